// wormhole_switch: N-port wormhole switch with VCS virtual-channel lanes per
// link, built from flit buffers, the wormhole allocator and a crossbar.
//
// Every input port has one flit_fifo per lane; an arriving flit goes into the
// queue its vc field names. The flit at the front of each queue is decoded
// (type, and destination port from the low data bits of a head flit) and
// offered to the wormhole_allocator. The allocator gives each packet an
// output lane from its head flit to its tail flit and, each cycle, chooses at
// most one flit per input port and per output port. The chosen lane of every
// input port is read out, its vc field is rewritten to the output lane, and
// the crossbar steers it to its output. Flits of packets on different lanes
// interleave on a link, so a packet stalled downstream in one lane leaves the
// link free for the other lane. A packet whose head cannot move for TIMEOUT
// cycles is preempted and discarded at its input buffer (see
// wormhole_allocator).
//
// Every link has a valid/ready handshake per lane: in_ready[i*VCS+v] is high
// when lane v of input i can take a flit, and a flit moves on a rising edge
// when its valid and its lane's ready are both high. This plays the part of
// the request/acknowledge exchange between neighbouring nodes.
//
// Interface: in_flit / in_valid per input port with in_ready per input lane;
// out_flit / out_valid per output port with out_ready per output lane.
// Timing: a head flit written on edge t is given an output lane on edge t+1
// and leaves on edge t+2 at the earliest; the rest of the packet follows one
// flit per cycle when unopposed. rst_n is active-low synchronous. The
// structure (buffers, lanes, allocator, switching fabric) follows the router
// description; buffer depth and handshake are this design's own choice.
module wormhole_switch
  import noc_alloc_pkg::*;
#(
  parameter int N     = PORTS,
  parameter int DEPTH = 4,
  parameter int TIMEOUT = 256,
  localparam int VCS = NUM_VCS,
  localparam int Q   = N * VCS,
  localparam int IW  = (N > 1) ? $clog2(N) : 1,
  localparam int QW  = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t [N-1:0]     in_flit,
  input  logic  [N-1:0]     in_valid,
  output logic  [Q-1:0]     in_ready,
  output flit_t [N-1:0]     out_flit,
  output logic  [N-1:0]     out_valid,
  input  logic  [Q-1:0]     out_ready,
  output logic  [Q-1:0]     ovc_busy
);

  flit_t [Q-1:0]          q_flit;
  logic  [Q-1:0]          q_valid, q_pop, q_drop, q_head, q_tail;
  logic  [Q-1:0][IW-1:0]  q_dest;
  logic  [N-1:0][N-1:0]   conn;
  logic  [N-1:0][VC_W-1:0] out_vc;
  logic  [Q-1:0][QW-1:0]  ovc_owner;
  flit_t [N-1:0]          sel_flit;    // flit chosen at each input port
  flit_t [N-1:0]          xbar_flit;

  for (genvar i = 0; i < N; i++) begin : g_port
    for (genvar v = 0; v < VCS; v++) begin : g_lane
      logic [$clog2(DEPTH):0] unused_level;
      flit_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_buf (
        .clk, .rst_n,
        .in_valid  (in_valid[i] && (int'(in_flit[i].vc) == v)),
        .in_ready  (in_ready[i*VCS + v]),
        .in_data   (in_flit[i]),
        .out_valid (q_valid[i*VCS + v]),
        .out_ready (q_pop[i*VCS + v] || q_drop[i*VCS + v]),
        .out_data  (q_flit[i*VCS + v]),
        .level     (unused_level)
      );
      assign q_head[i*VCS + v] = (q_flit[i*VCS + v].ftype == FLIT_HEAD);
      assign q_tail[i*VCS + v] = (q_flit[i*VCS + v].ftype == FLIT_TAIL);
      assign q_dest[i*VCS + v] = q_flit[i*VCS + v].data[IW-1:0];
    end

    // The popped lane of this input port feeds the crossbar.
    always_comb begin
      sel_flit[i] = '0;
      for (int v = 0; v < VCS; v++)
        if (q_pop[i*VCS + v]) sel_flit[i] = q_flit[i*VCS + v];
    end
  end

  wormhole_allocator #(.N(N), .VCS(VCS), .TIMEOUT(TIMEOUT)) u_alloc (
    .clk, .rst_n,
    .in_valid (q_valid), .in_head (q_head), .in_tail (q_tail), .in_dest (q_dest),
    .out_ready, .conn, .in_pop (q_pop), .in_drop (q_drop), .out_vc, .ovc_busy, .ovc_owner
  );

  crossbar #(.N(N), .W(FLIT_W)) u_xbar (
    .in_data (sel_flit), .conn, .out_data (xbar_flit), .out_valid
  );

  // The flit leaves on the lane its packet was given at this output.
  always_comb
    for (int j = 0; j < N; j++) begin
      out_flit[j]    = xbar_flit[j];
      out_flit[j].vc = out_vc[j];
    end

endmodule
