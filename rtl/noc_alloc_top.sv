// noc_alloc_top: four-port router allocation and wormhole switching core.
//
// Two parts sit side by side.
//  * Switch allocators. The same 12-bit request vector, three requests for
//    each of the north, south, east and west inputs, drives an iSLIP
//    allocator, a wavefront allocator and a lonely-output allocator at once,
//    so their matchings can be compared on identical traffic. The request
//    vector is expanded to a 4 x 4 matrix with the U-turn diagonal tied low,
//    which also squares the array for the wavefront allocator, and each
//    matching is folded back to 12 grant bits.
//  * Wormhole path. Each port has a flitizer that cuts packets into head,
//    body and tail flits on the lane (virtual channel) the packet names, and
//    feeds the wormhole switch, whose outputs are the four outgoing links.
//    out_ready has one bit per lane of each outgoing link: out_ready[j*NUM_VCS
//    + w] is high when lane w of the receiver on port j can take a flit.
//    A packet whose head flit cannot move for PREEMPT_TIMEOUT cycles is
//    preempted and discarded inside the switch (0 disables this).
//
// Compact vector layout: req_in[i][k] is input i asking for output
// other_port(i,k), i.e. the k-th of the other ports counted upwards (port
// order north, south, east, west). The grant vectors use the same layout.
// Timing: grants appear one cycle after the request is sampled. Packets enter
// at pkt_* and their flits leave at out_* one flit per cycle per link.
// rst_n is active-low synchronous. Which allocators are present and the four
// directions follow the evaluation set-up; putting them in one top is this
// design's choice.
module noc_alloc_top
  import noc_alloc_pkg::*;
#(
  parameter int ISLIP_ITERATIONS = PORTS,
  parameter int PKT_W            = 64,
  parameter int BUF_DEPTH        = 4,
  parameter int PREEMPT_TIMEOUT  = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // Allocators
  input  compact_t                    req_in,
  output compact_t                    islip_grt,
  output compact_t                    wavefront_grt,
  output compact_t                    lonely_grt,
  // Wormhole path
  input  logic     [PORTS-1:0]        pkt_valid,
  output logic     [PORTS-1:0]        pkt_ready,
  input  port_e    [PORTS-1:0]        pkt_dest,
  input  logic     [PORTS-1:0][VC_W-1:0] pkt_vc,
  input  logic     [PORTS-1:0][PKT_W-1:0] pkt_payload,
  output flit_t    [PORTS-1:0]        out_flit,
  output logic     [PORTS-1:0]        out_valid,
  input  logic     [PORTS*NUM_VCS-1:0] out_ready
);

  matrix_t req_m, islip_m, wf_m, lonely_m;
  logic [PORT_W-1:0]                 wf_prio;
  logic [PORTS-1:0][$clog2(PORTS+1)-1:0] lonely_count;

  assign req_m = compact_to_matrix(req_in);

  islip_allocator #(.N(PORTS), .ITERATIONS(ISLIP_ITERATIONS)) u_islip (
    .clk, .rst_n, .req (req_m), .grant (islip_m)
  );

  wavefront_allocator #(.N(PORTS)) u_wavefront (
    .clk, .rst_n, .req (req_m), .grant (wf_m), .prio (wf_prio)
  );

  lonely_output_allocator #(.N(PORTS)) u_lonely (
    .clk, .rst_n, .req (req_m), .grant (lonely_m), .req_count (lonely_count)
  );

  assign islip_grt     = matrix_to_compact(islip_m);
  assign wavefront_grt = matrix_to_compact(wf_m);
  assign lonely_grt    = matrix_to_compact(lonely_m);

  flit_t [PORTS-1:0] sw_in_flit;
  logic  [PORTS-1:0] sw_in_valid, sw_flit_ready;
  logic  [PORTS*NUM_VCS-1:0] sw_in_ready, sw_ovc_busy;

  for (genvar p = 0; p < PORTS; p++) begin : g_port
    flitizer #(.PKT_W(PKT_W)) u_flitizer (
      .clk, .rst_n,
      .pkt_valid (pkt_valid[p]), .pkt_ready (pkt_ready[p]),
      .pkt_dest (pkt_dest[p]), .pkt_vc (pkt_vc[p]), .pkt_payload (pkt_payload[p]),
      .flit_valid (sw_in_valid[p]), .flit_ready (sw_flit_ready[p]),
      .flit (sw_in_flit[p])
    );
    // The flitizer sees the ready of the lane its packet uses.
    assign sw_flit_ready[p] = sw_in_ready[p*NUM_VCS + int'(sw_in_flit[p].vc)];
  end

  wormhole_switch #(.N(PORTS), .DEPTH(BUF_DEPTH), .TIMEOUT(PREEMPT_TIMEOUT)) u_switch (
    .clk, .rst_n,
    .in_flit (sw_in_flit), .in_valid (sw_in_valid), .in_ready (sw_in_ready),
    .out_flit, .out_valid, .out_ready, .ovc_busy (sw_ovc_busy)
  );

endmodule
