// tb_wormhole_chain: latency of a packet crossing several wormhole switches.
//
// HOPS switches are chained west to east: the east output link of switch k
// (flits, valid, per-lane ready) drives the west input link of switch k+1. A
// 5-flit packet (head naming east, three body flits, tail) is written into
// the west input of switch 0, and the east output of every switch is watched.
// With no other traffic, the head spends two cycles in each switch (lane
// allocation, then switch traversal) and the other flits follow one cycle
// apart. So the tail leaves switch k (counting from 1) 2*k + 4 cycles after
// the head was written into switch 0: the packet length in flits plus about
// one flit time per switch, against (k+1) packet times for store-and-forward.
// The test checks that cycle count at every hop, and that each hop delivers
// the packet's flits in order, intact and on one lane. A second packet on
// the other lane, sent right behind the first, must follow with no gap.
module tb_wormhole_chain;
  import noc_alloc_pkg::*;
  localparam int N = PORTS, VCS = NUM_VCS, Q = N * VCS, HOPS = 3, NF = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  flit_t [N-1:0] in_flit [HOPS], out_flit [HOPS];
  logic  [N-1:0] in_valid [HOPS], out_valid [HOPS];
  logic  [Q-1:0] in_ready [HOPS], out_ready [HOPS], ovc_busy [HOPS];
  flit_t src_flit;
  logic  src_valid;

  for (genvar k = 0; k < HOPS; k++) begin : g_hop
    flit_t link_flit;
    logic  link_valid;
    logic  [VCS-1:0] link_ready;
    wormhole_switch u_sw (
      .clk, .rst_n,
      .in_flit (in_flit[k]), .in_valid (in_valid[k]), .in_ready (in_ready[k]),
      .out_flit (out_flit[k]), .out_valid (out_valid[k]), .out_ready (out_ready[k]),
      .ovc_busy (ovc_busy[k])
    );
    // West input: the source, or the east link of the previous switch.
    if (k == 0) begin : g_src
      assign link_flit  = src_flit;
      assign link_valid = src_valid;
    end else begin : g_link
      assign link_flit  = out_flit[k-1][PORT_EAST];
      assign link_valid = out_valid[k-1][PORT_EAST];
    end
    // East output lanes: ready from the next switch, always ready at the end.
    if (k < HOPS - 1) begin : g_next
      assign link_ready = in_ready[k+1][PORT_WEST*VCS +: VCS];
    end else begin : g_sink
      assign link_ready = '1;
    end
    always_comb begin
      in_flit[k]  = '0;
      in_valid[k] = '0;
      in_flit[k][PORT_WEST]  = link_flit;
      in_valid[k][PORT_WEST] = link_valid;
      out_ready[k] = '1;
      out_ready[k][PORT_EAST*VCS +: VCS] = link_ready;
    end
  end
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t pkt_flit(int pkt, int n);
    flit_t f;
    f.vc    = VC_W'(pkt);
    f.ftype = (n == 0) ? FLIT_HEAD : (n == NF - 1) ? FLIT_TAIL : FLIT_BODY;
    f.data  = (n == 0) ? FLIT_DATA_W'(PORT_EAST) : FLIT_DATA_W'(16'h1000 * (pkt + 1) + n);
    return f;
  endfunction

  // Monitors: flits seen on each hop's east output, per packet.
  int seen[HOPS][2];
  int tail_cycle[HOPS][2];
  int lane_of[HOPS][2];
  int cycle = 0;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    for (int k = 0; k < HOPS; k++)
      if (out_valid[k][PORT_EAST]) begin
        automatic flit_t f = out_flit[k][PORT_EAST];
        automatic int pkt = (f.ftype == FLIT_HEAD) ? ((seen[k][0] == 0) ? 0 : 1)
                                                   : int'(f.data[15:12]) - 1;
        automatic flit_t want = pkt_flit(pkt, seen[k][pkt]);
        checks++;
        if (pkt < 0 || pkt > 1 || f.ftype != want.ftype || f.data != want.data
            || (seen[k][pkt] > 0 && int'(f.vc) != lane_of[k][pkt])) begin
          failures++; $display("hop %0d: unexpected flit %h", k + 1, f);
        end else begin
          if (seen[k][pkt] == 0) lane_of[k][pkt] = int'(f.vc);
          seen[k][pkt]++;
          if (f.ftype == FLIT_TAIL) tail_cycle[k][pkt] = cycle;
        end
      end
  end

  initial begin
    int head_cycle;
    for (int k = 0; k < HOPS; k++)
      for (int p = 0; p < 2; p++) begin seen[k][p] = 0; tail_cycle[k][p] = -1; lane_of[k][p] = -1; end
    src_valid = 0; src_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Two packets, one per lane, back to back from the source.
    head_cycle = cycle;
    for (int p = 0; p < 2; p++)
      for (int n = 0; n < NF; n++) begin
        src_valid = 1; src_flit = pkt_flit(p, n);
        #1;
        while (!in_ready[0][PORT_WEST*VCS + p]) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    src_valid = 0;
    repeat (40) @(negedge clk);
    for (int k = 0; k < HOPS; k++) begin
      automatic int lat = tail_cycle[k][0] - head_cycle;
      checks++;
      if (seen[k][0] != NF || seen[k][1] != NF) begin
        failures++; $display("hop %0d: %0d and %0d flits arrived", k + 1, seen[k][0], seen[k][1]);
      end
      checks++;
      if (lat != 2 * (k + 1) + NF - 1) begin
        failures++; $display("hop %0d: tail after %0d cycles, expected %0d", k + 1, lat, 2 * (k + 1) + NF - 1);
      end
      checks++;
      if (tail_cycle[k][1] - tail_cycle[k][0] != NF) begin
        failures++; $display("hop %0d: second tail %0d cycles after the first", k + 1, tail_cycle[k][1] - tail_cycle[k][0]);
      end
      $display("hop %0d: tail after %0d cycles (store-and-forward would take %0d)", k + 1, lat, NF * (k + 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
