// tb_fig5_scenario: the two-input contention scenario, run on the full core.
//
// North and south request the same output (east) every cycle while east and
// west stay idle, and both inject packets bound for east into the wormhole
// path. Expected behaviour, worked out from the algorithms:
//  * every allocator grants east to exactly one of the two each cycle;
//  * iSLIP and the lonely-output allocator alternate strictly between north
//    and south (their round-robin pointers move past the winner);
//  * the wavefront allocator, whose diagonal rotates over four positions
//    while the two cells sit on diagonals 2 (north) and 3 (south), grants
//    north three cycles out of four and south one;
//  * in the wormhole path north sends on lane 0 and south on lane 1, so the
//    east link carries both packet streams at once: while both lanes are in
//    use the flits alternate between the lanes every cycle, and each lane
//    delivers whole packets of its own source.
module tb_fig5_scenario;
  import noc_alloc_pkg::*;
  localparam int N = PORTS, PKT_W = 64, NW = PKT_W / FLIT_DATA_W, PKTS = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  compact_t req_in, islip_grt, wavefront_grt, lonely_grt;
  logic  [N-1:0] pkt_valid, pkt_ready, out_valid;
  logic  [N*NUM_VCS-1:0] out_ready;
  port_e [N-1:0] pkt_dest;
  logic  [N-1:0][VC_W-1:0] pkt_vc;
  logic  [N-1:0][PKT_W-1:0] pkt_payload;
  flit_t [N-1:0] out_flit;

  noc_alloc_top dut (.clk, .rst_n, .req_in, .islip_grt, .wavefront_grt, .lonely_grt,
                     .pkt_valid, .pkt_ready, .pkt_dest, .pkt_vc, .pkt_payload,
                     .out_flit, .out_valid, .out_ready);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Which of north (0) / south (1) got east, -1 if not exactly one.
  function automatic int winner(compact_t g);
    matrix_t m = compact_to_matrix(g);
    if (m == 16'h0004) return 0;   // north -> east
    if (m == 16'h0040) return 1;   // south -> east
    return -1;
  endfunction

  int n_wf[2] = '{0, 0};
  int east_src[$];
  bit alloc_done = 0;

  initial begin
    automatic int last_i = -1, last_l = -1;
    req_in = '0;
    req_in[PORT_NORTH] = 3'b010;   // north's second other port is east
    req_in[PORT_SOUTH] = 3'b010;   // south's second other port is east
    repeat (3) @(negedge clk);
    wait (rst_n);
    @(negedge clk);
    for (int c = 0; c < 64; c++) begin
      int wi, ww, wl;
      @(negedge clk);
      wi = winner(islip_grt); ww = winner(wavefront_grt); wl = winner(lonely_grt);
      checks += 3;
      if (wi < 0 || ww < 0 || wl < 0) begin failures++; $display("cycle %0d: grants %h %h %h", c, islip_grt, wavefront_grt, lonely_grt); end
      if (c > 0) begin
        checks += 2;
        if (wi == last_i) begin failures++; $display("cycle %0d: iSLIP did not alternate", c); end
        if (wl == last_l) begin failures++; $display("cycle %0d: lonely allocator did not alternate", c); end
      end
      last_i = wi; last_l = wl;
      if (ww >= 0) n_wf[ww]++;
    end
    checks++;
    if (n_wf[0] != 48 || n_wf[1] != 16) begin failures++; $display("wavefront shares %0d/%0d, expected 48/16", n_wf[0], n_wf[1]); end
    $display("wavefront grants: north %0d south %0d", n_wf[0], n_wf[1]);
    alloc_done = 1;
  end

  initial begin
    automatic int sent[2] = '{0, 0};
    automatic int words[2] = '{0, 0};
    automatic bit open_pkt[2] = '{0, 0};
    automatic int last_lane = -1, alternations = 0, both_busy = 0;
    pkt_valid = '0; pkt_dest = '{default: PORT_EAST}; pkt_payload = '0; out_ready = '0;
    pkt_vc = '0; pkt_vc[PORT_SOUTH] = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    out_ready = '1;
    while (east_src.size() < 2 * PKTS) begin
      logic [N-1:0] pr; logic ov; flit_t f; bit both;
      @(negedge clk);
      for (int s = 0; s < 2; s++) begin
        pkt_valid[s] = (sent[s] < PKTS);
        for (int w = 0; w < NW; w++) pkt_payload[s][w*FLIT_DATA_W +: FLIT_DATA_W] = 16'(s * 256 + w);
      end
      #1;
      pr = pkt_ready; ov = out_valid[PORT_EAST]; f = out_flit[PORT_EAST];
      both = dut.u_switch.ovc_busy[PORT_EAST*NUM_VCS] && dut.u_switch.ovc_busy[PORT_EAST*NUM_VCS + 1];
      checks++;
      if (out_valid[PORT_NORTH] || out_valid[PORT_SOUTH] || out_valid[PORT_WEST]) begin failures++; $display("flit on a wrong link"); end
      @(posedge clk);
      for (int s = 0; s < 2; s++) if (pkt_valid[s] && pr[s]) sent[s]++;
      if (ov) begin
        automatic int l = int'(f.vc);
        checks++;
        if (f.ftype == FLIT_HEAD) begin
          if (open_pkt[l] || f.data != 16'(PORT_EAST)) begin failures++; $display("bad head on lane %0d", l); end
          open_pkt[l] = 1; words[l] = 0;
        end else begin
          // Lane 0 carries north's packets (source 0), lane 1 south's.
          if (!open_pkt[l] || f.data != 16'(l * 256 + words[l]) || (f.ftype == FLIT_TAIL) != (words[l] == NW - 1)) begin
            failures++; $display("bad flit %h on lane %0d", f, l);
          end
          words[l]++;
          if (f.ftype == FLIT_TAIL) begin east_src.push_back(l); open_pkt[l] = 0; end
        end
        if (both && last_lane >= 0) begin
          both_busy++;
          checks++;
          if (l == last_lane) begin failures++; $display("lane %0d sent twice in a row while both lanes were busy", l); end
          else alternations++;
        end
        last_lane = l;
      end else last_lane = -1;
    end
    checks++;
    if (alternations < 20) begin failures++; $display("only %0d lane alternations", alternations); end
    wait (alloc_done);
    $display("east link delivered %0d packets, %0d lane alternations", east_src.size(), alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
