// tb_flitizer: checks the packet-to-flit splitter.
//
// Random packets are offered with a random pkt_valid and taken by a sink
// with a random flit_ready. Every packet must come out as a head flit holding
// its destination, then PKT_W/16 words, all tagged with the packet's lane, in order, all body flits but the last,
// which is a tail. A second phase keeps both sides always ready and checks
// the rate: one packet of 1 + PKT_W/16 flits every 1 + PKT_W/16 cycles.
module tb_flitizer;
  import noc_alloc_pkg::*;
  localparam int PKT_W = 64, NW = PKT_W / FLIT_DATA_W;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pkt_valid, pkt_ready, flit_valid, flit_ready;
  port_e pkt_dest;
  logic [VC_W-1:0] pkt_vc;
  logic [PKT_W-1:0] pkt_payload;
  flit_t flit;

  flitizer #(.PKT_W(PKT_W)) dut (.clk, .rst_n, .pkt_valid, .pkt_ready, .pkt_dest, .pkt_vc, .pkt_payload,
                                 .flit_valid, .flit_ready, .flit);
  always #5 clk = ~clk;

  flit_t exp_q[$];
  int sent_pkts = 0, got_flits = 0, tails = 0;
  bit random_mode = 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sink and checker.
  always @(posedge clk) if (rst_n && flit_valid && flit_ready) begin
    checks++;
    got_flits++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected flit %h", flit); end
    else begin
      automatic flit_t e = exp_q.pop_front();
      if (flit != e) begin failures++; if (failures < 10) $display("flit %h expected %h", flit, e); end
      if (flit.ftype == FLIT_TAIL) tails++;
    end
  end

  task automatic offer(input bit rnd);
    port_e d = port_e'($urandom % 4);
    logic [PKT_W-1:0] p = {$urandom, $urandom};
    logic [VC_W-1:0] v = VC_W'($urandom);
    pkt_dest = d; pkt_payload = p; pkt_vc = v; pkt_valid = 1;
    @(posedge clk);
    while (!pkt_ready) @(posedge clk);
    // taken on this edge
    exp_q.push_back('{vc: v, ftype: FLIT_HEAD, data: FLIT_DATA_W'(d)});
    for (int w = 0; w < NW; w++)
      exp_q.push_back('{vc: v, ftype: (w == NW - 1) ? FLIT_TAIL : FLIT_BODY, data: p[w*FLIT_DATA_W +: FLIT_DATA_W]});
    sent_pkts++;
    #1;
    pkt_valid = 0;
    if (rnd) repeat ($urandom % 3) @(posedge clk);
    #1;
  endtask

  always @(negedge clk) flit_ready <= random_mode ? ($urandom % 3 != 0) : 1'b1;

  initial begin
    int t0, t1;
    pkt_valid = 0; pkt_dest = PORT_NORTH; pkt_payload = '0; pkt_vc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (300) offer(1);
    wait (exp_q.size() == 0);
    // Rate check: back-to-back packets with the sink always ready.
    @(negedge clk); random_mode = 0;
    @(negedge clk);
    t0 = got_flits;
    pkt_valid = 1;
    for (int k = 0; k < 20; k++) begin
      automatic port_e d = port_e'(k % 4);
      automatic logic [PKT_W-1:0] p = {$urandom, $urandom};
      pkt_dest = d; pkt_payload = p; pkt_vc = VC_W'(k);
      @(posedge clk);
      while (!pkt_ready) @(posedge clk);
      exp_q.push_back('{vc: VC_W'(k), ftype: FLIT_HEAD, data: FLIT_DATA_W'(d)});
      for (int w = 0; w < NW; w++)
        exp_q.push_back('{vc: VC_W'(k), ftype: (w == NW - 1) ? FLIT_TAIL : FLIT_BODY, data: p[w*FLIT_DATA_W +: FLIT_DATA_W]});
      #1;
    end
    pkt_valid = 0;
    t1 = got_flits;
    // 20 packets accepted; by now 19 full packets and nothing more have left.
    checks++;
    if (t1 - t0 != 19 * (NW + 1)) begin failures++; $display("rate: %0d flits in 20 packet slots, expected %0d", t1 - t0, 19 * (NW + 1)); end
    wait (exp_q.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (tails != 320) begin failures++; $display("tails %0d expected 320", tails); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
