// tb_noc_alloc_top: end-to-end test of the whole core at its default sizes.
//
// Allocators: random 12-bit request vectors (light and heavy load) go to the
// three allocators at once. One cycle later every grant vector must be a
// legal matching of that request (granted bits requested, at most one grant
// per input and per output); the iSLIP and wavefront matchings must be
// maximal; every lonely-output grant must be for one of the least-requested
// outputs its input asked for.
// Wormhole path: each port injects packets of four 16-bit words to random
// other ports, on a random lane, through its flitizer; every receiver lane
// stalls at random. On every output lane the flits must form whole packets
// (head naming the output, four words, tail), unmixed, and every packet must
// arrive exactly once with the payload that was sent.
// Each mechanism of the design is counted and must occur at least once:
// output contention, iSLIP matches completed by later iterations, iSLIP
// pointer rotation, wavefront priority rotation, a lonely output winning,
// a head flit waiting because every lane of its output is held, receiver
// stalls, packet back-pressure at the injection ports, two packets
// interleaved on one link over different lanes, a lane moving past the
// blocked other lane of its port, and a preemption. No flit may be discarded
// in the random phase. The preemption is forced at the end: with both lanes
// of the east receiver held off, a north-to-east packet must be discarded
// in the switch once its head has waited the preemption timeout, nothing of
// it may reach the east link, and a packet sent afterwards must arrive.
module tb_noc_alloc_top;
  import noc_alloc_pkg::*;
  localparam int N = PORTS, PKT_W = 64, NW = PKT_W / FLIT_DATA_W, PKTS = 100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  compact_t req_in, islip_grt, wavefront_grt, lonely_grt;
  localparam int VCS = NUM_VCS, Q = N * VCS, TO = 256;   // TO: the top's default timeout
  logic  [N-1:0] pkt_valid, pkt_ready, out_valid;
  logic  [Q-1:0] out_ready;
  port_e [N-1:0] pkt_dest;
  logic  [N-1:0][VC_W-1:0] pkt_vc;
  logic  [N-1:0][PKT_W-1:0] pkt_payload;
  flit_t [N-1:0] out_flit;

  noc_alloc_top dut (.clk, .rst_n, .req_in, .islip_grt, .wavefront_grt, .lonely_grt,
                     .pkt_valid, .pkt_ready, .pkt_dest, .pkt_vc, .pkt_payload,
                     .out_flit, .out_valid, .out_ready);
  always #5 clk = ~clk;

  // Mechanism counters.
  int n_contention = 0, n_islip_iter = 0, n_islip_rotate = 0, n_wf_rotate = 0;
  int n_lonely = 0, n_blocked_head = 0, n_stall = 0, n_backpressure = 0;
  int n_interleave = 0, n_bypass = 0, n_preempt = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit legal(matrix_t r, matrix_t g);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int rc = 0, cc = 0;
        if (g[i][j] && !r[i][j]) return 0;
        for (int x = 0; x < N; x++) begin rc += int'(g[i][x]); cc += int'(g[x][j]); end
        if (rc > 1 || cc > 1) return 0;
      end
    return 1;
  endfunction

  function automatic bit maximal(matrix_t r, matrix_t g);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (r[i][j] && g[i] == 0) begin
          bit col_free = 1;
          for (int x = 0; x < N; x++) if (g[x][j]) col_free = 0;
          if (col_free) return 0;
        end
    return 1;
  endfunction

  // ---------------- allocator side ----------------
  initial begin
    matrix_t r, prev_r, prev2_r, gi, gw, gl, prev_gi;
    int cnt[N];
    logic [1:0] prev_prio;
    prev_r = '0; prev2_r = '0; prev_gi = '0; prev_prio = '0;
    req_in = '0;
    repeat (3) @(negedge clk);
    wait (rst_n);
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // Grants now visible belong to prev_r.
      gi = compact_to_matrix(islip_grt);
      gw = compact_to_matrix(wavefront_grt);
      gl = compact_to_matrix(lonely_grt);
      checks += 5;
      if (!legal(prev_r, gi) || !maximal(prev_r, gi)) begin failures++; $display("cycle %0d: bad iSLIP matching %h for %h", c, gi, prev_r); end
      if (!legal(prev_r, gw) || !maximal(prev_r, gw)) begin failures++; $display("cycle %0d: bad wavefront matching %h for %h", c, gw, prev_r); end
      if (!legal(prev_r, gl)) begin failures++; $display("cycle %0d: bad lonely matching %h for %h", c, gl, prev_r); end
      if (compact_to_matrix(matrix_to_compact(gi)) != gi) begin failures++; $display("U-turn grant"); end
      for (int j = 0; j < N; j++) begin
        cnt[j] = 0;
        for (int i = 0; i < N; i++) cnt[j] += int'(prev_r[i][j]);
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) if (gl[i][j]) begin
          automatic bit lonelier_exists = 0, busier_exists = 0;
          for (int x = 0; x < N; x++) if (prev_r[i][x]) begin
            if (cnt[x] < cnt[j]) lonelier_exists = 1;
            if (cnt[x] > cnt[j]) busier_exists = 1;
          end
          if (lonelier_exists) begin failures++; $display("cycle %0d: lonely allocator skipped a lonelier output", c); end
          if (busier_exists) n_lonely++;
        end
      if (c > 0 && prev_r == prev2_r && prev_r != 0 && gi != prev_gi) n_islip_rotate++;
      if (c > 1 && dut.u_wavefront.prio != prev_prio) n_wf_rotate++;
      prev_prio = dut.u_wavefront.prio;
      prev_gi = gi;
      checks++;
      if (gi != compact_to_matrix(islip_grt)) failures++;
      // New request.
      if ((c / 16) % 4 == 0) req_in = matrix_to_compact(16'h2244 | 16'h0001);  // steady, contended
      else if ((c / 16) % 4 == 1) req_in = compact_t'($urandom) & compact_t'($urandom);
      else req_in = compact_t'($urandom) | compact_t'($urandom);
      r = compact_to_matrix(req_in);
      for (int j = 0; j < N; j++) begin
        automatic int k = 0;
        for (int i = 0; i < N; i++) k += int'(r[i][j]);
        if (k > 1) begin n_contention++; break; end
      end
      prev2_r = prev_r;
      prev_r = r;
      #1;
      // iSLIP: later iterations add matches the first one missed.
      if (dut.u_islip.match[ISLIP_ITERS_CHECK] != dut.u_islip.first_accept) n_islip_iter++;
    end
    alloc_done = 1;
  end
  localparam int ISLIP_ITERS_CHECK = N;
  bit alloc_done = 0;

  // ---------------- wormhole side ----------------
  int sent_pkts[N], rx_pkts = 0;
  logic [PKT_W-1:0] sent_payload[N][PKTS];
  int sent_dest[N][PKTS], sent_vc[N][PKTS];
  bit got[N][PKTS];
  bit rx_open[Q];                      // per output lane
  int rx_word[Q], rx_src[Q], rx_pkt[Q];
  int last_lane[N];
  logic [N-1:0] pr_seen, ov_seen;
  flit_t [N-1:0] of_seen;

  function automatic logic [PKT_W-1:0] make_payload(int src, int p);
    logic [PKT_W-1:0] v;
    for (int w = 0; w < NW; w++) v[w*FLIT_DATA_W +: FLIT_DATA_W] = {2'(src), 7'(p), 7'($urandom)};
    return v;
  endfunction

  // Forced preemption; the wormhole path is empty when this starts.
  task automatic preempt_phase();
    logic [PKT_W-1:0] pay = {16'h2b3c, 16'h4d5e, 16'h6f70, 16'h8192};
    int t = 0, t_head = -1, words = 0;
    bit done = 0;
    @(negedge clk);
    pkt_valid = '0; out_ready = '1; out_ready[PORT_EAST*VCS] = 0; out_ready[PORT_EAST*VCS + 1] = 0;
    pkt_valid[PORT_NORTH] = 1; pkt_dest[PORT_NORTH] = PORT_EAST; pkt_vc[PORT_NORTH] = '0;
    pkt_payload[PORT_NORTH] = {4{16'hdead}};
    #1;
    while (!pkt_ready[PORT_NORTH]) begin @(negedge clk); #1; end
    @(negedge clk);
    pkt_valid = '0;
    while (!done && t < 3 * TO) begin
      #1;
      checks++;
      if (out_valid[PORT_EAST]) begin failures++; $display("preempt: flit reached the east link"); end
      if (dut.u_switch.q_drop[0] && dut.u_switch.q_head[0]) begin n_preempt++; t_head = t; end
      if (dut.u_switch.q_drop[0] && dut.u_switch.q_tail[0]) done = 1;
      @(negedge clk); t++;
    end
    checks++;
    if (!done || t_head < TO || t_head > TO + 4) begin
      failures++; $display("preempt: head discarded after %0d cycles, whole packet %0d", t_head, done);
    end
    $display("preempted packet: head discarded %0d cycles after the packet was taken", t_head);
    checks++;
    if (dut.u_switch.ovc_busy != '0) begin failures++; $display("preempt: lanes still held"); end
    // The next packet to east passes.
    out_ready = '1;
    pkt_valid[PORT_NORTH] = 1; pkt_vc[PORT_NORTH] = 1'b1; pkt_payload[PORT_NORTH] = pay;
    #1;
    while (!pkt_ready[PORT_NORTH]) begin @(negedge clk); #1; end
    @(negedge clk);
    pkt_valid = '0;
    for (t = 0; t < 20 && words <= NW; t++) begin
      #1;
      if (out_valid[PORT_EAST]) begin
        automatic flit_t f = out_flit[PORT_EAST];
        checks++;
        if (words == 0 ? (f.ftype != FLIT_HEAD || int'(f.data) != int'(PORT_EAST))
                       : (f.data != pay[(words-1)*FLIT_DATA_W +: FLIT_DATA_W]
                          || (f.ftype == FLIT_TAIL) != (words == NW))) begin
          failures++; $display("after preemption: wrong flit %h", f);
        end
        words++;
      end
      @(negedge clk);
    end
    checks++;
    if (words != NW + 1) begin failures++; $display("after preemption: %0d flits arrived", words); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      sent_pkts[i] = 0; last_lane[i] = -1;
      for (int p = 0; p < PKTS; p++) begin
        sent_dest[i][p] = (i + 1 + int'($urandom % (N - 1))) % N;
        sent_vc[i][p] = int'($urandom % VCS);
        sent_payload[i][p] = make_payload(i, p);
        got[i][p] = 0;
      end
    end
    for (int q = 0; q < Q; q++) begin rx_open[q] = 0; rx_word[q] = 0; rx_src[q] = -1; rx_pkt[q] = 0; end
    pkt_valid = '0; out_ready = '0; pkt_dest = '{default: PORT_NORTH}; pkt_payload = '0; pkt_vc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (rx_pkts < N * PKTS) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        pkt_valid[i] = (sent_pkts[i] < PKTS) && ($urandom % 3 != 0);
        if (sent_pkts[i] < PKTS) begin
          pkt_dest[i]    = port_e'(sent_dest[i][sent_pkts[i]]);
          pkt_vc[i]      = VC_W'(sent_vc[i][sent_pkts[i]]);
          pkt_payload[i] = sent_payload[i][sent_pkts[i]];
        end
      end
      for (int k = 0; k < Q; k++) out_ready[k] = ($urandom % 4 != 0);
      #1;
      for (int i = 0; i < N; i++) if (pkt_valid[i] && !pkt_ready[i]) n_backpressure++;
      for (int q = 0; q < Q; q++) begin
        automatic int rp = int'(dut.u_switch.u_alloc.route_port[q]);
        automatic int rv = int'(dut.u_switch.u_alloc.route_vc[q]);
        automatic int o = (q / VCS) * VCS + (VCS - 1 - q % VCS);
        automatic int op = int'(dut.u_switch.u_alloc.route_port[o]);
        automatic int ov = int'(dut.u_switch.u_alloc.route_vc[o]);
        // Receiver stall: a lane with a route and a flit, receiver not ready.
        if (dut.u_switch.u_alloc.routed[q] && dut.u_switch.q_valid[q] && !out_ready[rp*VCS + rv]) n_stall++;
        // Head waiting because every lane of its output is held.
        if (dut.u_switch.q_valid[q] && dut.u_switch.q_head[q] && !dut.u_switch.u_alloc.routed[q]
            && !dut.u_switch.u_alloc.has_free[dut.u_switch.q_dest[q]]) n_blocked_head++;
        // This lane moves while the other lane of the port is blocked.
        if (dut.u_switch.q_pop[q] && dut.u_switch.u_alloc.routed[o] && dut.u_switch.q_valid[o]
            && !out_ready[op*VCS + ov]) n_bypass++;
      end
      for (int j = 0; j < N; j++) begin
        automatic int lane = out_valid[j] ? int'(out_flit[j].vc) : -1;
        if (lane >= 0 && last_lane[j] >= 0 && lane != last_lane[j]
            && dut.u_switch.ovc_busy[j*VCS] && dut.u_switch.ovc_busy[j*VCS + 1]) n_interleave++;
        last_lane[j] = lane;
      end
      checks++;
      if (dut.u_switch.q_drop != '0) begin failures++; $display("flit discarded under normal traffic"); end
      pr_seen = pkt_ready; ov_seen = out_valid; of_seen = out_flit;
      @(posedge clk);
      for (int i = 0; i < N; i++) if (pkt_valid[i] && pr_seen[i]) sent_pkts[i]++;
      for (int j = 0; j < N; j++) if (ov_seen[j]) begin
        automatic flit_t f = of_seen[j];
        automatic int ol = j * VCS + int'(f.vc);
        checks++;
        if (!out_ready[ol]) begin failures++; $display("out %0d: flit to a lane that is not ready", j); end
        if (f.ftype == FLIT_HEAD) begin
          if (rx_open[ol] || int'(f.data) != j) begin failures++; $display("out %0d: unexpected head %h", j, f); end
          rx_open[ol] = 1; rx_word[ol] = 0; rx_src[ol] = -1;
        end else if (!rx_open[ol]) begin
          failures++; $display("out %0d: flit outside a packet", j);
        end else begin
          automatic int s = int'(f.data[15:14]);
          automatic int p = int'(f.data[13:7]);
          if (rx_src[ol] < 0) begin
            rx_src[ol] = s; rx_pkt[ol] = p;
            if (p >= PKTS || got[s][p] || sent_dest[s][p] != j) begin failures++; $display("out %0d: unexpected packet %0d from %0d", j, p, s); end
          end
          if (s != rx_src[ol] || p != rx_pkt[ol] || p >= PKTS ||
              f.data != sent_payload[s][p][rx_word[ol]*FLIT_DATA_W +: FLIT_DATA_W] ||
              (f.ftype == FLIT_TAIL) != (rx_word[ol] == NW - 1)) begin
            failures++; $display("out %0d: flit %h wrong (src %0d pkt %0d word %0d)", j, f, s, p, rx_word[ol]);
          end
          rx_word[ol]++;
          if (f.ftype == FLIT_TAIL) begin
            rx_open[ol] = 0;
            rx_pkts++;
            if (p < PKTS) got[s][p] = 1;
          end
        end
      end
    end
    preempt_phase();
    wait (alloc_done);
    checks++;
    if (rx_pkts != N * PKTS) failures++;
    $display("packets delivered: %0d", rx_pkts);
    $display("mechanisms: contention=%0d islip_later_iter=%0d islip_rotate=%0d wavefront_rotate=%0d lonely_win=%0d blocked_head=%0d stall=%0d backpressure=%0d interleave=%0d bypass=%0d preempt=%0d",
             n_contention, n_islip_iter, n_islip_rotate, n_wf_rotate, n_lonely, n_blocked_head, n_stall, n_backpressure, n_interleave, n_bypass, n_preempt);
    checks += 11;
    if (n_preempt == 0)      begin failures++; $display("no preemption"); end
    if (n_interleave == 0)   begin failures++; $display("no lane interleaving"); end
    if (n_bypass == 0)       begin failures++; $display("no blocked-lane bypass"); end
    if (n_contention == 0)   begin failures++; $display("no output contention"); end
    if (n_islip_iter == 0)   begin failures++; $display("no later iSLIP iteration"); end
    if (n_islip_rotate == 0) begin failures++; $display("no iSLIP rotation"); end
    if (n_wf_rotate == 0)    begin failures++; $display("no wavefront rotation"); end
    if (n_lonely == 0)       begin failures++; $display("no lonely output win"); end
    if (n_blocked_head == 0) begin failures++; $display("no blocked head"); end
    if (n_stall == 0)        begin failures++; $display("no receiver stall"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
