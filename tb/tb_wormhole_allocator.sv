// tb_wormhole_allocator: checks virtual-channel and switch allocation with a
// packet stream on each of the eight input lanes (4 ports x 2 lanes) and
// randomly stalling receiver lanes.
//
// The testbench keeps its own record of which packet owns each output lane
// and checks every cycle:
//  * at most one flit per input port and per output port, in_pop agreeing
//    with conn, and a flit moving only when its receiver lane is ready;
//  * a head flit goes to its destination port, on an output lane no other
//    packet owns;
//  * body and tail flits follow on exactly the port and lane of their head,
//    so packets never mix within a lane;
//  * the tail frees the lane.
// All packets must be delivered. Two mechanisms must be seen: flits of two
// packets interleaved on one output port over different lanes, and a lane of
// an input port moving while the other lane of that port is blocked by its
// receiver. No flit may be discarded in this phase.
// A second, directed phase checks preemption: with every receiver lane held
// off, head flits from four input lanes wait - three of them hold output
// lanes, one waits for a lane. Each must be discarded exactly TIMEOUT cycles
// after it reached the front, together with the rest of its packet, and the
// output lanes must be freed. A packet sent afterwards must pass normally.
module tb_wormhole_allocator;
  localparam int N = 4, VCS = 2, Q = N * VCS, PKTS = 120, TO = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [Q-1:0] in_valid, in_head, in_tail, in_pop, in_drop, out_ready, ovc_busy;
  logic [Q-1:0][1:0] in_dest;
  logic [Q-1:0][2:0] ovc_owner;
  logic [N-1:0][N-1:0] conn;
  logic [N-1:0] out_vc;

  wormhole_allocator #(.N(N), .VCS(VCS), .TIMEOUT(TO)) dut (
    .clk, .rst_n, .in_valid, .in_head, .in_tail, .in_dest,
    .out_ready, .conn, .in_pop, .in_drop, .out_vc, .ovc_busy, .ovc_owner);
  always #5 clk = ~clk;

  int pk_dest[Q][PKTS], pk_len[Q][PKTS];
  int cur_pkt[Q], cur_flit[Q];
  int owner[N][VCS];          // model: input lane owning each output lane, -1 free
  int route_p[Q], route_v[Q];
  int last_lane[N];           // lane used on each output in the previous cycle
  int delivered = 0, n_interleave = 0, n_bypass = 0, n_preempt = 0;
  logic [N-1:0][N-1:0] conn_seen;
  logic [Q-1:0] pop_seen;
  logic [N-1:0] vc_seen;
  int stall_lane = -1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d packets delivered", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic present();
    for (int q = 0; q < Q; q++) begin
      in_head[q] = 0; in_tail[q] = 0; in_dest[q] = '0;
      if (cur_pkt[q] < PKTS) begin
        in_head[q] = (cur_flit[q] == 0);
        in_tail[q] = (cur_flit[q] == pk_len[q][cur_pkt[q]] - 1);
        in_dest[q] = 2'(pk_dest[q][cur_pkt[q]]);
      end
    end
  endtask

  // Directed preemption phase; all lanes are free when it starts.
  task automatic preempt_phase();
    localparam int NW = 4;
    int wq[NW] = '{0, 2, 3, 6};
    int wd[NW] = '{1, 2, 2, 2};
    int t;
    logic [Q-1:0] waiting = '0;
    @(negedge clk);
    in_valid = '0; in_head = '0; in_tail = '0; in_dest = '0; out_ready = '0;
    for (int k = 0; k < NW; k++) begin
      in_valid[wq[k]] = 1; in_head[wq[k]] = 1; in_dest[wq[k]] = 2'(wd[k]); waiting[wq[k]] = 1;
    end
    for (t = 0; t < TO; t++) begin
      #1;
      checks++;
      if (in_drop != '0 || in_pop != '0) begin failures++; $display("preempt: early drop/pop at %0d", t); end
      @(negedge clk);
    end
    #1;
    checks++;
    if (in_drop != waiting) begin failures++; $display("preempt: drops %b, expected %b after %0d cycles", in_drop, waiting, TO); end
    checks++;
    if (ovc_busy != 8'b0011_0100) begin failures++; $display("preempt: lanes held %b before the drop", ovc_busy); end
    // The head is discarded; present a body flit, then the tail.
    @(negedge clk);
    in_head = '0;
    #1;
    checks++;
    if (ovc_busy != '0) begin failures++; $display("preempt: lanes still held %b", ovc_busy); end
    checks++;
    if (in_drop != waiting || in_pop != '0) begin failures++; $display("preempt: body not discarded"); end
    n_preempt += $countones(in_drop);
    @(negedge clk);
    in_tail = waiting;
    #1;
    checks++;
    if (in_drop != waiting) begin failures++; $display("preempt: tail not discarded"); end
    // A new packet on lane 0 to port 1 now passes normally.
    @(negedge clk);
    in_valid = '0; in_tail = '0; out_ready = '1;
    in_valid[0] = 1; in_head[0] = 1; in_dest[0] = 2'd1;
    t = 0;
    #1;
    while (!in_pop[0] && t < 5) begin
      checks++;
      if (in_drop != '0) begin failures++; $display("preempt: new packet discarded"); end
      @(negedge clk); t++; #1;
    end
    checks++;
    if (t != 1 || in_drop != '0) begin failures++; $display("preempt: new head moved after %0d cycles", t); end
    @(negedge clk);
    in_head[0] = 0; in_tail[0] = 1;
    #1;
    checks++;
    if (!in_pop[0]) begin failures++; $display("preempt: new tail did not move"); end
    @(negedge clk);
    in_valid = '0;
  endtask

  initial begin
    for (int q = 0; q < Q; q++) begin
      cur_pkt[q] = 0; cur_flit[q] = 0; route_p[q] = -1; route_v[q] = -1;
      for (int p = 0; p < PKTS; p++) begin
        pk_dest[q][p] = (q / VCS + 1 + int'($urandom % (N - 1))) % N;
        pk_len[q][p]  = 2 + int'($urandom % 5);
      end
    end
    for (int j = 0; j < N; j++) begin last_lane[j] = -1; for (int w = 0; w < VCS; w++) owner[j][w] = -1; end
    in_valid = '0; out_ready = '0;
    present();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; delivered < Q * PKTS; c++) begin
      @(negedge clk);
      for (int q = 0; q < Q; q++) in_valid[q] = (cur_pkt[q] < PKTS) && ($urandom % 8 != 0);
      // One receiver lane at a time is held off for a stretch of cycles.
      if (c % 40 == 0) stall_lane = int'($urandom % Q);
      for (int k = 0; k < Q; k++) out_ready[k] = (k != stall_lane || c % 40 > 25) && ($urandom % 5 != 0);
      present();
      #1;
      for (int k = 0; k < N; k++) begin
        automatic int rc = 0, cc = 0, pc = 0;
        for (int x = 0; x < N; x++) begin rc += int'(conn[k][x]); cc += int'(conn[x][k]); end
        for (int v = 0; v < VCS; v++) pc += int'(in_pop[k*VCS + v]);
        checks++;
        if (rc > 1 || cc > 1 || pc != rc) begin failures++; $display("cycle %0d: bad connection or pop at %0d", c, k); end
      end
      for (int q = 0; q < Q; q++) if (in_pop[q]) begin
        automatic int i = q / VCS, j = -1, w;
        for (int x = 0; x < N; x++) if (conn[i][x]) j = x;
        w = (j >= 0) ? int'(out_vc[j]) : 0;
        checks++;
        if (j < 0 || !in_valid[q] || !out_ready[j*VCS + w]) begin failures++; $display("cycle %0d: lane %0d moved without valid/ready", c, q); end
        else if (in_head[q]) begin
          if (j != int'(in_dest[q]) || owner[j][w] != -1) begin failures++; $display("cycle %0d: bad head move %0d->%0d.%0d owner %0d", c, q, j, w, owner[j][w]); end
        end else if (route_p[q] != j || route_v[q] != w) begin
          failures++; $display("cycle %0d: lane %0d flit to %0d.%0d, packet holds %0d.%0d", c, q, j, w, route_p[q], route_v[q]);
        end
      end
      checks++;
      if (in_drop != '0) begin failures++; $display("cycle %0d: flit discarded under normal traffic", c); end
      // Mechanisms.
      for (int j = 0; j < N; j++) begin
        automatic int lane = -1;
        for (int i = 0; i < N; i++) if (conn[i][j]) lane = int'(out_vc[j]);
        if (lane >= 0 && last_lane[j] >= 0 && lane != last_lane[j]
            && owner[j][0] != -1 && owner[j][1] != -1) n_interleave++;
        last_lane[j] = lane;
      end
      for (int i = 0; i < N; i++)
        for (int v = 0; v < VCS; v++) begin
          automatic int q = i * VCS + v, o = i * VCS + (1 - v);
          if (in_pop[q] && in_valid[o] && route_p[o] >= 0 && !out_ready[route_p[o]*VCS + route_v[o]]) n_bypass++;
        end
      conn_seen = conn; pop_seen = in_pop; vc_seen = out_vc;
      @(posedge clk);
      for (int q = 0; q < Q; q++) if (pop_seen[q]) begin
        automatic int i = q / VCS, j = 0;
        for (int x = 0; x < N; x++) if (conn_seen[i][x]) j = x;
        if (in_head[q]) begin owner[j][int'(vc_seen[j])] = q; route_p[q] = j; route_v[q] = int'(vc_seen[j]); end
        if (in_tail[q]) begin owner[route_p[q]][route_v[q]] = -1; route_p[q] = -1; route_v[q] = -1; delivered++; end
        cur_flit[q]++;
        if (cur_flit[q] == pk_len[q][cur_pkt[q]]) begin cur_pkt[q]++; cur_flit[q] = 0; end
      end
    end
    preempt_phase();
    checks++;
    if (n_interleave == 0 || n_bypass == 0) begin failures++; $display("interleave %0d / bypass %0d never seen", n_interleave, n_bypass); end
    $display("delivered %0d packets, %0d lane interleaves, %0d blocked-lane bypasses, %0d preempted", delivered, n_interleave, n_bypass, n_preempt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
