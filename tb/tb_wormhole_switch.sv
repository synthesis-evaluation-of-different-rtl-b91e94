// tb_wormhole_switch: drives packets on both lanes of all four input links
// of the wormhole switch and checks what leaves the four output links.
//
// Sources: every input lane has its own list of packets (random other
// destination, 2 to 6 flits). Each cycle an input link sends one flit from
// one of its two lanes, choosing at random among the lanes that have a flit
// and whose in_ready is high, so packets of the two lanes interleave on the
// link. A body or tail flit carries {source port, source lane, packet number,
// word number}. Sinks: every output lane has a random ready. On every output
// lane the flits must form whole packets - a head naming that output port,
// then the words of one packet in order, ending with a tail - and per source
// lane and destination the packets must arrive in the order sent. Every
// packet must arrive and back-pressure must occur. A first packet sent alone
// checks the timing: one cycle for lane allocation, one through the switch,
// then one flit per cycle, so the tail of a 5-flit packet leaves 6 cycles
// after its head went in.
module tb_wormhole_switch;
  import noc_alloc_pkg::*;
  localparam int N = 4, VCS = NUM_VCS, Q = N * VCS, PKTS = 60;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  flit_t [N-1:0] in_flit, out_flit;
  logic [N-1:0] in_valid, out_valid;
  logic [Q-1:0] in_ready, out_ready, ovc_busy;

  wormhole_switch dut (.clk, .rst_n, .in_flit, .in_valid, .in_ready,
                       .out_flit, .out_valid, .out_ready, .ovc_busy);
  always #5 clk = ~clk;

  int pk_dest[Q][PKTS], pk_len[Q][PKTS];
  int cur_pkt[Q], cur_flit[Q];
  int next_rx[Q][N];                  // [source lane][dst]: next packet expected
  bit rx_open[Q];                     // per output lane
  int rx_src[Q], rx_pkt[Q], rx_word[Q];
  int sel[N];
  int received = 0, backpressure = 0;
  int cycle = 0, head_in_cycle = -100, tail_out_cycle = 0;
  logic [Q-1:0] rdy_seen;
  logic [N-1:0] ov_seen, iv_seen;
  flit_t [N-1:0] of_seen;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d packets received", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t make_flit(int q);
    flit_t f;
    int p = cur_pkt[q], w = cur_flit[q];
    f.vc = VC_W'(q % VCS);
    if (w == 0) begin
      f.ftype = FLIT_HEAD;
      f.data  = FLIT_DATA_W'(pk_dest[q][p]);
    end else begin
      f.ftype = (w == pk_len[q][p] - 1) ? FLIT_TAIL : FLIT_BODY;
      f.data  = {2'(q / VCS), 1'(q % VCS), 6'(p), 7'(w)};
    end
    return f;
  endfunction

  function automatic void skip_to_next(int q, int j);
    while (next_rx[q][j] < PKTS && pk_dest[q][next_rx[q][j]] != j) next_rx[q][j]++;
  endfunction

  initial begin
    for (int q = 0; q < Q; q++) begin
      cur_pkt[q] = 0; cur_flit[q] = 0; rx_open[q] = 0; rx_src[q] = -1; rx_pkt[q] = 0; rx_word[q] = 0;
      for (int p = 0; p < PKTS; p++) begin
        pk_dest[q][p] = (q / VCS + 1 + int'($urandom % (N - 1))) % N;
        pk_len[q][p]  = 2 + int'($urandom % 5);
      end
    end
    // Packet 0 of input lane 0: 5 flits to port 2, sent alone for the timing check.
    pk_dest[0][0] = 2; pk_len[0][0] = 5;
    for (int q = 0; q < Q; q++) for (int j = 0; j < N; j++) begin next_rx[q][j] = 0; skip_to_next(q, j); end
    in_valid = '0; out_ready = '0; in_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (received < Q * PKTS) begin
      @(negedge clk);
      cycle++;
      for (int j = 0; j < Q; j++) out_ready[j] = (cycle <= 12) || ($urandom % 3 != 0);
      #1;
      // Each source port picks a lane that has a flit and is ready.
      for (int i = 0; i < N; i++) begin
        automatic int first = int'($urandom % VCS);
        sel[i] = -1;
        for (int k = 0; k < VCS; k++) begin
          automatic int q = i * VCS + (first + k) % VCS;
          if (sel[i] < 0 && cur_pkt[q] < PKTS && in_ready[q] && ($urandom % 5 != 0)) sel[i] = q;
        end
        if (cycle <= 12) sel[i] = (i == 0 && cur_pkt[0] == 0 && in_ready[0]) ? 0 : -1;
        in_valid[i] = (sel[i] >= 0);
        in_flit[i]  = (sel[i] >= 0) ? make_flit(sel[i]) : '0;
        for (int k = 0; k < VCS; k++)
          if (cur_pkt[i*VCS + k] < PKTS && !in_ready[i*VCS + k]) backpressure++;
      end
      #1;
      if (cycle <= 12 && sel[0] == 0 && cur_flit[0] == 0) head_in_cycle = cycle;
      if (cycle <= 12 && out_valid[2] && out_flit[2].ftype == FLIT_TAIL) tail_out_cycle = cycle;
      ov_seen = out_valid; of_seen = out_flit; iv_seen = in_valid;
      @(posedge clk);
      // Sources advance.
      for (int i = 0; i < N; i++) if (iv_seen[i]) begin
        automatic int q = sel[i];
        cur_flit[q]++;
        if (cur_flit[q] == pk_len[q][cur_pkt[q]]) begin cur_pkt[q]++; cur_flit[q] = 0; end
      end
      // Sinks check, per output lane.
      for (int j = 0; j < N; j++) if (ov_seen[j]) begin
        automatic flit_t f = of_seen[j];
        automatic int ol = j * VCS + int'(f.vc);
        checks++;
        if (!out_ready[ol]) begin failures++; $display("out %0d lane %0d: flit sent to a lane that is not ready", j, f.vc); end
        if (f.ftype == FLIT_HEAD) begin
          if (rx_open[ol] || int'(f.data) != j) begin failures++; $display("out %0d: unexpected head %h", j, f); end
          rx_open[ol] = 1; rx_src[ol] = -1; rx_word[ol] = 1;
        end else begin
          automatic int s = int'(f.data[15:14]) * VCS + int'(f.data[13]);
          automatic int p = int'(f.data[12:7]), w = int'(f.data[6:0]);
          if (!rx_open[ol]) begin failures++; $display("out %0d: flit %h outside a packet", j, f); end
          else begin
            if (rx_src[ol] < 0) begin
              rx_src[ol] = s; rx_pkt[ol] = p;
              if (p != next_rx[s][j]) begin failures++; $display("out %0d: packet %0d from lane %0d, expected %0d", j, p, s, next_rx[s][j]); end
            end
            if (s != rx_src[ol] || p != rx_pkt[ol] || w != rx_word[ol]) begin
              failures++; $display("out %0d: mixed or lost flit %h", j, f);
            end
            rx_word[ol]++;
            if (f.ftype == FLIT_TAIL) begin
              checks++;
              if (p >= PKTS || w != pk_len[s][p] - 1) begin failures++; $display("out %0d: tail at word %0d", j, w); end
              next_rx[s][j]++;
              skip_to_next(s, j);
              rx_open[ol] = 0;
              received++;
            end
          end
        end
      end
    end
    checks++;
    if (tail_out_cycle - head_in_cycle != 6) begin
      failures++; $display("latency: head in at %0d, tail out at %0d, expected 6 cycles", head_in_cycle, tail_out_cycle);
    end
    checks++;
    if (backpressure == 0) begin failures++; $display("input buffers never filled"); end
    $display("received %0d packets, %0d back-pressure cycles", received, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
