// wormhole_allocator: virtual-channel and switch allocation for wormhole flow
// control with VCS lanes per physical channel.
//
// Every input port has VCS lanes (input VCs), indexed q = port * VCS + lane,
// and every output port has VCS output VCs, one per lane of the receiver.
// Before a head flit may move it needs three things: the channel state of an
// output VC at its destination (a free output VC), a flit buffer at the
// receiver (that lane's out_ready) and the channel for one flit (the output
// port in that cycle). Allocation runs in two steps:
//   VC allocation     - every cycle, each output port hands its lowest free
//                       output VC to one of the head flits waiting for it,
//                       chosen round-robin among all input VCs. The input VC
//                       then owns that output VC until its tail flit leaves.
//   switch allocation - every cycle, each input port picks round-robin one of
//                       its lanes that owns an output VC, has a flit and whose
//                       receiver lane is ready; each output port then picks
//                       round-robin one of the input ports that chose it.
// Head, body and tail flits all go through switch allocation; body and tail
// flits only compete for the receiver buffer and the physical channel. The
// tail flit frees the output VC. Because packets on different lanes
// interleave flit by flit on one physical channel, a packet that is blocked
// downstream does not stop the other lane from using the channel.
// Preemption against deadlock: a head flit that has waited TIMEOUT cycles at
// the front of its input VC without moving (no output VC free, or its
// receiver lane never ready) is preempted. Its packet is discarded at this
// input, flit by flit up to and including the tail (in_drop), and an output
// VC it held is freed. No flit of a discarded packet has left the switch, so
// the links downstream stay consistent. TIMEOUT = 0 turns preemption off.
//
// Interface, per input VC q: in_valid (a flit waits), in_head / in_tail (its
// type), in_dest (destination port, used with in_head). out_ready[j*VCS+w]
// is the ready/acknowledge of lane w of the receiver on output j.
// conn[i][j]: input port i sends to output port j in this cycle; in_pop[q]:
// the flit of input VC q moves; out_vc[j]: the lane the flit on output j uses;
// in_drop[q]: the flit of input VC q is discarded (popped, not forwarded).
// ovc_busy / ovc_owner show which input VC owns each output VC.
// Timing: VC allocation is registered, so a head flit can move at the
// earliest one cycle after it reached the front of its queue; switch
// allocation is combinational from the inputs and the registered state.
// rst_n is active-low synchronous and frees every VC. The three resources of
// a head flit, the lanes sharing a channel, the body flits' reduced needs and
// preempting and discarding packets follow the wormhole description; the
// two-step allocation, the round-robin arbiters, the timeout that triggers a
// preemption and the valid/ready handshake are this design's own choice.
module wormhole_allocator #(
  parameter int N   = 4,
  parameter int VCS = 2,
  parameter int TIMEOUT = 256,
  localparam int Q   = N * VCS,
  localparam int IW  = (N > 1) ? $clog2(N) : 1,
  localparam int VW  = (VCS > 1) ? $clog2(VCS) : 1,
  localparam int QW  = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [Q-1:0]        in_valid,
  input  logic [Q-1:0]        in_head,
  input  logic [Q-1:0]        in_tail,
  input  logic [Q-1:0][IW-1:0] in_dest,
  input  logic [Q-1:0]        out_ready,
  output logic [N-1:0][N-1:0] conn,
  output logic [Q-1:0]        in_pop,
  output logic [Q-1:0]        in_drop,
  output logic [N-1:0][VW-1:0] out_vc,
  output logic [Q-1:0]        ovc_busy,
  output logic [Q-1:0][QW-1:0] ovc_owner
);

  // Route state of every input VC.
  logic [Q-1:0]         routed;      // owns an output VC
  logic [Q-1:0][IW-1:0] route_port;
  logic [Q-1:0][VW-1:0] route_vc;

  // Preemption state of every input VC.
  localparam int TW = $clog2(TIMEOUT + 2);
  logic [Q-1:0]         dropping;    // discarding a preempted packet
  logic [Q-1:0][TW-1:0] wait_cnt;    // cycles the head has waited
  logic [Q-1:0]         head_waits;

  always_comb
    for (int q = 0; q < Q; q++) begin
      in_drop[q]    = dropping[q] && in_valid[q];
      head_waits[q] = in_valid[q] && in_head[q] && !dropping[q] && !in_pop[q];
    end

  // ---------------- VC allocation ----------------
  logic [N-1:0][Q-1:0]  va_req;      // [j][q]
  logic [N-1:0][Q-1:0]  va_gnt;
  logic [N-1:0][QW-1:0] va_idx;
  logic [N-1:0]         va_any;
  logic [N-1:0][VW-1:0] free_vc;     // lowest free output VC of port j
  logic [N-1:0]         has_free;
  logic [QW-1:0]        va_ptr [N];

  always_comb begin
    for (int j = 0; j < N; j++) begin
      has_free[j] = 1'b0;
      free_vc[j]  = '0;
      for (int w = VCS - 1; w >= 0; w--)
        if (!ovc_busy[j*VCS + w]) begin
          has_free[j] = 1'b1;
          free_vc[j]  = VW'(w);
        end
      for (int q = 0; q < Q; q++)
        va_req[j][q] = in_valid[q] && in_head[q] && !routed[q] && !dropping[q]
                       && (int'(in_dest[q]) == j) && has_free[j];
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_va
    rr_arbiter #(.N(Q)) u_va_arb (
      .req (va_req[j]), .ptr (va_ptr[j]),
      .gnt (va_gnt[j]), .gnt_idx (va_idx[j]), .any (va_any[j])
    );
  end

  // ---------------- switch allocation ----------------
  logic [N-1:0][VCS-1:0] sa_req;     // [i][v]: lane v of input i can send
  logic [N-1:0][VCS-1:0] sa_pick;
  logic [N-1:0][VW-1:0]  sa_vc;
  logic [N-1:0]          sa_any;
  logic [VW-1:0]         sa_in_ptr [N];
  logic [N-1:0][N-1:0]   so_req;     // [j][i]
  logic [N-1:0][N-1:0]   so_gnt;
  logic [N-1:0][IW-1:0]  so_idx;
  logic [N-1:0]          so_any;
  logic [IW-1:0]         sa_out_ptr [N];
  logic [N-1:0][IW-1:0]  pick_port;  // output wanted by input i's pick

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int v = 0; v < VCS; v++)
        sa_req[i][v] = routed[i*VCS + v] && in_valid[i*VCS + v]
                       && !dropping[i*VCS + v]
                       && out_ready[int'(route_port[i*VCS + v]) * VCS
                                    + int'(route_vc[i*VCS + v])];
  end

  for (genvar i = 0; i < N; i++) begin : g_sa_in
    rr_arbiter #(.N(VCS)) u_sa_in_arb (
      .req (sa_req[i]), .ptr (sa_in_ptr[i]),
      .gnt (sa_pick[i]), .gnt_idx (sa_vc[i]), .any (sa_any[i])
    );
    assign pick_port[i] = route_port[i*VCS + int'(sa_vc[i])];
  end

  always_comb
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        so_req[j][i] = sa_any[i] && (int'(pick_port[i]) == j);

  for (genvar j = 0; j < N; j++) begin : g_sa_out
    rr_arbiter #(.N(N)) u_sa_out_arb (
      .req (so_req[j]), .ptr (sa_out_ptr[j]),
      .gnt (so_gnt[j]), .gnt_idx (so_idx[j]), .any (so_any[j])
    );
  end

  always_comb begin
    conn   = '0;
    in_pop = '0;
    out_vc = '0;
    for (int j = 0; j < N; j++)
      if (so_any[j]) begin
        conn[so_idx[j]][j] = 1'b1;
        in_pop[int'(so_idx[j]) * VCS + int'(sa_vc[so_idx[j]])] = 1'b1;
        out_vc[j] = route_vc[int'(so_idx[j]) * VCS + int'(sa_vc[so_idx[j]])];
      end
  end

  function automatic logic [QW-1:0] next_q(logic [QW-1:0] x);
    return (int'(x) == Q - 1) ? '0 : x + 1'b1;
  endfunction
  function automatic logic [VW-1:0] next_v(logic [VW-1:0] x);
    return (int'(x) == VCS - 1) ? '0 : x + 1'b1;
  endfunction
  function automatic logic [IW-1:0] next_p(logic [IW-1:0] x);
    return (int'(x) == N - 1) ? '0 : x + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      routed     <= '0;
      route_port <= '0;
      route_vc   <= '0;
      ovc_busy   <= '0;
      ovc_owner  <= '0;
      dropping   <= '0;
      wait_cnt   <= '0;
      for (int j = 0; j < N; j++) begin
        va_ptr[j]     <= '0;
        sa_in_ptr[j]  <= '0;
        sa_out_ptr[j] <= '0;
      end
    end else begin
      // Tail flits leaving free their VCs.
      for (int q = 0; q < Q; q++)
        if (in_pop[q] && in_tail[q]) begin
          routed[q] <= 1'b0;
          ovc_busy[int'(route_port[q]) * VCS + int'(route_vc[q])] <= 1'b0;
        end
      // Preemption: count how long each head waits; on timeout start
      // discarding. The head's drop frees its VC; the tail's drop ends it.
      for (int q = 0; q < Q; q++) begin
        if (head_waits[q] && TIMEOUT > 0) begin
          if (int'(wait_cnt[q]) == TIMEOUT - 1) begin
            dropping[q] <= 1'b1;
            wait_cnt[q] <= '0;
          end else
            wait_cnt[q] <= wait_cnt[q] + 1'b1;
        end else
          wait_cnt[q] <= '0;
        if (in_drop[q] && in_head[q] && routed[q]) begin
          routed[q] <= 1'b0;
          ovc_busy[int'(route_port[q]) * VCS + int'(route_vc[q])] <= 1'b0;
        end
        if (in_drop[q] && in_tail[q])
          dropping[q] <= 1'b0;
      end
      // New VC grants (a head flit is never popped in its grant cycle).
      for (int j = 0; j < N; j++)
        if (va_any[j]) begin
          routed[va_idx[j]]              <= 1'b1;
          route_port[va_idx[j]]          <= IW'(j);
          route_vc[va_idx[j]]            <= free_vc[j];
          ovc_busy[j*VCS + int'(free_vc[j])]  <= 1'b1;
          ovc_owner[j*VCS + int'(free_vc[j])] <= va_idx[j];
          va_ptr[j]                      <= next_q(va_idx[j]);
        end
      // Switch allocation pointers move past the winners.
      for (int j = 0; j < N; j++)
        if (so_any[j]) begin
          sa_out_ptr[j]         <= next_p(so_idx[j]);
          sa_in_ptr[so_idx[j]]  <= next_v(sa_vc[so_idx[j]]);
        end
    end
  end

  // A connection matrix never has two bits in one row or one column.
  for (genvar k = 0; k < N; k++) begin : g_chk
    logic [N-1:0] col;
    always_comb for (int i = 0; i < N; i++) col[i] = conn[i][k];
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(conn[k]))
      else $error("wormhole_allocator: input %0d connected twice", k);
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col))
      else $error("wormhole_allocator: output %0d connected twice", k);
  end

endmodule
