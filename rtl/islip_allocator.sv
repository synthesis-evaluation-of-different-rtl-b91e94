// islip_allocator: iterative round-robin (iSLIP) matching of N inputs to N
// outputs.
//
// Each iteration runs the three iSLIP steps on the inputs and outputs that are
// still unmatched:
//   request - every unmatched input requests every unmatched output it has
//             traffic for;
//   grant   - every output picks one requesting input with its round-robin
//             grant arbiter, starting at its grant pointer;
//   accept  - every input picks one of the grants it received with its
//             round-robin accept arbiter, starting at its accept pointer.
// Accepted pairs join the match and drop out of later iterations. Only
// accepts made in the first iteration move the pointers: the accept pointer of
// the input goes to one past the output it accepted and the grant pointer of
// that output to one past the input, so the newest connection becomes the
// lowest-priority one in the next cell time. Unaccepted grants leave the
// pointers alone, so an output keeps granting the same input until it is
// taken, and no request starves.
//
// The ITERATIONS iterations are unrolled in one clock cycle, each with its own
// 2N programmable priority encoders (rr_arbiter). The algorithm follows the
// iSLIP description; the single-cycle unrolling, the registered grant output
// and the default of N iterations (enough for the match to converge) are this
// design's choices.
//
// Interface: req[i][j] = input i has a flit for output j. grant[i][j] is the
// match, at most one bit per row and per column.
// Timing: req is sampled on a rising clock edge and grant is valid from that
// edge until the next one (one cycle latency, one new match every cycle).
// rst_n is an active-low synchronous reset that clears grant and all pointers.
module islip_allocator #(
  parameter int N          = 4,
  parameter int ITERATIONS = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][N-1:0] req,
  output logic [N-1:0][N-1:0] grant
);

  logic [IW-1:0] grant_ptr  [N];   // per output, over inputs
  logic [IW-1:0] accept_ptr [N];   // per input, over outputs

  // match[k] is the matching built by iterations 0 .. k-1.
  logic [N-1:0][N-1:0] match [ITERATIONS+1];
  // Accept decisions of the first iteration, used for the pointer update.
  logic [N-1:0][N-1:0] first_accept;

  assign match[0] = '0;

  for (genvar k = 0; k < ITERATIONS; k++) begin : g_iter
    logic [N-1:0]        in_free, out_free;
    logic [N-1:0][N-1:0] out_req;   // [j][i]: request seen by output j
    logic [N-1:0][N-1:0] out_gnt;   // [j][i]: output j grants input i
    logic [N-1:0][N-1:0] in_gnt;    // [i][j]: input i got a grant from j
    logic [N-1:0][N-1:0] in_acc;    // [i][j]: input i accepts output j

    always_comb begin
      for (int i = 0; i < N; i++) begin
        in_free[i]  = ~|match[k][i];
        out_free[i] = 1'b1;
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (match[k][i][j]) out_free[j] = 1'b0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          out_req[j][i] = req[i][j] & in_free[i] & out_free[j];
    end

    for (genvar j = 0; j < N; j++) begin : g_grant
      logic [IW-1:0] unused_idx;
      logic          unused_any;
      rr_arbiter #(.N(N)) u_grant_arb (
        .req     (out_req[j]),
        .ptr     (grant_ptr[j]),
        .gnt     (out_gnt[j]),
        .gnt_idx (unused_idx),
        .any     (unused_any)
      );
    end

    always_comb
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          in_gnt[i][j] = out_gnt[j][i];

    for (genvar i = 0; i < N; i++) begin : g_accept
      logic [IW-1:0] unused_idx;
      logic          unused_any;
      rr_arbiter #(.N(N)) u_accept_arb (
        .req     (in_gnt[i]),
        .ptr     (accept_ptr[i]),
        .gnt     (in_acc[i]),
        .gnt_idx (unused_idx),
        .any     (unused_any)
      );
    end

    assign match[k+1] = match[k] | in_acc;
    if (k == 0) begin : g_first
      assign first_accept = in_acc;
    end
  end

  function automatic logic [IW-1:0] next_idx(int idx);
    return (idx == N - 1) ? '0 : IW'(idx + 1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant <= '0;
      for (int i = 0; i < N; i++) begin
        grant_ptr[i]  <= '0;
        accept_ptr[i] <= '0;
      end
    end else begin
      grant <= match[ITERATIONS];
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (first_accept[i][j]) begin
            accept_ptr[i] <= next_idx(j);
            grant_ptr[j]  <= next_idx(i);
          end
    end
  end

endmodule
