// lonely_output_allocator: separable input-first allocator with a request
// count stage in front of the input arbiters.
//
// A plain separable allocator lets every input arbiter pick independently, so
// they tend to pile onto the same popular output while outputs with few
// requests (lonely outputs) go unused. This allocator runs three stages in one
// cycle:
//   count  - for every output j, the number of inputs requesting it;
//   input  - every input keeps only its requests for the outputs with the
//            lowest count among those it wants, and breaks a tie with a
//            round-robin arbiter at its own pointer;
//   output - every output arbitrates round-robin among the inputs that chose
//            it.
// When output j grants input i, the output pointer moves to one past i and
// the input pointer of i to one past j, so priority rotates among equals.
//
// The count stage and the preference for low counts follow the lonely-output
// description. The round-robin tie-breaking, the pointer rule and the
// registered grant are this design's own choices.
//
// Interface: req[i][j] = input i wants output j; grant[i][j] = the match.
// req_count[j] is the count computed for the request now being allocated.
// Timing: req sampled on a rising edge, grant valid after it (one cycle
// latency). rst_n is active-low synchronous.
module lonely_output_allocator #(
  parameter int N = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1,
  localparam int CW = $clog2(N + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][N-1:0] req,
  output logic [N-1:0][N-1:0] grant,
  output logic [N-1:0][CW-1:0] req_count
);

  logic [IW-1:0]        in_ptr  [N];
  logic [IW-1:0]        out_ptr [N];
  logic [N-1:0][CW-1:0] count;
  logic [N-1:0][N-1:0]  lonely_req;   // [i][j]: request kept by the count stage
  logic [N-1:0][N-1:0]  in_pick;      // [i][j]: input i chose output j
  logic [N-1:0][N-1:0]  out_req;      // [j][i]
  logic [N-1:0][N-1:0]  out_gnt;      // [j][i]
  logic [N-1:0][N-1:0]  match;        // [i][j]

  // Count stage and low-count filter.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      count[j] = '0;
      for (int i = 0; i < N; i++)
        count[j] = count[j] + CW'(req[i][j]);
    end
    for (int i = 0; i < N; i++) begin
      logic [CW-1:0] lowest;
      lowest = '1;
      for (int j = 0; j < N; j++)
        if (req[i][j] && count[j] < lowest) lowest = count[j];
      for (int j = 0; j < N; j++)
        lonely_req[i][j] = req[i][j] && (count[j] == lowest);
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_in
    logic [IW-1:0] unused_idx;
    logic          unused_any;
    rr_arbiter #(.N(N)) u_in_arb (
      .req (lonely_req[i]), .ptr (in_ptr[i]),
      .gnt (in_pick[i]), .gnt_idx (unused_idx), .any (unused_any)
    );
  end

  always_comb
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        out_req[j][i] = in_pick[i][j];

  for (genvar j = 0; j < N; j++) begin : g_out
    logic [IW-1:0] unused_idx;
    logic          unused_any;
    rr_arbiter #(.N(N)) u_out_arb (
      .req (out_req[j]), .ptr (out_ptr[j]),
      .gnt (out_gnt[j]), .gnt_idx (unused_idx), .any (unused_any)
    );
  end

  always_comb
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        match[i][j] = out_gnt[j][i];

  function automatic logic [IW-1:0] next_idx(int idx);
    return (idx == N - 1) ? '0 : IW'(idx + 1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant     <= '0;
      req_count <= '0;
      for (int i = 0; i < N; i++) begin
        in_ptr[i]  <= '0;
        out_ptr[i] <= '0;
      end
    end else begin
      grant     <= match;
      req_count <= count;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (match[i][j]) begin
            in_ptr[i]  <= next_idx(j);
            out_ptr[j] <= next_idx(i);
          end
    end
  end

endmodule
