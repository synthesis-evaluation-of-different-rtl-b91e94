// wavefront_allocator: N x N wavefront allocator with a rotating priority
// diagonal.
//
// The allocator is a square array of cells, cell (i,j) standing for the
// request of input i for output j. Diagonal group d holds the cells with
// (i + j) mod N = d, exactly one cell of every row and every column. Each
// cycle the priority diagonal receives a row token and a column token in every
// cell. A cell grants its request when it holds both tokens and then absorbs
// them; a cell that does not use a token passes the row token to its right
// neighbour (i, j+1) and the column token to the cell below (i+1, j), both on
// the next diagonal, wrapping around the array edges. The tokens thus sweep
// through the array as a wavefront starting at the priority diagonal and the
// result is a maximal matching. The priority diagonal advances by one every
// clock cycle so that every cell in turn gets the first claim.
//
// A wrapped wavefront array is a ring of combinational paths. Here the N
// diagonals are evaluated in wavefront order, starting at the priority one,
// which gives the same grants as the wrapped array with no combinational loop.
// Requests the array does not need (non-square use, U-turns) are simply tied
// low by the caller, as dummy rows and columns would be. The cell behaviour
// and rotation follow the wavefront description; the loop-free evaluation,
// the registered grant and the rotate-every-cycle schedule are this design's.
//
// Interface: req[i][j] = input i wants output j; grant[i][j] = the match.
// prio is the diagonal that had priority for the grant now shown.
// Timing: req sampled on a rising edge, grant valid after it (one cycle).
// rst_n is active-low synchronous and resets grant and the diagonal to 0.
module wavefront_allocator #(
  parameter int N = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][N-1:0] req,
  output logic [N-1:0][N-1:0] grant,
  output logic [IW-1:0]       prio
);

  logic [IW-1:0]       prio_diag;   // diagonal with priority this cycle
  logic [N-1:0][N-1:0] wf_grant;

  // One wavefront cell: grant when both tokens are present, else pass them.
  function automatic logic [2:0] wf_cell(logic request, logic xin, logic yin);
    logic g;
    g = request & xin & yin;
    return {g, xin & ~g, yin & ~g};   // {grant, xout, yout}
  endfunction

  always_comb begin
    logic [N-1:0] row_tok;   // row token still travelling in row i
    logic [N-1:0] col_tok;   // column token still travelling in column j
    row_tok  = '1;
    col_tok  = '1;
    wf_grant = '0;
    for (int k = 0; k < N; k++) begin
      for (int i = 0; i < N; i++) begin
        int j;
        logic [2:0] c;
        j = (int'(prio_diag) + k - i + 2 * N) % N;
        c = wf_cell(req[i][j], row_tok[i], col_tok[j]);
        wf_grant[i][j] = c[2];
        row_tok[i]     = c[1];
        col_tok[j]     = c[0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant     <= '0;
      prio      <= '0;
      prio_diag <= '0;
    end else begin
      grant     <= wf_grant;
      prio      <= prio_diag;
      prio_diag <= (int'(prio_diag) == N - 1) ? '0 : prio_diag + 1'b1;
    end
  end

endmodule
