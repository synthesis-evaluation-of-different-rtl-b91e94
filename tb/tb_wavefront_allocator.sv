// tb_wavefront_allocator: checks the wavefront allocator against a model of
// the wrapped token array.
//
// The model injects row and column tokens on the priority diagonal and lets
// them travel cell by cell (row tokens rightwards, column tokens downwards,
// wrapping at the edges) by relaxation until nothing changes, granting every
// requesting cell that holds both tokens. This is the array as drawn, not the
// diagonal-ordered evaluation used in the RTL. The priority diagonal is
// expected to advance by one each cycle. Grants are checked one cycle after
// the request and must form a maximal matching.
module tb_wavefront_allocator;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req, grant;
  logic [1:0] prio;

  wavefront_allocator #(.N(N)) dut (.clk, .rst_n, .req, .grant, .prio);

  always #5 clk = ~clk;

  function automatic logic [N-1:0][N-1:0] wf_model(logic [N-1:0][N-1:0] r, int p);
    bit xin[N][N], yin[N][N], g[N][N];
    logic [N-1:0][N-1:0] res;
    bit changed = 1;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin xin[i][j] = 0; yin[i][j] = 0; g[i][j] = 0; end
    while (changed) begin
      changed = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          bit pri = ((i + j) % N == p);
          int jl = (j + N - 1) % N, iu = (i + N - 1) % N;
          bit nx = pri | (xin[i][jl] & ~g[i][jl]);
          bit ny = pri | (yin[iu][j] & ~g[iu][j]);
          bit ng = r[i][j] & nx & ny;
          if (nx != xin[i][j] || ny != yin[i][j] || ng != g[i][j]) changed = 1;
          xin[i][j] = nx; yin[i][j] = ny; g[i][j] = ng;
        end
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) res[i][j] = g[i][j];
    return res;
  endfunction

  function automatic bit valid_maximal(logic [N-1:0][N-1:0] r, logic [N-1:0][N-1:0] g);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int rc = 0, cc = 0;
        if (g[i][j] && !r[i][j]) return 0;
        for (int x = 0; x < N; x++) begin rc += int'(g[i][x]); cc += int'(g[x][j]); end
        if (rc > 1 || cc > 1) return 0;
        if (r[i][j] && rc == 0 && cc == 0) return 0;
      end
    return 1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0][N-1:0] exp_g, prev_req;
  int exp_p, model_p;

  initial begin
    req = '0; exp_g = '0; prev_req = '0; model_p = 1; exp_p = 0;  // diagonal 0 is used by the first edge after reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      checks++;
      if (grant !== exp_g || (c > 0 && int'(prio) != exp_p)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: req %h prio %0d grant %h expected %h (prio %0d)", c, prev_req, prio, grant, exp_g, exp_p);
      end
      checks++;
      if (!valid_maximal(prev_req, grant)) begin failures++; if (failures < 10) $display("cycle %0d: not a maximal matching", c); end
      if (c < 8) req = 16'h0044;
      else if (c % 2 == 0) req = 16'($urandom) | 16'($urandom);
      else req = 16'($urandom) & ~16'h8421;
      prev_req = req;
      exp_g = wf_model(req, model_p);
      exp_p = model_p;
      model_p = (model_p + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
