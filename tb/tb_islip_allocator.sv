// tb_islip_allocator: checks the iSLIP allocator against a behavioural model.
//
// The model keeps its own grant and accept pointers and runs the
// request/grant/accept iterations with plain loops, moving pointers only for
// first-iteration accepts. Random request matrices (with a U-turn-free and a
// dense mode) are applied for several thousand cycles; each grant is compared
// with the model one cycle after its request, which also checks the
// one-cycle latency. A single-iteration instance is checked the same way,
// and the full instance's matchings are also checked to be maximal.
module tb_islip_allocator;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req, grant, grant1;

  islip_allocator #(.N(N), .ITERATIONS(N)) dut  (.clk, .rst_n, .req, .grant);
  islip_allocator #(.N(N), .ITERATIONS(1)) dut1 (.clk, .rst_n, .req, .grant(grant1));

  always #5 clk = ~clk;

  typedef struct { int gp[N]; int ap[N]; } ptrs_t;
  ptrs_t m_full, m_one;

  function automatic logic [N-1:0][N-1:0] islip_model(logic [N-1:0][N-1:0] r, int iters, ref ptrs_t p);
    logic [N-1:0][N-1:0] m;
    bit in_used[N], out_used[N];
    int gsel[N];
    ptrs_t np;
    m = '0; np = p;
    for (int x = 0; x < N; x++) begin in_used[x] = 0; out_used[x] = 0; end
    for (int it = 0; it < iters; it++) begin
      // grant
      for (int j = 0; j < N; j++) begin
        gsel[j] = -1;
        if (!out_used[j])
          for (int k = 0; k < N && gsel[j] < 0; k++) begin
            int i = (p.gp[j] + k) % N;
            if (r[i][j] && !in_used[i]) gsel[j] = i;
          end
      end
      // accept
      for (int i = 0; i < N; i++) begin
        int a = -1;
        if (!in_used[i])
          for (int k = 0; k < N && a < 0; k++) begin
            int j = (p.ap[i] + k) % N;
            if (gsel[j] == i) a = j;
          end
        if (a >= 0) begin
          m[i][a] = 1;
          if (it == 0) begin np.ap[i] = (a + 1) % N; np.gp[a] = (i + 1) % N; end
        end
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (m[i][j]) begin in_used[i] = 1; out_used[j] = 1; end
    end
    p = np;
    return m;
  endfunction

  function automatic bit is_maximal(logic [N-1:0][N-1:0] r, logic [N-1:0][N-1:0] g);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (r[i][j] && g[i] == 0) begin
          bit col_free = 1;
          for (int x = 0; x < N; x++) if (g[x][j]) col_free = 0;
          if (col_free) return 0;
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

  logic [N-1:0][N-1:0] exp_full, exp_one, prev_req;
  int multi_iter = 0;

  initial begin
    for (int x = 0; x < N; x++) begin m_full.gp[x] = 0; m_full.ap[x] = 0; m_one.gp[x] = 0; m_one.ap[x] = 0; end
    req = '0; exp_full = '0; exp_one = '0; prev_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Fixed start: north and south both want east -> north first, then south.
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      checks++;
      if (grant !== exp_full) begin
        failures++;
        if (failures < 10) $display("cycle %0d: req %h grant %h expected %h", c, prev_req, grant, exp_full);
      end
      checks++;
      if (grant1 !== exp_one) begin
        failures++;
        if (failures < 10) $display("cycle %0d (1 iter): req %h grant %h expected %h", c, prev_req, grant1, exp_one);
      end
      checks++;
      if (!is_maximal(prev_req, grant)) begin failures++; $display("cycle %0d: not maximal", c); end
      if (grant != grant1) multi_iter++;
      if (c < 4) req = 16'h0044;                  // inputs 0 and 1 request output 2
      else if (c % 3 == 0) req = 16'($urandom) | 16'($urandom);
      else req = 16'($urandom) & ~16'h8421;   // no U-turns
      prev_req = req;
      exp_full = islip_model(req, N, m_full);
      exp_one  = islip_model(req, 1, m_one);
    end
    checks++;
    if (multi_iter == 0) begin failures++; $display("later iterations never added a match"); end
    $display("matches improved by later iterations in %0d cycles", multi_iter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
