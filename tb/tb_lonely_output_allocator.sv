// tb_lonely_output_allocator: checks the lonely-output allocator against a
// behavioural model.
//
// The model counts the requests per output, lets every input keep the
// requests to its least-requested outputs, picks one of them round-robin from
// the input's pointer, then lets every output choose round-robin among the
// inputs that picked it; pointers move past the granted partner. Random
// request matrices are applied and each grant compared one cycle later. A
// directed case checks the point of the scheme: input 0 wants outputs 1 and
// 2, inputs 1 and 2 also want output 1, so input 0 must get the lonely
// output 2.
module tb_lonely_output_allocator;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req, grant;
  logic [N-1:0][2:0]   req_count;

  lonely_output_allocator #(.N(N)) dut (.clk, .rst_n, .req, .grant, .req_count);

  always #5 clk = ~clk;

  int inp[N], outp[N];

  function automatic logic [N-1:0][N-1:0] lo_model(logic [N-1:0][N-1:0] r, ref int cnt[N]);
    int pick[N];
    logic [N-1:0][N-1:0] m;
    m = '0;
    for (int j = 0; j < N; j++) begin
      cnt[j] = 0;
      for (int i = 0; i < N; i++) cnt[j] += int'(r[i][j]);
    end
    for (int i = 0; i < N; i++) begin
      int best = N + 1;
      pick[i] = -1;
      for (int j = 0; j < N; j++) if (r[i][j] && cnt[j] < best) best = cnt[j];
      for (int k = 0; k < N && pick[i] < 0; k++) begin
        int j = (inp[i] + k) % N;
        if (r[i][j] && cnt[j] == best) pick[i] = j;
      end
    end
    for (int j = 0; j < N; j++) begin
      int w = -1;
      for (int k = 0; k < N && w < 0; k++) begin
        int i = (outp[j] + k) % N;
        if (pick[i] == j) w = i;
      end
      if (w >= 0) begin
        m[w][j] = 1;
        inp[w] = (j + 1) % N;
        outp[j] = (w + 1) % N;
      end
    end
    return m;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0][N-1:0] exp_g, prev_req;
  int cnt[N], exp_cnt[N];
  int lonely_wins = 0;

  initial begin
    for (int x = 0; x < N; x++) begin inp[x] = 0; outp[x] = 0; exp_cnt[x] = 0; end
    req = '0; exp_g = '0; prev_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      checks++;
      if (grant !== exp_g) begin
        failures++;
        if (failures < 10) $display("cycle %0d: req %h grant %h expected %h", c, prev_req, grant, exp_g);
      end
      for (int j = 0; j < N; j++) begin
        checks++;
        if (int'(req_count[j]) != exp_cnt[j]) begin failures++; if (failures < 10) $display("cycle %0d: count[%0d]=%0d expected %0d", c, j, req_count[j], exp_cnt[j]); end
      end
      if (c == 1) begin
        checks++;
        if (!grant[0][2]) begin failures++; $display("input 0 did not get the lonely output 2: %h", grant); end
        else lonely_wins++;
      end
      if (c == 0) begin
        req = '0; req[0][1] = 1; req[0][2] = 1; req[1][1] = 1; req[2][1] = 1;
      end else if (c % 2 == 0) req = 16'($urandom) | 16'($urandom);
      else req = 16'($urandom) & ~16'h8421;
      prev_req = req;
      exp_g = lo_model(req, cnt);
      exp_cnt = cnt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
