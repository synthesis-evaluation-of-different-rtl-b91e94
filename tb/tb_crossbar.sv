// tb_crossbar: checks the N x N crossbar with random legal connection
// matrices (each output driven by at most one input, as the allocators
// guarantee). Every output must carry exactly the data of its connected
// input, or zero and out_valid low when unconnected.
module tb_crossbar;
  localparam int N = 4, W = 18;
  int checks = 0, failures = 0;
  logic [N-1:0][W-1:0] in_data, out_data;
  logic [N-1:0][N-1:0] conn;
  logic [N-1:0] out_valid;

  crossbar #(.N(N), .W(W)) dut (.in_data, .conn, .out_data, .out_valid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src[N];
    for (int t = 0; t < 2000; t++) begin
      conn = '0;
      for (int i = 0; i < N; i++) in_data[i] = W'($urandom);
      for (int j = 0; j < N; j++) begin
        src[j] = int'($urandom % (N + 1)) - 1;   // -1: unconnected
        if (src[j] >= 0) conn[src[j]][j] = 1'b1;
      end
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (src[j] < 0) begin
          if (out_valid[j] || out_data[j] != '0) begin failures++; $display("out %0d should be idle", j); end
        end else if (!out_valid[j] || out_data[j] != in_data[src[j]]) begin
          failures++; $display("out %0d: %h expected %h from %0d", j, out_data[j], in_data[src[j]], src[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
