// tb_flit_fifo: checks the flit buffer against a queue model.
//
// Random pushes and pops (with bursts that fill and drain the buffer) are
// applied for a few thousand cycles. Each popped word must be the oldest word
// of the model queue, out_valid must equal "model not empty", in_ready must be
// high unless the model is full and no pop happens, and level must match the
// model size. Filling the buffer and writing while full with a pop both have
// to occur.
module tb_flit_fifo;
  localparam int W = 18, D = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [2:0] level;

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                         .out_valid, .out_ready, .out_data, .level);
  always #5 clk = ~clk;

  logic [W-1:0] q[$];
  int full_seen = 0, full_pass = 0;
  bit pop_seen, push_seen;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      automatic int phase = (c / 64) % 3;
      @(negedge clk);
      in_valid  = (phase == 0) ? ($urandom % 8 != 0) : (phase == 1) ? ($urandom % 4 == 0) : ($urandom % 2 == 0);
      out_ready = (phase == 0) ? ($urandom % 4 == 0) : (phase == 1) ? ($urandom % 8 != 0) : ($urandom % 2 == 0);
      in_data   = W'($urandom);
      #1;
      checks++;
      if (out_valid != (q.size() != 0) || int'(level) != q.size()) begin
        failures++; $display("cycle %0d: valid %b level %0d model %0d", c, out_valid, level, q.size());
      end
      checks++;
      if (in_ready != (q.size() < D || out_ready)) begin failures++; $display("cycle %0d: in_ready %b", c, in_ready); end
      if (out_valid && q.size() != 0) begin
        checks++;
        if (out_data != q[0]) begin failures++; $display("cycle %0d: data %h expected %h", c, out_data, q[0]); end
      end
      if (q.size() == D) full_seen++;
      if (q.size() == D && in_valid && out_ready) full_pass++;
      pop_seen = out_valid && out_ready; push_seen = in_valid && in_ready;
      @(posedge clk);
      if (pop_seen && q.size() != 0) void'(q.pop_front());
      if (push_seen) q.push_back(in_data);
    end
    checks++;
    if (full_seen == 0 || full_pass == 0) begin failures++; $display("full buffer never reached (%0d, %0d)", full_seen, full_pass); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
