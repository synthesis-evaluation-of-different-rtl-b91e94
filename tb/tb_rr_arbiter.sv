// tb_rr_arbiter: exhaustive check of the round-robin priority encoder.
//
// For N = 4 every request pattern is tried with every pointer value, and for
// N = 5 (not a power of two) likewise. The expected grant is found by walking
// from the pointer upwards with wrap-around and taking the first request.
module tb_rr_arbiter;
  int checks = 0, failures = 0;

  logic [3:0] req4, gnt4;  logic [1:0] ptr4, idx4;  logic any4;
  logic [4:0] req5, gnt5;  logic [2:0] ptr5, idx5;  logic any5;

  rr_arbiter #(.N(4)) dut4 (.req(req4), .ptr(ptr4), .gnt(gnt4), .gnt_idx(idx4), .any(any4));
  rr_arbiter #(.N(5)) dut5 (.req(req5), .ptr(ptr5), .gnt(gnt5), .gnt_idx(idx5), .any(any5));

  function automatic int first_from(int req, int ptr, int n);
    for (int k = 0; k < n; k++)
      if (req[(ptr + k) % n]) return (ptr + k) % n;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++)
      for (int r = 0; r < 16; r++) begin
        int w;
        req4 = 4'(r); ptr4 = 2'(p); #1;
        w = first_from(r, p, 4);
        checks++;
        if (w < 0) begin
          if (gnt4 != 0 || any4) begin failures++; $display("N4 r=%b p=%0d: expected none, got %b", req4, p, gnt4); end
        end else if (gnt4 != 4'(1 << w) || idx4 != 2'(w) || !any4) begin
          failures++; $display("N4 r=%b p=%0d: expected %0d, got %b/%0d", req4, p, w, gnt4, idx4);
        end
      end
    for (int p = 0; p < 5; p++)
      for (int r = 0; r < 32; r++) begin
        int w;
        req5 = 5'(r); ptr5 = 3'(p); #1;
        w = first_from(r, p, 5);
        checks++;
        if (w < 0) begin
          if (gnt5 != 0 || any5) begin failures++; $display("N5 r=%b p=%0d: expected none, got %b", req5, p, gnt5); end
        end else if (gnt5 != 5'(1 << w) || idx5 != 3'(w) || !any5) begin
          failures++; $display("N5 r=%b p=%0d: expected %0d, got %b/%0d", req5, p, w, gnt5, idx5);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
