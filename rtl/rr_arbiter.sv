// rr_arbiter: programmable priority encoder, the building block of the
// round-robin allocators.
//
// Among the asserted bits of req it grants the first one found when scanning
// upwards from index ptr and wrapping around, so ptr names the requester that
// currently has the highest priority. The arbiter itself holds no state: the
// allocator that uses it owns the pointer and decides when to move it, which
// is what lets iSLIP update pointers only on first-iteration accepts.
//
// Interface: req (N bits), ptr (index of the highest-priority requester);
// gnt is one-hot or zero, gnt_idx its index and any is |req.
// Timing: purely combinational.
module rr_arbiter #(
  parameter int N  = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [IW-1:0] ptr,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          any
);

  logic [N-1:0] upper;   // requests at or above the pointer

  always_comb begin
    for (int i = 0; i < N; i++) upper[i] = req[i] && (i >= int'(ptr));
    gnt     = '0;
    gnt_idx = '0;
    any     = |req;
    // Lowest request at or above ptr; if there is none, lowest request overall.
    for (int i = N - 1; i >= 0; i--)
      if (upper[i] || (upper == '0 && req[i])) begin
        gnt      = '0;
        gnt[i]   = 1'b1;
        gnt_idx  = IW'(i);
      end
  end

endmodule
