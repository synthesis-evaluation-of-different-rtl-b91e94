// crossbar: N x N switching fabric for flits.
//
// Output j carries the flit of the input i whose connection bit conn[i][j] is
// set; the crossbar is an AND-OR multiplexer per output, so the allocator
// must give each output at most one input. out_valid[j] is
// set when output j has a connection. The crossbar is named but not detailed
// by the router description; this is the simplest implementation.
//
// Timing: purely combinational.
module crossbar #(
  parameter int N = 4,
  parameter int W = noc_alloc_pkg::FLIT_W
) (
  input  logic [N-1:0][W-1:0] in_data,
  input  logic [N-1:0][N-1:0] conn,
  output logic [N-1:0][W-1:0] out_data,
  output logic [N-1:0]        out_valid
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_data[j]  = '0;
      out_valid[j] = 1'b0;
      for (int i = 0; i < N; i++)
        if (conn[i][j]) begin
          out_data[j]  = out_data[j] | in_data[i];
          out_valid[j] = 1'b1;
        end
    end
  end

endmodule
