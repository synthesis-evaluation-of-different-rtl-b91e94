// flit_fifo: input flit buffer queue of a wormhole switch port.
//
// A circular buffer of DEPTH entries of WIDTH bits with separate read and
// write pointers and an occupancy counter. Writes and reads use a valid/ready
// handshake: a word is written on a rising edge when in_valid and in_ready
// are both high, and removed when out_valid and out_ready are both high.
// in_ready is high whenever the queue is not full, so the queue accepts one
// word per cycle and a simultaneous read and write is allowed when full.
// out_data always shows the oldest word, read straight from the storage
// array. The buffer being a per-port flit queue follows the wormhole
// description; the depth and the handshake are this design's own choice.
//
// Timing: a word written on an edge is visible at the output after it (one
// cycle fall-through). rst_n is active-low synchronous and empties the queue.
module flit_fifo #(
  parameter int WIDTH = noc_alloc_pkg::FLIT_W,
  parameter int DEPTH = 4,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [AW:0]      level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             push, pop;

  assign in_ready  = (int'(level) < DEPTH) || out_ready;
  assign out_valid = (level != '0);
  assign out_data  = mem[rd_ptr];
  assign pop       = out_valid && out_ready;
  assign push      = in_valid && in_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      level <= level + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

endmodule
