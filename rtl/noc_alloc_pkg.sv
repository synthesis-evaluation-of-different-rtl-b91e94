// noc_alloc_pkg: types and constants shared by the router allocators and the
// wormhole switch.
//
// The router has four ports named after the mesh directions (north, south,
// east, west). A packet never leaves through the port it came in on, so each
// input can request only the three other outputs: four inputs times three
// requests gives the 12-bit request vector the allocators are sized for.
// Inside, every allocator works on a square PORTS x PORTS request matrix whose
// diagonal (the U-turn) is held at zero; compact_to_matrix and
// matrix_to_compact convert between the 12-bit form seen at the top-level
// ports and that matrix.
//
// A flit is a virtual-channel number, a 2-bit type (head, body, tail) and a
// FLIT_DATA_W-bit data field. A head flit carries the destination port in the
// low bits of its data field. NUM_VCS lanes (virtual channels) share every
// physical link; the vc field names the lane a flit travels in. The port
// count follows the four directions of the router and the lane count the
// "pair of flit buffers" per channel; the data width and the flit type
// encoding are this design's own choice.
package noc_alloc_pkg;

  localparam int PORTS       = 4;
  localparam int REQ_BITS    = PORTS * (PORTS - 1);  // 12
  localparam int PORT_W      = $clog2(PORTS);
  localparam int FLIT_DATA_W = 16;
  localparam int NUM_VCS     = 2;
  localparam int VC_W        = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1;

  typedef enum logic [PORT_W-1:0] {
    PORT_NORTH = 2'd0,
    PORT_SOUTH = 2'd1,
    PORT_EAST  = 2'd2,
    PORT_WEST  = 2'd3
  } port_e;

  typedef enum logic [1:0] {
    FLIT_BODY = 2'b00,
    FLIT_HEAD = 2'b01,
    FLIT_TAIL = 2'b10
  } flit_type_e;

  typedef struct packed {
    logic [VC_W-1:0]        vc;
    flit_type_e             ftype;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // Compact request/grant vector: entry [i][k] is input i asking for the k-th
  // of the other outputs, counted upwards and skipping output i.
  typedef logic [PORTS-1:0][PORTS-2:0] compact_t;
  // Square matrix: entry [i][j] is input i asking for output j.
  typedef logic [PORTS-1:0][PORTS-1:0] matrix_t;

  function automatic int other_port(int in_port, int k);
    return (k < in_port) ? k : k + 1;
  endfunction

  function automatic matrix_t compact_to_matrix(compact_t c);
    matrix_t m;
    m = '0;
    for (int i = 0; i < PORTS; i++)
      for (int k = 0; k < PORTS - 1; k++)
        m[i][other_port(i, k)] = c[i][k];
    return m;
  endfunction

  function automatic compact_t matrix_to_compact(matrix_t m);
    compact_t c;
    for (int i = 0; i < PORTS; i++)
      for (int k = 0; k < PORTS - 1; k++)
        c[i][k] = m[i][other_port(i, k)];
    return c;
  endfunction

endpackage
