// fw_pkg: types and constants shared by the NoC firewall blocks.
//
// Packet format (16-bit flits): flit 0 is the address header, flit 1 the
// payload size, followed by `size` payload flits. The header holds four
// 4-bit coordinates: source X in bits 3:0, source Y in 7:4, destination X in
// 11:8 and destination Y in 15:12. Four bits per coordinate give at most
// 16 x 16 = 256 nodes, so an access register needs at most 256 bits.
//
// The configuration circuit is a serial chain. Each word on it is a
// cfg_word_t: a valid bit, an 8-bit data field and the dedicated A_b bit.
// A configuration frame is three consecutive valid words: target X, target Y,
// and the access-register index to write; A_b travels beside the index word.
// The 8-bit data width (wide enough for an index up to 255) is this design's
// choice.
package fw_pkg;

  localparam int unsigned FLIT_W  = 16;
  localparam int unsigned COORD_W = 4;
  localparam int unsigned CFG_W   = 8;

  typedef logic [FLIT_W-1:0]  flit_t;
  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t dst_y;  // bits 15:12
    coord_t dst_x;  // bits 11:8
    coord_t src_y;  // bits 7:4
    coord_t src_x;  // bits 3:0
  } header_t;

  typedef struct packed {
    coord_t y;
    coord_t x;
  } addr_t;

  typedef struct packed {
    logic             valid;
    logic [CFG_W-1:0] data;
    logic             ab;
  } cfg_word_t;

  // Position of node (x, y) in the access register A_r: row-major, X fastest.
  function automatic int unsigned ar_index(int unsigned x, int unsigned y, int unsigned m);
    return y * m + x;
  endfunction

  // Node visited at position k of the configuration chain. The chain snakes
  // through the mesh: row 0 left to right, row 1 right to left, and so on.
  function automatic int unsigned chain_x(int unsigned k, int unsigned m);
    int unsigned row;
    row = k / m;
    return (row % 2 == 0) ? (k % m) : (m - 1 - (k % m));
  endfunction

  function automatic int unsigned chain_y(int unsigned k, int unsigned m);
    return k / m;
  endfunction

endpackage
