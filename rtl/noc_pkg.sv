// noc_pkg: types and constants shared by the router, the mesh and the local cores.
//
// Flits are 32 bits wide. The two most significant bits give the flit type
// (11 head, 10 body, 01 tail). A head flit carries the destination node id in
// bits 29:22 and the source node id in bits 7:0; bits 21:8 are unused. Body
// flits carry the destination id in their low bits so that flits of different
// packets can be told apart. A tail flit carries a 15-bit packet id in bits
// 22:8 and the destination id in bits 7:0, which lets a receiver match a
// packet to its injection record. All of this follows the flit layout of the
// design.
//
// Ports are numbered North 0, East 1, South 2, West 3, Local 4. Nodes are
// numbered 1..MESH*MESH row by row, starting at the bottom-left corner, so
// node n sits in row (n-1)/MESH and column (n-1)%MESH (both counted from 0
// here, row 0 at the bottom). North increases the row, East the column.
package noc_pkg;

  localparam int unsigned FLIT_W  = 32;
  localparam int unsigned NPORTS  = 5;
  localparam int unsigned NDIRS   = 4;
  localparam int unsigned ID_W    = 8;
  localparam int unsigned PKTID_W = 15;

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [ID_W-1:0]   node_id_t;

  typedef enum logic [2:0] {
    PORT_N = 3'd0,
    PORT_E = 3'd1,
    PORT_S = 3'd2,
    PORT_W = 3'd3,
    PORT_L = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_NONE = 2'b00,
    FT_TAIL = 2'b01,
    FT_BODY = 2'b10,
    FT_HEAD = 2'b11
  } flit_type_e;

  function automatic flit_type_e flit_type(flit_t f);
    return flit_type_e'(f[31:30]);
  endfunction

  function automatic node_id_t head_dest(flit_t f);
    return f[29:22];
  endfunction

  function automatic node_id_t head_src(flit_t f);
    return f[7:0];
  endfunction

  function automatic logic [PKTID_W-1:0] tail_pkt_id(flit_t f);
    return f[22:8];
  endfunction

  function automatic node_id_t tail_dest(flit_t f);
    return f[7:0];
  endfunction

  function automatic flit_t make_head(node_id_t dst, node_id_t src);
    return {FT_HEAD, dst, 14'd0, src};
  endfunction

  function automatic flit_t make_body(node_id_t dst);
    return {FT_BODY, 22'd0, dst};
  endfunction

  function automatic flit_t make_tail(node_id_t dst, logic [PKTID_W-1:0] pkt_id);
    return {FT_TAIL, 7'd0, pkt_id, dst};
  endfunction

  // Direction a neighbour sees this link from: N<->S, E<->W.
  function automatic int unsigned opposite(int unsigned p);
    return (p + 2) % NDIRS;
  endfunction

endpackage
