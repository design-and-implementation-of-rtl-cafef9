// route_compute: output port selection for one head flit.
//
// Plain XY dimension ordered routing sends a packet East or West until its
// column matches the destination, then North or South, and to the Local port
// at the destination. The congestion aware X/Y rule changes only packets that
// still need both an X and a Y hop (reroutable packets). For these both
// candidate ports are known, and the rule compares the number of requests
// already pending on each in the current router's request matrix (req_cnt)
// and the congestion flags read from the neighbours (bov_in):
//
//   if requests(X) > requests(Y):
//       if bov_in(X) == 0 and requests(X)*PACKET_SIZE < PEND_THRESH : X
//       else if bov_in(Y) == 0                                      : Y
//       else                                                        : X
//   else                                                            : X
//
// Packets with a single remaining dimension keep their only minimal port, so
// routing stays minimal. With ADAPTIVE = 0 the block is plain XY routing.
//
// The block is purely combinational: the router samples its result once per
// packet. Node numbering: id n is in row (n-1)/MESH_SIZE and column
// (n-1)%MESH_SIZE, rows growing northward.
//
// Taken from the design: both routing algorithms and the port numbering.
// Reading of this RTL: the threshold the pending requests are compared with
// is the BOV threshold (PEND_THRESH, 12 flits by default), and the pending
// requests are counted in flits, i.e. requests times PACKET_SIZE: the flits
// those packets would push into the downstream buffer. With a 100 % BOV
// threshold the rule then almost never leaves XY routing.
module route_compute
  import noc_pkg::*;
#(
  parameter int unsigned MESH_SIZE  = 4,
  parameter int unsigned PACKET_SIZE = 4,
  parameter int unsigned PEND_THRESH = 12,
  parameter bit          ADAPTIVE   = 1'b1
) (
  input  node_id_t   cur_id,
  input  node_id_t   dest_id,
  input  logic [NDIRS-1:0] bov_in,
  input  logic [2:0] req_cnt [NPORTS],
  output port_e      out_port,
  output logic       reroutable,
  output logic       rerouted
);

  int unsigned cur_row, cur_col, dst_row, dst_col;
  port_e       x_port, y_port;
  logic        need_x, need_y;
  logic [2:0]  cnt_x, cnt_y;

  always_comb begin
    cur_row = (int'(cur_id)  - 1) / MESH_SIZE;
    cur_col = (int'(cur_id)  - 1) % MESH_SIZE;
    dst_row = (int'(dest_id) - 1) / MESH_SIZE;
    dst_col = (int'(dest_id) - 1) % MESH_SIZE;

    need_x = (cur_col != dst_col);
    need_y = (cur_row != dst_row);
    x_port = (cur_col < dst_col) ? PORT_E : PORT_W;
    y_port = (cur_row < dst_row) ? PORT_N : PORT_S;
    cnt_x  = req_cnt[x_port];
    cnt_y  = req_cnt[y_port];

    reroutable = need_x && need_y;
    rerouted   = 1'b0;

    if (!need_x && !need_y) begin
      out_port = PORT_L;
    end else if (!need_y) begin
      out_port = x_port;
    end else if (!need_x) begin
      out_port = y_port;
    end else if (ADAPTIVE && (cnt_x > cnt_y)) begin
      if (!bov_in[x_port[1:0]] && (int'(cnt_x) * int'(PACKET_SIZE) < int'(PEND_THRESH))) begin
        out_port = x_port;
      end else if (!bov_in[y_port[1:0]]) begin
        out_port = y_port;
        rerouted = 1'b1;
      end else begin
        out_port = x_port;
      end
    end else begin
      out_port = x_port;
    end
  end

endmodule
