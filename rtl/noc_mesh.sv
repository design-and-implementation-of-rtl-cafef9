// noc_mesh: a MESH_SIZE x MESH_SIZE square mesh of routers.
//
// Nodes are numbered 1..N (N = MESH_SIZE*MESH_SIZE) row by row from the
// bottom-left corner; array index k holds node k+1, in row k/MESH_SIZE and
// column k%MESH_SIZE. Each router's North port is linked to the South port
// of the node one row up, its East port to the West port of the node one
// column to the right, and so on; every link is a pair of unidirectional
// channels (flit, req, ready). The bov_out pin a router drives for direction
// d goes to the bov_in pin of the neighbour in that direction for the port
// facing back. Ports on the mesh edge are tied off: no flits arrive there,
// nothing is accepted there, and their congestion flag reads 0. Minimal
// routing never sends a packet to a mesh edge, so those ports stay unused.
//
// The local port (4) of every router is brought out as the arrays local_*.
// num_pkts[k] is the number of packets node k's router received from its
// local core.
//
// The mesh structure, numbering and BOV wiring follow the design; the edge
// tie-offs are this RTL's choice.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_SIZE   = 4,
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned NUM_VC      = 2,
  parameter int unsigned PACKET_SIZE = 4,
  parameter int unsigned BOV_PCT     = 75,
  parameter bit          ADAPTIVE    = 1'b1,
  localparam int unsigned N          = MESH_SIZE * MESH_SIZE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t       local_in_flit  [N],
  input  logic        local_in_req   [N],
  output logic        local_in_ready [N],
  output flit_t       local_out_flit [N],
  output logic        local_out_req  [N],
  input  logic        local_out_ready[N],
  output logic [31:0] num_pkts       [N]
);

  flit_t            r_in_flit  [N][NPORTS];
  logic             r_in_req   [N][NPORTS];
  logic             r_in_ready [N][NPORTS];
  flit_t            r_out_flit [N][NPORTS];
  logic             r_out_req  [N][NPORTS];
  logic             r_out_ready[N][NPORTS];
  logic [NDIRS-1:0] r_bov_in   [N];
  logic [NDIRS-1:0] r_bov_out  [N];
  logic [31:0]      r_num_pkts [N][NPORTS];

  for (genvar k = 0; k < N; k++) begin : g_node
    localparam int ROW = k / MESH_SIZE;
    localparam int COL = k % MESH_SIZE;

    for (genvar d = 0; d < NDIRS; d++) begin : g_dir
      localparam int NR = (d == 0) ? ROW + 1 : (d == 2) ? ROW - 1 : ROW;
      localparam int NC = (d == 1) ? COL + 1 : (d == 3) ? COL - 1 : COL;
      localparam bit HAS_NB = (NR >= 0) && (NR < MESH_SIZE) && (NC >= 0) && (NC < MESH_SIZE);
      localparam int NB = HAS_NB ? NR * MESH_SIZE + NC : 0;
      localparam int OD = (d + 2) % NDIRS;

      if (HAS_NB) begin : g_link
        assign r_in_flit[k][d]   = r_out_flit[NB][OD];
        assign r_in_req[k][d]    = r_out_req[NB][OD];
        assign r_out_ready[k][d] = r_in_ready[NB][OD];
        assign r_bov_in[k][d]    = r_bov_out[NB][OD];
      end else begin : g_edge
        assign r_in_flit[k][d]   = '0;
        assign r_in_req[k][d]    = 1'b0;
        assign r_out_ready[k][d] = 1'b0;
        assign r_bov_in[k][d]    = 1'b0;
      end
    end

    assign r_in_flit[k][PORT_L]   = local_in_flit[k];
    assign r_in_req[k][PORT_L]    = local_in_req[k];
    assign local_in_ready[k]      = r_in_ready[k][PORT_L];
    assign local_out_flit[k]      = r_out_flit[k][PORT_L];
    assign local_out_req[k]       = r_out_req[k][PORT_L];
    assign r_out_ready[k][PORT_L] = local_out_ready[k];
    assign num_pkts[k]            = r_num_pkts[k][PORT_L];

    router #(
      .MESH_SIZE  (MESH_SIZE),
      .FIFO_DEPTH (FIFO_DEPTH),
      .NUM_VC     (NUM_VC),
      .PACKET_SIZE(PACKET_SIZE),
      .BOV_PCT    (BOV_PCT),
      .ADAPTIVE   (ADAPTIVE)
    ) u_router (
      .clk      (clk),
      .rst_n    (rst_n),
      .router_id(node_id_t'(k + 1)),
      .in_port  (r_in_flit[k]),
      .in_req   (r_in_req[k]),
      .in_ready (r_in_ready[k]),
      .out_port (r_out_flit[k]),
      .out_req  (r_out_req[k]),
      .out_ready(r_out_ready[k]),
      .bov_in   (r_bov_in[k]),
      .bov_out  (r_bov_out[k]),
      .num_pkts (r_num_pkts[k])
    );
  end

endmodule
