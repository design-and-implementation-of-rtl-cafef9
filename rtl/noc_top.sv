// noc_top: the complete network, a square mesh of congestion aware routers
// with one local core on every node.
//
// Each node k (node number k+1) has a local_cpu whose send side feeds the
// local input of its router and whose receive side takes the router's local
// output. A packet is injected at node k by raising gen_pkt[k] with
// gen_dest[k] and gen_pkt_id[k] while tx_busy[k] is 0. When a packet has
// been delivered at node k, rx_done[k] pulses for one cycle with the source
// node, the packet id and a flag saying the packet reached the node it was
// addressed to; rx_pkts[k] counts delivered packets and inj_pkts[k] the
// packets node k's router accepted from its core. rx_en[k] lets the
// environment hold off delivery at node k.
//
// Parameters are those of the mesh: 4x4 nodes, FIFO depth 8 with 2 virtual
// channels, 4-flit packets and a 75 % BOV threshold, with congestion aware
// X/Y routing switched on (ADAPTIVE = 0 gives plain XY routing).
module noc_top
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
  input  logic               clk,
  input  logic               rst_n,
  input  logic               gen_pkt   [N],
  input  node_id_t           gen_dest  [N],
  input  logic [PKTID_W-1:0] gen_pkt_id[N],
  output logic               tx_busy   [N],
  input  logic               rx_en     [N],
  output logic               rx_done   [N],
  output node_id_t           rx_src    [N],
  output logic [PKTID_W-1:0] rx_pkt_id [N],
  output logic               rx_dest_ok[N],
  output logic [31:0]        rx_pkts   [N],
  output logic [31:0]        inj_pkts  [N]
);

  flit_t l_in_flit  [N];
  logic  l_in_req   [N];
  logic  l_in_ready [N];
  flit_t l_out_flit [N];
  logic  l_out_req  [N];
  logic  l_out_ready[N];

  noc_mesh #(
    .MESH_SIZE  (MESH_SIZE),
    .FIFO_DEPTH (FIFO_DEPTH),
    .NUM_VC     (NUM_VC),
    .PACKET_SIZE(PACKET_SIZE),
    .BOV_PCT    (BOV_PCT),
    .ADAPTIVE   (ADAPTIVE)
  ) u_mesh (
    .clk            (clk),
    .rst_n          (rst_n),
    .local_in_flit  (l_in_flit),
    .local_in_req   (l_in_req),
    .local_in_ready (l_in_ready),
    .local_out_flit (l_out_flit),
    .local_out_req  (l_out_req),
    .local_out_ready(l_out_ready),
    .num_pkts       (inj_pkts)
  );

  for (genvar k = 0; k < N; k++) begin : g_core
    local_cpu #(.PACKET_SIZE(PACKET_SIZE)) u_cpu (
      .clk       (clk),
      .rst_n     (rst_n),
      .node_id   (node_id_t'(k + 1)),
      .gen_pkt   (gen_pkt[k]),
      .gen_dest  (gen_dest[k]),
      .gen_pkt_id(gen_pkt_id[k]),
      .tx_busy   (tx_busy[k]),
      .tx_flit   (l_in_flit[k]),
      .tx_req    (l_in_req[k]),
      .tx_ready  (l_in_ready[k]),
      .rx_flit   (l_out_flit[k]),
      .rx_req    (l_out_req[k]),
      .rx_ready  (l_out_ready[k]),
      .rx_en     (rx_en[k]),
      .rx_done   (rx_done[k]),
      .rx_src    (rx_src[k]),
      .rx_pkt_id (rx_pkt_id[k]),
      .rx_dest_ok(rx_dest_ok[k]),
      .num_pkts  (rx_pkts[k])
    );
  end

endmodule
