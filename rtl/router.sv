// router: five-port input-buffered, store-and-forward, congestion aware router.
//
// Ports 0..4 are North, East, South, West and Local. Every input port has an
// input_buffer (virtual channels, store-and-forward admission, occupancy
// count). When a complete packet is at the front of an input buffer its head
// flit goes through route_compute once and the chosen output port is latched;
// that latched route is the input's row of the request matrix. The
// switch_allocator grants each idle output to one requesting input (round
// robin) and holds the grant until the tail flit has left. The crossbar then
// moves one flit per cycle from the input buffer to the output port while the
// downstream side is ready.
//
// Congestion awareness: bov_out[d] is 1 while the buffer of directional input
// d holds more flits than the BOV threshold; it is wired to the neighbour in
// direction d, which reads it on its bov_in pin for the port facing this
// router. route_compute uses bov_in and the per-port pending request counts
// to move reroutable packets from the X port to the Y port.
//
// Handshake on every port: a flit moves on a clock edge where req and ready
// are both 1. Inputs: in_port/in_req in, in_ready out. Outputs:
// out_port/out_req out, out_ready in. in_ready and out_req are functions of
// registered state only, so routers can be chained without combinational
// loops; out_port/out_req stay stable while out_ready is low.
//
// Timing (no contention): tail flit stored at edge t, the buffer presents the
// packet after edge t+1, route latched at t+2, grant at t+3, and the head
// flit leaves on edge t+4, followed by one flit per cycle.
//
// num_pkts[p] counts packets received on input port p. router_id is this
// node's number (1..MESH_SIZE*MESH_SIZE).
//
// The port set (32-bit in/out ports, req/ready per port, four bov_in and four
// bov_out pins), the port numbering, XY and congestion aware X/Y routing,
// round robin switch allocation, store-and-forward flow control, FIFO_DEPTH
// 8, 2 virtual channels and the 75 % BOV threshold follow the design. The
// pipeline timing above and the per-port num_pkts counters are choices of
// this RTL.
module router
  import noc_pkg::*;
#(
  parameter int unsigned MESH_SIZE   = 4,
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned NUM_VC      = 2,
  parameter int unsigned PACKET_SIZE = 4,
  parameter int unsigned BOV_PCT     = 75,
  parameter bit          ADAPTIVE    = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  node_id_t    router_id,
  input  flit_t       in_port  [NPORTS],
  input  logic        in_req   [NPORTS],
  output logic        in_ready [NPORTS],
  output flit_t       out_port [NPORTS],
  output logic        out_req  [NPORTS],
  input  logic        out_ready[NPORTS],
  input  logic [NDIRS-1:0] bov_in,
  output logic [NDIRS-1:0] bov_out,
  output logic [31:0] num_pkts [NPORTS]
);

  flit_t      front   [NPORTS];
  logic       pkt_v   [NPORTS];
  logic       pop     [NPORTS];
  logic       bov_p   [NPORTS];

  logic       route_v [NPORTS];
  port_e      route_p [NPORTS];
  port_e      rc_port [NPORTS];

  logic       out_busy [NPORTS];
  logic [2:0] out_owner[NPORTS];
  logic       granted  [NPORTS];
  logic [2:0] req_cnt  [NPORTS];
  logic [NPORTS-1:0] req_matrix [NPORTS];
  logic       done     [NPORTS];
  logic       xb_valid [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    logic [$clog2(FIFO_DEPTH*NUM_VC+1)-1:0] flit_cnt;
    logic reroutable, rerouted;

    input_buffer #(
      .FIFO_DEPTH (FIFO_DEPTH),
      .NUM_VC     (NUM_VC),
      .PACKET_SIZE(PACKET_SIZE),
      .BOV_PCT    (BOV_PCT)
    ) u_buf (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_flit   (in_port[p]),
      .in_req    (in_req[p]),
      .in_ready  (in_ready[p]),
      .pkt_valid (pkt_v[p]),
      .front_flit(front[p]),
      .pop       (pop[p]),
      .flit_cnt  (flit_cnt),
      .bov       (bov_p[p]),
      .pkt_cnt   (num_pkts[p])
    );

    route_compute #(
      .MESH_SIZE  (MESH_SIZE),
      .PACKET_SIZE(PACKET_SIZE),
      .PEND_THRESH((BOV_PCT * FIFO_DEPTH * NUM_VC) / 100),
      .ADAPTIVE   (ADAPTIVE)
    ) u_rc (
      .cur_id    (router_id),
      .dest_id   (head_dest(front[p])),
      .bov_in    (bov_in),
      .req_cnt   (req_cnt),
      .out_port  (rc_port[p]),
      .reroutable(reroutable),
      .rerouted  (rerouted)
    );

    // route latch: computed once per packet, released with the tail flit
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        route_v[p] <= 1'b0;
        route_p[p] <= PORT_L;
      end else if (route_v[p]) begin
        if (pop[p] && flit_type(front[p]) == FT_TAIL) route_v[p] <= 1'b0;
      end else if (pkt_v[p]) begin
        route_v[p] <= 1'b1;
        route_p[p] <= rc_port[p];
      end
    end

    assign xb_valid[p] = pkt_v[p] && granted[p];

    assert property (@(posedge clk) disable iff (!rst_n)
                     (pkt_v[p] && !route_v[p]) |-> flit_type(front[p]) == FT_HEAD);
  end

  for (genvar d = 0; d < NDIRS; d++) begin : g_bov
    assign bov_out[d] = bov_p[d];
  end

  switch_allocator u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_valid (route_v),
    .req_port  (route_p),
    .done      (done),
    .out_busy  (out_busy),
    .out_owner (out_owner),
    .in_granted(granted),
    .req_cnt   (req_cnt),
    .req_matrix(req_matrix)
  );

  crossbar u_xb (
    .in_flit  (front),
    .in_valid (xb_valid),
    .in_pop   (pop),
    .en       (out_busy),
    .sel      (out_owner),
    .out_flit (out_port),
    .out_req  (out_req),
    .out_ready(out_ready)
  );

  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++)
      done[o] = out_req[o] && out_ready[o] && flit_type(out_port[o]) == FT_TAIL;
  end

  // output handshake: a flit on offer stays on offer, unchanged, until taken
  for (genvar o = 0; o < NPORTS; o++) begin : g_hs
    assert property (@(posedge clk) disable iff (!rst_n)
                     (out_req[o] && !out_ready[o]) |=> (out_req[o] && $stable(out_port[o])));
  end

endmodule
