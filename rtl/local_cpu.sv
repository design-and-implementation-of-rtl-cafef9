// local_cpu: the local IP core (network adapter) attached to a router's
// local port.
//
// Send side: when gen_pkt is 1 and the core is idle (tx_busy = 0) it takes
// gen_dest and gen_pkt_id and sends one packet of PACKET_SIZE flits to the
// router: a head flit with destination and source ids, PACKET_SIZE-2 body
// flits carrying the destination id, and a tail flit carrying the packet id
// and the destination id. Flits move on edges where tx_req and tx_ready are
// both 1; the first flit is offered on the cycle after gen_pkt is taken.
//
// Receive side: while rx_en is 1 the core accepts flits from the router's
// local output (rx_ready = rx_en). It keeps the source id of each head flit.
// On the edge that accepts a tail flit it raises rx_done for one cycle with
// the packet's source id, packet id and a flag telling whether the packet
// was addressed to this node, and it increments num_pkts.
//
// The gen_pkt request, the packet format and the num_pkts count follow the
// design; the idle/busy interface, rx_en and the dest_ok flag are choices of
// this RTL.
module local_cpu
  import noc_pkg::*;
#(
  parameter int unsigned PACKET_SIZE = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  node_id_t            node_id,
  // packet generation
  input  logic                gen_pkt,
  input  node_id_t            gen_dest,
  input  logic [PKTID_W-1:0]  gen_pkt_id,
  output logic                tx_busy,
  // to router local input
  output flit_t               tx_flit,
  output logic                tx_req,
  input  logic                tx_ready,
  // from router local output
  input  flit_t               rx_flit,
  input  logic                rx_req,
  output logic                rx_ready,
  input  logic                rx_en,
  // received packet report
  output logic                rx_done,
  output node_id_t            rx_src,
  output logic [PKTID_W-1:0]  rx_pkt_id,
  output logic                rx_dest_ok,
  output logic [31:0]         num_pkts
);

  localparam int unsigned IW = $clog2(PACKET_SIZE);

  node_id_t           dest_q;
  logic [PKTID_W-1:0] id_q;
  logic [IW-1:0]      idx;
  node_id_t           src_q;

  assign tx_busy = tx_req;

  always_comb begin
    if (idx == '0)                             tx_flit = make_head(dest_q, node_id);
    else if (int'(idx) == PACKET_SIZE - 1)     tx_flit = make_tail(dest_q, id_q);
    else                                       tx_flit = make_body(dest_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_req <= 1'b0;
      idx    <= '0;
      dest_q <= '0;
      id_q   <= '0;
    end else if (tx_req) begin
      if (tx_ready) begin
        if (int'(idx) == PACKET_SIZE - 1) begin
          tx_req <= 1'b0;
          idx    <= '0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end else if (gen_pkt) begin
      tx_req <= 1'b1;
      idx    <= '0;
      dest_q <= gen_dest;
      id_q   <= gen_pkt_id;
    end
  end

  // receive side
  logic rx_fire;
  assign rx_ready = rx_en;
  assign rx_fire  = rx_req && rx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q      <= '0;
      rx_done    <= 1'b0;
      rx_src     <= '0;
      rx_pkt_id  <= '0;
      rx_dest_ok <= 1'b0;
      num_pkts   <= '0;
    end else begin
      rx_done <= 1'b0;
      if (rx_fire) begin
        if (flit_type(rx_flit) == FT_HEAD) src_q <= head_src(rx_flit);
        if (flit_type(rx_flit) == FT_TAIL) begin
          rx_done    <= 1'b1;
          rx_src     <= src_q;
          rx_pkt_id  <= tail_pkt_id(rx_flit);
          rx_dest_ok <= (tail_dest(rx_flit) == node_id);
          num_pkts   <= num_pkts + 1;
        end
      end
    end
  end

endmodule
