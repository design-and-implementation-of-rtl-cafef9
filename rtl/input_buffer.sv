// input_buffer: the buffer behind one router input port.
//
// The buffer holds NUM_VC virtual channels, each a FIFO of FIFO_DEPTH flits.
// Flow control is store-and-forward: a packet is only offered to the router
// once its tail flit has been stored. A new packet is admitted when some
// virtual channel has room for a whole packet (PACKET_SIZE flits); the lowest
// numbered such channel takes it, so channel 1 only starts filling when
// channel 0 cannot take another packet. Once a head flit has been accepted
// the rest of the packet is always accepted, because its room was reserved.
//
// On the read side the buffer locks onto one virtual channel that holds at
// least one complete packet (round robin between channels) and presents the
// flit at the front of that channel until the tail flit has been popped.
//
// Congestion estimate: flit_cnt is the number of flits held over all
// channels. bov is 1 when flit_cnt exceeds BOV_PCT percent of
// FIFO_DEPTH*NUM_VC (the buffer occupancy value compared with a threshold).
// pkt_cnt counts packets received through this port.
//
// Write interface: in_flit/in_req/in_ready, a flit moves on a clock edge where
// in_req and in_ready are both 1. in_ready depends only on registered state.
// Read interface: pkt_valid says a complete packet is presented, front_flit is
// its current flit, pop removes that flit on the clock edge.
//
// Taken from the design: FIFO_DEPTH 8, 2 virtual channels, 32-bit flits,
// store-and-forward, BOV as occupied slots over FIFO_DEPTH*NUM_VC, a 75 %
// threshold. Choices of this RTL: whole-packet admission per channel, lowest
// channel first on admission, round robin between channels on reading, and a
// threshold rounded down to whole flits.
module input_buffer
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned NUM_VC      = 2,
  parameter int unsigned PACKET_SIZE = 4,
  parameter int unsigned BOV_PCT     = 75
) (
  input  logic        clk,
  input  logic        rst_n,
  // upstream side
  input  flit_t       in_flit,
  input  logic        in_req,
  output logic        in_ready,
  // router side
  output logic        pkt_valid,
  output flit_t       front_flit,
  input  logic        pop,
  // status
  output logic [$clog2(FIFO_DEPTH*NUM_VC+1)-1:0] flit_cnt,
  output logic        bov,
  output logic [31:0] pkt_cnt
);

  localparam int unsigned PW     = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;
  localparam int unsigned CW     = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned VW     = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;
  localparam int unsigned TW     = $clog2(FIFO_DEPTH*NUM_VC+1);
  localparam int unsigned THRESH = (BOV_PCT * FIFO_DEPTH * NUM_VC) / 100;

  flit_t         mem   [NUM_VC][FIFO_DEPTH];
  logic [PW-1:0] wr_ptr[NUM_VC];
  logic [PW-1:0] rd_ptr[NUM_VC];
  logic [CW-1:0] count [NUM_VC];
  logic [CW-1:0] npkts [NUM_VC];   // complete packets held per channel

  logic          rx_active;        // inside a packet on the write side
  logic [VW-1:0] wr_vc;            // channel taking the current packet
  logic          rd_lock;          // read side locked on rd_vc
  logic [VW-1:0] rd_vc;

  // ---------------------------------------------------------------- admission
  logic          room_any;
  logic [VW-1:0] room_vc;

  always_comb begin
    room_any = 1'b0;
    room_vc  = '0;
    for (int unsigned v = 0; v < NUM_VC; v++) begin
      if (!room_any && (int'(count[v]) + int'(PACKET_SIZE) <= int'(FIFO_DEPTH))) begin
        room_any = 1'b1;
        room_vc  = VW'(v);
      end
    end
  end

  assign in_ready = rx_active || room_any;

  logic          wr_en;
  logic [VW-1:0] wr_sel;
  logic          wr_tail;

  assign wr_en   = in_req && in_ready;
  assign wr_sel  = rx_active ? wr_vc : room_vc;
  assign wr_tail = (flit_type(in_flit) == FT_TAIL);

  // ---------------------------------------------------------------- read side
  logic          cand_any;
  logic [VW-1:0] cand_vc;

  always_comb begin
    cand_any = 1'b0;
    cand_vc  = '0;
    for (int unsigned k = 1; k <= NUM_VC; k++) begin
      int unsigned v;
      v = (int'(rd_vc) + k) % NUM_VC;
      if (!cand_any && npkts[v] != '0) begin
        cand_any = 1'b1;
        cand_vc  = VW'(v);
      end
    end
  end

  assign pkt_valid  = rd_lock;
  assign front_flit = mem[rd_vc][rd_ptr[rd_vc]];

  logic rd_en, rd_tail;
  assign rd_en   = pop && rd_lock;
  assign rd_tail = (flit_type(front_flit) == FT_TAIL);

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_sel][wr_ptr[wr_sel]] <= in_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_active <= 1'b0;
      wr_vc     <= '0;
      rd_lock   <= 1'b0;
      rd_vc     <= VW'(NUM_VC - 1);
      pkt_cnt   <= '0;
      for (int unsigned v = 0; v < NUM_VC; v++) begin
        wr_ptr[v] <= '0;
        rd_ptr[v] <= '0;
        count[v]  <= '0;
        npkts[v]  <= '0;
      end
    end else begin
      // write side
      if (wr_en) begin
        wr_ptr[wr_sel] <= (int'(wr_ptr[wr_sel]) == FIFO_DEPTH - 1) ? '0 : wr_ptr[wr_sel] + 1'b1;
        if (!rx_active) wr_vc <= room_vc;
        rx_active <= !wr_tail;
        if (wr_tail) pkt_cnt <= pkt_cnt + 1;
      end
      // read side
      if (rd_en) begin
        rd_ptr[rd_vc] <= (int'(rd_ptr[rd_vc]) == FIFO_DEPTH - 1) ? '0 : rd_ptr[rd_vc] + 1'b1;
        if (rd_tail) rd_lock <= 1'b0;
      end else if (!rd_lock && cand_any) begin
        rd_lock <= 1'b1;
        rd_vc   <= cand_vc;
      end
      // occupancy per channel
      for (int unsigned v = 0; v < NUM_VC; v++) begin
        logic inc_f, dec_f, inc_p, dec_p;
        inc_f = wr_en && (wr_sel == VW'(v));
        dec_f = rd_en && (rd_vc == VW'(v));
        inc_p = inc_f && wr_tail;
        dec_p = dec_f && rd_tail;
        count[v] <= count[v] + CW'(inc_f) - CW'(dec_f);
        npkts[v] <= npkts[v] + CW'(inc_p) - CW'(dec_p);
      end
    end
  end

  always_comb begin
    flit_cnt = '0;
    for (int unsigned v = 0; v < NUM_VC; v++) flit_cnt = flit_cnt + TW'(count[v]);
  end

  assign bov = (int'(flit_cnt) > int'(THRESH));

  // a packet must start with a head flit and never overflow its channel
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_en && !rx_active) |-> flit_type(in_flit) == FT_HEAD);
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_en |-> int'(count[wr_sel]) < int'(FIFO_DEPTH));

  initial begin
    assert (PACKET_SIZE >= 2 && PACKET_SIZE <= FIFO_DEPTH)
      else $error("PACKET_SIZE must be between 2 and FIFO_DEPTH");
  end

endmodule
