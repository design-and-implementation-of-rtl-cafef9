// tb_local_cpu: the local core of node 12.
//  1. gen_pkt to destination 12 with packet id 5 (a packet that loops back
//     through the local router port): the core offers the first flit on the
//     cycle after gen_pkt and sends head C300000C, bodies 8000000C and tail
//     4000050C, holding each flit while tx_ready is low.
//  2. gen_pkt while busy is ignored.
//  3. Receive side: a packet from node 3 with id 77 raises rx_done one cycle
//     after its tail, reports source 3 and id 77, and increments num_pkts;
//     a packet for another node is reported with rx_dest_ok = 0; with rx_en
//     low nothing is accepted.
module tb_local_cpu;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  node_id_t node_id = 8'd12;
  logic gen_pkt; node_id_t gen_dest; logic [14:0] gen_pkt_id; logic tx_busy;
  flit_t tx_flit; logic tx_req, tx_ready;
  flit_t rx_flit; logic rx_req, rx_ready, rx_en;
  logic rx_done; node_id_t rx_src; logic [14:0] rx_pkt_id; logic rx_dest_ok;
  logic [31:0] num_pkts;
  int checks = 0, failures = 0;

  local_cpu #(.PACKET_SIZE(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic send_rx(flit_t f);
    rx_flit = f; rx_req = 1;
    while (!rx_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 rx_req = 0;
  endtask

  logic [31:0] exp_tx [4] = '{32'hC300_000C, 32'h8000_000C, 32'h8000_000C, 32'h4000_050C};

  initial begin
    gen_pkt = 0; gen_dest = 0; gen_pkt_id = 0; tx_ready = 0; rx_req = 0; rx_flit = 0; rx_en = 1;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk("idle", tx_busy, 0);
    gen_pkt = 1; gen_dest = 12; gen_pkt_id = 5;
    @(posedge clk); #1;
    gen_pkt = 0;
    chk("first flit offered next cycle", tx_req, 1);
    // 2. ignored while busy
    gen_pkt = 1; gen_dest = 3; gen_pkt_id = 9;
    for (int i = 0; i < 4; i++) begin
      repeat ($urandom % 3) begin
        tx_ready = 0; @(posedge clk); #1;
        chk("held while not ready", tx_flit, exp_tx[i]);
      end
      tx_ready = 1;
      chk($sformatf("tx flit %0d", i), tx_flit, exp_tx[i]);
      chk("req", tx_req, 1);
      @(posedge clk); #1;
      gen_pkt = 0;
    end
    tx_ready = 0;
    chk("done sending", tx_req, 0);
    // 3. receive
    send_rx(make_head(8'd12, 8'd3));
    send_rx(make_body(8'd12));
    send_rx(make_body(8'd12));
    chk("no done before tail", rx_done, 0);
    rx_flit = make_tail(8'd12, 15'd77); rx_req = 1;
    @(posedge clk); #1 rx_req = 0;
    chk("rx_done", rx_done, 1);
    chk("rx_src", rx_src, 3);
    chk("rx_pkt_id", rx_pkt_id, 77);
    chk("rx_dest_ok", rx_dest_ok, 1);
    chk("num_pkts", num_pkts, 1);
    @(posedge clk); #1;
    chk("rx_done one cycle", rx_done, 0);
    send_rx(make_head(8'd5, 8'd1));
    send_rx(make_body(8'd5));
    send_rx(make_body(8'd5));
    send_rx(make_tail(8'd5, 15'd4));
    chk("wrong dest flagged", rx_dest_ok, 0);
    chk("num_pkts 2", num_pkts, 2);
    rx_en = 0; #1;
    chk("not ready when disabled", rx_ready, 0);
    rx_flit = make_head(8'd12, 8'd1); rx_req = 1;
    repeat (3) @(posedge clk);
    #1 rx_req = 0;
    chk("num_pkts unchanged", num_pkts, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
