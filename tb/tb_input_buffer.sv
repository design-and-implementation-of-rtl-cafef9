// tb_input_buffer: exercises one input buffer (depth 8, 2 virtual channels,
// 4-flit packets, 75 % BOV threshold = 12 flits).
//  1. store-and-forward: a packet is not offered until its tail is stored,
//     and is offered exactly one cycle after the tail's write edge;
//  2. four packets fill both channels (two each); in_ready then drops;
//  3. flit_cnt tracks the number of stored flits and bov rises when it
//     exceeds 12;
//  4. packets come out whole, channel by channel in round-robin order
//     (packet 0, 2, 1, 3 for packets 0,1 in channel 0 and 2,3 in channel 1);
//  5. random traffic with random pops: every flit comes out intact and
//     packets keep their flit order; pkt_cnt counts received packets.
module tb_input_buffer;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t in_flit, front_flit;
  logic in_req, in_ready, pkt_valid, pop, bov;
  logic [4:0] flit_cnt;
  logic [31:0] pkt_cnt;
  int checks = 0, failures = 0;

  input_buffer #(.FIFO_DEPTH(8), .NUM_VC(2), .PACKET_SIZE(4), .BOV_PCT(75)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic flit_t pf(int pkt, int i);
    node_id_t d = node_id_t'(pkt + 1);
    if (i == 0) return make_head(d, 8'd9);
    if (i == 3) return make_tail(d, 15'(pkt));
    return {FT_BODY, 14'(pkt), 8'(i), d};
  endfunction

  task automatic write_flit(flit_t f);
    in_flit = f; in_req = 1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 in_req = 0;
  endtask

  task automatic read_packet(int exp_pkt);
    for (int i = 0; i < 4; i++) begin
      while (!pkt_valid) begin @(posedge clk); #1; end
      checks++;
      if (front_flit !== pf(exp_pkt, i)) begin
        failures++; $display("FAIL read pkt %0d flit %0d: %08h", exp_pkt, i, front_flit);
      end
      pop = 1; @(posedge clk); #1 pop = 0;
    end
  endtask

  int q_pkt[$];
  int next_exp[int];

  initial begin
    in_req = 0; pop = 0; in_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk("ready after reset", in_ready, 1);
    chk("empty", flit_cnt, 0);
    // 1. store-and-forward
    for (int i = 0; i < 3; i++) begin
      write_flit(pf(0, i));
      chk("not offered before tail", pkt_valid, 0);
    end
    write_flit(pf(0, 3));
    chk("not offered at tail edge", pkt_valid, 0);
    @(posedge clk); #1;
    chk("offered one cycle after tail", pkt_valid, 1);
    chk("front is head", front_flit, pf(0, 0));
    // 2./3. fill the rest
    for (int p = 1; p < 4; p++)
      for (int i = 0; i < 4; i++) begin
        write_flit(pf(p, i));
        chk("flit_cnt", flit_cnt, p * 4 + i + 1);
        chk("bov", bov, (p * 4 + i + 1) > 12);
      end
    chk("full: not ready", in_ready, 0);
    chk("pkt_cnt 4", pkt_cnt, 4);
    // 4. order 0,2,1,3
    read_packet(0);
    @(posedge clk); #1;
    chk("ready again", in_ready, 1);
    read_packet(2);
    read_packet(1);
    read_packet(3);
    repeat (2) @(posedge clk); #1;
    chk("empty again", flit_cnt, 0);
    chk("nothing offered", pkt_valid, 0);
    // 5. random concurrent traffic
    fork
      begin
        for (int p = 10; p < 210; p++) begin
          for (int i = 0; i < 4; i++) begin
            write_flit(pf(p, i));
            repeat ($urandom % 3) begin @(posedge clk); #1; end
          end
        end
      end
      begin
        int got = 0;
        while (got < 200) begin
          int pkt;
          while (!pkt_valid) begin @(posedge clk); #1; end
          pkt = int'(head_dest(front_flit)) - 1;
          checks++;
          if (flit_type(front_flit) != FT_HEAD || pkt < 10 || pkt >= 210) begin
            failures++; $display("FAIL random: bad head %08h", front_flit);
          end
          for (int i = 0; i < 4; i++) begin
            repeat ($urandom % 3) @(posedge clk);
            #1;
            checks++;
            if (front_flit !== pf(pkt, i)) begin
              failures++; $display("FAIL random pkt %0d flit %0d: %08h", pkt, i, front_flit);
            end
            pop = 1; @(posedge clk); #1 pop = 0;
          end
          got++;
        end
      end
    join
    chk("pkt_cnt total", pkt_cnt, 204);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
