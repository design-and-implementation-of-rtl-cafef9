// tb_noc_mesh: the 4x4 mesh with default parameters, driven directly on the
// local ports.
//  1. One packet from node 1 to node 16 crosses 7 routers; each router adds
//     PACKET_SIZE+3 = 7 cycles between tail in and tail out, so the tail
//     reaches node 16's local port 49 cycles after it entered node 1.
//  2. All-to-all: every node sends one packet to each of the 15 others, all
//     at once; every packet must arrive, intact, at its destination, and each
//     router's num_pkts must read 15.
//  3. Hotspot: all 15 other nodes send 6 packets each to node 6 while node 6
//     accepts a flit only every other cycle; all 90 must arrive.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int M = 4, N = 16, PS = 4;
  logic clk = 0, rst_n = 0;
  flit_t local_in_flit [N]; logic local_in_req [N], local_in_ready [N];
  flit_t local_out_flit [N]; logic local_out_req [N], local_out_ready [N];
  logic [31:0] num_pkts [N];
  int checks = 0, failures = 0, cycle = 0;

  noc_mesh dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int tail_in_cycle;

  task automatic send_pkt(int k, int dst, int id);
    for (int i = 0; i < PS; i++) begin
      if (i == 0)           local_in_flit[k] = make_head(8'(dst), 8'(k + 1));
      else if (i == PS - 1) local_in_flit[k] = make_tail(8'(dst), 15'(id));
      else                  local_in_flit[k] = make_body(8'(dst));
      local_in_req[k] = 1;
      while (!local_in_ready[k]) begin @(posedge clk); #1; end
      @(posedge clk);
      tail_in_cycle = cycle;
      #1 local_in_req[k] = 0;
    end
  endtask

  // sinks: check every packet delivered at node k
  int n_rx = 0, last_rx_cycle = 0;
  int rx_count [int];     // id -> times received
  int rx_src [N];
  logic in_pkt [N];
  int nflit [N];

  always @(posedge clk) begin
    if (rst_n) for (int k = 0; k < N; k++) begin
      if (local_out_req[k] && local_out_ready[k]) begin
        flit_t f;
        f = local_out_flit[k];
        checks++;
        case (flit_type(f))
          FT_HEAD: begin
            if (in_pkt[k] || int'(head_dest(f)) != k + 1) begin
              failures++; $display("FAIL node %0d: bad head %08h", k + 1, f);
            end
            in_pkt[k] <= 1; nflit[k] <= 1; rx_src[k] <= int'(head_src(f));
          end
          FT_BODY: begin
            if (!in_pkt[k]) begin failures++; $display("FAIL node %0d: stray body", k + 1); end
            nflit[k] <= nflit[k] + 1;
          end
          default: begin
            int id;
            id = int'(tail_pkt_id(f));
            if (!in_pkt[k] || nflit[k] != PS - 1 || int'(tail_dest(f)) != k + 1
                || (id / 256) != rx_src[k]) begin
              failures++; $display("FAIL node %0d: bad tail %08h", k + 1, f);
            end
            in_pkt[k] <= 0;
            rx_count[id] = rx_count.exists(id) ? rx_count[id] + 1 : 1;
            n_rx++;
            last_rx_cycle = cycle;
          end
        endcase
      end
    end
  end

  task automatic wait_rx(int n, int limit);
    int t;
    t = 0;
    while (n_rx < n && t < limit) begin @(posedge clk); #1; t++; end
    chk("packets delivered", n_rx, n);
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      local_in_flit[k] = 0; local_in_req[k] = 0; local_out_ready[k] = 1; in_pkt[k] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1; #1;

    // 1. corner to corner
    send_pkt(0, 16, 1 * 256 + 0);
    wait_rx(1, 500);
    chk("corner latency (tail in to tail out)", last_rx_cycle - tail_in_cycle, 7 * (PS + 3));
    chk("corner id", rx_count.exists(256), 1);
    rx_count.delete(); n_rx = 0;

    // 2. all to all
    for (int s = 0; s < N; s++) begin
      automatic int ss = s;
      fork
        for (int j = 1; j < N; j++) begin
          int d;
          d = (ss + j) % N;                          // 0-based destination
          send_pkt(ss, d + 1, (ss + 1) * 256 + d);
        end
      join_none
    end
    wait fork;
    wait_rx(N * (N - 1), 20000);
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        if (s != d) chk($sformatf("pkt %0d->%0d once", s + 1, d + 1),
                        rx_count.exists((s + 1) * 256 + d) ? rx_count[(s + 1) * 256 + d] : 0, 1);
    for (int k = 0; k < N; k++) chk("router num_pkts", num_pkts[k], N - 1 + (k == 0));
    rx_count.delete(); n_rx = 0;

    // 3. hotspot on node 6 with a slow sink
    fork
      begin
        repeat (4000) begin @(posedge clk); #1; local_out_ready[5] = !local_out_ready[5]; end
        local_out_ready[5] = 1;
      end
      begin
        for (int s = 0; s < N; s++) begin
          automatic int ss = s;
          if (ss != 5) fork
            for (int r = 0; r < 6; r++) send_pkt(ss, 6, (ss + 1) * 256 + 100 + r);
          join_none
        end
        wait_rx(90, 40000);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
