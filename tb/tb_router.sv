// tb_router: one router, node 6 of a 4x4 mesh (row 1, column 1, so it has a
// neighbour on every side), with a packet source on every input port and a
// sink on every output port.
//  1. Loopback: the local core sends a packet to node 6; it comes back out
//     of the local port unchanged. The tail leaves PACKET_SIZE+3 = 7 cycles
//     after it entered (stored, presented, routed, granted, 4 flits).
//  2. XY routes from the local port to all 15 other nodes.
//  3. Contention: N, S and Local all send to node 8 (East only); all three
//     leave through East one after the other, never interleaved.
//  4. Stall and BOV: with East blocked, the West buffer fills, in_ready[W]
//     drops and bov_out[W] rises once more than 12 flits are held.
//  5. Reroute: East blocked and three packets (12 flits) pending on it; a local packet to
//     node 16 (needs East and North) leaves through North. With bov_in[N]
//     set it stays on East.
//  6. Random traffic with random backpressure: every packet arrives intact
//     on its XY port or, for packets needing both dimensions, its Y port.
module tb_router;
  import noc_pkg::*;
  localparam int PS = 4;
  logic clk = 0, rst_n = 0;
  node_id_t router_id = 8'd6;
  flit_t in_port [NPORTS];
  logic in_req [NPORTS], in_ready [NPORTS];
  flit_t out_port [NPORTS];
  logic out_req [NPORTS], out_ready [NPORTS];
  logic [3:0] bov_in, bov_out;
  logic [31:0] num_pkts [NPORTS];
  int checks = 0, failures = 0;
  int cycle = 0;

  router #(.MESH_SIZE(4), .FIFO_DEPTH(8), .NUM_VC(2), .PACKET_SIZE(PS), .BOV_PCT(75),
           .ADAPTIVE(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int xy_port(int cur, int dst);
    int cr, cc, dr, dc;
    cr = (cur - 1) / 4; cc = (cur - 1) % 4; dr = (dst - 1) / 4; dc = (dst - 1) % 4;
    if (cur == dst) return 4;
    if (cc < dc) return 1;
    if (cc > dc) return 3;
    if (cr < dr) return 0;
    return 2;
  endfunction

  function automatic int yx_port(int cur, int dst);
    int cr, cc, dr, dc;
    cr = (cur - 1) / 4; cc = (cur - 1) % 4; dr = (dst - 1) / 4; dc = (dst - 1) % 4;
    if (cc == dc || cr == dr) return xy_port(cur, dst);
    return (cr < dr) ? 0 : 2;
  endfunction

  // ------------------------------------------------------------ sources
  int tail_in_cycle [NPORTS];

  task automatic send_pkt(int p, int dst, int src, int id);
    for (int i = 0; i < PS; i++) begin
      if (i == 0)           in_port[p] = make_head(8'(dst), 8'(src));
      else if (i == PS - 1) in_port[p] = make_tail(8'(dst), 15'(id));
      else                  in_port[p] = {FT_BODY, 7'd0, 15'(id), 8'(dst)};
      in_req[p] = 1;
      while (!in_ready[p]) begin @(posedge clk); #1; end
      @(posedge clk);
      if (i == PS - 1) tail_in_cycle[p] = cycle;
      #1 in_req[p] = 0;
    end
  endtask

  // ------------------------------------------------------------ sinks
  typedef struct { int port; int dst; int src; int id; int cyc; } rec_t;
  rec_t got_q [$];
  logic in_pkt [NPORTS];
  int   cur_dst [NPORTS], cur_src [NPORTS], cur_n [NPORTS];

  always @(posedge clk) begin
    if (rst_n) for (int o = 0; o < NPORTS; o++) begin
      if (out_req[o] && out_ready[o]) begin
        flit_t f;
        f = out_port[o];
        if (!in_pkt[o]) begin
          checks++;
          if (flit_type(f) != FT_HEAD) begin failures++; $display("FAIL out %0d: packet without head", o); end
          in_pkt[o] <= 1; cur_dst[o] <= int'(head_dest(f)); cur_src[o] <= int'(head_src(f)); cur_n[o] <= 1;
        end else begin
          checks++;
          if (flit_type(f) == FT_HEAD) begin failures++; $display("FAIL out %0d: interleaved packets", o); end
          cur_n[o] <= cur_n[o] + 1;
          if (flit_type(f) == FT_TAIL) begin
            rec_t r;
            checks++;
            if (cur_n[o] != PS - 1 || int'(tail_dest(f)) != cur_dst[o]) begin
              failures++; $display("FAIL out %0d: bad packet length or tail", o);
            end
            r.port = o; r.dst = cur_dst[o]; r.src = cur_src[o]; r.id = int'(tail_pkt_id(f)); r.cyc = cycle;
            got_q.push_back(r);
            in_pkt[o] <= 0;
          end
        end
      end
    end
  end

  int w_acc = 0;
  logic w_count_en = 0;
  always @(posedge clk) if (w_count_en && in_req[3] && in_ready[3]) w_acc <= w_acc + 1;

  task automatic wait_pkts(int n);
    int t;
    t = 0;
    while (got_q.size() < n && t < 2000) begin @(posedge clk); #1; t++; end
    chk("packets arrived", got_q.size(), n);
  endtask

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      in_port[p] = 0; in_req[p] = 0; out_ready[p] = 1; in_pkt[p] = 0;
    end
    bov_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;

    // 1. loopback through the local port
    send_pkt(4, 6, 6, 100);
    wait_pkts(1);
    chk("loopback port", got_q[0].port, 4);
    chk("loopback src", got_q[0].src, 6);
    chk("loopback id", got_q[0].id, 100);
    chk("tail latency", got_q[0].cyc - tail_in_cycle[4], PS + 3);
    got_q.delete();

    // 2. XY from local
    for (int d = 1; d <= 16; d++) begin
      if (d == 6) continue;
      send_pkt(4, d, 6, d);
      wait_pkts(1);
      chk($sformatf("xy port to %0d", d), got_q[0].port, xy_port(6, d));
      chk("id", got_q[0].id, d);
      got_q.delete();
    end
    chk("num_pkts local", num_pkts[4], 16);

    // 3. contention on East
    fork
      send_pkt(0, 8, 10, 200);
      send_pkt(2, 8, 2, 201);
      send_pkt(4, 8, 6, 202);
    join
    wait_pkts(3);
    for (int i = 0; i < 3; i++) chk("contention port", got_q[i].port, 1);
    chk("all three distinct", (got_q[0].id != got_q[1].id) && (got_q[1].id != got_q[2].id)
                               && (got_q[0].id != got_q[2].id), 1);
    got_q.delete();

    // 4. stall and BOV on the West input
    out_ready[1] = 0;
    w_count_en = 1;
    fork
      begin
        for (int k = 0; k < 5; k++) send_pkt(3, 8, 5, 300 + k);
      end
      begin
        int seen_bov, seen_stall;
        seen_bov = 0; seen_stall = 0;
        repeat (60) begin
          @(posedge clk); #1;
          if (bov_out[3]) seen_bov = 1;
          if (in_req[3] && !in_ready[3]) seen_stall = 1;
          checks++;
          // East is blocked, so every flit taken on West is still held
          if (bov_out[3] != (w_acc > 12)) begin
            failures++; $display("FAIL bov %0d with %0d flits held", bov_out[3], w_acc);
          end
        end
        chk("bov raised", seen_bov, 1);
        chk("input stalled", seen_stall, 1);
        chk("other bov low", bov_out[0] | bov_out[1] | bov_out[2], 0);
        out_ready[1] = 1;
      end
    join
    wait_pkts(5);
    // channel 0 holds 300 and 301, channel 1 holds 302 and 303: reads alternate
    chk("first stalled packet", got_q[0].id, 300);
    chk("second comes from channel 1", got_q[1].id, 302);
    begin
      int mask;
      mask = 0;
      for (int i = 0; i < 5; i++) mask |= 1 << (got_q[i].id - 300);
      chk("all stalled packets delivered", mask, 5'b11111);
    end
    got_q.delete();

    // 5. reroute
    out_ready[1] = 0;
    fork
      send_pkt(2, 8, 2, 400);
      send_pkt(3, 8, 5, 401);
      send_pkt(0, 8, 10, 404);
    join
    repeat (4) @(posedge clk); #1;
    send_pkt(4, 16, 6, 402);
    wait_pkts(1);
    chk("rerouted to North", got_q[0].port, 0);
    chk("rerouted id", got_q[0].id, 402);
    got_q.delete();
    bov_in = 4'b0001;
    send_pkt(4, 16, 6, 403);
    repeat (12) @(posedge clk); #1;
    chk("North congested: nothing on North", got_q.size(), 0);
    out_ready[1] = 1;
    wait_pkts(4);
    chk("kept on East", got_q[3].port, 1);
    chk("kept id", got_q[3].id, 403);
    got_q.delete();
    bov_in = 0;

    // 6. random traffic
    begin
      int sent [int];
      int nsent;
      nsent = 0;
      fork
        for (int p = 0; p < NPORTS; p++) begin
          automatic int pp = p;
          fork
            for (int k = 0; k < 40; k++) begin
              int d, id;
              d = 1 + $urandom % 16;
              id = 1000 + pp * 100 + k;
              sent[id] = d;
              nsent++;
              send_pkt(pp, d, pp, id);
              repeat ($urandom % 6) begin @(posedge clk); #1; end
            end
          join_none
        end
        repeat (3000) begin
          @(posedge clk); #1;
          for (int o = 0; o < NPORTS; o++) out_ready[o] = ($urandom % 4) != 0;
          bov_in = 4'($urandom);
        end
      join
      for (int o = 0; o < NPORTS; o++) out_ready[o] = 1;
      wait_pkts(200);
      foreach (got_q[i]) begin
        int d;
        d = sent.exists(got_q[i].id) ? sent[got_q[i].id] : -1;
        chk("random: known packet", d == got_q[i].dst, 1);
        chk("random: minimal port",
            (got_q[i].port == xy_port(6, d)) || (got_q[i].port == yx_port(6, d)), 1);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
