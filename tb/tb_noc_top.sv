// tb_noc_top: end-to-end run of the whole network at its default size
// (4x4 mesh, FIFO depth 8, 2 virtual channels, 4-flit packets, 75 % BOV
// threshold, congestion aware X/Y routing).
//
// Phase 0 sends isolated packets and checks the zero-load latency, from the
// cycle the core takes gen_pkt to the cycle rx_done is seen:
// 4 (core to router) + (PACKET_SIZE+3) per router crossed. It includes a
// packet a node sends to itself through its own router.
//
// Then, like a mesh NoC simulator, it runs synthetic traffic patterns one
// after another: random, shuffle, neighbour and transpose, each for
// INJ_CYCLES cycles with a mean injection interval of INTERVAL cycles per
// node (each node waits a random PACKET_SIZE+1 .. 2*INTERVAL-PACKET_SIZE-1
// cycles between attempts, so the core is never still busy with its own
// previous packet unless the network holds it back).
// An attempt while the core is still busy is refused, as a network without
// free input buffer space refuses a packet. After injection stops the
// network drains. A final hotspot phase (all nodes to node 6, short
// interval) loads one region heavily. Every accepted packet must be
// delivered exactly once, to the right node, with the right source id;
// per-node injection and delivery counters must agree with the testbench's
// own counts. Latency statistics skip the first WARMUP cycles of a phase.
//
// The mechanisms of the design are counted from inside the routers and each
// must occur at least once: packets rerouted from X to Y, BOV flags raised,
// input handshakes stalled, packets admitted to virtual channel 1, outputs
// with two or more pending requests, and refused injections.
module tb_noc_top;
  import noc_pkg::*;
  localparam int M = 4, N = M * M, PS = 4, BITS = 4;
  localparam int INJ_CYCLES = 5000, WARMUP = 250, INTERVAL = 15;

  logic clk = 0, rst_n = 0;
  logic gen_pkt [N]; node_id_t gen_dest [N]; logic [14:0] gen_pkt_id [N]; logic tx_busy [N];
  logic rx_en [N]; logic rx_done [N]; node_id_t rx_src [N]; logic [14:0] rx_pkt_id [N];
  logic rx_dest_ok [N]; logic [31:0] rx_pkts [N]; logic [31:0] inj_pkts [N];
  int checks = 0, failures = 0, cycle = 0;

  noc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int c_reroute [N][NPORTS];
  int c_bov     [N][NDIRS];
  int c_stall   [N][NPORTS];
  int c_vc1     [N][NPORTS];
  int c_conflict[N][NPORTS];

  for (genvar k = 0; k < N; k++) begin : g_mon
    for (genvar p = 0; p < NPORTS; p++) begin : g_port
      initial begin c_reroute[k][p] = 0; c_stall[k][p] = 0; c_vc1[k][p] = 0; c_conflict[k][p] = 0; end
      always @(posedge clk) if (rst_n) begin
        if (!dut.u_mesh.g_node[k].u_router.route_v[p] && dut.u_mesh.g_node[k].u_router.pkt_v[p]
            && dut.u_mesh.g_node[k].u_router.g_in[p].rerouted) c_reroute[k][p]++;
        if (dut.u_mesh.g_node[k].u_router.in_req[p] && !dut.u_mesh.g_node[k].u_router.in_ready[p])
          c_stall[k][p]++;
        if (dut.u_mesh.g_node[k].u_router.g_in[p].u_buf.wr_en
            && !dut.u_mesh.g_node[k].u_router.g_in[p].u_buf.rx_active
            && dut.u_mesh.g_node[k].u_router.g_in[p].u_buf.room_vc == 1'b1) c_vc1[k][p]++;
        if (dut.u_mesh.g_node[k].u_router.req_cnt[p] >= 2) c_conflict[k][p]++;
      end
    end
    for (genvar d = 0; d < NDIRS; d++) begin : g_dir
      initial c_bov[k][d] = 0;
      always @(posedge clk)
        if (rst_n && dut.u_mesh.g_node[k].u_router.bov_out[d]
            && !$past(dut.u_mesh.g_node[k].u_router.bov_out[d])) c_bov[k][d]++;
    end
  end

  function automatic int sum2(int which);
    int s;
    s = 0;
    for (int k = 0; k < N; k++)
      for (int p = 0; p < NPORTS; p++)
        case (which)
          0: s += c_reroute[k][p];
          1: s += (p < NDIRS) ? c_bov[k][p] : 0;
          2: s += c_stall[k][p];
          3: s += c_vc1[k][p];
          default: s += c_conflict[k][p];
        endcase
    return s;
  endfunction

  // ------------------------------------------------------------ traffic patterns
  typedef enum int { P_RANDOM, P_SHUFFLE, P_NEIGHBOR, P_TRANSPOSE, P_HOTSPOT } pattern_e;

  // destination index (0-based) for source index s, or -1 when s would send to itself
  function automatic int pick_dest(pattern_e pat, int s);
    int d;
    case (pat)
      P_RANDOM:    begin d = $urandom % (N - 1); if (d >= s) d++; end
      P_SHUFFLE:   d = ((s << 1) | (s >> (BITS - 1))) & (N - 1);
      P_NEIGHBOR:  d = (s / M) * M + ((s % M) + 1) % M;
      P_TRANSPOSE: d = ((s << (BITS / 2)) | (s >> (BITS / 2))) & (N - 1);
      default:     d = 5;
    endcase
    return (d == s) ? -1 : d;
  endfunction

  function automatic int manhattan(int a, int b);
    int dr, dc;
    dr = a / M - b / M; dc = a % M - b % M;
    return (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);
  endfunction

  // ------------------------------------------------------------ bookkeeping
  int gen_cyc [32768];
  int exp_dst [32768];
  int exp_src [32768];
  int seen    [32768];
  int next_id;
  int outstanding;
  int n_acc_node [N], n_rx_node [N];
  int n_refused;
  longint lat_sum; int lat_n, lat_peak;
  int pend_dest [N];
  int pend_id [N];

  // every cycle: retire deliveries, record accepted injections
  always @(posedge clk) begin
    #1;
    if (rst_n) for (int k = 0; k < N; k++) begin
      if (rx_done[k]) begin
        int id, lat;
        id = int'(rx_pkt_id[k]);
        checks++;
        if (seen[id] != 0 || exp_dst[id] != k || exp_src[id] != int'(rx_src[k]) - 1 || !rx_dest_ok[k]) begin
          failures++;
          $display("FAIL delivery id %0d at node %0d (seen %0d, dst %0d, src %0d/%0d)",
                   id, k + 1, seen[id], exp_dst[id] + 1, exp_src[id] + 1, rx_src[k]);
        end
        seen[id]++;
        outstanding--;
        n_rx_node[k]++;
        lat = cycle - gen_cyc[id];
        if (gen_cyc[id] >= warm_until) begin
          lat_sum += lat; lat_n++;
          if (lat > lat_peak) lat_peak = lat;
        end
        last_lat = lat;
      end
      if (gen_pkt[k]) begin          // taken at this edge: tx_busy was 0
        gen_cyc[pend_id[k]] = cycle;
        gen_pkt[k] = 0;
      end
    end
  end

  int warm_until = 0;
  int last_lat;

  task automatic inject(int s, int d);
    int id;
    id = next_id;
    next_id = (next_id + 1) % 32768;
    exp_dst[id] = d; exp_src[id] = s; seen[id] = 0;
    pend_id[s] = id;
    gen_dest[s] = node_id_t'(d + 1);
    gen_pkt_id[s] = 15'(id);
    gen_pkt[s] = 1;
    outstanding++;
    n_acc_node[s]++;
  endtask

  task automatic drain(int limit);
    int t;
    t = 0;
    while (outstanding > 0 && t < limit) begin @(posedge clk); #2; t++; end
    chk("network drained", outstanding, 0);
  endtask

  // gap between injection attempts: uniform in PS+1 .. 2*interval-PS-1, mean = interval
  function automatic int gap(int interval);
    return PS + 1 + $urandom % (2 * (interval - PS - 1) + 1);
  endfunction

  task automatic run_phase(pattern_e pat, int interval, int inj_cycles, string name);
    int wait_c [N];
    int acc0, ref0;
    acc0 = 0; for (int k = 0; k < N; k++) acc0 += n_acc_node[k];
    ref0 = n_refused;
    lat_sum = 0; lat_n = 0; lat_peak = 0;
    warm_until = cycle + WARMUP;
    for (int k = 0; k < N; k++) wait_c[k] = gap(interval);
    repeat (inj_cycles) begin
      @(posedge clk); #2;
      for (int k = 0; k < N; k++) begin
        if (--wait_c[k] == 0) begin
          int d;
          wait_c[k] = gap(interval);
          d = pick_dest(pat, k);
          if (d >= 0) begin
            if (tx_busy[k] || gen_pkt[k]) n_refused++;
            else inject(k, d);
          end
        end
      end
    end
    drain(40000);
    begin
      int acc;
      acc = -acc0; for (int k = 0; k < N; k++) acc += n_acc_node[k];
      $display("%-10s interval %0d: packets handled %0d, refused %0d, avg latency %0d.%02d, peak latency %0d cycles",
               name, interval, acc, n_refused - ref0, lat_n ? int'(lat_sum / lat_n) : 0,
               lat_n ? int'((lat_sum * 100 / lat_n) % 100) : 0, lat_peak);
      $display("           reroutes %0d, bov rises %0d, stalls %0d, vc1 admissions %0d, conflicts %0d",
               sum2(0), sum2(1), sum2(2), sum2(3), sum2(4));
      checks++;
      if (acc == 0) begin failures++; $display("FAIL %s: no packets handled", name); end
    end
  endtask

  task automatic single(int s, int d);
    inject(s, d);
    @(posedge clk); #2;
    drain(1000);
    chk($sformatf("zero-load latency %0d->%0d", s + 1, d + 1), last_lat, 4 + (PS + 3) * (manhattan(s, d) + 1));
  endtask

  initial begin
    next_id = 0; outstanding = 0; n_refused = 0;
    for (int k = 0; k < N; k++) begin
      gen_pkt[k] = 0; gen_dest[k] = 0; gen_pkt_id[k] = 0; rx_en[k] = 1;
      n_acc_node[k] = 0; n_rx_node[k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #2;

    // phase 0: isolated packets, including the loopback of node 12 to itself
    single(11, 11);
    single(0, 15);
    single(15, 0);
    single(5, 6);
    single(3, 12);

    run_phase(P_RANDOM,    INTERVAL, INJ_CYCLES, "random");
    run_phase(P_SHUFFLE,   INTERVAL, INJ_CYCLES, "shuffle");
    run_phase(P_NEIGHBOR,  INTERVAL, INJ_CYCLES, "neighbor");
    run_phase(P_TRANSPOSE, INTERVAL, INJ_CYCLES, "transpose");
    run_phase(P_RANDOM,    8,        2000,       "random-hi");
    run_phase(P_HOTSPOT,   8,        1000,       "hotspot");

    for (int k = 0; k < N; k++) begin
      chk($sformatf("inj_pkts node %0d", k + 1), inj_pkts[k], n_acc_node[k]);
      chk($sformatf("rx_pkts node %0d", k + 1), rx_pkts[k], n_rx_node[k]);
    end
    checks++; if (sum2(0) == 0) begin failures++; $display("FAIL no packet was rerouted"); end
    checks++; if (sum2(1) == 0) begin failures++; $display("FAIL no BOV flag was raised"); end
    checks++; if (sum2(2) == 0) begin failures++; $display("FAIL no input stall"); end
    checks++; if (sum2(3) == 0) begin failures++; $display("FAIL virtual channel 1 never used"); end
    checks++; if (sum2(4) == 0) begin failures++; $display("FAIL no output conflict"); end
    checks++; if (n_refused == 0) begin failures++; $display("FAIL no injection refused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
