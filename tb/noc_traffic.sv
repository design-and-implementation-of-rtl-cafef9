// noc_traffic: one complete network (noc_top) with a synthetic traffic
// source and a checker, used by the workload testbenches. Not synthesizable.
//
// After rst_n rises, every node makes an injection attempt every
// PACKET_SIZE+1 .. 2*INTERVAL-PACKET_SIZE-1 cycles (uniform, mean INTERVAL)
// for CYCLES cycles. The attempt picks a destination by the traffic pattern
// PATTERN (0 random, 1 shuffle, 2 neighbour, 3 transpose); nodes the pattern
// maps onto themselves do not send. An attempt is refused when the node's
// core is still busy sending, which is the case when its router's local
// input buffer has no room for a packet. The gaps and the random destinations
// come from a per-node linear congruential generator seeded with SEED, so two
// instances with the same SEED, size and pattern make exactly the same
// attempts, whatever their routing: only refusals and timing differ.
//
// After injection stops the network drains. Every packet must arrive once, at
// its destination, with its source id; the routers' and cores' packet
// counters must agree with the counts kept here. Outputs once done is 1:
// packets handled (accepted injections), refused attempts, average and peak
// latency (from the cycle the core takes the request to the cycle the
// delivery is reported, packets generated in the first WARMUP cycles left
// out), average and peak waiting time (latency minus the zero-load latency
// 4 + (PACKET_SIZE+3)*(hops+1) of the same packet), the number of packets
// rerouted from X to Y, and the testbench check and failure counts.
//
// Shuffle and transpose work on the bits of the 0-based node index and need
// MESH_SIZE to be a power of two.
module noc_traffic
  import noc_pkg::*;
#(
  parameter int MESH_SIZE   = 4,
  parameter int FIFO_DEPTH  = 16,
  parameter int NUM_VC      = 1,
  parameter int PACKET_SIZE = 4,
  parameter int BOV_PCT     = 75,
  parameter bit ADAPTIVE    = 1'b1,
  parameter int PATTERN     = 0,
  parameter int INTERVAL    = 15,
  parameter int CYCLES      = 5000,
  parameter int WARMUP      = 250,
  parameter int SEED        = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   handled,
  output int   refused,
  output int   lat_avg100,
  output int   lat_peak,
  output int   wait_avg100,
  output int   wait_peak,
  output int   reroutes,
  output int   checks,
  output int   failures
);
  localparam int M = MESH_SIZE, N = M * M, PS = PACKET_SIZE, BITS = $clog2(N);
  localparam int DRAIN_LIMIT = 50000;

  logic gen_pkt [N]; node_id_t gen_dest [N]; logic [14:0] gen_pkt_id [N]; logic tx_busy [N];
  logic rx_en [N]; logic rx_done [N]; node_id_t rx_src [N]; logic [14:0] rx_pkt_id [N];
  logic rx_dest_ok [N]; logic [31:0] rx_pkts [N]; logic [31:0] inj_pkts [N];

  noc_top #(
    .MESH_SIZE  (MESH_SIZE),
    .FIFO_DEPTH (FIFO_DEPTH),
    .NUM_VC     (NUM_VC),
    .PACKET_SIZE(PACKET_SIZE),
    .BOV_PCT    (BOV_PCT),
    .ADAPTIVE   (ADAPTIVE)
  ) dut (.*);

  // packets rerouted: counted once per packet, when its route is latched
  int c_rr [N][NPORTS];
  for (genvar k = 0; k < N; k++) begin : g_mon
    for (genvar p = 0; p < NPORTS; p++) begin : g_port
      initial c_rr[k][p] = 0;
      always @(posedge clk)
        if (rst_n && !dut.u_mesh.g_node[k].u_router.route_v[p] && dut.u_mesh.g_node[k].u_router.pkt_v[p]
            && dut.u_mesh.g_node[k].u_router.g_in[p].rerouted) c_rr[k][p]++;
    end
  end

  int unsigned lcg [N];
  function automatic int unsigned rnd(int k);
    lcg[k] = lcg[k] * 32'd1103515245 + 32'd12345;
    return lcg[k] >> 8;
  endfunction

  function automatic int gap(int k);
    return PS + 1 + int'(rnd(k) % unsigned'(2 * (INTERVAL - PS - 1) + 1));
  endfunction

  function automatic int pick_dest(int s);
    int d;
    case (PATTERN)
      0:       begin d = int'(rnd(s) % unsigned'(N - 1)); if (d >= s) d++; end
      1:       d = ((s << 1) | (s >> (BITS - 1))) & (N - 1);
      2:       d = (s / M) * M + ((s % M) + 1) % M;
      default: d = ((s << (BITS / 2)) | (s >> (BITS - BITS / 2))) & (N - 1);
    endcase
    return (d == s) ? -1 : d;
  endfunction

  function automatic int hops(int a, int b);
    int dr, dc;
    dr = a / M - b / M; dc = a % M - b % M;
    return (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);
  endfunction

  int gen_cyc [32768];
  int exp_dst [32768];
  int exp_src [32768];
  int seen    [32768];
  int pend_id [N];
  int wait_c  [N];
  int n_acc [N], n_rx [N];

  task automatic fail(string msg);
    failures++;
    $display("FAIL [size %0d depth %0d vc %0d ps %0d bov %0d adaptive %0d pattern %0d interval %0d] %s",
             M, FIFO_DEPTH, NUM_VC, PS, BOV_PCT, ADAPTIVE, PATTERN, INTERVAL, msg);
  endtask

  initial begin
    int cyc, next_id, outstanding, lat_n, wait_n;
    longint lat_sum, wait_sum;
    done = 0; handled = 0; refused = 0; lat_peak = 0; wait_peak = 0; reroutes = 0;
    lat_avg100 = 0; wait_avg100 = 0; checks = 0; failures = 0;
    cyc = 0; next_id = 0; outstanding = 0; lat_n = 0; wait_n = 0; lat_sum = 0; wait_sum = 0;
    for (int k = 0; k < N; k++) begin
      gen_pkt[k] = 0; gen_dest[k] = 0; gen_pkt_id[k] = 0; rx_en[k] = 1;
      n_acc[k] = 0; n_rx[k] = 0; pend_id[k] = 0;
      lcg[k] = unsigned'(SEED * 7919 + k * 104729);
      wait_c[k] = gap(k);
    end
    @(posedge rst_n);
    while (cyc < CYCLES || (outstanding > 0 && cyc < CYCLES + DRAIN_LIMIT)) begin
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        if (rx_done[k]) begin
          int id, lat, w;
          id = int'(rx_pkt_id[k]);
          checks++;
          if (seen[id] != 0 || exp_dst[id] != k || exp_src[id] != int'(rx_src[k]) - 1 || !rx_dest_ok[k])
            fail($sformatf("bad delivery of packet %0d at node %0d", id, k + 1));
          seen[id]++;
          outstanding--;
          n_rx[k]++;
          lat = cyc - gen_cyc[id];
          w = lat - (4 + (PS + 3) * (hops(exp_src[id], k) + 1));
          checks++;
          if (w < 0) fail($sformatf("packet %0d faster than zero-load latency", id));
          if (gen_cyc[id] >= WARMUP) begin
            lat_sum += lat; lat_n++;
            wait_sum += w; wait_n++;
            if (lat > lat_peak) lat_peak = lat;
            if (w > wait_peak) wait_peak = w;
          end
        end
        if (gen_pkt[k]) begin            // taken on this edge: the core was idle
          gen_cyc[pend_id[k]] = cyc;
          gen_pkt[k] = 0;
        end
      end
      if (cyc < CYCLES) begin
        for (int k = 0; k < N; k++) begin
          wait_c[k]--;
          if (wait_c[k] == 0) begin
            int d;
            wait_c[k] = gap(k);
            d = pick_dest(k);
            if (d >= 0) begin
              if (tx_busy[k]) refused++;
              else begin
                pend_id[k] = next_id;
                exp_dst[next_id] = d; exp_src[next_id] = k; seen[next_id] = 0;
                gen_dest[k] = node_id_t'(d + 1);
                gen_pkt_id[k] = 15'(next_id);
                gen_pkt[k] = 1;
                next_id = (next_id + 1) % 32768;
                outstanding++;
                handled++;
                n_acc[k]++;
              end
            end
          end
        end
      end
      cyc++;
    end
    checks++;
    if (outstanding != 0) fail($sformatf("%0d packets never delivered", outstanding));
    for (int k = 0; k < N; k++) begin
      checks += 2;
      if (int'(inj_pkts[k]) != n_acc[k]) fail($sformatf("router %0d local packet count", k + 1));
      if (int'(rx_pkts[k]) != n_rx[k]) fail($sformatf("core %0d received packet count", k + 1));
      for (int p = 0; p < NPORTS; p++) reroutes += c_rr[k][p];
    end
    checks++;
    if (handled == 0) fail("no packet injected");
    lat_avg100  = lat_n ? int'(lat_sum * 100 / lat_n) : 0;
    wait_avg100 = wait_n ? int'(wait_sum * 100 / wait_n) : 0;
    done = 1;
  end
endmodule
