// tb_noc_routing_compare: congestion aware X/Y routing against plain XY
// routing on the evaluations of the congestion aware router.
//
// Each row is one complete network driven by noc_traffic; the runs go side
// by side, and every row runs twice, with XY and with congestion aware
// routing, with the same traffic seed, so both see the same injection
// attempts. The rows are:
//   * 8x8 mesh, 1 VC of depth 16, BOV threshold 75 %, transpose traffic,
//     mean injection interval 15 cycles;
//   * 4x4 mesh, 1 VC of depth 16, BOV threshold 75 %, random traffic,
//     interval 21 cycles.
// Both use 4-flit packets, 5000 injection cycles and 250 warm-up cycles.
// More rows (other sizes, buffer configurations, patterns, thresholds) are
// added by extending row() and NR; each distinct row is a separate
// elaboration of the whole network, so compile time grows with the rows.
//
// Checked: every packet of every run is delivered correctly (noc_traffic),
// XY routing never reroutes, congestion aware routing reroutes at least once
// on transpose traffic. The packets handled, latencies and waiting times of
// each pair are printed side by side.
module tb_noc_routing_compare;
  localparam int NR = 2;
  // one row per run: size, depth, vcs, bov %, pattern, interval
  // (each row runs once with XY routing and once with congestion aware routing)
  function automatic logic [47:0] row(int i);
    case (i)
      0:       return {8'd8, 8'd16, 8'd1, 8'd75, 8'd3, 8'd15};
      default: return {8'd4, 8'd16, 8'd1, 8'd75, 8'd0, 8'd21};
    endcase
  endfunction

  function automatic int cfg(int i, int field);
    return int'((row(i) >> (8 * (5 - field))) & 48'hff);
  endfunction


  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [NR][2];
  int handled [NR][2], refused [NR][2], lat_avg [NR][2], lat_peak [NR][2];
  int wait_avg [NR][2], wait_peak [NR][2], reroutes [NR][2], r_checks [NR][2], r_fails [NR][2];

  for (genvar i = 0; i < NR; i++) begin : g_run
    for (genvar a = 0; a < 2; a++) begin : g_alg
      noc_traffic #(
        .MESH_SIZE  (cfg(i, 0)),
        .FIFO_DEPTH (cfg(i, 1)),
        .NUM_VC     (cfg(i, 2)),
        .PACKET_SIZE(4),
        .BOV_PCT    (cfg(i, 3)),
        .ADAPTIVE   (a == 1),
        .PATTERN    (cfg(i, 4)),
        .INTERVAL   (cfg(i, 5)),
        .CYCLES     (5000),
        .WARMUP     (250),
        .SEED       (i + 1)
      ) u_net (
        .clk        (clk),
        .rst_n      (rst_n),
        .done       (done[i][a]),
        .handled    (handled[i][a]),
        .refused    (refused[i][a]),
        .lat_avg100 (lat_avg[i][a]),
        .lat_peak   (lat_peak[i][a]),
        .wait_avg100(wait_avg[i][a]),
        .wait_peak  (wait_peak[i][a]),
        .reroutes   (reroutes[i][a]),
        .checks     (r_checks[i][a]),
        .failures   (r_fails[i][a])
      );
    end
  end

  int checks = 0, failures = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string pname(int p);
    case (p)
      0: return "random";
      1: return "shuffle";
      2: return "neighbor";
      default: return "transpose";
    endcase
  endfunction

  function automatic bit all_done();
    for (int i = 0; i < NR; i++)
      for (int a = 0; a < 2; a++)
        if (!done[i][a]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    do @(posedge clk); while (!all_done());
    $display("mesh depth vc bov  pattern   intv | handled XY/CA  | avg lat XY/CA   | peak lat XY/CA | avg wait XY/CA  | peak wait XY/CA | reroutes");
    for (int i = 0; i < NR; i++) begin
      $display("%0dx%0d  %4d %2d %3d%% %-9s %4d | %5d / %5d  | %0d.%02d / %0d.%02d | %4d / %4d    | %0d.%02d / %0d.%02d | %4d / %4d     | %0d",
               cfg(i, 0), cfg(i, 0), cfg(i, 1), cfg(i, 2), cfg(i, 3), pname(cfg(i, 4)), cfg(i, 5),
               handled[i][0], handled[i][1],
               lat_avg[i][0] / 100, lat_avg[i][0] % 100, lat_avg[i][1] / 100, lat_avg[i][1] % 100,
               lat_peak[i][0], lat_peak[i][1],
               wait_avg[i][0] / 100, wait_avg[i][0] % 100, wait_avg[i][1] / 100, wait_avg[i][1] % 100,
               wait_peak[i][0], wait_peak[i][1], reroutes[i][1]);
      for (int a = 0; a < 2; a++) begin
        checks += r_checks[i][a];
        failures += r_fails[i][a];
      end
      checks++;
      if (reroutes[i][0] != 0) begin
        failures++;
        $display("FAIL row %0d: XY routing rerouted %0d packets", i, reroutes[i][0]);
      end
      if (cfg(i, 4) == 3) begin
        checks++;
        if (reroutes[i][1] == 0) begin
          failures++;
          $display("FAIL row %0d: congestion aware routing never rerouted", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
