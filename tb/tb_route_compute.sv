// tb_route_compute: checks route computation on a 4x4 mesh.
//  1. With no pending requests and no congestion, every (router, destination)
//     pair gets the XY dimension ordered port, worked out here from the
//     node grid (nodes numbered 1..16 row by row from the bottom left).
//  2. Hand-picked cases of the congestion aware rule at router 6
//     (row 1, column 1) for destination 16 (X port East, Y port North).
//  3. Random request counts and congestion flags against a reference
//     written from the rule: reroute to Y only when X has more pending
//     requests than Y, X is congested or its pending requests amount to
//     12 flits (the BOV threshold) or more,
//     and Y is not congested; packets needing one dimension never move.
module tb_route_compute;
  import noc_pkg::*;
  localparam int M = 4;
  node_id_t cur_id, dest_id;
  logic [3:0] bov_in;
  logic [2:0] req_cnt [NPORTS];
  port_e out_port;
  logic reroutable, rerouted;
  int checks = 0, failures = 0;

  route_compute #(.MESH_SIZE(M), .PACKET_SIZE(4), .PEND_THRESH(12), .ADAPTIVE(1'b1)) dut (.*);

  // node grid for the reference: row r (bottom = 0), column c
  function automatic int xy_port(int cur, int dst);
    int cr = (cur - 1) / M, cc = (cur - 1) % M, dr = (dst - 1) / M, dc = (dst - 1) % M;
    if (cur == dst) return 4;
    if (cc < dc) return 1;
    if (cc > dc) return 3;
    if (cr < dr) return 0;
    return 2;
  endfunction

  function automatic int yx_port(int cur, int dst);
    int cr = (cur - 1) / M, dr = (dst - 1) / M;
    return (cr < dr) ? 0 : 2;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic set_cnt(int n, int e, int s, int w, int l);
    req_cnt[0] = 3'(n); req_cnt[1] = 3'(e); req_cnt[2] = 3'(s); req_cnt[3] = 3'(w); req_cnt[4] = 3'(l);
  endtask

  initial begin
    bov_in = '0;
    set_cnt(0, 0, 0, 0, 0);
    // 1. plain XY when idle
    for (int c = 1; c <= 16; c++)
      for (int d = 1; d <= 16; d++) begin
        cur_id = 8'(c); dest_id = 8'(d); #1;
        chk($sformatf("xy %0d->%0d", c, d), out_port, xy_port(c, d));
        chk("not rerouted when idle", rerouted, 0);
      end
    // spot values from the port arrangement: 1->4 East, 4->1 West, 1->13 North, 13->1 South, 7->7 Local
    cur_id = 1; dest_id = 4; #1 chk("1->4 east", out_port, 1);
    cur_id = 4; dest_id = 1; #1 chk("4->1 west", out_port, 3);
    cur_id = 1; dest_id = 13; #1 chk("1->13 north", out_port, 0);
    cur_id = 13; dest_id = 1; #1 chk("13->1 south", out_port, 2);
    cur_id = 7; dest_id = 7; #1 chk("7 local", out_port, 4);
    // 2. hand-picked adaptive cases, router 6 -> 16: X = East(1), Y = North(0)
    cur_id = 6; dest_id = 16;
    set_cnt(0, 1, 0, 0, 0); bov_in = 4'b0000; #1 chk("X 1 req (4 flits < 12), free: X", out_port, 1);
    set_cnt(0, 2, 0, 0, 0); bov_in = 4'b0000; #1 chk("X 2 req (8 flits < 12), free: X", out_port, 1);
    chk("reroutable", reroutable, 1);
    set_cnt(0, 3, 0, 0, 0); bov_in = 4'b0000; #1 chk("X 3 req (12 flits): Y", out_port, 0);
    chk("rerouted flag", rerouted, 1);
    set_cnt(0, 1, 0, 0, 0); bov_in = 4'b0010; #1 chk("X congested: Y", out_port, 0);
    set_cnt(0, 3, 0, 0, 0); bov_in = 4'b0011; #1 chk("both congested: X", out_port, 1);
    set_cnt(2, 2, 0, 0, 0); bov_in = 4'b0010; #1 chk("X not more than Y: X", out_port, 1);
    set_cnt(1, 3, 0, 0, 0); bov_in = 4'b0000; #1 chk("3 vs 1: Y", out_port, 0);
    // single-dimension packets never move: 6 -> 8 (East only), 6 -> 14 (North only)
    cur_id = 6; dest_id = 8; set_cnt(0, 4, 0, 0, 0); bov_in = 4'b1111; #1 chk("east only", out_port, 1);
    chk("not reroutable", reroutable, 0);
    cur_id = 6; dest_id = 14; set_cnt(4, 0, 0, 0, 0); #1 chk("north only", out_port, 0);
    // 3. random against the reference rule
    for (int i = 0; i < 5000; i++) begin
      int c, d, xp, yp, exp;
      c = 1 + $urandom % 16; d = 1 + $urandom % 16;
      cur_id = 8'(c); dest_id = 8'(d);
      for (int p = 0; p < 5; p++) req_cnt[p] = 3'($urandom % 5);
      bov_in = 4'($urandom);
      #1;
      xp = xy_port(c, d);
      exp = xp;
      if ((xp == 1 || xp == 3) && ((c - 1) / M != (d - 1) / M)) begin
        yp = yx_port(c, d);
        if (req_cnt[xp] > req_cnt[yp] && (bov_in[xp] || req_cnt[xp] * 4 >= 12) && !bov_in[yp]) exp = yp;
      end
      chk($sformatf("random %0d->%0d", c, d), out_port, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
