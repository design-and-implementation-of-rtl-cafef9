// tb_switch_allocator: checks the request matrix, the per-column request
// counts, and the grant behaviour of the switch allocator.
//  1. Inputs 0, 2 and 4 all request output 3: the grants come out in
//     round-robin order 0, 2, 4, 0 ..., each grant starts one cycle after
//     the request and is held until done[3] is pulsed.
//  2. Requests to different outputs are granted in the same cycle.
//  3. Random requests with random done pulses: no output ever has two
//     owners, an owner is always an input requesting that output, and the
//     counts equal the number of requests per column.
module tb_switch_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid [NPORTS];
  port_e req_port [NPORTS];
  logic done [NPORTS];
  logic out_busy [NPORTS];
  logic [2:0] out_owner [NPORTS];
  logic in_granted [NPORTS];
  logic [2:0] req_cnt [NPORTS];
  logic [NPORTS-1:0] req_matrix [NPORTS];
  int checks = 0, failures = 0;

  switch_allocator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic clear();
    for (int i = 0; i < NPORTS; i++) begin req_valid[i] = 0; req_port[i] = PORT_N; done[i] = 0; end
  endtask

  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // 1. three inputs on output 3 (West)
    req_valid[0] = 1; req_port[0] = PORT_W;
    req_valid[2] = 1; req_port[2] = PORT_W;
    req_valid[4] = 1; req_port[4] = PORT_W;
    #1;
    chk("count col 3", req_cnt[3], 3);
    chk("count col 0", req_cnt[0], 0);
    chk("matrix row 2", req_matrix[2], 5'b01000);
    chk("not busy before edge", out_busy[3], 0);
    begin
      int order [4] = '{0, 2, 4, 0};
      for (int k = 0; k < 4; k++) begin
        @(posedge clk); #1;
        chk("busy after grant", out_busy[3], 1);
        chk($sformatf("owner %0d", k), out_owner[3], order[k]);
        chk("granted flag", in_granted[order[k]], 1);
        repeat (3) begin @(posedge clk); #1; chk("held", out_owner[3], order[k]); end
        done[3] = 1; req_valid[order[k]] = (k < 2);   // 0 and 2 re-request later
        @(posedge clk); #1;
        done[3] = 0;
        chk("released", out_busy[3], 0);
        if (k < 2) req_valid[order[k]] = 1;
        else req_valid[order[k]] = 1;
      end
    end
    clear();
    @(posedge clk); #1;
    // 2. parallel grants
    req_valid[0] = 1; req_port[0] = PORT_E;
    req_valid[1] = 1; req_port[1] = PORT_L;
    req_valid[4] = 1; req_port[4] = PORT_S;
    @(posedge clk); #1;
    chk("E owned by 0", out_busy[1] && out_owner[1] == 0, 1);
    chk("L owned by 1", out_busy[4] && out_owner[4] == 1, 1);
    chk("S owned by 4", out_busy[2] && out_owner[2] == 4, 1);
    chk("N idle", out_busy[0], 0);
    for (int o = 0; o < NPORTS; o++) done[o] = 1;
    @(posedge clk); #1;
    clear();
    @(posedge clk); #1;
    for (int o = 0; o < NPORTS; o++) done[o] = 1;
    @(posedge clk); #1;
    clear();
    // 3. random
    for (int t = 0; t < 3000; t++) begin
      // inputs that are not being served may change their request
      for (int i = 0; i < NPORTS; i++)
        if (!in_granted[i] && ($urandom % 4 == 0)) begin
          req_valid[i] = $urandom % 2;
          req_port[i] = port_e'($urandom % 5);
        end
      for (int o = 0; o < NPORTS; o++) done[o] = out_busy[o] && ($urandom % 3 == 0);
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        int n; n = 0;
        for (int i = 0; i < NPORTS; i++) if (req_valid[i] && req_port[i] == port_e'(o)) n++;
        chk("count", req_cnt[o], n);
        if (out_busy[o]) begin
          chk("owner requests this output",
              req_valid[out_owner[o]] && req_port[out_owner[o]] == port_e'(o), 1);
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        int n; n = 0;
        for (int o = 0; o < NPORTS; o++) if (out_busy[o] && out_owner[o] == 3'(i)) n++;
        chk("at most one output per input", n <= 1, 1);
      end
      @(posedge clk); #1;
      // a granted input keeps its request until its output is released
      for (int o = 0; o < NPORTS; o++) done[o] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
