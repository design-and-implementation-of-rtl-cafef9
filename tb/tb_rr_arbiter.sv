// tb_rr_arbiter: drives random request vectors into a 5-input round-robin
// arbiter and compares each grant with a reference pointer model kept in the
// testbench. Also checks that with all requests held high the grants rotate
// 0,1,2,3,4,0,... and that a request dropped from the sequence is skipped.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [2:0] gnt_idx;
  logic gnt_valid, take;
  int checks = 0, failures = 0;
  int ref_ptr;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_idx(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  task automatic step_check();
    int e;
    #1;
    e = expect_idx(req, ref_ptr);
    checks++;
    if (e < 0) begin
      if (gnt_valid || gnt != 0) begin failures++; $display("FAIL grant without request"); end
    end else if (!gnt_valid || int'(gnt_idx) != e || gnt != N'(1 << e)) begin
      failures++;
      $display("FAIL req=%b ptr=%0d got idx=%0d gnt=%b expected %0d", req, ref_ptr, gnt_idx, gnt, e);
    end
    @(posedge clk);
    if (take && e >= 0) ref_ptr = (e + 1) % N;
    #1;
  endtask

  initial begin
    req = 0; take = 0; ref_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // all requesting: strict rotation
    req = '1; take = 1;
    for (int i = 0; i < 10; i++) begin
      checks++;
      #1;
      if (int'(gnt_idx) != i % N) begin failures++; $display("FAIL rotation %0d got %0d", i, gnt_idx); end
      @(posedge clk);
      ref_ptr = (i % N + 1) % N;
      #1;
    end
    // input 2 absent: skipped
    req = 5'b11011;
    for (int i = 0; i < 8; i++) step_check();
    // random, take sometimes low
    for (int i = 0; i < 2000; i++) begin
      req = N'($urandom);
      take = ($urandom % 4) != 0;
      step_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
