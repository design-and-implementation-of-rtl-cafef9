// tb_crossbar: random connections through the 5x5 crossbar. Each output is
// enabled at random and connected to a distinct input; the testbench checks
// the output flits and request lines and which inputs are popped against a
// model of the connections.
module tb_crossbar;
  import noc_pkg::*;
  flit_t in_flit [NPORTS];
  logic in_valid [NPORTS];
  logic in_pop [NPORTS];
  logic en [NPORTS];
  logic [2:0] sel [NPORTS];
  flit_t out_flit [NPORTS];
  logic out_req [NPORTS];
  logic out_ready [NPORTS];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int perm [NPORTS];
      logic exp_pop [NPORTS];
      for (int i = 0; i < NPORTS; i++) perm[i] = i;
      for (int i = NPORTS - 1; i > 0; i--) begin
        int j, tmp; j = $urandom % (i + 1); tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      for (int i = 0; i < NPORTS; i++) begin
        in_flit[i] = $urandom; in_valid[i] = $urandom % 2;
        en[i] = $urandom % 2; sel[i] = 3'(perm[i]); out_ready[i] = $urandom % 2;
        exp_pop[i] = 0;
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (en[o]) begin
          if (out_flit[o] !== in_flit[perm[o]] || out_req[o] !== in_valid[perm[o]]) begin
            failures++; $display("FAIL output %0d", o);
          end
          if (in_valid[perm[o]] && out_ready[o]) exp_pop[perm[o]] = 1;
        end else if (out_req[o] !== 0) begin
          failures++; $display("FAIL disabled output %0d requests", o);
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        checks++;
        if (in_pop[i] !== exp_pop[i]) begin failures++; $display("FAIL pop %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
