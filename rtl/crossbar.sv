// crossbar: the 5x5 switch between input buffers and output ports.
//
// Output port o carries the front flit of the input named by sel[o] while
// en[o] is 1; its request line is that input's valid line. In the other
// direction an input is popped when the output it is connected to sees its
// ready line high. The switch allocator guarantees that no input is selected
// by two outputs at once. Purely combinational: switch traversal takes no
// clock cycle of its own, the flit is registered by the downstream buffer.
module crossbar
  import noc_pkg::*;
(
  input  flit_t      in_flit  [NPORTS],
  input  logic       in_valid [NPORTS],
  output logic       in_pop   [NPORTS],
  input  logic       en       [NPORTS],   // per output
  input  logic [2:0] sel      [NPORTS],   // per output: input index
  output flit_t      out_flit [NPORTS],
  output logic       out_req  [NPORTS],
  input  logic       out_ready[NPORTS]
);

  always_comb begin
    for (int unsigned i = 0; i < NPORTS; i++) in_pop[i] = 1'b0;
    for (int unsigned o = 0; o < NPORTS; o++) begin
      out_flit[o] = '0;
      out_req[o]  = 1'b0;
      if (en[o] && int'(sel[o]) < NPORTS) begin
        out_flit[o] = in_flit[sel[o]];
        out_req[o]  = in_valid[sel[o]];
        if (in_valid[sel[o]] && out_ready[o]) in_pop[sel[o]] = 1'b1;
      end
    end
  end

endmodule
