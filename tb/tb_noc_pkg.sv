// tb_noc_pkg: checks the flit encoders and field extractors of noc_pkg
// against hand-computed 32-bit words (head: 11|dest[29:22]|0|src[7:0];
// body: 10|...|dest; tail: 01|0|pkt_id[22:8]|dest[7:0]) and the
// opposite-direction helper.
module tb_noc_pkg;
  import noc_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    check("head 12<-3", make_head(8'd12, 8'd3), 32'hC300_0003);
    check("head 64<-1", make_head(8'd64, 8'd1), 32'hD000_0001);
    check("body 12", make_body(8'd12), 32'h8000_000C);
    check("tail 12 id5", make_tail(8'd12, 15'd5), 32'h4000_050C);
    check("tail 1 id7fff", make_tail(8'd1, 15'h7fff), 32'h407F_FF01);
    check("type head", 32'(flit_type(32'hC300_0003)), 32'(2'b11));
    check("type body", 32'(flit_type(32'h8000_000C)), 32'(2'b10));
    check("type tail", 32'(flit_type(32'h4000_050C)), 32'(2'b01));
    check("head dest", 32'(head_dest(32'hD000_0001)), 32'd64);
    check("head src", 32'(head_src(32'hC300_0003)), 32'd3);
    check("tail id", 32'(tail_pkt_id(32'h407F_FF01)), 32'h7fff);
    check("tail dest", 32'(tail_dest(32'h4000_050C)), 32'd12);
    check("opp N", opposite(0), 2);
    check("opp E", opposite(1), 3);
    check("opp S", opposite(2), 0);
    check("opp W", opposite(3), 1);
    for (int i = 0; i < 200; i++) begin
      logic [7:0] d, s; logic [14:0] id;
      d = 8'($urandom); s = 8'($urandom); id = 15'($urandom);
      check("rt dest", 32'(head_dest(make_head(d, s))), 32'(d));
      check("rt src", 32'(head_src(make_head(d, s))), 32'(s));
      check("rt id", 32'(tail_pkt_id(make_tail(d, id))), 32'(id));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
