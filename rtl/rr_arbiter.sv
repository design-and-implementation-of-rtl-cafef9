// rr_arbiter: round-robin arbiter over N requesters.
//
// The arbiter grants the first active request found when searching upward
// (with wrap-around) from the requester that currently has the highest
// priority. When the caller accepts the grant (take = 1) the priority pointer
// moves to the requester just after the one granted, so the granted requester
// has the lowest priority in the next round. That is the round-robin rule the
// design specifies for switch allocation; the pointer register, its reset to
// requester 0 and the separate "take" strobe are choices of this RTL.
//
// Interface: req[N] requests; gnt[N] one-hot grant and gnt_idx its index,
// both combinational from req and the pointer; gnt_valid when any request is
// granted. take updates the pointer on the next clock edge.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 take,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_valid
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!gnt_valid && req[idx]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(idx);
        gnt[idx]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (take && gnt_valid) begin
      ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
