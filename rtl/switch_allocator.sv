// switch_allocator: request matrix and one round-robin arbiter per output port.
//
// Each input port that holds a routed packet raises one request, for the
// output port its route computation chose (req_valid[i], req_port[i]). The
// requests form the request matrix: row = input port, column = output port,
// at most one 1 per row. Every idle output port arbitrates over its column
// with a round-robin arbiter; the winner owns the output until the packet's
// tail flit has left (done[o]), since store-and-forward sends a packet as
// one unit. The grant is registered: an output starts carrying the winner's
// flits on the cycle after arbitration.
//
// req_cnt[o] is the number of requests in column o, the packet being sent
// included. Route computation uses it as the pending-request count of a port.
//
// Taken from the design: request matrix layout, round robin per output port.
// Choices of this RTL: registered grant, grant held for a whole packet,
// pending count including the packet in service.
module switch_allocator
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid [NPORTS],
  input  port_e       req_port  [NPORTS],
  input  logic        done      [NPORTS],   // per output: tail flit sent
  output logic        out_busy  [NPORTS],
  output logic [2:0]  out_owner [NPORTS],
  output logic        in_granted[NPORTS],
  output logic [2:0]  req_cnt   [NPORTS],
  output logic [NPORTS-1:0] req_matrix [NPORTS]  // [input] -> output bits
);

  always_comb begin
    for (int unsigned i = 0; i < NPORTS; i++) begin
      req_matrix[i] = '0;
      if (req_valid[i]) req_matrix[i][req_port[i]] = 1'b1;
    end
    for (int unsigned o = 0; o < NPORTS; o++) begin
      req_cnt[o] = '0;
      for (int unsigned i = 0; i < NPORTS; i++) req_cnt[o] = req_cnt[o] + 3'(req_matrix[i][o]);
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic [NPORTS-1:0] col;
    logic [NPORTS-1:0] gnt;
    logic [2:0]        gnt_idx;
    logic              gnt_valid;
    logic              take;

    always_comb begin
      for (int unsigned i = 0; i < NPORTS; i++) col[i] = req_matrix[i][o];
      // an input already being served must not be granted again
      if (out_busy[o]) col = '0;
    end

    assign take = !out_busy[o] && gnt_valid;

    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .req      (col),
      .take     (take),
      .gnt      (gnt),
      .gnt_idx  (gnt_idx),
      .gnt_valid(gnt_valid)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_busy[o]  <= 1'b0;
        out_owner[o] <= '0;
      end else if (out_busy[o]) begin
        if (done[o]) out_busy[o] <= 1'b0;
      end else if (take) begin
        out_busy[o]  <= 1'b1;
        out_owner[o] <= gnt_idx;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NPORTS; i++) begin
      in_granted[i] = 1'b0;
      for (int unsigned o = 0; o < NPORTS; o++)
        if (out_busy[o] && out_owner[o] == 3'(i)) in_granted[i] = 1'b1;
    end
  end

  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_matrix[i]));
  end

endmodule
