// jscan_dff: jump-scan (J-scan) flip-flop.
//
// A master-slave flip-flop built from a negative latch (NL, transparent
// while clk is low) and a positive latch (PL, transparent while clk is
// high), with a multiplexer in front of each latch:
//   Mux1 = se ? si : di   feeds NL
//   Mux2 = se ? ji : NL   feeds PL
// With se = 0 the cell is an ordinary rising-edge D flip-flop (q follows di
// at each rising edge). With se = 1 the two latches work as two independent
// one-phase stages: during the low phase si passes through NL to jo, during
// the high phase ji passes through PL to q. Chained with a scan path
// (q -> si) and a jump path (jo -> ji), the chain moves one bit per clock
// phase, i.e. two bits per clock cycle.
//
// Interface: q is the shared functional/scan output (DO/SO), jo is the jump
// output, which is the NL output. All timing is set by the two latch
// phases; there is no reset. The structure and mux settings follow the
// published cell; describing the latches with always_latch is this RTL's
// choice. The latches are intentional.
module jscan_dff (
  input  logic clk,
  input  logic se,
  input  logic di,
  input  logic si,
  input  logic ji,
  output logic jo,
  output logic q
);

  logic mux1, mux2;
  logic nl_q, pl_q;

  assign mux1 = se ? si : di;

  always_latch begin
    if (!clk) nl_q = mux1;
  end

  assign mux2 = se ? ji : nl_q;

  always_latch begin
    if (clk) pl_q = mux2;
  end

  assign jo = nl_q;
  assign q  = pl_q;

endmodule
