// jqn_dff: jump-scan flip-flop with quiet-noisy toggle suppression (J_QN-scan).
//
// The J-scan cell (negative latch NL, positive latch PL, Mux1, Mux2) with a
// reset pin and a data output DO kept apart from the scan output SO:
//   Nor1 = NOR(~di, rst) = di & ~rst    gates the functional input
//   Mux1 = se  ? si : Nor1              feeds NL (transparent while clk low)
//   Mux2 = rst ? ji : NL                feeds PL (transparent while clk high)
//   so   = PL
//   Nor2 = NOR(PL_bar, rst) = PL & ~rst drives do_o
// Modes (rst, se):
//   1,1  quiet scan: two bits per clock as in the J-scan cell, do_o = 0, so
//        the logic driven by DO does not toggle while the pattern shifts.
//   0,1  noisy scan: plain master-slave scan, one bit per clock, do_o = SO.
//   0,0  function mode: rising-edge D flip-flop on di.
//   1,0  reset: NL loads 0 and do_o = 0.
// Interface: jo is the NL output (jump path), so the PL output (scan path),
// do_o the suppressed data output. The gates, their inputs and the mode
// table follow the published cell; Mux2 being steered by rst (not se) is
// read from the cell diagram and is what makes the noisy mode shift one bit
// per clock. The latches are intentional.
module jqn_dff (
  input  logic clk,
  input  logic rst,
  input  logic se,
  input  logic di,
  input  logic si,
  input  logic ji,
  output logic jo,
  output logic so,
  output logic do_o
);

  logic nor1, mux1, mux2;
  logic nl_q, pl_q, pl_qn;

  assign nor1 = ~(~di | rst);
  assign mux1 = se ? si : nor1;

  always_latch begin
    if (!clk) nl_q = mux1;
  end

  assign mux2 = rst ? ji : nl_q;

  always_latch begin
    if (clk) pl_q = mux2;
  end

  assign pl_qn = ~pl_q;
  assign jo    = nl_q;
  assign so    = pl_q;
  assign do_o  = ~(pl_qn | rst);

endmodule
