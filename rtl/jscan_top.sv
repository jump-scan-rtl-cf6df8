// jscan_top: scan-inserted flip-flop bank of a circuit under test, built
// twice side by side: once with a J-scan chain and once with a J_QN-scan
// chain.
//
// Jump scan replaces each mux-scan flip-flop of a single-chain design by a
// cell whose two latches shift independently, so the chain moves two bits
// per clock cycle: the scan clock runs at half the mux-scan rate for the
// same test time, or at the full rate for half the test time. The J_QN
// variant also holds every data output at 0 while shifting (quiet scan) and
// can make one one-bit shift (noisy scan) to launch a skew-load delay test.
//
// Each chain has its own clock, scan enable, scan in/out and the bundle of
// functional inputs (j_di/q_di, from the combinational logic) and outputs
// (j_dout/q_dout, to it). The combinational logic itself is not part of this
// design. N_FF is the flip-flop count of the circuit; its default is the
// largest published benchmark (1636 flip-flops). Building both variants
// into one top is this RTL's choice, so that both can be exercised together.
module jscan_top #(
  parameter int unsigned N_FF = 1636
) (
  // J-scan design
  input  logic            j_clk,
  input  logic            j_se,
  input  logic            j_scan_in,
  output logic            j_scan_out,
  input  logic [N_FF-1:0] j_di,
  output logic [N_FF-1:0] j_dout,
  // J_QN-scan design
  input  logic            q_clk,
  input  logic            q_rst,
  input  logic            q_se,
  input  logic            q_scan_in,
  output logic            q_scan_out,
  input  logic [N_FF-1:0] q_di,
  output logic [N_FF-1:0] q_dout
);

  jscan_chain #(.N_FF(N_FF)) u_jscan (
    .clk      (j_clk),
    .se       (j_se),
    .scan_in  (j_scan_in),
    .scan_out (j_scan_out),
    .di       (j_di),
    .dout     (j_dout)
  );

  jqn_chain #(.N_FF(N_FF)) u_jqn (
    .clk      (q_clk),
    .rst      (q_rst),
    .se       (q_se),
    .scan_in  (q_scan_in),
    .scan_out (q_scan_out),
    .di       (q_di),
    .dout     (q_dout)
  );

endmodule
