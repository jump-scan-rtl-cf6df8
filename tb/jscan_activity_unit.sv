// jscan_activity_unit: loads random patterns into a J-scan chain and a J_QN
// chain of N_FF flip-flops from the same bit stream, and counts switching
// activity: scan clock cycles, flip-flop output (dout) toggles on the J-scan
// chain, and dout toggles on the J_QN chain during quiet scan. Checks that a
// load takes half as many clock cycles as there are cells, that both chains
// hold the pattern a shift-register model predicts (the J_QN chain seen on
// dout in one noisy low phase) and that quiet scan produces no dout toggle.
// Raises done when finished; checks and failures are outputs.
module jscan_activity_unit #(
  parameter int unsigned N_FF  = 4,
  parameter int unsigned LOADS = 8
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned PAD = jscan_pkg::pad_cells(N_FF);
  localparam int unsigned NC  = jscan_pkg::num_cells(N_FF);

  logic clk, se, rst, scan_in, j_out, q_out;
  logic [N_FF-1:0] j_dout, q_dout;
  logic [NC-1:0] model;
  logic [N_FF-1:0] j_prev;
  int cycles, j_toggles, q_toggles;
  bit counting;

  jscan_chain #(.N_FF(N_FF)) u_j (.clk(clk), .se(se), .scan_in(scan_in),
                                  .scan_out(j_out), .di('0), .dout(j_dout));
  jqn_chain #(.N_FF(N_FF)) u_q (.clk(clk), .rst(rst), .se(se), .scan_in(scan_in),
                                .scan_out(q_out), .di('0), .dout(q_dout));

  always @(posedge clk) if (counting) cycles <= cycles + 1;
  always @(j_dout) begin
    if (counting) j_toggles <= j_toggles + $countones(j_dout ^ j_prev);
    j_prev <= j_dout;
  end
  always @(q_dout) if (counting) q_toggles <= q_toggles + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N_FF=%0d %s at %0t", N_FF, what, $time);
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    cycles = 0; j_toggles = 0; q_toggles = 0; counting = 1'b0;
    clk = 1'b0; se = 1'b1; scan_in = 1'b0; model = '0;
    #1 rst = 1'b1;   // rst moves only while clk is low
    clk = 1'b1;
    j_prev = '0;
    // flush with zeros
    for (int k = 0; k < int'(NC) / 2; k++) begin
      clk = 1'b0; #5; clk = 1'b1; #5;
    end
    for (int l = 0; l < int'(LOADS); l++) begin
      clk = 1'b0;
      #1 rst = 1'b1;
      #1 counting = 1'b1;
      for (int k = 0; k < int'(NC); k++) begin
        logic b;
        b = 1'($urandom);
        clk = 1'(k % 2);
        #1 scan_in = b;
        model = {model[NC-2:0], b};
        #4;
      end
      counting = 1'b0;
      check(j_dout == model[NC-1:PAD], "J-scan chain holds the loaded pattern");
      // Look at the J_QN contents in one noisy low phase, then go back to
      // quiet scan before the rising edge, so nothing shifts.
      clk = 1'b0;
      #1 rst = 1'b0;
      #2 check(q_dout == model[NC-1:PAD], "J_QN chain holds the loaded pattern");
      rst = 1'b1;
      #2 clk = 1'b1;
      #5;
    end
    check(cycles == int'(LOADS * NC / 2), "two bits per clock cycle");
    check(q_toggles == 0, "no J_QN dout toggles in quiet scan");
    check(j_toggles > 0, "J-scan dout toggles while shifting");
    $display("activity N_FF=%0d cells=%0d bits=%0d clock_cycles=%0d jscan_dout_toggles=%0d jqn_dout_toggles=%0d",
             N_FF, NC, LOADS * NC, cycles, j_toggles, q_toggles);
    done = 1'b1;
  end

endmodule
