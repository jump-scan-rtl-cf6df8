// tb_jscan_chain: self-checking test of the jump-scan chain.
//
// Two chains run in lockstep from the same clock, scan enable and scan_in:
// one with four flip-flops (the published example) and one with five, which
// gets a dummy cell. Each is checked against a plain shift-register model of
// its cells that moves one bit per clock phase: the cell contents seen on
// dout after each full clock cycle, the fact that dout does not move during
// the low phase, and scan_out in every phase (Mux3). The published load
// table is checked literally on the four-flip-flop chain. Function-mode
// capture is checked through a later unload. The load length is checked to
// be half the number of cells in clock cycles.
module tb_jscan_chain;

  localparam int unsigned NA = 4, NB = 5;
  localparam int unsigned CA = jscan_pkg::num_cells(NA);
  localparam int unsigned CB = jscan_pkg::num_cells(NB);

  logic clk = 1'b1, se = 1'b1, scan_in = 1'b0;
  logic out_a, out_b;
  logic [NA-1:0] di_a = '0, dout_a;
  logic [NB-1:0] di_b = '0, dout_b;
  logic [CA-1:0] ref_a;
  logic [CB-1:0] ref_b;
  int checks = 0, failures = 0;
  int rises;

  jscan_chain #(.N_FF(NA)) dut_a (.clk(clk), .se(se), .scan_in(scan_in),
                                  .scan_out(out_a), .di(di_a), .dout(dout_a));
  jscan_chain #(.N_FF(NB)) dut_b (.clk(clk), .se(se), .scan_in(scan_in),
                                  .scan_out(out_b), .di(di_b), .dout(dout_b));

  always @(posedge clk) rises <= rises + 1;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic check_dout();
    check(32'(dout_a), 32'(ref_a), "chain A contents");
    check(32'(dout_b), 32'(ref_b[CB-1:1]), "chain B contents (dummy excluded)");
  endtask

  // One clock phase of scan: apply bit b, check scan_out, update the models.
  task automatic scan_phase(input logic level, input logic b);
    clk = level;
    #1 scan_in = b;
    #2;
    check(32'(out_a), 32'(ref_a[CA-1]), "chain A scan_out");
    check(32'(out_b), 32'(ref_b[CB-1]), "chain B scan_out");
    ref_a = {ref_a[CA-2:0], b};
    ref_b = {ref_b[CB-2:0], b};
    #2;
  endtask

  task automatic scan_cycle(input logic b0, input logic b1);
    logic [CA-1:0] held_a;
    held_a = ref_a;
    scan_phase(1'b0, b0);
    check(32'(dout_a), 32'(held_a), "chain A holds during low phase");
    scan_phase(1'b1, b1);
    check_dout();
  endtask

  // Shift a whole chain length (CB bits) and check the number of clocks.
  task automatic scan_load();
    int r0;
    r0 = rises;
    for (int k = 0; k < int'(CB) / 2; k++)
      scan_cycle(1'($urandom), 1'($urandom));
    check(32'(rises - r0), 32'(CB / 2), "clock cycles per full load");
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] abcd;
    se = 1'b1;
    ref_a = '0; ref_b = '0; rises = 0;
    // Flush both chains with zeros so the models start in step.
    clk = 1'b1;
    for (int k = 0; k < 4; k++) begin
      clk = 1'b0; #1 scan_in = 1'b0; #4;
      clk = 1'b1; #5;
    end

    // Published load table: A..D applied in periods I..IV.
    for (int t = 0; t < 16; t++) begin
      abcd = 4'(t);
      scan_cycle(abcd[3], abcd[2]);          // periods I, II
      check(32'(dout_a[1:0]), 32'({abcd[3], abcd[2]}), "period II: PL1=B, PL2=A");
      scan_cycle(abcd[1], abcd[0]);          // periods III, IV
      check(32'(dout_a), 32'({abcd[3], abcd[2], abcd[1], abcd[0]}),
            "period IV: PL4..PL1 = A..D");
    end

    // Random loads and unloads.
    for (int n = 0; n < 50; n++) scan_load();

    // Function-mode capture, then unload and compare.
    for (int n = 0; n < 50; n++) begin
      se = 1'b0;
      di_a = NA'($urandom); di_b = NB'($urandom);
      clk = 1'b0; #5;
      clk = 1'b1; #5;
      ref_a = di_a;
      ref_b = {di_b, 1'b0};
      check_dout();
      se = 1'b1;
      scan_load();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
