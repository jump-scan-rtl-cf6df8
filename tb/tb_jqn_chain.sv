// tb_jqn_chain: self-checking test of the J_QN-scan chain through the
// skew-load delay-test sequence.
//
// Two chains (four and five flip-flops; the second has a dummy cell) share
// clock, reset, scan enable and scan_in. A small XOR function stands in for
// the circuit under test: di[i] = dout[i] ^ dout[i+1] ^ (i odd). Each round
// is: one reset cycle; a quiet scan load (two bits per clock, dout must stay
// 0); one noisy-scan cycle (dout shows P1 in the low phase and P1 shifted by
// one cell, P2, after the rising edge); one function cycle capturing the
// stand-in response to P2; then a quiet scan unload while the next pattern
// is loaded. Every phase checks scan_out against a shift-register model of
// the cells (one bit per phase when quiet, one per cycle when noisy).
module tb_jqn_chain;

  localparam int unsigned NA = 4, NB = 5;
  localparam int unsigned CA = jscan_pkg::num_cells(NA);
  localparam int unsigned CB = jscan_pkg::num_cells(NB);

  logic clk = 1'b1, rst = 1'b1, se = 1'b0, scan_in = 1'b0;
  logic out_a, out_b;
  logic [NA-1:0] di_a, dout_a;
  logic [NB-1:0] di_b, dout_b;
  logic [CA-1:0] ref_a;
  logic [CB-1:0] ref_b;
  int checks = 0, failures = 0;
  int quiet_toggles;
  bit in_quiet = 1'b0;

  jqn_chain #(.N_FF(NA)) dut_a (.clk(clk), .rst(rst), .se(se), .scan_in(scan_in),
                                .scan_out(out_a), .di(di_a), .dout(dout_a));
  jqn_chain #(.N_FF(NB)) dut_b (.clk(clk), .rst(rst), .se(se), .scan_in(scan_in),
                                .scan_out(out_b), .di(di_b), .dout(dout_b));

  function automatic logic [NA-1:0] cut_a(input logic [NA-1:0] d);
    for (int i = 0; i < int'(NA); i++)
      cut_a[i] = d[i] ^ d[(i + 1) % NA] ^ 1'(i % 2);
  endfunction

  function automatic logic [NB-1:0] cut_b(input logic [NB-1:0] d);
    for (int i = 0; i < int'(NB); i++)
      cut_b[i] = d[i] ^ d[(i + 1) % NB] ^ 1'(i % 2);
  endfunction

  assign di_a = cut_a(dout_a);
  assign di_b = cut_b(dout_b);

  always @(dout_a or dout_b) if (in_quiet) quiet_toggles <= quiet_toggles + 1;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic check_dout(input string what);
    check(32'(dout_a), 32'(ref_a), what);
    check(32'(dout_b), 32'(ref_b[CB-1:1]), what);
  endtask

  task automatic check_out(input string what);
    check(32'(out_a), 32'(ref_a[CA-1]), what);
    check(32'(out_b), 32'(ref_b[CB-1]), what);
  endtask

  task automatic quiet_phase(input logic level, input logic b);
    clk = level;
    #1 scan_in = b;
    #2;
    check_out("quiet scan_out");
    check(32'(dout_a), 0, "quiet dout A");
    check(32'(dout_b), 0, "quiet dout B");
    ref_a = {ref_a[CA-2:0], b};
    ref_b = {ref_b[CB-2:0], b};
    #2;
  endtask

  task automatic quiet_load();
    clk = 1'b0;
    #1 rst = 1'b1; se = 1'b1;
    #1 in_quiet = 1'b1;
    for (int k = 0; k < int'(CB) / 2; k++) begin
      quiet_phase(1'b0, 1'($urandom));
      quiet_phase(1'b1, 1'($urandom));
    end
    in_quiet = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b;
    quiet_toggles = 0;
    for (int n = 0; n < 100; n++) begin
      // Reset cycle (scan_in held at 0): every cell clears.
      if (n % 10 == 0) begin
        clk = 1'b0;
        #1 rst = 1'b1; se = 1'b0; scan_in = 1'b0;
        #4 clk = 1'b1;
        #5;
        ref_a = '0; ref_b = '0;
        check(32'(dout_a), 0, "reset dout A");
        // The cleared contents are checked by the quiet unload that follows.
      end
      // Quiet load (also unloads the previous response or the reset zeros).
      quiet_load();
      // Noisy scan cycle: P1 on dout in the low phase, P2 after the edge.
      clk = 1'b0;
      #1 rst = 1'b0; se = 1'b1; b = 1'($urandom); scan_in = b;
      #2;
      check_dout("noisy low phase shows P1");
      check_out("noisy low scan_out");
      ref_a = {ref_a[CA-2:0], b};
      ref_b = {ref_b[CB-2:0], b};
      #2 clk = 1'b1;
      #1 se = 1'b0;   // scan enable drops during the high phase
      #2;
      check_dout("noisy high phase shows P2");
      check_out("noisy high scan_out");
      #2;
      // Function (capture) cycle.
      clk = 1'b0;
      #5 clk = 1'b1;
      ref_a = cut_a(ref_a);
      ref_b = {cut_b(ref_b[CB-1:1]), 1'b0};
      #5;
      check_dout("captured response");
    end
    quiet_load();
    check(32'(quiet_toggles), 0, "no dout toggles during quiet shifting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
