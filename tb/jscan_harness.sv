// jscan_harness: tester and circuit-under-test stand-in for jscan_top.
//
// Drives both halves of the top through complete scan tests and checks
// every response against a shift-register model of the chain cells:
//   J-scan half: load a random pattern two bits per clock, capture the
//   stand-in logic's response in one function cycle, unload it while the
//   next pattern loads, Mux3 output checked in every phase.
//   J_QN half: reset cycle, quiet load (dout must not toggle), one noisy
//   cycle launching P2 = P1 shifted by one cell, capture, quiet unload.
// The stand-in logic is di[i] = dout[i] ^ dout[i+1] ^ (i odd), closing the
// loop from the flip-flop outputs back to their inputs. Each mechanism is
// counted and a mechanism that never happens is a failure (the dummy cell
// only when N_FF is odd). Prints the TB_RESULT line and ends the run.
module jscan_harness #(
  parameter int unsigned N_FF   = 4,
  parameter int unsigned ROUNDS = 4
) (
  output logic            j_clk,
  output logic            j_se,
  output logic            j_scan_in,
  input  logic            j_scan_out,
  output logic [N_FF-1:0] j_di,
  input  logic [N_FF-1:0] j_dout,
  output logic            q_clk,
  output logic            q_rst,
  output logic            q_se,
  output logic            q_scan_in,
  input  logic            q_scan_out,
  output logic [N_FF-1:0] q_di,
  input  logic [N_FF-1:0] q_dout
);

  localparam int unsigned PAD = jscan_pkg::pad_cells(N_FF);
  localparam int unsigned NC  = jscan_pkg::num_cells(N_FF);

  int checks = 0, failures = 0;
  logic [NC-1:0] j_ref, q_ref;

  // mechanism counters
  int n_j_load, n_j_capture, n_mux3_low, n_mux3_high, n_dummy;
  int n_q_reset, n_q_quiet, n_q_noisy, n_q_capture;
  int j_shift_toggles, q_quiet_toggles;
  bit j_shifting = 1'b0, q_quiet = 1'b0;

  function automatic logic [N_FF-1:0] cut(input logic [N_FF-1:0] d);
    for (int i = 0; i < int'(N_FF); i++)
      cut[i] = d[i] ^ d[(i + 1) % N_FF] ^ 1'(i % 2);
  endfunction

  assign j_di = cut(j_dout);
  assign q_di = cut(q_dout);

  always @(j_dout) if (j_shifting) j_shift_toggles <= j_shift_toggles + 1;
  always @(q_dout) if (q_quiet)    q_quiet_toggles <= q_quiet_toggles + 1;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic check_vec(input logic [N_FF-1:0] got, input logic [N_FF-1:0] exp,
                           input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_count(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic require(input int count, input string what);
    checks++;
    $display("mechanism %-28s : %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // ---------------- J-scan half ----------------
  task automatic j_phase(input logic level, input logic b);
    j_clk = level;
    #1 j_scan_in = b;
    #2;
    check(j_scan_out, j_ref[NC-1], "J-scan scan_out");
    if (level) n_mux3_high++; else n_mux3_low++;
    j_ref = {j_ref[NC-2:0], b};
    #2;
  endtask

  task automatic j_load();
    int cycles = 0;
    j_clk = 1'b0;
    #1 j_se = 1'b1; j_shifting = 1'b1;
    for (int k = 0; k < int'(NC) / 2; k++) begin
      j_phase(1'b0, 1'($urandom));
      j_phase(1'b1, 1'($urandom));
      cycles++;
    end
    j_shifting = 1'b0;
    check_count(cycles * 2, int'(NC), "J-scan: two bits per clock cycle");
    check_vec(j_dout, j_ref[NC-1:PAD], "J-scan loaded pattern");
    n_j_load++;
    if (PAD != 0) n_dummy++;
  endtask

  task automatic j_capture();
    logic [N_FF-1:0] resp;
    resp = cut(j_ref[NC-1:PAD]);
    j_clk = 1'b0;
    #1 j_se = 1'b0;
    #4 j_clk = 1'b1;
    #5;
    j_ref = NC'({resp, {PAD{1'b0}}});
    check_vec(j_dout, resp, "J-scan captured response");
    n_j_capture++;
  endtask

  // ---------------- J_QN-scan half ----------------
  task automatic q_phase(input logic level, input logic b);
    q_clk = level;
    #1 q_scan_in = b;
    #2;
    check(q_scan_out, q_ref[NC-1], "J_QN quiet scan_out");
    check_vec(q_dout, '0, "J_QN quiet dout held at 0");
    if (level) n_mux3_high++; else n_mux3_low++;
    q_ref = {q_ref[NC-2:0], b};
    #2;
  endtask

  task automatic q_reset();
    q_clk = 1'b0;
    #1 q_rst = 1'b1; q_se = 1'b0; q_scan_in = 1'b0;
    #4 q_clk = 1'b1;
    #5;
    q_ref = '0;
    check_vec(q_dout, '0, "J_QN reset dout");
    n_q_reset++;
  endtask

  task automatic q_quiet_load();
    q_clk = 1'b0;
    #1 q_rst = 1'b1; q_se = 1'b1;
    #1 q_quiet = 1'b1;
    for (int k = 0; k < int'(NC) / 2; k++) begin
      q_phase(1'b0, 1'($urandom));
      q_phase(1'b1, 1'($urandom));
    end
    q_quiet = 1'b0;
    n_q_quiet++;
  endtask

  task automatic q_launch_capture();
    logic b;
    logic [N_FF-1:0] p1, p2, resp;
    p1 = q_ref[NC-1:PAD];
    // noisy scan cycle
    q_clk = 1'b0;
    #1 q_rst = 1'b0; q_se = 1'b1; b = 1'($urandom); q_scan_in = b;
    #2;
    check_vec(q_dout, p1, "J_QN noisy low phase shows P1");
    check(q_scan_out, q_ref[NC-1], "J_QN noisy scan_out low");
    q_ref = {q_ref[NC-2:0], b};
    p2 = q_ref[NC-1:PAD];
    #2 q_clk = 1'b1;
    #1 q_se = 1'b0;
    #2;
    check_vec(q_dout, p2, "J_QN noisy high phase shows P2");
    check(q_scan_out, q_ref[NC-1], "J_QN noisy scan_out high");
    if (p1 != p2) n_q_noisy++;
    #2;
    // function (capture) cycle
    resp = cut(p2);
    q_clk = 1'b0;
    #5 q_clk = 1'b1;
    #5;
    q_ref = NC'({resp, {PAD{1'b0}}});
    check_vec(q_dout, resp, "J_QN captured response");
    n_q_capture++;
  endtask

  initial begin
    n_j_load = 0; n_j_capture = 0; n_mux3_low = 0; n_mux3_high = 0; n_dummy = 0;
    n_q_reset = 0; n_q_quiet = 0; n_q_noisy = 0; n_q_capture = 0;
    j_shift_toggles = 0; q_quiet_toggles = 0;
    j_clk = 1'b1; j_se = 1'b1; j_scan_in = 1'b0;
    q_clk = 1'b0;
    #1 q_rst = 1'b1; q_se = 1'b0; q_scan_in = 1'b0;   // rst moves with clk low
    j_ref = '0; q_ref = '0;
    #10;
    fork
      begin
        // Flush with zeros so the model and the chain agree, then test.
        j_clk = 1'b0;
        #1 j_se = 1'b1; j_scan_in = 1'b0;
        for (int k = 0; k < int'(NC) / 2; k++) begin
          j_clk = 1'b0; #5; j_clk = 1'b1; #5;
        end
        j_ref = '0;
        for (int r = 0; r < int'(ROUNDS); r++) begin
          j_load();          // also unloads the previous response
          j_capture();
        end
        j_load();
      end
      begin
        for (int r = 0; r < int'(ROUNDS); r++) begin
          if (r % 2 == 0) q_reset();
          q_quiet_load();    // also unloads the previous response
          q_launch_capture();
        end
        q_quiet_load();
      end
    join
    check_count(q_quiet_toggles, 0, "J_QN dout toggles during quiet scan");
    require(n_j_load, "J-scan two-bit load/unload");
    require(n_j_capture, "J-scan capture");
    require(n_mux3_low, "Mux3 low phase (SO)");
    require(n_mux3_high, "Mux3 high phase (JO)");
    if (PAD != 0) require(n_dummy, "dummy cell padding");
    require(n_q_reset, "J_QN reset cycle");
    require(n_q_quiet, "J_QN quiet scan");
    require(n_q_noisy, "J_QN noisy-scan launch");
    require(n_q_capture, "J_QN capture");
    require(j_shift_toggles, "J-scan dout activity (no QN)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
