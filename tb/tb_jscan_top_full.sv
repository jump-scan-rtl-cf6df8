// tb_jscan_top_full: jscan_top at its default size (1636 flip-flops per
// chain, the largest published benchmark), taken through complete J-scan
// and J_QN-scan tests by jscan_harness.
module tb_jscan_top_full;

  localparam int unsigned N = 1636;

  logic         j_clk, j_se, j_scan_in, j_scan_out;
  logic [N-1:0] j_di, j_dout;
  logic         q_clk, q_rst, q_se, q_scan_in, q_scan_out;
  logic [N-1:0] q_di, q_dout;

  jscan_top dut (.*);

  jscan_harness #(.N_FF(N), .ROUNDS(2)) tester (.*);

  initial begin
    #10000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", tester.checks, tester.failures + 1);
    $finish;
  end

endmodule
