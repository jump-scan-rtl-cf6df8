// tb_jscan_top: end-to-end test of jscan_top with 21 flip-flops per chain
// (the size of the smallest published benchmark, odd, so each chain carries
// a dummy cell). The tester and the stand-in logic are in jscan_harness.
module tb_jscan_top;

  localparam int unsigned N = 21;

  logic         j_clk, j_se, j_scan_in, j_scan_out;
  logic [N-1:0] j_di, j_dout;
  logic         q_clk, q_rst, q_se, q_scan_in, q_scan_out;
  logic [N-1:0] q_di, q_dout;

  jscan_top #(.N_FF(N)) dut (.*);

  jscan_harness #(.N_FF(N), .ROUNDS(12)) tester (.*);

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", tester.checks, tester.failures + 1);
    $finish;
  end

endmodule
