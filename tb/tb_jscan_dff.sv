// tb_jscan_dff: self-checking test of the J-scan flip-flop.
//
// Function mode (se=0): while clk is low the negative latch follows di (seen
// on jo) and q holds; at the rising edge q takes the last di and keeps it
// through the high phase whatever di does. Scan mode (se=1): in the low phase
// jo follows si and q holds; in the high phase q follows ji and jo holds the
// last si. Expected values come from a tracked copy of the two latches.
module tb_jscan_dff;

  logic clk = 1'b1, se = 1'b0, di = 1'b0, si = 1'b0, ji = 1'b0;
  logic jo, q;
  int checks = 0, failures = 0;
  logic exp_nl, exp_pl;
  bit   known;

  jscan_dff dut (.clk(clk), .se(se), .di(di), .si(si), .ji(ji), .jo(jo), .q(q));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic randomize_inputs();
    di = 1'($urandom); si = 1'($urandom); ji = 1'($urandom);
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    known = 1'b0;
    for (int mode = 0; mode < 2; mode++) begin
      se = 1'(mode);
      for (int n = 0; n < 200; n++) begin
        // low phase: NL transparent, PL holds
        clk = 1'b0;
        for (int k = 0; k < 3; k++) begin
          #1 randomize_inputs();
          #1;
          exp_nl = se ? si : di;
          check(jo, exp_nl, "jo follows NL input in low phase");
          if (known) check(q, exp_pl, "q holds in low phase");
        end
        // high phase: PL transparent, NL holds
        #1 clk = 1'b1;
        for (int k = 0; k < 3; k++) begin
          #1 randomize_inputs();
          #1;
          exp_pl = se ? ji : exp_nl;
          check(q, exp_pl, "q in high phase");
          check(jo, exp_nl, "jo holds in high phase");
        end
        known = 1'b1;
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
