// tb_jqn_dff: self-checking test of the J_QN-scan flip-flop in all four
// (rst, se) modes.
//
// Low phase: the negative latch follows se ? si : (di & ~rst), seen on jo;
// so holds. High phase: so follows rst ? ji : NL; jo holds. do_o must equal
// so when rst=0 and stay 0 when rst=1 (quiet). Expected values come from a
// tracked copy of the two latches.
module tb_jqn_dff;

  logic clk = 1'b1, rst = 1'b0, se = 1'b0, di = 1'b0, si = 1'b0, ji = 1'b0;
  logic jo, so, do_o;
  int checks = 0, failures = 0;
  logic exp_nl, exp_pl;
  bit   known;

  jqn_dff dut (.clk(clk), .rst(rst), .se(se), .di(di), .si(si), .ji(ji),
               .jo(jo), .so(so), .do_o(do_o));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (rst=%0b se=%0b) at %0t",
               what, got, exp, rst, se, $time);
    end
  endtask

  task automatic randomize_inputs();
    di = 1'($urandom); si = 1'($urandom); ji = 1'($urandom);
  endtask

  initial begin
    #40000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    known = 1'b0;
    for (int n = 0; n < 800; n++) begin
      // mode is chosen while clk is high is not allowed to disturb PL: pick it
      // at the start of the low phase, after the falling edge.
      clk = 1'b0;
      #1 {rst, se} = 2'(n / 200);
      for (int k = 0; k < 3; k++) begin
        #1 randomize_inputs();
        #1;
        exp_nl = se ? si : (di & ~rst);
        check(jo, exp_nl, "jo follows NL input in low phase");
        if (known) begin
          check(so, exp_pl, "so holds in low phase");
          check(do_o, exp_pl & ~rst, "do_o in low phase");
        end
      end
      #1 clk = 1'b1;
      for (int k = 0; k < 3; k++) begin
        #1 randomize_inputs();
        #1;
        exp_pl = rst ? ji : exp_nl;
        check(so, exp_pl, "so in high phase");
        check(jo, exp_nl, "jo holds in high phase");
        check(do_o, exp_pl & ~rst, "do_o in high phase");
      end
      known = 1'b1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
