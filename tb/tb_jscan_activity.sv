// tb_jscan_activity: switching activity while loading scan patterns into
// J-scan and J_QN chains of the flip-flop counts of the published benchmark
// circuits (21, 6, 179, 211 and 534; 1636 is covered by the full-size top
// test). For each size it reports clock cycles per bit loaded (one half, as
// the chain moves two bits per cycle), flip-flop output toggles on the J-scan
// chain, and none on the J_QN chain in quiet scan. The logic of the
// benchmark circuits is not modelled, so these are activity counts of the
// scan cells only, not power figures.
module tb_jscan_activity;

  localparam int NU = 5;
  logic [NU-1:0] done;
  int c[NU], f[NU];
  int checks, failures;

  jscan_activity_unit #(.N_FF(21))  u_s526   (.done(done[0]), .checks(c[0]), .failures(f[0]));
  jscan_activity_unit #(.N_FF(6))   u_s1494  (.done(done[1]), .checks(c[1]), .failures(f[1]));
  jscan_activity_unit #(.N_FF(179)) u_s5378  (.done(done[2]), .checks(c[2]), .failures(f[2]));
  jscan_activity_unit #(.N_FF(211)) u_s9234  (.done(done[3]), .checks(c[3]), .failures(f[3]));
  jscan_activity_unit #(.N_FF(534)) u_s15850 (.done(done[4]), .checks(c[4]), .failures(f[4]));

  task automatic report(input int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NU; i++) begin
      checks += c[i]; failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #1000000;
    $display("FAIL watchdog");
    report(1);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    report(0);
    $finish;
  end

endmodule
