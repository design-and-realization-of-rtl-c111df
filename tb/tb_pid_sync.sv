// tb_pid_sync: applies random master/slave x and y values to the PID
// controller with a random enable and checks the control output and the x
// error every cycle against an independent model:
//   I += T*e1 on each enabled clock, ctrl = KpT*e1 + KiT*(I + T*e1) + KdT*e2.
// Also checks that reset clears the integral.
module tb_pid_sync;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  fix_t xm, xs, ym, ys, ctrl, err_x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pid_sync dut (.clk(clk), .rst(rst), .en(en), .xm(xm), .xs(xs), .ym(ym),
                .ys(ys), .ctrl(ctrl), .err_x(err_x));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic fix_t rnd_state();
    // uniform in about [-4, 4)
    return fix_t'($signed($urandom_range(32'h7FFFFFF, 0)) - 32'sh4000000);
  endfunction

  initial begin
    longint integ, e1, e2, exp_ctrl, integ_next;
    xm = '0; xs = '0; ym = '0; ys = '0;
    integ = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i == 2500) begin
        rst = 1'b1;
        @(posedge clk);
        #1 rst = 1'b0;
        integ = 0;
        @(negedge clk);
      end
      xm = rnd_state(); ym = rnd_state();
      // slave close to master most of the time, as in a locked loop
      xs = ($urandom_range(1, 0) != 0) ? xm + fix_t'($signed($urandom_range(2047, 0)) - 1024) : rnd_state();
      ys = ym + fix_t'($signed($urandom_range(65535, 0)) - 32768);
      en = ($urandom_range(3, 0) != 0);
      #1;
      e1 = longint'(xm) - longint'(xs);
      e2 = longint'(ym) - longint'(ys);
      integ_next = wrap32(integ + rmul(R_T, e1));
      exp_ctrl = wrap32(rmul(R_PT, e1) + rmul(R_IT, integ_next) + rmul(R_DT, e2));
      check(longint'(ctrl) == exp_ctrl, "ctrl");
      if (longint'(ctrl) != exp_ctrl && failures < 4) $display("ctrl %0d exp %0d integ %0d e1 %0d e2 %0d", ctrl, exp_ctrl, integ, e1, e2);
      check(longint'(err_x) == wrap32(e1), "err_x");
      @(posedge clk);
      if (en) integ = integ_next;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
