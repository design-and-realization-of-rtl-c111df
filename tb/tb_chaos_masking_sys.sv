// tb_chaos_masking_sys: runs the synchronized masking link for 60000 samples
// with a slow low-amplitude information signal (0.05 * sin), checking every
// sample bit for bit against the integer reference model of master, PID and
// slave, and checking the synchronization itself: after 20000 samples the
// x error must stay below 0.03 (under 1% of its swing) and the recovered
// information within 0.03 of the transmitted one.  Also checks that the slave starts away from the master.
module tb_chaos_masking_sys;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NSAMP = 60000;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  fix_t info = '0, s, info_rec, ctrl, err_x;
  hc_state_t ms, ss;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  chaos_masking_sys dut (.clk(clk), .rst(rst), .en(en), .info(info), .s(s),
                         .info_rec(info_rec), .master_state(ms),
                         .slave_state(ss), .ctrl(ctrl), .err_x(err_x));

  initial begin
    #5_000_000;
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

  initial begin
    ref_state_t rm, rs;
    longint integ, e1, e2, c, integ_next;
    real maxerr_late, maxrec_late, early_err;
    rm = '{x: 1677722, y: 0, z: 0, u: 0};
    rs = '{x: 0, y: 0, z: 0, u: 0};
    integ = 0;
    maxerr_late = 0.0; maxrec_late = 0.0; early_err = 0.0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      @(negedge clk);
      info = fix_t'(fix_of(0.05 * $sin(6.283185307179586 * n / 2000.0)));
      en = 1'b1;
      #1;
      e1 = rm.x - rs.x;
      e2 = rm.y - rs.y;
      integ_next = wrap32(integ + rmul(R_T, e1));
      c = wrap32(rmul(R_PT, e1) + rmul(R_IT, integ_next) + rmul(R_DT, e2));
      check(longint'(ms.x) == rm.x && longint'(ms.y) == rm.y &&
            longint'(ms.z) == rm.z && longint'(ms.u) == rm.u, "master state");
      check(longint'(ss.x) == rs.x && longint'(ss.y) == rs.y &&
            longint'(ss.z) == rs.z && longint'(ss.u) == rs.u, "slave state");
      check(longint'(ctrl) == c, "ctrl");
      check(longint'(s) == wrap32(rm.u + longint'(info)), "s");
      check(longint'(info_rec) == wrap32(rm.u + longint'(info) - rs.u), "info_rec");
      if (n < 200 && rabs(real_of(e1)) > early_err) early_err = rabs(real_of(e1));
      if (n >= 20000) begin
        if (rabs(real_of(e1)) > maxerr_late) maxerr_late = rabs(real_of(e1));
        if (rabs(real_of(longint'(info_rec) - longint'(info))) > maxrec_late)
          maxrec_late = rabs(real_of(longint'(info_rec) - longint'(info)));
      end
      @(posedge clk);
      integ = integ_next;
      rm = ref_step(rm, 0);
      rs = ref_step(rs, c);
    end
    $display("early |e1| %f, late max |e1| %f, late max recovery error %f",
             early_err, maxerr_late, maxrec_late);
    check(early_err > 0.05, "slave starts unsynchronized");
    check(maxerr_late < 0.03, "x synchronized");
    check(maxrec_late < 0.03, "information recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
