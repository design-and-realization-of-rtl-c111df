// tb_hc_bifurcation: the bifurcation parameter a at five points of the
// range 3.5 to 8.4.  One hc_master per value of a runs 150000 samples.  Over
// the second half the large local maxima of x (above 1.0) are collected; a
// periodic orbit returns to the same maximum each turn, a chaotic one does
// not.  Expected: a = 3.8 and 4.0 periodic (spread of the maxima below 0.05),
// a = 6.0, 7.0 and 8.4 chaotic (spread above 1.0), and every trajectory
// bounded (|x| < 8).
module tb_hc_bifurcation;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NPT   = 5;
  localparam int NSAMP = 150000;

  logic clk = 1'b0, rst = 1'b1;
  hc_state_t st [NPT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hc_master #(.A(3.8)) u_a0 (.clk(clk), .rst(rst), .en(1'b1), .state(st[0]));
  hc_master #(.A(4.0)) u_a1 (.clk(clk), .rst(rst), .en(1'b1), .state(st[1]));
  hc_master #(.A(6.0)) u_a2 (.clk(clk), .rst(rst), .en(1'b1), .state(st[2]));
  hc_master #(.A(7.0)) u_a3 (.clk(clk), .rst(rst), .en(1'b1), .state(st[3]));
  hc_master #(.A(8.4)) u_a4 (.clk(clk), .rst(rst), .en(1'b1), .state(st[4]));

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
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real p1 [NPT], p2 [NPT], xv, pmin [NPT], pmax [NPT], amax [NPT];
    int  npk [NPT];
    real avals [NPT];
    avals = '{3.8, 4.0, 6.0, 7.0, 8.4};
    for (int i = 0; i < NPT; i++) begin
      p1[i] = 0.0; p2[i] = 0.0; pmin[i] = 1.0e9; pmax[i] = -1.0e9;
      npk[i] = 0; amax[i] = 0.0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      @(negedge clk);
      for (int i = 0; i < NPT; i++) begin
        xv = real_of(longint'(st[i].x));
        if (rabs(xv) > amax[i]) amax[i] = rabs(xv);
        // p1 is a local maximum if it exceeds both neighbours
        if (n > NSAMP / 2 && p1[i] > p2[i] && p1[i] >= xv && p1[i] > 1.0) begin
          npk[i]++;
          if (p1[i] < pmin[i]) pmin[i] = p1[i];
          if (p1[i] > pmax[i]) pmax[i] = p1[i];
        end
        p2[i] = p1[i];
        p1[i] = xv;
      end
    end
    for (int i = 0; i < NPT; i++) begin
      $display("a = %0.1f: %0d maxima, spread %f, max |x| %f", avals[i], npk[i],
               pmax[i] - pmin[i], amax[i]);
      check(npk[i] >= 3, "oscillating");
      check(amax[i] < 8.0, "bounded");
      if (avals[i] < 4.1) check(pmax[i] - pmin[i] < 0.05, "periodic");
      else                check(pmax[i] - pmin[i] > 1.0, "chaotic");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
