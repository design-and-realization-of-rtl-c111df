// tb_hc_master: checks the master oscillator against the integer reference
// model, bit for bit, for 20000 samples, with the sample enable toggled at
// random; checks the initial state after reset, that a disabled clock holds
// the state, that the first 300 samples follow a floating-point Euler
// solution of the continuous equations within 1e-3, and that the trajectory
// stays within the +/-5 range the published design reports (checked against +/-6).
module tb_hc_master;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  hc_state_t state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hc_master dut (.clk(clk), .rst(rst), .en(en), .state(state));

  initial begin
    #2_000_000;
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
    ref_state_t r;
    real fx, fy, fz, fu, nx, ny, nz, nu;
    int steps;
    real maxabs;
    r = '{x: 1677722, y: 0, z: 0, u: 0};
    fx = 0.1; fy = 0.0; fz = 0.0; fu = 0.0;
    maxabs = 0.0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(state.x == 32'(r.x) && state.y == 0 && state.z == 0 && state.u == 0,
          "initial state");
    steps = 0;
    while (steps < 20000) begin
      en = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      #1;
      if (en) begin
        r = ref_step(r, 0);
        steps++;
        if (steps <= 300) begin
          nx = fx + 0.001 * (7.0 * fz - 7.0 * fx * (-1.2 + fu * fu));
          ny = fy + 0.001 * (fy - fz);
          nz = fz + 0.001 * 2.5 * (fy - fx);
          nu = fu + 0.001 * (-6.0) * fx;
          fx = nx; fy = ny; fz = nz; fu = nu;
          check((real_of(longint'(state.x)) - fx) < 1e-3 &&
                (fx - real_of(longint'(state.x))) < 1e-3 &&
                (real_of(longint'(state.u)) - fu) < 1e-3 &&
                (fu - real_of(longint'(state.u))) < 1e-3, "float Euler");
        end
      end
      check(longint'(state.x) == r.x && longint'(state.y) == r.y &&
            longint'(state.z) == r.z && longint'(state.u) == r.u,
            "bit-exact state");
      if (rabs(real_of(longint'(state.x))) > maxabs) maxabs = rabs(real_of(longint'(state.x)));
      if (rabs(real_of(longint'(state.u))) > maxabs) maxabs = rabs(real_of(longint'(state.u)));
    end
    check(maxabs < 6.0 && maxabs > 1.0, "amplitude range");
    $display("max |x|,|u| = %f", maxabs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
