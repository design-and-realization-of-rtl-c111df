// tb_hc_slave: drives the slave oscillator with a random control term and
// checks every sample against the integer reference model (control added to
// the x update), for 10000 samples with a random sample enable, plus the
// zero initial state after reset.
module tb_hc_slave;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  fix_t ctrl = '0;
  hc_state_t state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hc_slave dut (.clk(clk), .rst(rst), .en(en), .ctrl(ctrl), .state(state));

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

  initial begin
    ref_state_t r;
    int steps;
    r = '{x: 0, y: 0, z: 0, u: 0};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(state == '0, "initial state");
    steps = 0;
    while (steps < 10000) begin
      en   = ($urandom_range(3, 0) != 0);
      // control term in [-2^-6, 2^-6)
      ctrl = fix_t'($signed($urandom_range(32'h7FFFF, 0)) - 32'sh40000);
      @(posedge clk);
      #1;
      if (en) begin
        r = ref_step(r, longint'(ctrl));
        steps++;
      end
      check(longint'(state.x) == r.x && longint'(state.y) == r.y &&
            longint'(state.z) == r.z && longint'(state.u) == r.u,
            "bit-exact state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
