// tb_cook_sys: sends 2000 random bits through the COOK link over a noiseless
// channel (r_in = s_out).  Checks: bit_req timing (first enabled clock after
// reset, then every SAMPLES_PER_BIT enabled clocks); s_out equal to the
// generator's u for a 1 bit and zero for a 0 bit; rx_valid exactly one clock
// after each bit's last sample, i.e. SAMPLES_PER_BIT enabled clocks after
// the bit started; energy equal to an independently accumulated
// sum(floor(u*u)*0.0009768); the decision equal to energy > threshold; and
// at least 99% of the decisions equal to the sent bits.  The sample enable
// is toggled at random.
module tb_cook_sys;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  localparam int SPB   = 10;
  localparam int NBITS = 2000;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0, tx_bit = 1'b0;
  logic bit_req, rx_bit, rx_valid;
  fix_t s_out, r_in, threshold, energy;
  hc_state_t cs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  always_comb r_in = s_out;

  cook_sys #(.SAMPLES_PER_BIT(SPB)) dut (
    .clk(clk), .rst(rst), .en(en), .tx_bit(tx_bit), .bit_req(bit_req),
    .s_out(s_out), .r_in(r_in), .threshold(threshold), .rx_bit(rx_bit),
    .rx_valid(rx_valid), .energy(energy), .chaos_state(cs));

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
    ref_state_t g;
    logic sent [$];
    logic cur;
    int k, nbits_sent, decisions, correct, ones_seen, zeros_seen;
    longint acc, exp_e;
    logic exp_valid;
    threshold = fix_t'(1);
    g = '{x: 1677722, y: 0, z: 0, u: 0};
    k = -1; nbits_sent = 0; decisions = 0; correct = 0;
    ones_seen = 0; zeros_seen = 0;
    acc = 0; exp_valid = 1'b0; cur = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    while (decisions < NBITS) begin
      @(negedge clk);
      // outputs registered at the previous edge
      check(rx_valid == exp_valid, "rx_valid timing");
      if (exp_valid) begin
        logic b;
        b = sent.pop_front();
        check(longint'(energy) == exp_e, "energy");
        check(rx_bit == (exp_e > longint'(threshold)), "decision");
        decisions++;
        if (rx_bit == b) correct++;
        if (b) ones_seen++; else zeros_seen++;
      end
      exp_valid = 1'b0;
      en = ($urandom_range(5, 0) != 0);
      tx_bit = $urandom_range(1, 0);
      #1;
      check(bit_req == (k == -1 || k == SPB - 1), "bit_req");
      if (k >= 0) begin
        check(s_out == (cur ? cs.u : fix_t'(0)), "s_out");
        check(longint'(cs.u) == g.u && longint'(cs.x) == g.x, "generator");
      end
      @(posedge clk);
      if (en) begin
        if (k >= 0) begin
          acc = wrap32(acc + rmul(rmul(longint'(r_in), longint'(r_in)), R_SC));
          if (k == SPB - 1) begin
            exp_e = acc; exp_valid = 1'b1; acc = 0;
          end
        end
        g = ref_step(g, 0);
        if (k == -1 || k == SPB - 1) begin
          cur = tx_bit;
          sent.push_back(tx_bit);
          k = 0;
        end else begin
          k++;
        end
      end
    end
    $display("decisions %0d correct %0d (ones %0d zeros %0d)", decisions, correct,
             ones_seen, zeros_seen);
    check(correct * 100 >= decisions * 99, "noiseless bit error rate");
    check(ones_seen > 0 && zeros_seen > 0, "both symbols");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
