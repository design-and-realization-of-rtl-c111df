// tb_cook_ber: bit error rate of the COOK link over an additive white
// Gaussian noise channel, Eb/N0 from 0 dB to 20 dB in 5 dB steps, 4000 bits
// per point, at the default bit length.
//
// The carrier power P (mean u^2 while the chaos is switched on) is measured
// in a noiseless warm-up of 500 bits.  With half of the bits ones, the mean
// bit energy is Eb = P * SAMPLES_PER_BIT / 2; the noise added to each
// sample has variance N0/2 = Eb / (2 * Eb/N0).  The decision threshold is
// set halfway between the expected energies of a 0 bit and a 1 bit:
// 0.0009768 * SAMPLES_PER_BIT * (N0/2 + P/2).  Each decision is checked
// against an independent energy accumulation of the noisy samples; the
// bit error rate must not rise from 0 dB to 20 dB and must stay below 0.5
// at every point.
module tb_cook_ber;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  localparam int SPB    = 10;
  localparam int NBITS  = 4000;
  localparam int NWARM  = 500;
  localparam int NPTS   = 5;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0, tx_bit = 1'b0;
  logic bit_req, rx_bit, rx_valid;
  fix_t s_out, r_in = '0, threshold = fix_t'(1), energy;
  hc_state_t cs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cook_sys dut (
    .clk(clk), .rst(rst), .en(en), .tx_bit(tx_bit), .bit_req(bit_req),
    .s_out(s_out), .r_in(r_in), .threshold(threshold), .rx_bit(rx_bit),
    .rx_valid(rx_valid), .energy(energy), .chaos_state(cs));

  initial begin
    #20_000_000;
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
    logic sent [$];
    int k, point, nb, errs;
    int errs_at [NPTS];
    longint acc, exp_e;
    logic exp_valid;
    real psum, pavg, sigma, ebn0;
    int pcount;
    logic cur;
    k = -1; acc = 0; exp_valid = 1'b0; cur = 1'b0;
    psum = 0.0; pcount = 0; sigma = 0.0;
    point = -1; nb = 0; errs = 0;
    en = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    while (point < NPTS) begin
      @(negedge clk);
      if (exp_valid) begin
        logic b;
        b = sent.pop_front();
        check(longint'(energy) == exp_e, "energy");
        check(rx_bit == (exp_e > longint'(threshold)), "decision");
        if (point >= 0 && rx_bit != b) errs++;
        nb++;
        if ((point < 0 && nb == NWARM) || (point >= 0 && nb == NBITS)) begin
          if (point >= 0) begin
            errs_at[point] = errs;
            $display("Eb/N0 %0d dB: %0d errors in %0d bits, BER %f",
                     5 * point, errs, NBITS, real'(errs) / NBITS);
          end
          if (point < 0) pavg = psum / pcount;
          point++;
          nb = 0; errs = 0;
          if (point < NPTS) begin
            ebn0 = 10.0 ** ((5.0 * point) / 10.0);
            sigma = $sqrt(pavg * SPB / 2.0 / ebn0 / 2.0);
            threshold = fix_t'(fix_of(0.0009768 * SPB * (sigma * sigma + pavg / 2.0)));
          end
        end
      end
      exp_valid = 1'b0;
      if (point >= NPTS) break;
      tx_bit = $urandom_range(1, 0);
      #1;
      if (point >= 0 && k >= 0) r_in = fix_t'(longint'(s_out) + fix_of(gauss(sigma)));
      else                      r_in = s_out;
      @(posedge clk);
      if (k >= 0) begin
        if (cur) begin
          psum += real_of(longint'(s_out)) ** 2;
          pcount++;
        end
        acc = wrap32(acc + rmul(rmul(longint'(r_in), longint'(r_in)), R_SC));
        if (k == SPB - 1) begin
          exp_e = acc; exp_valid = 1'b1; acc = 0;
        end
      end
      if (k == -1 || k == SPB - 1) begin
        // bits queued at the moment the transmitter takes them; bits taken
        // at a phase change are simply counted in the next phase
        cur = tx_bit;
        sent.push_back(tx_bit);
        k = 0;
      end else begin
        k++;
      end
    end
    $display("carrier power %f", pavg);
    for (int p = 0; p < NPTS; p++) check(errs_at[p] * 2 < NBITS, "BER below 0.5");
    check(errs_at[NPTS-1] <= errs_at[0], "BER falls with Eb/N0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
