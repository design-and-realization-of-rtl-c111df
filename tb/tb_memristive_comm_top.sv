// tb_memristive_comm_top: end-to-end test of both links at the default
// parameters.
//
// Masking link: 60000 samples of a 0.05-amplitude sine hidden in the master's
// u state; every output is compared bit for bit with the integer reference
// model, and the run must show the slave starting unsynchronized, locking
// (x error below 0.03) and the information being recovered within 0.03.
// COOK link: random bits for as long as the masking run lasts (at least
// 3000), the first 1000 over a noiseless channel, the rest through additive
// white Gaussian noise at Eb/N0 = 10 dB (the noise
// level set from the carrier power measured in the first phase) with the
// threshold placed between the expected energies of a 0 and a 1.  Every
// decision is checked against an independent energy accumulation of what was
// fed back on cook_r, and the noiseless phase must decode at least 99% of
// the bits.  The sample enable is dropped at random so that stalls occur.
// Each mechanism (stall, unsynchronized start, lock, recovery, bit request,
// chaos on, chaos off, decision 1, decision 0, noisy decision) is counted and
// a mechanism that never happens is a failure.
module tb_memristive_comm_top;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  localparam int SPB     = 10;
  localparam int NSAMP   = 60000;
  localparam int NBITS   = 3000;
  localparam int NQUIET  = 1000;
  localparam real EBN0_DB = 10.0;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  fix_t mask_info = '0, mask_s, mask_info_rec, mask_ctrl, mask_err_x;
  hc_state_t mask_master, mask_slave, cook_chaos;
  logic cook_tx_bit = 1'b0, cook_bit_req, cook_rx_bit, cook_rx_valid;
  fix_t cook_s, cook_r = '0, cook_threshold = '0, cook_energy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  memristive_comm_top dut (.*);

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

  // mechanism counters
  int n_stall = 0, n_unsync = 0, n_lock = 0, n_recover = 0, n_bitreq = 0;
  int n_on = 0, n_off = 0, n_dec1 = 0, n_dec0 = 0, n_noisy = 0;

  initial begin
    // masking reference
    ref_state_t rm, rs, g;
    longint integ, e1, e2, c, integ_next;
    int nmask;
    real late_err;
    // COOK reference
    logic sent [$];
    logic cur;
    int k, decisions, correct_quiet, errors_noisy;
    longint acc, exp_e;
    logic exp_valid;
    real psum, pavg, sigma, ebn0;
    int pcount;

    rm = '{x: 1677722, y: 0, z: 0, u: 0};
    rs = '{x: 0, y: 0, z: 0, u: 0};
    g  = '{x: 1677722, y: 0, z: 0, u: 0};
    integ = 0; nmask = 0; late_err = 0.0;
    k = -1; decisions = 0; correct_quiet = 0; errors_noisy = 0;
    acc = 0; exp_valid = 1'b0; cur = 1'b0;
    psum = 0.0; pcount = 0; sigma = 0.0;
    cook_threshold = fix_t'(1);
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    while (nmask < NSAMP || decisions < NBITS) begin
      @(negedge clk);
      // ---- COOK decision registered at the previous edge
      check(cook_rx_valid == exp_valid, "rx_valid timing");
      if (exp_valid) begin
        logic b;
        b = sent.pop_front();
        check(longint'(cook_energy) == exp_e, "energy");
        check(cook_rx_bit == (exp_e > longint'(cook_threshold)), "decision");
        if (cook_rx_bit) n_dec1++; else n_dec0++;
        if (decisions < NQUIET) begin
          if (cook_rx_bit == b) correct_quiet++;
        end else begin
          n_noisy++;
          if (cook_rx_bit != b) errors_noisy++;
        end
        decisions++;
        if (decisions == NQUIET) begin
          // set the noise from the measured carrier power
          pavg  = psum / pcount;
          ebn0  = 10.0 ** (EBN0_DB / 10.0);
          sigma = $sqrt(pavg * SPB / 2.0 / ebn0 / 2.0);
          cook_threshold = fix_t'(fix_of(0.0009768 * SPB * (sigma * sigma + pavg / 2.0)));
          $display("carrier power %f, noise sigma %f", pavg, sigma);
        end
      end
      exp_valid = 1'b0;

      en = ($urandom_range(7, 0) != 0);
      if (!en) n_stall++;
      mask_info = fix_t'(fix_of(0.05 * $sin(6.283185307179586 * nmask / 2000.0)));
      cook_tx_bit = $urandom_range(1, 0);
      #1;
      // ---- masking link, combinational view of the current sample
      e1 = rm.x - rs.x;
      e2 = rm.y - rs.y;
      integ_next = wrap32(integ + rmul(R_T, e1));
      c = wrap32(rmul(R_PT, e1) + rmul(R_IT, integ_next) + rmul(R_DT, e2));
      check(longint'(mask_master.x) == rm.x && longint'(mask_master.u) == rm.u &&
            longint'(mask_slave.x) == rs.x && longint'(mask_slave.u) == rs.u,
            "masking states");
      check(longint'(mask_ctrl) == c, "masking ctrl");
      check(longint'(mask_s) == wrap32(rm.u + longint'(mask_info)), "mask_s");
      check(longint'(mask_info_rec) == wrap32(rm.u + longint'(mask_info) - rs.u),
            "mask_info_rec");
      if (nmask < NSAMP) begin
        if (nmask < 200 && rabs(real_of(e1)) > 0.05) n_unsync++;
        if (nmask >= 20000) begin
          if (rabs(real_of(e1)) < 0.03) n_lock++;
          if (rabs(real_of(e1)) > late_err) late_err = rabs(real_of(e1));
          if (rabs(real_of(longint'(mask_info_rec) - longint'(mask_info))) < 0.03)
            n_recover++;
          else
            check(1'b0, "information recovered");
        end
      end
      // ---- COOK link: channel
      check(cook_bit_req == (k == -1 || k == SPB - 1), "bit_req");
      if (k >= 0) begin
        check(cook_s == (cur ? cook_chaos.u : fix_t'(0)), "cook_s");
        check(longint'(cook_chaos.u) == g.u, "cook generator");
      end
      if (decisions >= NQUIET && k >= 0)
        cook_r = fix_t'(longint'(cook_s) + fix_of(gauss(sigma)));
      else
        cook_r = cook_s;
      @(posedge clk);
      if (en) begin
        integ = integ_next;
        rm = ref_step(rm, 0);
        rs = ref_step(rs, c);
        nmask++;
        if (k >= 0) begin
          if (cur) begin
            n_on++;
            psum += real_of(longint'(cook_s)) ** 2;
            pcount++;
          end else begin
            n_off++;
          end
          acc = wrap32(acc + rmul(rmul(longint'(cook_r), longint'(cook_r)), R_SC));
          if (k == SPB - 1) begin
            exp_e = acc; exp_valid = 1'b1; acc = 0;
          end
        end
        g = ref_step(g, 0);
        if (k == -1 || k == SPB - 1) begin
          n_bitreq++;
          cur = cook_tx_bit;
          sent.push_back(cook_tx_bit);
          k = 0;
        end else begin
          k++;
        end
      end
    end
    $display("masking: late max |e1| %f", late_err);
    $display("COOK: quiet %0d/%0d correct, noisy %0d errors in %0d bits at %0.1f dB",
             correct_quiet, NQUIET, errors_noisy, n_noisy, EBN0_DB);
    $display("mechanisms: stall %0d unsync %0d lock %0d recover %0d bitreq %0d on %0d off %0d dec1 %0d dec0 %0d noisy %0d",
             n_stall, n_unsync, n_lock, n_recover, n_bitreq, n_on, n_off, n_dec1, n_dec0, n_noisy);
    check(correct_quiet * 100 >= NQUIET * 99, "noiseless COOK decoding");
    check(errors_noisy * 4 < n_noisy, "noisy COOK decoding better than chance");
    check(n_stall > 0,   "stall happened");
    check(n_unsync > 0,  "unsynchronized start happened");
    check(n_lock > 0,    "lock happened");
    check(n_recover > 0, "recovery happened");
    check(n_bitreq > 0,  "bit request happened");
    check(n_on > 0,      "chaos on happened");
    check(n_off > 0,     "chaos off happened");
    check(n_dec1 > 0,    "decision 1 happened");
    check(n_dec0 > 0,    "decision 0 happened");
    check(n_noisy > 0,   "noisy decision happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
