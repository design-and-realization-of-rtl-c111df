// tb_cook_demod: feeds random received samples in bits of 10 samples (with
// random enable gaps), computes each bit's energy sum(floor(r*r)*0.0009768)
// independently, and checks energy, decision (energy > threshold) and that
// bit_valid rises exactly one clock after the bit's last sample and never
// otherwise.  Bits alternate between loud and weak signal so both
// decisions occur.
module tb_cook_demod;
  import hc_pkg::*;
  import tb_ref_pkg::*;

  localparam int SPB = 10;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0, sym_end = 1'b0;
  fix_t r = '0, threshold, energy;
  logic bit_o, bit_valid;
  int checks = 0, failures = 0, ones = 0, zeros = 0;

  always #5 clk = ~clk;

  cook_demod dut (.clk(clk), .rst(rst), .en(en), .r(r), .sym_end(sym_end),
                  .threshold(threshold), .bit_o(bit_o), .bit_valid(bit_valid),
                  .energy(energy));

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
    longint acc, expect_e;
    logic   expect_valid;
    threshold = fix_t'(fix_of(0.005));
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    acc = 0;
    expect_valid = 1'b0;
    for (int b = 0; b < 600; b++) begin
      int k;
      logic loud;
      loud = $urandom_range(1, 0);
      k = 0;
      while (k < SPB) begin
        @(negedge clk);
        check(bit_valid == expect_valid, "valid timing");
        if (expect_valid) begin
          check(longint'(energy) == expect_e, "energy");
          check(bit_o == (expect_e > longint'(threshold)), "decision");
          if (bit_o) ones++; else zeros++;
        end
        expect_valid = 1'b0;
        en = ($urandom_range(4, 0) != 0);
        r  = loud ? fix_t'($signed($urandom_range(32'h3FFFFFF, 0)) - 32'sh2000000)
                    : fix_t'($signed($urandom_range(32'h1FFFFF, 0)) - 32'sh100000);
        sym_end = (k == SPB - 1);
        if (en) begin
          acc = wrap32(acc + rmul(rmul(longint'(r), longint'(r)), R_SC));
          if (sym_end) begin
            expect_e = acc;
            expect_valid = 1'b1;
            acc = 0;
          end
          k++;
        end
      end
    end
    @(negedge clk);
    check(bit_valid == expect_valid, "valid timing");
    check(ones > 10 && zeros > 10, "both decisions");
    $display("ones=%0d zeros=%0d", ones, zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
