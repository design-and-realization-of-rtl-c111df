// tb_cook_mod: random chaotic samples and bits; checks that a 1 passes the
// sample unchanged and a 0 sends zero.
module tb_cook_mod;
  import hc_pkg::*;
  fix_t chaos, s;
  logic bit_i;
  int checks = 0, failures = 0, ones = 0, zeros = 0;

  cook_mod dut (.chaos(chaos), .bit_i(bit_i), .s(s));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      chaos = fix_t'($signed($urandom_range(32'h0FFFFFFF, 1)) - 32'sh08000000);
      bit_i = $urandom_range(1, 0);
      #1;
      checks++;
      if (bit_i) ones++; else zeros++;
      if (s != (bit_i ? chaos : fix_t'(0))) begin
        failures++;
        if (failures < 10) $display("FAIL bit=%0d chaos=%0d s=%0d", bit_i, chaos, s);
      end
    end
    checks++;
    if (ones == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
