// tb_mask_tx: random carrier and information samples; checks s = carrier + info.
module tb_mask_tx;
  import hc_pkg::*;
  fix_t carrier, info, s;
  int checks = 0, failures = 0;

  mask_tx dut (.carrier(carrier), .info(info), .s(s));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      carrier = fix_t'($signed($urandom_range(32'h0FFFFFFF, 0)) - 32'sh08000000);
      info    = fix_t'($signed($urandom_range(32'h00FFFFFF, 0)) - 32'sh00800000);
      #1;
      checks++;
      if (longint'(s) != longint'(carrier) + longint'(info)) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0d carrier=%0d info=%0d", s, carrier, info);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
