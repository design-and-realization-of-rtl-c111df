// tb_mask_rx: random received and replica samples; checks info_rec = s - replica.
module tb_mask_rx;
  import hc_pkg::*;
  fix_t s, replica, info_rec;
  int checks = 0, failures = 0;

  mask_rx dut (.s(s), .replica(replica), .info_rec(info_rec));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      s       = fix_t'($signed($urandom_range(32'h0FFFFFFF, 0)) - 32'sh08000000);
      replica = fix_t'($signed($urandom_range(32'h0FFFFFFF, 0)) - 32'sh08000000);
      #1;
      checks++;
      if (longint'(info_rec) != longint'(s) - longint'(replica)) begin
        failures++;
        if (failures < 10) $display("FAIL info_rec=%0d s=%0d replica=%0d", info_rec, s, replica);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
