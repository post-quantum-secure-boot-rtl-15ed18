// tb_wots_checksum: compares the base-16 digits and checksum digits with
// the reference model's base_w for random digests and the two extremes
// (all-zero and all-ones digests).
module tb_wots_checksum;
  import xmss_pkg::*;
  import xmss_ref_pkg::*;
  hash_t digest;
  logic [LEN-1:0][3:0] wd;
  int checks = 0, failures = 0;
  wots_checksum dut (.digest, .wd);
  initial begin
    digits_t d;
    for (int t = 0; t < 102; t++) begin
      digest = (t == 0) ? '0 : (t == 1) ? '1 : rand_h();
      #1;
      d = base_w(digest);
      for (int i = 0; i < 67; i++) begin
        checks++;
        if (int'(wd[i]) != d[i]) begin failures++; $display("FAIL t%0d digit %0d: %0d vs %0d", t, i, wd[i], d[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
