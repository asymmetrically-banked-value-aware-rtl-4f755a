// tb_width_verify: a result must be flagged as misfit exactly when its width
// exceeds the width of the bank its destination register lives in.
module tb_width_verify;
  import abvarf_pkg::*;
  logic [63:0] value;
  preg_t preg;
  width_t flags;
  logic misfit;
  int checks = 0, failures = 0;

  width_verify dut (.value(value), .preg(preg), .flags(flags), .misfit(misfit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int sh, need, have;
      logic [63:0] r;
      sh = $urandom_range(0, 63);
      r = {$urandom, $urandom};
      r = 64'($signed(r << sh) >>> sh);
      value = r;
      preg = preg_t'($urandom_range(0, 511));
      #1;
      // bits needed: 64 - sh is an upper bound, compute exactly
      need = 64;
      for (int k = 64; k >= 1; k--)
        if (64'($signed(r << (64 - k)) >>> (64 - k)) == r) need = k;
      have = (preg < 256) ? 16 : (preg < 384) ? 34 : 64;
      checks++;
      if (misfit !== (need > have)) begin
        failures++;
        $display("FAIL v=%h preg=%0d misfit=%b need=%0d have=%0d", r, preg, misfit, need, have);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
