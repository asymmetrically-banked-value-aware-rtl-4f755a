// tb_width_detect: checks the narrowness flags against a reference that finds
// the smallest two's-complement width holding the value.
module tb_width_detect;
  import abvarf_pkg::*;
  logic [63:0] value;
  width_t flags;
  int checks = 0, failures = 0;

  width_detect dut (.value(value), .flags(flags));

  function automatic width_t ref_flags(input logic [63:0] v);
    int w;
    w = 64;
    // smallest w with sign-extension of v[w-1:0] == v
    for (int k = 64; k >= 1; k--) begin
      logic [63:0] s;
      s = 64'($signed(v << (64 - k)) >>> (64 - k));
      if (s == v) w = k;
    end
    if (w <= 16) return W16;
    if (w <= 34) return W34;
    return W64;
  endfunction

  task automatic check(input logic [63:0] v);
    value = v;
    #1;
    checks++;
    if (flags !== ref_flags(v)) begin
      failures++;
      $display("FAIL value=%h flags=%b exp=%b", v, flags, ref_flags(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(64'h0); check('1); check(64'h7fff); check(64'h8000); check(64'hffff_ffff_ffff_8000);
    check(64'hffff_ffff_ffff_7fff); check(64'h1_ffff_ffff); check(64'h2_0000_0000);
    check(64'hffff_fffe_0000_0000); check(64'hffff_fffd_ffff_ffff); check(64'h8000_0000_0000_0000);
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] r;
      int sh;
      r = {$urandom, $urandom};
      sh = $urandom_range(0, 63);
      r = 64'($signed(r << sh) >>> sh);   // random widths
      check(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
