// tb_rat: random rename groups and restore writes against a map model updated
// one instruction at a time (so intra-group dependences are checked).
module tb_rat;
  import abvarf_pkg::*;
  localparam int RW = 8;
  logic clk = 0, rst_n = 0, fire;
  logic [RW-1:0] valid, has_dest;
  logic [RW-1:0][4:0] lsrc1, lsrc2, ldest;
  preg_t [RW-1:0] pdest, psrc1, psrc2, old_pdest;
  logic rst_valid;
  logic [4:0] rst_lreg;
  preg_t rst_preg;
  int checks = 0, failures = 0;
  preg_t model [32];

  rat dut (.clk(clk), .rst_n(rst_n), .fire(fire), .valid(valid), .has_dest(has_dest),
    .lsrc1(lsrc1), .lsrc2(lsrc2), .ldest(ldest), .pdest(pdest),
    .psrc1(psrc1), .psrc2(psrc2), .old_pdest(old_pdest),
    .rst_valid(rst_valid), .rst_lreg(rst_lreg), .rst_preg(rst_preg));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) model[r] = preg_t'(384 + r);
    fire = 0; valid = '0; has_dest = '0; rst_valid = 0; rst_lreg = '0; rst_preg = '0;
    lsrc1 = '0; lsrc2 = '0; ldest = '0; pdest = '0;
    #12 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      preg_t m [32];
      @(negedge clk);
      for (int i = 0; i < RW; i++) begin
        valid[i] = $urandom_range(0, 5) != 0;
        has_dest[i] = $urandom_range(0, 4) != 0;
        lsrc1[i] = 5'($urandom_range(0, 7));   // few registers: many dependences
        lsrc2[i] = 5'($urandom_range(0, 31));
        ldest[i] = 5'($urandom_range(0, 7));
        pdest[i] = preg_t'($urandom);
      end
      fire = $urandom_range(0, 3) != 0;
      rst_valid = !fire && $urandom_range(0, 1);
      rst_lreg = 5'($urandom);
      rst_preg = preg_t'($urandom);
      #1;
      m = model;
      for (int i = 0; i < RW; i++) begin
        checks += 2;
        if (psrc1[i] !== m[lsrc1[i]] || psrc2[i] !== m[lsrc2[i]]) begin
          failures++;
          $display("FAIL cyc %0d slot %0d src %0d/%0d exp %0d/%0d", cyc, i, psrc1[i], psrc2[i], m[lsrc1[i]], m[lsrc2[i]]);
        end
        if (valid[i] && has_dest[i]) begin
          if (old_pdest[i] !== m[ldest[i]]) begin
            failures++;
            $display("FAIL cyc %0d slot %0d old %0d exp %0d", cyc, i, old_pdest[i], m[ldest[i]]);
          end
          m[ldest[i]] = pdest[i];
        end
      end
      @(posedge clk);
      if (fire) model = m;
      else if (rst_valid) model[rst_lreg] = rst_preg;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
