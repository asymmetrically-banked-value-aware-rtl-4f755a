// tb_abvarf_regfile: random writes and reads within the per-bank port limits.
// The model keeps, per physical register, the written value cut to its bank's
// width (16/16/34/64 bits) and sign-extended, which is what a read must return.
module tb_abvarf_regfile;
  import abvarf_pkg::*;
  logic clk = 0;
  logic [15:0] rd_valid;
  preg_t [15:0] rd_preg;
  logic [15:0][63:0] rd_data;
  logic [7:0] wr_valid;
  preg_t [7:0] wr_preg;
  logic [7:0][63:0] wr_data;
  logic rd_conflict, wr_conflict;
  logic [63:0] model [512];
  logic known [512];
  int checks = 0, failures = 0;

  abvarf_regfile dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] fit(input logic [63:0] v, input int p);
    int w;
    w = (p < 256) ? 16 : (p < 384) ? 34 : 64;
    return 64'($signed(v << (64 - w)) >>> (64 - w));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 512; p++) known[p] = 0;
    rd_valid = '0; wr_valid = '0; rd_preg = '0; wr_preg = '0; wr_data = '0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int rn [4], wn [4];
      logic used [512];
      @(negedge clk);
      rn = '{0, 0, 0, 0}; wn = '{0, 0, 0, 0};
      for (int p = 0; p < 512; p++) used[p] = 0;
      for (int j = 0; j < 16; j++) begin
        rd_preg[j] = preg_t'($urandom_range(0, 511));
        rd_valid[j] = rn[rd_preg[j] / 128] < 4;
        if (rd_valid[j]) rn[rd_preg[j] / 128]++;
      end
      for (int j = 0; j < 8; j++) begin
        logic [63:0] v;
        int sh;
        wr_preg[j] = preg_t'($urandom_range(0, 511));
        sh = $urandom_range(0, 63);
        v = {$urandom, $urandom};
        wr_data[j] = 64'($signed(v << sh) >>> sh);
        wr_valid[j] = wn[wr_preg[j] / 128] < 2 && !used[wr_preg[j]] && $urandom_range(0, 1);
        if (wr_valid[j]) begin wn[wr_preg[j] / 128]++; used[wr_preg[j]] = 1; end
      end
      #1;
      checks++;
      if (rd_conflict || wr_conflict) begin failures++; $display("FAIL conflict flagged"); end
      for (int j = 0; j < 16; j++) if (rd_valid[j] && known[rd_preg[j]]) begin
        checks++;
        if (rd_data[j] !== model[rd_preg[j]]) begin
          failures++;
          $display("FAIL cyc %0d preg %0d got %h exp %h", cyc, rd_preg[j], rd_data[j], model[rd_preg[j]]);
        end
      end
      @(posedge clk);
      for (int j = 0; j < 8; j++) if (wr_valid[j]) begin
        model[wr_preg[j]] = fit(wr_data[j], wr_preg[j]);
        known[wr_preg[j]] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
