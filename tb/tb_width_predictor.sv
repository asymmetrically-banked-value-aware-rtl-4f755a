// tb_width_predictor: random lookups and updates against a table model.
// Checks the reset prediction (64-bit), the last-width counter values and that
// an update is visible from the next cycle.
module tb_width_predictor;
  import abvarf_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][63:0] lk_pc, up_pc;
  width_t [N-1:0] lk_pred, up_flags;
  logic [N-1:0] up_valid;
  int checks = 0, failures = 0;
  width_t model [2048];

  width_predictor dut (.clk(clk), .rst_n(rst_n), .lk_pc(lk_pc), .lk_pred(lk_pred),
                       .up_valid(up_valid), .up_pc(up_pc), .up_flags(up_flags));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2048; e++) model[e] = W64;
    up_valid = '0; lk_pc = '0; up_pc = '0; up_flags = {N{W64}};
    #12 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        // small PC range so that updates and lookups collide often
        lk_pc[i] = 64'($urandom_range(0, 63) * 4 + (cyc > 1500 ? 64'h1000 * $urandom_range(0, 1) : 0));
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (lk_pred[i] !== model[lk_pc[i][12:2]]) begin
          failures++;
          $display("FAIL cyc %0d pc %h pred %b exp %b", cyc, lk_pc[i], lk_pred[i], model[lk_pc[i][12:2]]);
        end
      end
      for (int i = 0; i < N; i++) begin
        int f;
        up_valid[i] = ($urandom_range(0, 3) == 0);
        up_pc[i] = 64'($urandom_range(0, 63) * 4);
        f = $urandom_range(0, 2);
        up_flags[i] = (f == 0) ? W16 : (f == 1) ? W34 : W64;
      end
      @(posedge clk);
      for (int i = 0; i < N; i++)
        if (up_valid[i]) model[up_pc[i][12:2]] = up_flags[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
