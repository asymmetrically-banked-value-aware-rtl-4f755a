// tb_regbank: random writes and reads of a 34-bit bank against an array model.
module tb_regbank;
  localparam int W = 34, E = 128, NR = 4, NW = 2;
  logic clk = 0;
  logic [NR-1:0][6:0] ra;
  logic [NR-1:0][W-1:0] rd;
  logic [NW-1:0] we;
  logic [NW-1:0][6:0] wa;
  logic [NW-1:0][W-1:0] wd;
  logic [W-1:0] model [E];
  logic known [E];
  int checks = 0, failures = 0;

  regbank #(.WIDTH(W), .ENTRIES(E), .NR(NR), .NW(NW)) dut (
    .clk(clk), .ra(ra), .rd(rd), .we(we), .wa(wa), .wd(wd));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < E; e++) known[e] = 0;
    we = '0; wa = '0; wd = '0; ra = '0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) ra[r] = 7'($urandom_range(0, E - 1));
      for (int w = 0; w < NW; w++) begin
        we[w] = $urandom_range(0, 1);
        wa[w] = 7'($urandom_range(0, E - 1));
        wd[w] = W'({$urandom, $urandom});
      end
      if (we[0] && we[1] && wa[0] == wa[1]) we[0] = 0;
      #1;
      for (int r = 0; r < NR; r++) if (known[ra[r]]) begin
        checks++;
        if (rd[r] !== model[ra[r]]) begin
          failures++;
          $display("FAIL cyc %0d port %0d addr %0d got %h exp %h", cyc, r, ra[r], rd[r], model[ra[r]]);
        end
      end
      @(posedge clk);
      for (int w = 0; w < NW; w++) if (we[w]) begin model[wa[w]] = wd[w]; known[wa[w]] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
