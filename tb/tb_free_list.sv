// tb_free_list: random allocation and release against a queue model.
// Reduced size (16 entries, 4 allocations and 3 releases per cycle) so that
// the list runs empty and wraps around often.
module tb_free_list;
  import abvarf_pkg::*;
  localparam int DEPTH = 16, AW = 4, RW = 3, FIRST = 32, SKIP = 4;
  logic clk = 0, rst_n = 0;
  preg_t [AW-1:0] head_id;
  logic [4:0] count;
  logic [2:0] pop;
  logic [RW-1:0] rel_valid;
  preg_t [RW-1:0] rel_id;
  int checks = 0, failures = 0;
  preg_t q[$];
  preg_t out[$];   // allocated ids

  free_list #(.DEPTH(DEPTH), .ALLOC_W(AW), .REL_W(RW), .FIRST(FIRST), .SKIP(SKIP)) dut (
    .clk(clk), .rst_n(rst_n), .head_id(head_id), .count(count), .pop(pop),
    .rel_valid(rel_valid), .rel_id(rel_id));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int empties = 0;
  initial begin
    pop = '0; rel_valid = '0; rel_id = '0;
    for (int i = SKIP; i < DEPTH; i++) q.push_back(preg_t'(FIRST + i));
    for (int i = 0; i < SKIP; i++) out.push_back(preg_t'(FIRST + i));
    #12 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int np, lim;
      @(negedge clk);
      checks++;
      if (count !== 5'(q.size())) begin
        failures++;
        $display("FAIL cyc %0d count %0d exp %0d", cyc, count, q.size());
      end
      if (q.size() == 0) empties++;
      for (int i = 0; i < AW && i < q.size(); i++) begin
        checks++;
        if (head_id[i] !== q[i]) begin
          failures++;
          $display("FAIL cyc %0d head[%0d] %0d exp %0d", cyc, i, head_id[i], q[i]);
        end
      end
      lim = (q.size() < AW) ? q.size() : AW;
      np = $urandom_range(0, lim);
      pop = 3'(np);
      rel_valid = '0;
      for (int r = 0; r < RW; r++) begin
        if (out.size() > 0 && $urandom_range(0, 2) == 0) begin
          int k;
          k = $urandom_range(0, out.size() - 1);
          rel_valid[r] = 1'b1;
          rel_id[r] = out[k];
          out.delete(k);
        end else begin
          rel_id[r] = preg_t'($urandom);
        end
      end
      @(posedge clk);
      for (int i = 0; i < np; i++) out.push_back(q.pop_front());
      for (int r = 0; r < RW; r++) if (rel_valid[r]) q.push_back(rel_id[r]);
    end
    checks++;
    if (empties == 0) begin failures++; $display("FAIL list never ran empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
