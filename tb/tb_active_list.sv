// tb_active_list: random allocation, completion, commit and flushes on a
// 16-entry list (4 wide) against a queue model. Checks the tags handed out,
// the in-order commit of done entries with their old registers, and that a
// flush walks back one entry per cycle from the youngest to the flagged one,
// including a flush of an older instruction that arrives during a walk.
module tb_active_list;
  import abvarf_pkg::*;
  localparam int D = 16, RW = 4, CW = 4, NWB = 4, NL = 8;
  typedef struct {
    int tag; logic has_dest; int ldest; preg_t pdest; preg_t old; logic done;
  } ent_t;
  logic clk = 0, rst_n = 0;
  logic al_fire, al_ready;
  logic [RW-1:0] al_valid, al_has_dest;
  logic [RW-1:0][2:0] al_ldest;
  preg_t [RW-1:0] al_pdest, al_old;
  logic [RW-1:0][3:0] al_tag;
  logic [NWB-1:0] wb_valid;
  logic [NWB-1:0][3:0] wb_tag;
  logic [CW-1:0] cm_valid, cm_release;
  preg_t [CW-1:0] cm_old;
  logic flush_valid, busy, walk_valid, walk_has_dest;
  logic [3:0] flush_tag, head_tag;
  logic [2:0] walk_ldest;
  preg_t walk_old, walk_new;
  logic [4:0] occupancy;
  int checks = 0, failures = 0;
  ent_t q[$];
  int next_tag = 0, stop = 0;
  logic walking = 0;
  int n_commit = 0, n_walk = 0, n_flush = 0, n_extend = 0;

  active_list #(.DEPTH(D), .RENAME_W(RW), .COMMIT_W(CW), .NWB(NWB), .NUM_LREGS(NL)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic int pos(input int tag);
    for (int k = 0; k < q.size(); k++) if (q[k].tag == tag) return k;
    return -1;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    al_fire = 0; al_valid = '0; al_has_dest = '0; al_ldest = '0; al_pdest = '0; al_old = '0;
    wb_valid = '0; wb_tag = '0; flush_valid = 0; flush_tag = '0;
    #12 rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int ncm, nt;
      @(negedge clk);
      // stimulus
      flush_valid = 0;
      begin
        automatic int cand[$];
        for (int k = 0; k < q.size(); k++) if (!q[k].done) cand.push_back(k);
        if (cand.size() > 0 && $urandom_range(0, 19) == 0) begin
          automatic int k = cand[$urandom_range(0, cand.size() - 1)];
          if (!walking || k < pos(stop)) begin
            flush_valid = 1;
            flush_tag = 4'(q[k].tag);
          end
        end
      end
      for (int i = 0; i < RW; i++) begin
        al_valid[i] = $urandom_range(0, 3) != 0;
        al_has_dest[i] = $urandom_range(0, 4) != 0;
        al_ldest[i] = 3'($urandom);
        al_pdest[i] = preg_t'($urandom);
        al_old[i] = preg_t'($urandom);
      end
      for (int w = 0; w < NWB; w++) begin
        wb_valid[w] = 0; wb_tag[w] = '0;
        if (q.size() > 0 && $urandom_range(0, 1)) begin
          automatic int k = $urandom_range(0, q.size() - 1);
          wb_valid[w] = !(flush_valid && q[k].tag == int'(flush_tag)) && !q[k].done;
          wb_tag[w] = 4'(q[k].tag);
        end
      end
      #1;
      chk(al_ready == (!walking && !flush_valid && q.size() + RW <= D), $sformatf("cyc %0d al_ready", cyc));
      al_fire = al_ready && $urandom_range(0, 2) != 0;
      nt = next_tag;
      for (int i = 0; i < RW; i++) if (al_valid[i] && al_ready) begin
        chk(al_tag[i] == 4'(nt), $sformatf("cyc %0d tag slot %0d %0d exp %0d", cyc, i, al_tag[i], nt));
        nt = (nt + 1) % D;
      end
      chk(busy == walking, "busy");
      // expected commit
      ncm = 0;
      if (!walking)
        while (ncm < CW && ncm < q.size() && q[ncm].done) ncm++;
      for (int c = 0; c < CW; c++) begin
        chk(cm_valid[c] == (c < ncm), $sformatf("cyc %0d cm_valid[%0d]", cyc, c));
        if (c < ncm)
          chk(cm_release[c] == q[c].has_dest && (!q[c].has_dest || cm_old[c] == q[c].old),
              $sformatf("cyc %0d commit %0d", cyc, c));
      end
      chk(walk_valid == walking, "walk_valid");
      if (walking) begin
        automatic ent_t e = q[q.size() - 1];
        chk(walk_has_dest == e.has_dest && walk_ldest == 3'(e.ldest) && walk_old == e.old && walk_new == e.pdest,
            $sformatf("cyc %0d walk entry tag %0d qsize %0d dut new %0d exp %0d hd %0d/%0d", cyc, e.tag, q.size(), walk_new, e.pdest, walk_has_dest, e.has_dest));
      end
      @(posedge clk);
      // model update
      for (int w = 0; w < NWB; w++) if (wb_valid[w]) begin
        automatic int k = pos(wb_tag[w]);
        if (k >= 0) q[k].done = 1;
      end
      if (walking) begin
        ent_t e;
        automatic int s = stop;
        if (flush_valid && pos(flush_tag) < pos(stop)) begin s = flush_tag; n_extend++; end
        e = q.pop_back();
        n_walk++;
        next_tag = e.tag;
        stop = s;
        if (e.tag == s) walking = 0;
      end else begin
        for (int c = 0; c < ncm; c++) void'(q.pop_front());
        n_commit += ncm;
        if (al_fire)
          for (int i = 0; i < RW; i++) if (al_valid[i] && al_ready) begin
            ent_t e;
            e.tag = next_tag; e.has_dest = al_has_dest[i]; e.ldest = al_ldest[i];
            e.pdest = al_pdest[i]; e.old = al_old[i]; e.done = 0;
            q.push_back(e);
            next_tag = (next_tag + 1) % D;
          end
        if (flush_valid) begin walking = 1; stop = flush_tag; n_flush++; end
      end
    end
    chk(n_commit > 0 && n_walk > 0 && n_flush > 0 && n_extend > 0, "mechanisms exercised");
    $display("commits %0d flushes %0d walk steps %0d extended walks %0d", n_commit, n_flush, n_walk, n_extend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
