// tb_abvarf_top: end-to-end test of the AB-VARF register-file subsystem at its
// full default size (8-wide rename/issue/commit, 512 registers in 16/16/34/64-
// bit banks, 512-entry active list, 2048-entry width predictor).
//
// The testbench plays the out-of-order core around the block. A 64-
// instruction loop is fetched and renamed 8 at a time; each static instruction
// produces results of a fixed width class (16, 34 or 64 bits) or, for a few,
// a class that changes between iterations so that the width predictor is
// sometimes wrong. Renamed instructions are offered to the port scheduler
// oldest first, read their operands on granted cycles, and write back after
// their latency; loads hit, miss in L1 (writing L2_LAT later) or come back
// late through the priority path. Models of the RAT, the free registers per
// class, the active list order and the register contents check, every cycle:
// source and destination renaming (never downsized; oversized only when the
// narrower list is empty), free counts, read data, write-port conflicts,
// misfit detection and the flush it causes, in-order commit, and at the end the
// architectural register values. Each mechanism (rename stall for lack of a
// register, oversized renaming, width misfit and recovery walk, read-port and
// write-port refusals, late-load write-back stall, L1-miss loads, commit) is
// counted and must occur. The walk must take one cycle per squashed entry.
module tb_abvarf_top;
  import abvarf_pkg::*;
  localparam int RW = 8, IW = 8, NRP = 16, NWP = 8, L2 = 12, VL = 24;
  localparam int PROG = 64;
  localparam int N_INSTR = 6000;

  logic clk = 0, rst_n = 0;
  logic [RW-1:0][63:0] fetch_pc;
  width_t [RW-1:0] fetch_wpred, ren_wpred;
  logic [RW-1:0] ren_valid, ren_has_dest, ren_oversized;
  logic [RW-1:0][4:0] ren_lsrc1, ren_lsrc2, ren_ldest;
  logic ren_fire, ren_nofree;
  preg_t [RW-1:0] ren_psrc1, ren_psrc2, ren_pdest;
  logic [RW-1:0][8:0] ren_tag;
  logic [IW-1:0] iss_valid, iss_has_dest, iss_is_load, iss_grant, iss_rp_block, iss_wp_block;
  logic [IW-1:0][1:0] iss_rd;
  preg_t [IW-1:0][1:0] iss_psrc;
  preg_t [IW-1:0] iss_pdest;
  logic [IW-1:0][4:0] iss_lat;
  logic late_ld_valid, wb_stall;
  logic [IW-1:0] cpl_valid;
  logic [IW-1:0][8:0] cpl_tag;
  int cpl_list[$];
  preg_t late_ld_preg;
  logic [NRP-1:0] rd_valid;
  preg_t [NRP-1:0] rd_preg;
  logic [NRP-1:0][63:0] rd_data;
  logic [NWP-1:0] wb_valid, wb_misfit;
  preg_t [NWP-1:0] wb_preg;
  logic [NWP-1:0][63:0] wb_data, wb_pc;
  logic [NWP-1:0][8:0] wb_tag;
  width_t [NWP-1:0] wb_flags;
  logic flush_valid, recover_busy, rf_rd_conflict, rf_wr_conflict;
  logic [8:0] flush_tag;
  logic [3:0] commit_count;
  logic [8:0] free16, free34, free64;

  abvarf_top dut (.*);
  always #5 clk = ~clk;

  // ------------------------------------------------------------ program
  typedef struct {
    logic has_dest; int ldest, src1, src2; int kind; logic is_load; int lat;
  } sinst_t;
  sinst_t prog [PROG];

  // ------------------------------------------------------------ dynamic state
  typedef struct {
    int seq; int pc; logic has_dest; int ldest; preg_t pdest, old, ps1, ps2;
    logic [63:0] value; logic is_load; int lat; int outcome;  // 0 hit, 1 miss, 2 late
    logic written; logic ok;
  } dyn_t;
  dyn_t rec [512];
  int order[$];        // tags in program order, renamed and not committed
  int unissued[$];     // tags in program order
  int pend_tag[$], pend_due[$];   // scheduled write-backs, due tick
  int late_tag[$], late_due[$];   // late loads
  preg_t spec_map [32], arch_map [32];
  logic [63:0] arch_val [32];
  logic arch_known [32];
  logic [63:0] rf_val [512];
  logic rf_known [512];
  logic inuse [512];
  int alloc_cls [3];
  int fetch_seq = 0, tick = 0, next_tag = 0;
  int checks = 0, failures = 0;
  int n_nofree = 0, n_over = 0, n_flush = 0, n_walk = 0, n_squash = 0, n_rblk = 0, n_wblk = 0;
  int n_stall = 0, n_miss = 0, n_late = 0, n_commit = 0, n_full_groups = 0, n_pred16 = 0, n_pred34 = 0;

  task automatic chk(input logic c, input string s);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, s);
    end
  endtask

  function automatic int cls(input preg_t p);
    return (p < 256) ? 0 : (p < 384) ? 1 : 2;
  endfunction
  function automatic int wcls(input logic [63:0] v);
    if (64'($signed(v << 48) >>> 48) == v) return 0;
    if (64'($signed(v << 30) >>> 30) == v) return 1;
    return 2;
  endfunction
  function automatic logic [63:0] fit(input logic [63:0] v, input preg_t p);
    int w;
    w = (cls(p) == 0) ? 16 : (cls(p) == 1) ? 34 : 64;
    return 64'($signed(v << (64 - w)) >>> (64 - w));
  endfunction
  function automatic logic [63:0] gen_value(input int kind, input int seq);
    logic [63:0] r;
    int c;
    r = {$urandom, $urandom};
    c = (kind == 3) ? (((seq / PROG) % 4 == 3) ? 2 : 0) :
        (kind == 4) ? (((seq / PROG) % 3 == 2) ? 1 : 0) : kind;
    if (c == 0) return 64'($signed(r << 49) >>> 49);
    if (c == 1) return 64'($signed(r << 31) >>> 31) ^ 64'h0000_0000_4000_0000;
    return r | 64'h4000_0000_0000_0000;
  endfunction

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic squash_from(input int tag);
    int k;
    k = -1;
    for (int i = 0; i < order.size(); i++) if (order[i] == tag) begin k = i; break; end
    if (k < 0) return;
    fetch_seq = rec[tag].seq;
    while (order.size() > k) begin
      automatic int t = order.pop_back();
      n_squash++;
      if (rec[t].has_dest) begin
        inuse[rec[t].pdest] = 0;
        alloc_cls[cls(rec[t].pdest)]--;
      end
      foreach (cpl_list[i]) if (cpl_list[i] == t) begin cpl_list.delete(i); break; end
      foreach (unissued[i]) if (unissued[i] == t) begin unissued.delete(i); break; end
      for (int i = pend_tag.size() - 1; i >= 0; i--)
        if (pend_tag[i] == t) begin pend_tag.delete(i); pend_due.delete(i); end
      for (int i = late_tag.size() - 1; i >= 0; i--)
        if (late_tag[i] == t) begin late_tag.delete(i); late_due.delete(i); end
      next_tag = t;
    end
    for (int r = 0; r < 32; r++) spec_map[r] = arch_map[r];
    foreach (order[i]) if (rec[order[i]].has_dest) spec_map[rec[order[i]].ldest] = rec[order[i]].pdest;
  endtask

  task automatic cycle(input int cyc);
    int late_sel, nwb, nrd, ncm, exp_cm, flush_t, flush_pos;
    int wb_list[$];
    logic stalled;
    @(negedge clk);
    // ---- late load (priority write-back path)
    late_ld_valid = 0; late_ld_preg = '0; late_sel = -1;
    foreach (late_tag[i]) if (late_due[i] <= tick) begin late_sel = i; break; end
    if (late_sel >= 0) begin
      late_ld_valid = 1;
      late_ld_preg = rec[late_tag[late_sel]].pdest;
    end
    // ---- fetch and rename
    for (int i = 0; i < RW; i++) begin
      automatic int s = fetch_seq + i;
      automatic int p = s % PROG;
      fetch_pc[i] = 64'(p * 4 + 64'h1_0000);
      ren_valid[i] = s < N_INSTR;
      ren_has_dest[i] = prog[p].has_dest;
      ren_ldest[i] = 5'(prog[p].ldest);
      ren_lsrc1[i] = 5'(prog[p].src1);
      ren_lsrc2[i] = 5'(prog[p].src2);
    end
    #1;
    ren_wpred = fetch_wpred;
    // ---- issue candidates, oldest first
    iss_valid = '0; iss_rd = '0; iss_psrc = '0; iss_has_dest = '0; iss_pdest = '0; iss_lat = '0; iss_is_load = '0;
    for (int i = 0; i < IW && i < unissued.size(); i++) begin
      automatic int t = unissued[i];
      iss_valid[i] = 1;
      iss_rd[i] = 2'($urandom_range(0, 3) | (cyc % 50 < 10 ? 3 : 0));   // bursts without bypass
      iss_psrc[i][0] = rec[t].ps1;
      iss_psrc[i][1] = rec[t].ps2;
      iss_has_dest[i] = rec[t].has_dest;
      iss_pdest[i] = rec[t].pdest;
      iss_lat[i] = 5'(rec[t].lat);
      iss_is_load[i] = rec[t].is_load;
    end
    // ---- scheduled write-backs due now
    wb_valid = '0; wb_preg = '0; wb_data = '0; wb_pc = '0; wb_tag = '0;
    cpl_valid = '0; cpl_tag = '0;
    foreach (cpl_list[i]) if (i < IW) begin cpl_valid[i] = 1; cpl_tag[i] = 9'(cpl_list[i]); end
    #1;
    stalled = wb_stall;
    nwb = 0;
    if (!stalled) foreach (pend_tag[i]) if (pend_due[i] == tick) wb_list.push_back(pend_tag[i]);
    if (late_sel >= 0) wb_list.push_back(late_tag[late_sel]);
    chk(wb_list.size() <= NWP, "more write-backs than write ports");
    foreach (wb_list[i]) if (i < NWP) begin
      automatic int t = wb_list[i];
      wb_valid[i] = 1; wb_preg[i] = rec[t].pdest; wb_data[i] = rec[t].value;
      wb_pc[i] = 64'(rec[t].pc * 4 + 64'h1_0000); wb_tag[i] = 9'(t);
    end
    #1;
    // ---- read operands of granted instructions
    rd_valid = '0; rd_preg = '0; nrd = 0;
    for (int i = 0; i < IW; i++) if (iss_grant[i])
      for (int s = 0; s < 2; s++) if (iss_rd[i][s]) begin
        rd_valid[nrd] = 1; rd_preg[nrd] = iss_psrc[i][s]; nrd++;
      end
    #1;
    // ---- checks
    chk(!rf_rd_conflict && !rf_wr_conflict, "bank port conflict reached the register file");
    for (int j = 0; j < nrd; j++) if (rf_known[rd_preg[j]])
      chk(rd_data[j] == rf_val[rd_preg[j]], $sformatf("read p%0d got %h exp %h", rd_preg[j], rd_data[j], rf_val[rd_preg[j]]));
    if (stalled) begin
      n_stall++;
      chk(iss_grant == '0, "grant during write-back stall");
    end
    n_rblk += $countones(iss_rp_block);
    n_wblk += $countones(iss_wp_block);
    for (int i = 0; i < IW; i++)
      if (iss_valid[i] && !iss_grant[i]) chk(stalled || iss_rp_block[i] || iss_wp_block[i], "refusal without reason");
    // write-back: misfit flags and the flush of the oldest misfit
    flush_t = -1; flush_pos = 1 << 30;
    foreach (wb_list[i]) begin
      automatic int t = wb_list[i];
      automatic logic mis = wcls(rec[t].value) > cls(rec[t].pdest);
      chk(wb_misfit[i] == mis, $sformatf("misfit flag tag %0d", t));
      if (mis) foreach (order[k]) if (order[k] == t && k < flush_pos) begin flush_pos = k; flush_t = t; end
    end
    chk(flush_valid == (flush_t >= 0) && (flush_t < 0 || int'(flush_tag) == flush_t), "flush request");
    // rename
    if (recover_busy) n_walk++;
    if (ren_fire) begin
      automatic int nv = 0;
      automatic preg_t m [32] = spec_map;
      chk(!recover_busy && !flush_valid, "rename during recovery");
      for (int i = 0; i < RW; i++) if (ren_valid[i]) begin
        automatic int s = fetch_seq + i;
        automatic int p = s % PROG;
        automatic int want = (ren_wpred[i] == W16) ? 0 : (ren_wpred[i] == W34) ? 1 : 2;
        nv++;
        if (want == 0) n_pred16++;
        if (want == 1) n_pred34++;
        chk(ren_tag[i] == 9'(next_tag), $sformatf("tag %0d exp %0d", ren_tag[i], next_tag));
        chk(ren_psrc1[i] == m[prog[p].src1] && ren_psrc2[i] == m[prog[p].src2], "source renaming");
        rec[next_tag].seq = s; rec[next_tag].pc = p; rec[next_tag].has_dest = prog[p].has_dest;
        rec[next_tag].ldest = prog[p].ldest; rec[next_tag].ps1 = ren_psrc1[i]; rec[next_tag].ps2 = ren_psrc2[i];
        rec[next_tag].is_load = prog[p].is_load; rec[next_tag].lat = prog[p].lat;
        rec[next_tag].outcome = prog[p].is_load ? ($urandom_range(0, 9) < 6 ? 0 : $urandom_range(0, 3) < 3 ? 1 : 2) : 0;
        rec[next_tag].value = gen_value(prog[p].kind, s);
        rec[next_tag].written = 0; rec[next_tag].ok = 0;
        if (prog[p].has_dest) begin
          automatic int c = cls(ren_pdest[i]);
          chk(c >= want, "downsized renaming");
          chk(ren_oversized[i] == (c > want), "oversized flag");
          chk(!inuse[ren_pdest[i]], $sformatf("allocated register p%0d is in use", ren_pdest[i]));
          if (c > want) n_over++;
          rec[next_tag].pdest = ren_pdest[i];
          rec[next_tag].old = m[prog[p].ldest];
          m[prog[p].ldest] = ren_pdest[i];
        end else begin
          rec[next_tag].pdest = '0;
        end
        next_tag = (next_tag + 1) % 512;
      end
      if (nv == RW) n_full_groups++;
    end else if (|ren_valid && !recover_busy && !flush_valid && order.size() + RW <= 512) begin
      chk(ren_nofree, "rename stalled without a reason");
    end
    if (ren_nofree) n_nofree++;
    if (!recover_busy) begin
      chk(free16 == 9'(256 - alloc_cls[0]) && free34 == 9'(128 - alloc_cls[1]) && free64 == 9'(128 - alloc_cls[2]),
          $sformatf("free counts %0d/%0d/%0d exp %0d/%0d/%0d", free16, free34, free64,
                    256 - alloc_cls[0], 128 - alloc_cls[1], 128 - alloc_cls[2]));
    end
    // commit
    exp_cm = 0;
    if (!recover_busy)
      while (exp_cm < 8 && exp_cm < order.size() && rec[order[exp_cm]].ok) exp_cm++;
    chk(int'(commit_count) == exp_cm, $sformatf("commit count %0d exp %0d", commit_count, exp_cm));

    @(posedge clk);
    // ---- model updates at the clock edge
    if (!stalled) tick++;
    if (ren_fire) begin
      int t0;
      t0 = (next_tag + 512 - $countones(ren_valid)) % 512;
      for (int i = 0; i < RW; i++) if (ren_valid[i]) begin
        automatic int t = (t0 + i) % 512;
        order.push_back(t);
        unissued.push_back(t);
        if (rec[t].has_dest) begin
          inuse[rec[t].pdest] = 1;
          alloc_cls[cls(rec[t].pdest)]++;
          spec_map[rec[t].ldest] = rec[t].pdest;
        end
      end
      fetch_seq += $countones(ren_valid);
    end
    for (int i = IW - 1; i >= 0; i--) if (iss_grant[i]) begin
      automatic int t = unissued[i];
      automatic int due = tick - 1 + rec[t].lat;
      unissued.delete(i);
      if (!rec[t].has_dest) begin
        cpl_list.push_back(t);
      end else if (rec[t].outcome == 0) begin
        pend_tag.push_back(t); pend_due.push_back(due);
      end else if (rec[t].outcome == 1) begin
        pend_tag.push_back(t); pend_due.push_back(due + L2); n_miss++;
      end else begin
        late_tag.push_back(t); late_due.push_back(due + L2 + $urandom_range(1, 8) + ($urandom_range(0, 3) == 0 ? 150 : 0)); n_late++;
      end
    end
    foreach (wb_list[i]) begin
      automatic int t = wb_list[i];
      rf_val[rec[t].pdest] = fit(rec[t].value, rec[t].pdest);
      rf_known[rec[t].pdest] = 1;
      rec[t].written = 1;
      rec[t].ok = !(wcls(rec[t].value) > cls(rec[t].pdest));
      for (int k = pend_tag.size() - 1; k >= 0; k--)
        if (pend_tag[k] == t) begin pend_tag.delete(k); pend_due.delete(k); end
    end
    for (int i = 0; i < IW; i++) if (cpl_valid[i]) begin
      rec[cpl_tag[i]].written = 1; rec[cpl_tag[i]].ok = 1;
      void'(cpl_list.pop_front());
    end
    if (late_sel >= 0) begin late_tag.delete(late_sel); late_due.delete(late_sel); end
    for (int c = 0; c < exp_cm; c++) begin
      automatic int t = order.pop_front();
      n_commit++;
      if (rec[t].has_dest) begin
        inuse[rec[t].old] = 0;
        alloc_cls[cls(rec[t].old)]--;
        arch_map[rec[t].ldest] = rec[t].pdest;
        arch_val[rec[t].ldest] = fit(rec[t].value, rec[t].pdest);
        arch_known[rec[t].ldest] = 1;
      end
    end
    if (flush_t >= 0) begin
      n_flush++;
      squash_from(flush_t);
    end
  endtask

  task automatic run();
    int cyc;
    for (int p = 0; p < PROG; p++) begin
      automatic int k = $urandom_range(0, 99);
      prog[p].has_dest = $urandom_range(0, 9) != 0;
      prog[p].ldest = $urandom_range(0, 31);
      prog[p].src1 = $urandom_range(0, 31);
      prog[p].src2 = $urandom_range(0, 31);
      prog[p].kind = (p == 5) ? 3 : (p == 37) ? 4 : (k < 60) ? 0 : (k < 75) ? 1 : 2;
      prog[p].is_load = $urandom_range(0, 4) == 0;
      prog[p].lat = prog[p].is_load ? 2 : $urandom_range(1, 6);
    end
    for (int r = 0; r < 32; r++) begin
      spec_map[r] = preg_t'(384 + r); arch_map[r] = preg_t'(384 + r); arch_known[r] = 0;
    end
    for (int p = 0; p < 512; p++) begin inuse[p] = (p >= 384 && p < 416); rf_known[p] = 0; end
    alloc_cls = '{0, 0, 32};
    fetch_pc = '0; ren_valid = '0; ren_has_dest = '0; ren_lsrc1 = '0; ren_lsrc2 = '0; ren_ldest = '0;
    ren_wpred = '0; iss_valid = '0; late_ld_valid = 0; late_ld_preg = '0; rd_valid = '0; rd_preg = '0;
    wb_valid = '0; wb_preg = '0; wb_data = '0; wb_tag = '0; wb_pc = '0;
    cpl_valid = '0; cpl_tag = '0;
    iss_rd = '0; iss_psrc = '0; iss_has_dest = '0; iss_pdest = '0; iss_lat = '0; iss_is_load = '0;
    #22 rst_n = 1;
    cyc = 0;
    while ((fetch_seq < N_INSTR || order.size() > 0 || recover_busy) && cyc < 200000) begin
      cycle(cyc);
      cyc++;
    end
    // architectural state read back through the read ports
    @(negedge clk);
    ren_valid = '0; iss_valid = '0; wb_valid = '0; late_ld_valid = 0;
    rd_valid = '0;
    for (int r = 0; r < 32; r++) begin
      rd_valid[r % NRP] = 1;
      rd_preg[r % NRP] = arch_map[r];
      #1;
      if (arch_known[r])
        chk(rd_data[r % NRP] == arch_val[r], $sformatf("architectural r%0d = %h exp %h", r, rd_data[r % NRP], arch_val[r]));
      rd_valid = '0;
    end
    chk(order.size() == 0, "instructions left in flight");
    begin
      int held [3];
      held = '{0, 0, 0};
      for (int r = 0; r < 32; r++) held[cls(arch_map[r])]++;
      chk(free16 == 9'(256 - held[0]) && free34 == 9'(128 - held[1]) && free64 == 9'(128 - held[2]),
          "free registers after drain");
    end
    chk(n_walk == n_squash, $sformatf("walk cycles %0d, squashed entries %0d", n_walk, n_squash));
    $display("cycles %0d committed %0d full rename groups %0d", cyc, n_commit, n_full_groups);
    $display("predicted 16-bit %0d, 34-bit %0d; oversized renames %0d; rename stalls (no register) %0d",
             n_pred16, n_pred34, n_over, n_nofree);
    $display("width misfits %0d, squashed %0d, walk cycles %0d", n_flush, n_squash, n_walk);
    $display("read-port refusals %0d, write-port refusals %0d, late-load stalls %0d, L1-miss loads %0d, late loads %0d",
             n_rblk, n_wblk, n_stall, n_miss, n_late);
    chk(n_commit >= N_INSTR, "all instructions committed");
    chk(n_pred16 > 0 && n_pred34 > 0, "mechanism: narrow width predictions");
    chk(n_over > 0, "mechanism: oversized renaming");
    chk(n_nofree > 0, "mechanism: rename stall for lack of a wide-enough register");
    chk(n_flush > 0 && n_walk > 0, "mechanism: width misfit and recovery walk");
    chk(n_rblk > 0, "mechanism: read-port refusal");
    chk(n_wblk > 0, "mechanism: write-port refusal");
    chk(n_stall > 0, "mechanism: late-load write-back stall");
    chk(n_miss > 0, "mechanism: L1-miss load write-back");
    chk(n_full_groups > 0, "mechanism: full 8-wide rename");
  endtask

  initial begin
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
