// tb_port_sched: random selection rounds against a model that counts, per bank
// and per future cycle, the writes already promised, and per bank the reads of
// the current cycle. The model grants oldest first exactly when the reads fit
// NRPB and the write-back cycle(s) still have fewer than NWPB writes; a late
// load stalls the round when its bank's current cycle is already full, and the
// model's time then stands still for a cycle. Checks grants, the refusal
// reasons, the stall, and counts each mechanism.
module tb_port_sched;
  localparam int IW = 8, NB = 4, NRPB = 4, NWPB = 2, VL = 24, L2 = 12;
  logic clk = 0, rst_n = 0;
  logic [IW-1:0] c_valid, c_has_dest, c_is_load, grant, rp_block, wp_block;
  logic [IW-1:0][1:0] c_rd;
  logic [IW-1:0][1:0][1:0] c_src_bank;
  logic [IW-1:0][1:0] c_dest_bank;
  logic [IW-1:0][4:0] c_lat;
  logic late_valid, wb_stall;
  logic [1:0] late_bank;
  logic [4:0] ptr_o;
  int checks = 0, failures = 0;
  int wcnt [NB][64];
  int tick = 0;
  int n_rblk = 0, n_wblk = 0, n_stall = 0, n_load = 0, n_grant = 0;

  port_sched dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) for (int s = 0; s < 64; s++) wcnt[b][s] = 0;
    c_valid = '0; c_rd = '0; c_src_bank = '0; c_has_dest = '0; c_dest_bank = '0;
    c_lat = '0; c_is_load = '0; late_valid = 0; late_bank = '0;
    #12 rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      logic exp_stall;
      logic [IW-1:0] eg, erb, ewb;
      int rcnt [NB];
      int pend [NB][64];
      @(negedge clk);
      for (int i = 0; i < IW; i++) begin
        c_valid[i] = $urandom_range(0, 4) != 0;
        c_rd[i] = 2'($urandom);
        c_src_bank[i][0] = 2'($urandom_range(0, 3) == 0 ? 3 : $urandom_range(0, 1));
        c_src_bank[i][1] = 2'($urandom_range(0, 3));
        c_has_dest[i] = $urandom_range(0, 5) != 0;
        c_dest_bank[i] = 2'($urandom_range(0, 2) == 0 ? $urandom_range(0, 3) : $urandom_range(0, 1));
        c_is_load[i] = $urandom_range(0, 4) == 0;
        c_lat[i] = 5'(c_is_load[i] ? $urandom_range(2, VL - 1 - L2) : $urandom_range(1, 6));
      end
      late_valid = $urandom_range(0, 9) == 0;
      late_bank = 2'($urandom_range(0, 3));
      #1;
      exp_stall = late_valid && wcnt[late_bank][tick % 64] >= NWPB;
      pend = wcnt;
      for (int b = 0; b < NB; b++) rcnt[b] = 0;
      eg = '0; erb = '0; ewb = '0;
      for (int i = 0; i < IW; i++) begin
        int nr [NB];
        logic rok, wok;
        int s1, s2;
        for (int b = 0; b < NB; b++) nr[b] = 0;
        for (int s = 0; s < 2; s++) if (c_rd[i][s]) nr[c_src_bank[i][s]]++;
        rok = 1;
        for (int b = 0; b < NB; b++) if (rcnt[b] + nr[b] > NRPB) rok = 0;
        s1 = (tick + c_lat[i]) % 64;
        s2 = (tick + c_lat[i] + L2) % 64;
        wok = !c_has_dest[i] ||
              (pend[c_dest_bank[i]][s1] < NWPB && (!c_is_load[i] || pend[c_dest_bank[i]][s2] < NWPB));
        if (!c_valid[i] || exp_stall) continue;
        erb[i] = !rok;
        ewb[i] = rok && !wok;
        if (rok && wok) begin
          eg[i] = 1;
          for (int b = 0; b < NB; b++) rcnt[b] += nr[b];
          if (c_has_dest[i]) begin
            pend[c_dest_bank[i]][s1]++;
            if (c_is_load[i]) pend[c_dest_bank[i]][s2]++;
          end
        end
      end
      checks += 4;
      if (wb_stall !== exp_stall) begin failures++; $display("FAIL cyc %0d stall %b exp %b", cyc, wb_stall, exp_stall); end
      if (grant !== eg) begin failures++; $display("FAIL cyc %0d grant %b exp %b", cyc, grant, eg); end
      if (rp_block !== erb) begin failures++; $display("FAIL cyc %0d rp_block %b exp %b", cyc, rp_block, erb); end
      if (wp_block !== ewb) begin failures++; $display("FAIL cyc %0d wp_block %b exp %b", cyc, wp_block, ewb); end
      if (exp_stall) n_stall++;
      n_rblk += $countones(erb);
      n_wblk += $countones(ewb);
      n_grant += $countones(eg);
      n_load += $countones(eg & c_is_load & c_has_dest);
      @(posedge clk);
      if (!exp_stall) begin
        wcnt = pend;
        for (int b = 0; b < NB; b++) wcnt[b][tick % 64] = 0;
        tick++;
      end
    end
    checks++;
    if (n_rblk == 0 || n_wblk == 0 || n_stall == 0 || n_load == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: rblk %0d wblk %0d stall %0d load %0d", n_rblk, n_wblk, n_stall, n_load);
    end
    $display("grants %0d read-blocked %0d write-blocked %0d late-load stalls %0d loads %0d",
             n_grant, n_rblk, n_wblk, n_stall, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
