// tb_rf_routing: random global requests; checks which bank port each request
// lands on (first free port of its bank, in global-port order), the write
// data and index passed through, sign extension of returned data from the
// bank width, and the conflict flags.
module tb_rf_routing;
  import abvarf_pkg::*;
  localparam int NRP = 16, NWP = 8, NRPB = 4, NWPB = 2;
  logic [NRP-1:0] g_rd_valid;
  preg_t [NRP-1:0] g_rd_preg;
  logic [NRP-1:0][63:0] g_rd_data;
  logic [NWP-1:0] g_wr_valid;
  preg_t [NWP-1:0] g_wr_preg;
  logic [NWP-1:0][63:0] g_wr_data;
  logic [3:0][NRPB-1:0][6:0] b_ra;
  logic [3:0][NRPB-1:0][63:0] b_rd;
  logic [3:0][NWPB-1:0] b_we;
  logic [3:0][NWPB-1:0][6:0] b_wa;
  logic [3:0][NWPB-1:0][63:0] b_wd;
  logic rd_conflict, wr_conflict;
  int checks = 0, failures = 0;

  rf_routing dut (.*);

  task automatic chk(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int rn [4], wn [4];
      logic exp_rc, exp_wc;
      int wbits [4] = '{16, 16, 34, 64};
      for (int j = 0; j < NRP; j++) begin
        g_rd_valid[j] = $urandom_range(0, 3) == 0 || t < 1000;
        g_rd_preg[j] = preg_t'($urandom_range(0, 511));
      end
      if (t >= 1000) g_rd_valid = g_rd_valid & 16'($urandom);
      for (int j = 0; j < NWP; j++) begin
        g_wr_valid[j] = $urandom_range(0, 2) == 0;
        g_wr_preg[j] = preg_t'($urandom_range(0, 511));
        g_wr_data[j] = {$urandom, $urandom};
      end
      // bank outputs: only the bank's width is meaningful, upper bits zero
      for (int b = 0; b < 4; b++)
        for (int p = 0; p < NRPB; p++)
          b_rd[b][p] = (wbits[b] == 64) ? {$urandom, $urandom} : ({$urandom, $urandom} & ((64'd1 << wbits[b]) - 1));
      #1;
      rn = '{0, 0, 0, 0}; wn = '{0, 0, 0, 0};
      exp_rc = 0; exp_wc = 0;
      for (int j = 0; j < NRP; j++) if (g_rd_valid[j]) begin
        int b, p;
        logic [63:0] e;
        b = g_rd_preg[j] / 128;
        p = rn[b]++;
        if (p >= NRPB) begin exp_rc = 1; continue; end
        chk(b_ra[b][p] == g_rd_preg[j] % 128, $sformatf("t%0d read %0d address", t, j));
        e = b_rd[b][p];
        if (wbits[b] < 64 && e[wbits[b]-1]) e = e | ~((64'd1 << wbits[b]) - 1);
        chk(g_rd_data[j] == e, $sformatf("t%0d read %0d data %h exp %h", t, j, g_rd_data[j], e));
      end
      for (int j = 0; j < NWP; j++) if (g_wr_valid[j]) begin
        int b, p;
        b = g_wr_preg[j] / 128;
        p = wn[b]++;
        if (p >= NWPB) begin exp_wc = 1; continue; end
        chk(b_we[b][p] && b_wa[b][p] == g_wr_preg[j] % 128 && b_wd[b][p] == g_wr_data[j],
            $sformatf("t%0d write %0d", t, j));
      end
      for (int b = 0; b < 4; b++)
        for (int p = 0; p < NWPB; p++)
          chk(b_we[b][p] == (p < wn[b]), $sformatf("t%0d bank %0d we %0d", t, b, p));
      chk(rd_conflict == exp_rc && wr_conflict == exp_wc, $sformatf("t%0d conflict flags", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
