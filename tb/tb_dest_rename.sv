// tb_dest_rename: random rename groups against a reference that applies the
// allocation rules one instruction at a time: best-matched list first, only
// wider lists as fallback, never narrower, and a stalled group takes nothing.
module tb_dest_rename;
  import abvarf_pkg::*;
  localparam int RW = 8;
  logic [RW-1:0] valid, has_dest, oversized;
  width_t [RW-1:0] wpred;
  logic [8:0] c16, c34, c64;
  preg_t [RW-1:0] h16, h34, h64, pdest;
  logic [3:0] p16, p34, p64;
  logic stall;
  int checks = 0, failures = 0;
  int stalls = 0, overs = 0;

  dest_rename dut (.valid(valid), .has_dest(has_dest), .wpred(wpred),
    .cnt16(c16), .cnt34(c34), .cnt64(c64), .head16(h16), .head34(h34), .head64(h64),
    .pdest(pdest), .oversized(oversized), .pop16(p16), .pop34(p34), .pop64(p64), .stall(stall));

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int avail [3];
      int used [3];
      preg_t exp_pd [RW];
      logic exp_ov [RW];
      logic exp_stall;
      for (int i = 0; i < RW; i++) begin
        int w;
        valid[i] = $urandom_range(0, 7) != 0;
        has_dest[i] = $urandom_range(0, 5) != 0;
        w = $urandom_range(0, 2);
        wpred[i] = (w == 0) ? W16 : (w == 1) ? W34 : W64;
        h16[i] = preg_t'(i * 3 + 1);
        h34[i] = preg_t'(256 + i * 5 + 2);
        h64[i] = preg_t'(384 + i * 7 + 3);
      end
      c16 = 9'($urandom_range(0, 5)); c34 = 9'($urandom_range(0, 4)); c64 = 9'($urandom_range(0, 6));
      if ($urandom_range(0, 3) == 0) c16 = 9'(200);
      #1;
      avail[0] = c16; avail[1] = c34; avail[2] = c64;
      used = '{0, 0, 0};
      exp_stall = 0;
      for (int i = 0; i < RW; i++) begin
        int want, got;
        exp_ov[i] = 0;
        exp_pd[i] = '0;
        if (!(valid[i] && has_dest[i])) continue;
        want = (wpred[i] == W16) ? 0 : (wpred[i] == W34) ? 1 : 2;
        got = -1;
        for (int c = want; c < 3; c++)
          if (got < 0 && used[c] < avail[c]) got = c;
        if (got < 0) begin exp_stall = 1; continue; end
        exp_pd[i] = (got == 0) ? h16[used[0]] : (got == 1) ? h34[used[1]] : h64[used[2]];
        exp_ov[i] = got != want;
        used[got]++;
      end
      checks++;
      if (stall !== exp_stall) fail($sformatf("t%0d stall %b exp %b", t, stall, exp_stall));
      if (exp_stall) begin
        stalls++;
        checks++;
        if (p16 != 0 || p34 != 0 || p64 != 0) fail("pops during stall");
      end else begin
        checks++;
        if (p16 != 4'(used[0]) || p34 != 4'(used[1]) || p64 != 4'(used[2]))
          fail($sformatf("t%0d pops %0d %0d %0d exp %0d %0d %0d", t, p16, p34, p64, used[0], used[1], used[2]));
        for (int i = 0; i < RW; i++) if (valid[i] && has_dest[i]) begin
          checks++;
          if (pdest[i] !== exp_pd[i] || oversized[i] !== exp_ov[i])
            fail($sformatf("t%0d slot %0d pdest %0d/%b exp %0d/%b", t, i, pdest[i], oversized[i], exp_pd[i], exp_ov[i]));
          if (exp_ov[i]) overs++;
        end
      end
    end
    checks++;
    if (stalls == 0 || overs == 0) fail("stall or oversized renaming never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
