// abvarf_top: integer register-file subsystem with an asymmetrically banked,
// value-aware register file (AB-VARF).
//
// Most register values are narrow, so the 512 physical registers are split
// into banks of different widths: two 16-bit banks, one 34-bit bank and one
// 64-bit bank of 128 entries, 4 read and 2 write ports each. The id of a
// physical register names its bank and therefore its width.
//
// Data flow:
//   fetch      width_predictor gives each fetched PC a predicted result width.
//   rename     dest_rename takes, per instruction, a register from the 16-,
//              34- or 64-bit free list matching the prediction (wider if that
//              list is empty, never narrower; the group stalls when nothing
//              fits). rat renames the sources; active_list records the
//              destination's new and old registers and gives a tag.
//   issue      port_sched grants candidates oldest first so that no bank sees
//              more reads than its read ports and each write finds a reserved
//              write port in its write-back cycle.
//   read       abvarf_regfile routes each read to its bank and sign-extends.
//   write-back abvarf_regfile stores the value at the bank width; width_verify
//              sets the narrowness flags and flags a result wider than its
//              register. The flags train the predictor. A correct result marks
//              its tag done; a misfit starts a recovery walk of the active list
//              (oldest misfit of the cycle) that restores the RAT and returns
//              the squashed registers to their free lists.
//              Instructions without a register result report completion on
//              the cpl_* ports.
//   commit     up to COMMIT_W done instructions per cycle free their old
//              registers into the list of the old register's class.
// The out-of-order core around it (fetch, issue queue, execution units, the
// bypass-hint logic) is not part of this block: its signals are the ports
// here. Rename is accepted in the cycle ren_fire is high; issue grants and
// read data are combinational in the same cycle; write-back updates take
// effect at the next clock edge. The stages and their rules follow the
// published scheme; completion ports, flush selection among several misfits
// and the squashing of the misfit instruction itself are choices made here.
module abvarf_top
  import abvarf_pkg::*;
#(
  parameter int unsigned RENAME_W   = 8,
  parameter int unsigned ISSUE_W    = 8,
  parameter int unsigned COMMIT_W   = 8,
  parameter int unsigned NRP        = 16,
  parameter int unsigned NWP        = 8,
  parameter int unsigned NRPB       = 4,
  parameter int unsigned NWPB       = 2,
  parameter int unsigned NUM_LREGS  = 32,
  parameter int unsigned AL_DEPTH   = 512,
  parameter int unsigned WP_ENTRIES = 2048,
  parameter int unsigned VEC_LEN    = 24,
  parameter int unsigned L2_LAT     = 12,
  localparam int unsigned LW    = $clog2(NUM_LREGS),
  localparam int unsigned TW    = $clog2(AL_DEPTH),
  localparam int unsigned LAT_W = $clog2(VEC_LEN)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // fetch: width prediction
  input  logic [RENAME_W-1:0][XLEN-1:0]    fetch_pc,
  output width_t [RENAME_W-1:0]            fetch_wpred,
  // rename
  input  logic [RENAME_W-1:0]              ren_valid,
  input  logic [RENAME_W-1:0]              ren_has_dest,
  input  logic [RENAME_W-1:0][LW-1:0]      ren_lsrc1,
  input  logic [RENAME_W-1:0][LW-1:0]      ren_lsrc2,
  input  logic [RENAME_W-1:0][LW-1:0]      ren_ldest,
  input  width_t [RENAME_W-1:0]            ren_wpred,
  output logic                             ren_fire,
  output logic                             ren_nofree,     // stalled: no register wide enough
  output preg_t [RENAME_W-1:0]             ren_psrc1,
  output preg_t [RENAME_W-1:0]             ren_psrc2,
  output preg_t [RENAME_W-1:0]             ren_pdest,
  output logic [RENAME_W-1:0][TW-1:0]      ren_tag,
  output logic [RENAME_W-1:0]              ren_oversized,
  // issue / selection
  input  logic [ISSUE_W-1:0]               iss_valid,
  input  logic [ISSUE_W-1:0][1:0]          iss_rd,
  input  preg_t [ISSUE_W-1:0][1:0]         iss_psrc,
  input  logic [ISSUE_W-1:0]               iss_has_dest,
  input  preg_t [ISSUE_W-1:0]              iss_pdest,
  input  logic [ISSUE_W-1:0][LAT_W-1:0]    iss_lat,
  input  logic [ISSUE_W-1:0]               iss_is_load,
  output logic [ISSUE_W-1:0]               iss_grant,
  output logic [ISSUE_W-1:0]               iss_rp_block,
  output logic [ISSUE_W-1:0]               iss_wp_block,
  input  logic                             late_ld_valid,
  input  preg_t                            late_ld_preg,
  output logic                             wb_stall,
  // completion of instructions without a register result (stores, branches)
  input  logic [ISSUE_W-1:0]               cpl_valid,
  input  logic [ISSUE_W-1:0][TW-1:0]       cpl_tag,
  // register read
  input  logic [NRP-1:0]                   rd_valid,
  input  preg_t [NRP-1:0]                  rd_preg,
  output logic [NRP-1:0][XLEN-1:0]         rd_data,
  // write-back
  input  logic [NWP-1:0]                   wb_valid,
  input  preg_t [NWP-1:0]                  wb_preg,
  input  logic [NWP-1:0][XLEN-1:0]         wb_data,
  input  logic [NWP-1:0][TW-1:0]           wb_tag,
  input  logic [NWP-1:0][XLEN-1:0]         wb_pc,
  output width_t [NWP-1:0]                 wb_flags,
  output logic [NWP-1:0]                   wb_misfit,
  // status
  output logic                             flush_valid,
  output logic [TW-1:0]                    flush_tag,
  output logic                             recover_busy,
  output logic [$clog2(COMMIT_W):0]        commit_count,
  output logic [8:0]                       free16,
  output logic [8:0]                       free34,
  output logic [8:0]                       free64,
  output logic                             rf_rd_conflict,
  output logic                             rf_wr_conflict
);
  localparam int unsigned REL_W = COMMIT_W + 1;
  localparam int unsigned PW    = $clog2(RENAME_W) + 1;

  // ---------------------------------------------------------------- predictor
  width_predictor #(.ENTRIES(WP_ENTRIES), .NLOOKUP(RENAME_W), .NUPDATE(NWP)) u_wpred (
    .clk(clk), .rst_n(rst_n),
    .lk_pc(fetch_pc), .lk_pred(fetch_wpred),
    .up_valid(wb_valid), .up_pc(wb_pc), .up_flags(wb_flags)
  );

  // ---------------------------------------------------------------- free lists
  preg_t [RENAME_W-1:0] h16, h34, h64;
  logic [8:0] c16;
  logic [7:0] c34, c64;
  logic [PW-1:0] p16, p34, p64, fp16, fp34, fp64;
  logic [REL_W-1:0] rv16, rv34, rv64;
  preg_t [REL_W-1:0] rid;
  logic ren_stall;

  free_list #(.DEPTH(2*BANK_ENTRIES), .ALLOC_W(RENAME_W), .REL_W(REL_W),
              .FIRST(0), .SKIP(0)) u_fl16 (
    .clk(clk), .rst_n(rst_n), .head_id(h16), .count(c16), .pop(fp16),
    .rel_valid(rv16), .rel_id(rid));
  free_list #(.DEPTH(BANK_ENTRIES), .ALLOC_W(RENAME_W), .REL_W(REL_W),
              .FIRST(2*BANK_ENTRIES), .SKIP(0)) u_fl34 (
    .clk(clk), .rst_n(rst_n), .head_id(h34), .count(c34), .pop(fp34),
    .rel_valid(rv34), .rel_id(rid));
  free_list #(.DEPTH(BANK_ENTRIES), .ALLOC_W(RENAME_W), .REL_W(REL_W),
              .FIRST(3*BANK_ENTRIES), .SKIP(NUM_LREGS)) u_fl64 (
    .clk(clk), .rst_n(rst_n), .head_id(h64), .count(c64), .pop(fp64),
    .rel_valid(rv64), .rel_id(rid));

  assign free16 = c16;
  assign free34 = 9'(c34);
  assign free64 = 9'(c64);

  // ---------------------------------------------------------------- rename
  dest_rename #(.RENAME_W(RENAME_W), .CW(9)) u_dren (
    .valid(ren_valid), .has_dest(ren_has_dest), .wpred(ren_wpred),
    .cnt16(c16), .cnt34(9'(c34)), .cnt64(9'(c64)),
    .head16(h16), .head34(h34), .head64(h64),
    .pdest(ren_pdest), .oversized(ren_oversized),
    .pop16(p16), .pop34(p34), .pop64(p64), .stall(ren_stall)
  );

  logic al_ready;
  assign ren_fire   = (|ren_valid) && !ren_stall && al_ready;
  assign ren_nofree = (|ren_valid) && ren_stall;
  assign fp16 = ren_fire ? p16 : '0;
  assign fp34 = ren_fire ? p34 : '0;
  assign fp64 = ren_fire ? p64 : '0;

  preg_t [RENAME_W-1:0] old_pdest;
  logic walk_valid, walk_has_dest;
  logic [LW-1:0] walk_ldest;
  preg_t walk_old, walk_new;

  rat #(.RENAME_W(RENAME_W), .NUM_LREGS(NUM_LREGS), .RESET_BASE(3*BANK_ENTRIES)) u_rat (
    .clk(clk), .rst_n(rst_n), .fire(ren_fire),
    .valid(ren_valid), .has_dest(ren_has_dest),
    .lsrc1(ren_lsrc1), .lsrc2(ren_lsrc2), .ldest(ren_ldest), .pdest(ren_pdest),
    .psrc1(ren_psrc1), .psrc2(ren_psrc2), .old_pdest(old_pdest),
    .rst_valid(walk_valid && walk_has_dest), .rst_lreg(walk_ldest), .rst_preg(walk_old)
  );

  // ---------------------------------------------------------------- active list
  logic [COMMIT_W-1:0] cm_valid, cm_release;
  preg_t [COMMIT_W-1:0] cm_old;
  logic [NWP-1:0] wb_done;
  logic [NWP+ISSUE_W-1:0] al_done;
  logic [NWP+ISSUE_W-1:0][TW-1:0] al_done_tag;

  assign al_done     = {cpl_valid, wb_done};
  assign al_done_tag = {cpl_tag, wb_tag};
  logic [TW-1:0] head_tag;

  active_list #(.DEPTH(AL_DEPTH), .RENAME_W(RENAME_W), .COMMIT_W(COMMIT_W),
                .NWB(NWP + ISSUE_W), .NUM_LREGS(NUM_LREGS)) u_al (
    .clk(clk), .rst_n(rst_n),
    .al_fire(ren_fire), .al_valid(ren_valid), .al_has_dest(ren_has_dest),
    .al_ldest(ren_ldest), .al_pdest(ren_pdest), .al_old(old_pdest),
    .al_tag(ren_tag), .al_ready(al_ready),
    .wb_valid(al_done), .wb_tag(al_done_tag),
    .cm_valid(cm_valid), .cm_release(cm_release), .cm_old(cm_old),
    .flush_valid(flush_valid), .flush_tag(flush_tag), .busy(recover_busy),
    .walk_valid(walk_valid), .walk_has_dest(walk_has_dest), .walk_ldest(walk_ldest),
    .walk_old(walk_old), .walk_new(walk_new), .head_tag(head_tag), .occupancy()
  );

  // Released registers go back to the list of their own class.
  always_comb begin
    rv16 = '0; rv34 = '0; rv64 = '0; rid = '0;
    commit_count = '0;
    for (int c = 0; c < COMMIT_W; c++) begin
      rid[c] = cm_old[c];
      if (cm_valid[c]) commit_count++;
      if (cm_valid[c] && cm_release[c]) begin
        case (class_of(cm_old[c]))
          W16:     rv16[c] = 1'b1;
          W34:     rv34[c] = 1'b1;
          default: rv64[c] = 1'b1;
        endcase
      end
    end
    rid[COMMIT_W] = walk_new;
    if (walk_valid && walk_has_dest) begin
      case (class_of(walk_new))
        W16:     rv16[COMMIT_W] = 1'b1;
        W34:     rv34[COMMIT_W] = 1'b1;
        default: rv64[COMMIT_W] = 1'b1;
      endcase
    end
  end

  // ---------------------------------------------------------------- port scheduling
  logic [ISSUE_W-1:0][1:0][BANK_W-1:0] iss_src_bank;
  logic [ISSUE_W-1:0][BANK_W-1:0]      iss_dest_bank;

  always_comb
    for (int i = 0; i < ISSUE_W; i++) begin
      iss_src_bank[i][0] = bank_of(iss_psrc[i][0]);
      iss_src_bank[i][1] = bank_of(iss_psrc[i][1]);
      iss_dest_bank[i]   = bank_of(iss_pdest[i]);
    end

  port_sched #(.ISSUE_W(ISSUE_W), .NBANK(NUM_BANKS), .NRPB(NRPB), .NWPB(NWPB),
               .VEC_LEN(VEC_LEN), .L2_LAT(L2_LAT)) u_psched (
    .clk(clk), .rst_n(rst_n),
    .c_valid(iss_valid), .c_rd(iss_rd), .c_src_bank(iss_src_bank),
    .c_has_dest(iss_has_dest), .c_dest_bank(iss_dest_bank),
    .c_lat(iss_lat), .c_is_load(iss_is_load),
    .grant(iss_grant), .rp_block(iss_rp_block), .wp_block(iss_wp_block),
    .late_valid(late_ld_valid), .late_bank(bank_of(late_ld_preg)),
    .wb_stall(wb_stall), .ptr_o()
  );

  // ---------------------------------------------------------------- register file
  abvarf_regfile #(.NRP(NRP), .NWP(NWP), .NRPB(NRPB), .NWPB(NWPB)) u_rf (
    .clk(clk),
    .rd_valid(rd_valid), .rd_preg(rd_preg), .rd_data(rd_data),
    .wr_valid(wb_valid), .wr_preg(wb_preg), .wr_data(wb_data),
    .rd_conflict(rf_rd_conflict), .wr_conflict(rf_wr_conflict)
  );

  // ---------------------------------------------------------------- width check
  for (genvar w = 0; w < NWP; w++) begin : g_wv
    width_verify u_wv (.value(wb_data[w]), .preg(wb_preg[w]),
                       .flags(wb_flags[w]), .misfit(wb_misfit[w]));
  end

  // Completion and recovery: the oldest misfit of the cycle starts the walk.
  always_comb begin
    logic [TW-1:0] best_age;
    flush_valid = 1'b0;
    flush_tag   = '0;
    best_age    = '1;
    for (int w = 0; w < NWP; w++) begin
      automatic logic [TW-1:0] a = TW'((int'(wb_tag[w]) + AL_DEPTH - int'(head_tag)) % AL_DEPTH);
      wb_done[w] = wb_valid[w] && !wb_misfit[w];
      if (wb_valid[w] && wb_misfit[w] && (!flush_valid || a < best_age)) begin
        flush_valid = 1'b1;
        flush_tag   = wb_tag[w];
        best_age    = a;
      end
    end
  end
endmodule
