// abvarf_regfile: the asymmetrically banked value-aware register file.
//
// Four banks of BANK_ENTRIES registers behind one address-and-data routing
// network: banks 0 and 1 are 16 bits wide, bank 2 is 34 bits, bank 3 is 64
// bits (the "211" configuration), each with NRPB read and NWPB write ports,
// so the aggregate port count equals a 16-read/8-write monolithic file. The
// physical register id selects bank and entry; a write keeps only the bank's
// width, a read returns the value sign-extended to 64 bits. Reads are
// combinational, writes take effect at the rising clock edge. Widths, entries
// and ports follow the published configuration; which bank number holds which
// width is a choice made here.
module abvarf_regfile
  import abvarf_pkg::*;
#(
  parameter int unsigned NRP  = 16,
  parameter int unsigned NWP  = 8,
  parameter int unsigned NRPB = 4,
  parameter int unsigned NWPB = 2
) (
  input  logic                     clk,
  input  logic [NRP-1:0]           rd_valid,
  input  preg_t [NRP-1:0]          rd_preg,
  output logic [NRP-1:0][XLEN-1:0] rd_data,
  input  logic [NWP-1:0]           wr_valid,
  input  preg_t [NWP-1:0]          wr_preg,
  input  logic [NWP-1:0][XLEN-1:0] wr_data,
  output logic                     rd_conflict,
  output logic                     wr_conflict
);
  logic [NUM_BANKS-1:0][NRPB-1:0][IDX_W-1:0] b_ra;
  logic [NUM_BANKS-1:0][NRPB-1:0][XLEN-1:0]  b_rd;
  logic [NUM_BANKS-1:0][NWPB-1:0]            b_we;
  logic [NUM_BANKS-1:0][NWPB-1:0][IDX_W-1:0] b_wa;
  logic [NUM_BANKS-1:0][NWPB-1:0][XLEN-1:0]  b_wd;

  rf_routing #(.NRP(NRP), .NWP(NWP), .NRPB(NRPB), .NWPB(NWPB)) u_route (
    .g_rd_valid(rd_valid), .g_rd_preg(rd_preg), .g_rd_data(rd_data),
    .g_wr_valid(wr_valid), .g_wr_preg(wr_preg), .g_wr_data(wr_data),
    .b_ra(b_ra), .b_rd(b_rd), .b_we(b_we), .b_wa(b_wa), .b_wd(b_wd),
    .rd_conflict(rd_conflict), .wr_conflict(wr_conflict)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    localparam int unsigned W = bank_bits(b);
    logic [NRPB-1:0][W-1:0] rd_n;
    logic [NWPB-1:0][W-1:0] wd_n;

    for (genvar p = 0; p < NWPB; p++) begin : g_wd
      assign wd_n[p] = b_wd[b][p][W-1:0];
    end
    for (genvar p = 0; p < NRPB; p++) begin : g_rd
      assign b_rd[b][p] = XLEN'(rd_n[p]);
    end

    regbank #(.WIDTH(W), .ENTRIES(BANK_ENTRIES), .NR(NRPB), .NW(NWPB)) u_bank (
      .clk(clk), .ra(b_ra[b]), .rd(rd_n), .we(b_we[b]), .wa(b_wa[b]), .wd(wd_n)
    );
  end
endmodule
