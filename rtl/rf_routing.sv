// rf_routing: global address and data routing of the banked register file.
//
// The bank field of a physical register id (its top bits) selects the bank;
// the rest is the entry index. Each global read port is connected to the next
// unused read port of its bank, in global-port order; likewise for writes.
// Write data are cut to the bank width by the bank itself. Read data come back
// from the bank zero-padded to 64 bits and are sign-extended here from the
// bank's width, so a narrow register reads back as the full 64-bit value.
// rd_conflict / wr_conflict report more requests to a bank than it has ports
// (the port scheduler is meant to prevent that; the excess request is
// dropped). Purely combinational. The routing block itself is part of the
// published organisation; the port-order assignment and sign extension by
// bank width are choices made here.
module rf_routing
  import abvarf_pkg::*;
#(
  parameter int unsigned NRP  = 16,
  parameter int unsigned NWP  = 8,
  parameter int unsigned NRPB = 4,
  parameter int unsigned NWPB = 2
) (
  // global side
  input  logic [NRP-1:0]                 g_rd_valid,
  input  preg_t [NRP-1:0]                g_rd_preg,
  output logic [NRP-1:0][XLEN-1:0]       g_rd_data,
  input  logic [NWP-1:0]                 g_wr_valid,
  input  preg_t [NWP-1:0]                g_wr_preg,
  input  logic [NWP-1:0][XLEN-1:0]       g_wr_data,
  // bank side
  output logic [NUM_BANKS-1:0][NRPB-1:0][IDX_W-1:0] b_ra,
  input  logic [NUM_BANKS-1:0][NRPB-1:0][XLEN-1:0]  b_rd,
  output logic [NUM_BANKS-1:0][NWPB-1:0]            b_we,
  output logic [NUM_BANKS-1:0][NWPB-1:0][IDX_W-1:0] b_wa,
  output logic [NUM_BANKS-1:0][NWPB-1:0][XLEN-1:0]  b_wd,
  output logic                           rd_conflict,
  output logic                           wr_conflict
);
  function automatic logic [XLEN-1:0] sext(input logic [XLEN-1:0] v, input int unsigned w);
    logic signed [XLEN-1:0] t;
    t = $signed(v << (XLEN - w));
    return t >>> (XLEN - w);
  endfunction

  // Bank port picked by each global read port (address half of the routing).
  logic [NRP-1:0]                    r_hit;
  logic [NRP-1:0][BANK_W-1:0]        r_bank;
  logic [NRP-1:0][$clog2(NRPB)-1:0]  r_port;

  always_comb begin
    int unsigned rn [NUM_BANKS];
    int unsigned wn [NUM_BANKS];
    b_ra = '0;
    b_we = '0;
    b_wa = '0;
    b_wd = '0;
    r_hit  = '0;
    r_bank = '0;
    r_port = '0;
    rd_conflict = 1'b0;
    wr_conflict = 1'b0;
    for (int b = 0; b < NUM_BANKS; b++) begin rn[b] = 0; wn[b] = 0; end

    for (int j = 0; j < NRP; j++) begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        if (g_rd_valid[j] && int'(bank_of(g_rd_preg[j])) == b) begin
          if (rn[b] >= NRPB) rd_conflict = 1'b1;
          for (int p = 0; p < NRPB; p++) begin
            if (rn[b] == p) begin
              b_ra[b][p] = g_rd_preg[j][IDX_W-1:0];
              r_hit[j]   = 1'b1;
              r_bank[j]  = BANK_W'(b);
              r_port[j]  = $clog2(NRPB)'(p);
            end
          end
          rn[b]++;
        end
      end
    end

    for (int j = 0; j < NWP; j++) begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        if (g_wr_valid[j] && int'(bank_of(g_wr_preg[j])) == b) begin
          if (wn[b] >= NWPB) wr_conflict = 1'b1;
          for (int p = 0; p < NWPB; p++) begin
            if (wn[b] == p) begin
              b_we[b][p] = 1'b1;
              b_wa[b][p] = g_wr_preg[j][IDX_W-1:0];
              b_wd[b][p] = g_wr_data[j];
            end
          end
          wn[b]++;
        end
      end
    end
  end

  // Data half: return path with sign extension from the bank width.
  always_comb begin
    for (int j = 0; j < NRP; j++) begin
      g_rd_data[j] = '0;
      for (int b = 0; b < NUM_BANKS; b++)
        for (int p = 0; p < NRPB; p++)
          if (r_hit[j] && int'(r_bank[j]) == b && int'(r_port[j]) == p)
            g_rd_data[j] = sext(b_rd[b][p], bank_bits(b));
    end
  end
endmodule
