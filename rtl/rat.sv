// rat: register alias table (logical -> physical mapping) for a rename group.
//
// MIPS R10000-style renaming with the architectural and physical registers in
// one file. Sources of instruction i read the table, overridden by the
// destination of the youngest earlier instruction of the same group with the
// same logical register. old_pdest[i] is the mapping the destination replaces
// (it goes to the active list and is freed when i commits). At the clock edge,
// when `fire` is high, every destination is written; later instructions of the
// group win. A restore port writes one entry per cycle during a recovery walk
// (it is not used in a cycle with `fire`). At reset logical register r maps to
// physical register RESET_BASE + r. Reads are combinational. The published
// scheme leaves the RAT unchanged from conventional R10000-style renaming;
// the restore port and the reset mapping are choices made here.
module rat
  import abvarf_pkg::*;
#(
  parameter int unsigned RENAME_W   = 8,
  parameter int unsigned NUM_LREGS  = 32,
  parameter int unsigned RESET_BASE = 384
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    fire,
  input  logic [RENAME_W-1:0]     valid,
  input  logic [RENAME_W-1:0]     has_dest,
  input  logic [RENAME_W-1:0][$clog2(NUM_LREGS)-1:0] lsrc1, lsrc2, ldest,
  input  preg_t [RENAME_W-1:0]    pdest,
  output preg_t [RENAME_W-1:0]    psrc1, psrc2, old_pdest,
  input  logic                    rst_valid,
  input  logic [$clog2(NUM_LREGS)-1:0] rst_lreg,
  input  preg_t                   rst_preg
);
  preg_t map [NUM_LREGS];

  always_comb begin
    for (int i = 0; i < RENAME_W; i++) begin
      psrc1[i]     = map[lsrc1[i]];
      psrc2[i]     = map[lsrc2[i]];
      old_pdest[i] = map[ldest[i]];
      for (int j = 0; j < i; j++) begin
        if (valid[j] && has_dest[j]) begin
          if (ldest[j] == lsrc1[i]) psrc1[i]     = pdest[j];
          if (ldest[j] == lsrc2[i]) psrc2[i]     = pdest[j];
          if (ldest[j] == ldest[i]) old_pdest[i] = pdest[j];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_LREGS; r++) map[r] <= preg_t'(RESET_BASE + r);
    end else if (fire) begin
      for (int i = 0; i < RENAME_W; i++)
        if (valid[i] && has_dest[i]) map[ldest[i]] <= pdest[i];
    end else if (rst_valid) begin
      map[rst_lreg] <= rst_preg;
    end
  end
endmodule
