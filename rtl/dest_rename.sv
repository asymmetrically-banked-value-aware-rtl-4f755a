// dest_rename: width-steered allocation of destination physical registers.
//
// For each instruction of a rename group, in program order, the predicted
// result width picks the best-matched free list: a predicted 16-bit result
// takes a 16-bit register, else a 34-bit one, else a 64-bit one; a predicted
// 34-bit result takes a 34-bit register, else a 64-bit one; a predicted 64-bit
// result takes only a 64-bit register (never a narrower one). All three lists
// are looked at at once: the k-th id taken from a list in this group is that
// list's head_id[k]. When some instruction finds no register wide enough the
// whole group stalls and nothing is taken (all-or-nothing stall is this
// design's choice). Combinational; the pop counts go to the free lists.
// The allocation rules (best match, oversize allowed, downsize forbidden,
// stall when nothing fits) follow the published scheme.
module dest_rename
  import abvarf_pkg::*;
#(
  parameter int unsigned RENAME_W = 8,
  parameter int unsigned CW       = 9   // width of the free-list counts
) (
  input  logic [RENAME_W-1:0]        valid,
  input  logic [RENAME_W-1:0]        has_dest,
  input  width_t [RENAME_W-1:0]      wpred,
  input  logic [CW-1:0]              cnt16, cnt34, cnt64,
  input  preg_t [RENAME_W-1:0]       head16, head34, head64,
  output preg_t [RENAME_W-1:0]       pdest,
  output logic [RENAME_W-1:0]        oversized,   // got a wider register than predicted
  output logic [$clog2(RENAME_W):0]  pop16, pop34, pop64,
  output logic                       stall
);
  localparam int unsigned PW = $clog2(RENAME_W) + 1;

  always_comb begin
    logic [PW-1:0] t16, t34, t64;
    logic fail;
    t16 = '0; t34 = '0; t64 = '0; fail = 1'b0;
    pdest = '0;
    oversized = '0;
    for (int i = 0; i < RENAME_W; i++) begin
      if (valid[i] && has_dest[i]) begin
        if (wpred[i] == W16 && CW'(t16) < cnt16) begin
          pdest[i] = head16[t16[PW-2:0]];
          t16++;
        end else if ((wpred[i] == W16 || wpred[i] == W34) && CW'(t34) < cnt34) begin
          pdest[i] = head34[t34[PW-2:0]];
          oversized[i] = (wpred[i] == W16);
          t34++;
        end else if (CW'(t64) < cnt64) begin
          pdest[i] = head64[t64[PW-2:0]];
          oversized[i] = (wpred[i] != W64);
          t64++;
        end else begin
          fail = 1'b1;
        end
      end
    end
    stall = fail;
    pop16 = fail ? '0 : t16;
    pop34 = fail ? '0 : t34;
    pop64 = fail ? '0 : t64;
  end
endmodule
