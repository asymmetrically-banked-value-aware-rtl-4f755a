// width_predictor: last-width value-width predictor, organised like a bimodal
// branch predictor.
//
// A table of ENTRIES 2-bit counters is indexed by PC bits [IDX+1:2] (4-byte
// instructions). The counter holds the width of the last result of the
// instruction: 0 predicts a 64-bit value, 1 a 34-bit value, 2 a 16-bit value.
// Reset clears every counter to 0, the design's initial "64-bit" prediction.
// Lookups are combinational (NLOOKUP per cycle, used at fetch). Updates
// (NUPDATE per cycle) take the detected narrowness flags of a result and write
// 2, 1 or 0 at the next clock edge; when two updates in one cycle hit the same
// entry the higher-numbered port wins. Counter value 3 is never written and
// predicts 64 bits. Training at write-back, the PC indexing and the port
// counts are choices of this design; table size and counter meaning follow the
// published scheme.
module width_predictor
  import abvarf_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned NLOOKUP = 8,
  parameter int unsigned NUPDATE = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NLOOKUP-1:0][XLEN-1:0] lk_pc,
  output width_t [NLOOKUP-1:0]  lk_pred,
  input  logic [NUPDATE-1:0]    up_valid,
  input  logic [NUPDATE-1:0][XLEN-1:0] up_pc,
  input  width_t [NUPDATE-1:0]  up_flags
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [1:0] ctr [ENTRIES];

  function automatic logic [IW-1:0] idx(input logic [XLEN-1:0] pc);
    return pc[IW+1:2];
  endfunction

  always_comb begin
    for (int i = 0; i < NLOOKUP; i++) begin
      case (ctr[idx(lk_pc[i])])
        2'd1:    lk_pred[i] = W34;
        2'd2:    lk_pred[i] = W16;
        default: lk_pred[i] = W64;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) ctr[e] <= 2'd0;
    end else begin
      for (int u = 0; u < NUPDATE; u++) begin
        if (up_valid[u]) begin
          case (up_flags[u])
            W16:     ctr[idx(up_pc[u])] <= 2'd2;
            W34:     ctr[idx(up_pc[u])] <= 2'd1;
            default: ctr[idx(up_pc[u])] <= 2'd0;
          endcase
        end
      end
    end
  end
endmodule
