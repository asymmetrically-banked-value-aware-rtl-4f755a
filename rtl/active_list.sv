// active_list: in-order record of renamed instructions (a reorder buffer for
// register state), with commit and recovery walk.
//
// Each entry holds the logical destination, the new physical register and the
// physical register it replaced. Allocation: up to RENAME_W entries per cycle
// at the tail when `al_fire`; the valid slots of the group get consecutive
// tags. Completion: a write-back marks its tag done. Commit: up to COMMIT_W
// consecutive done entries leave from the head per cycle and their old
// physical registers are released (cm_*). Recovery: `flush_valid` with a tag
// starts a walk from the youngest entry back to and including that tag, one
// entry per cycle: each step restores the RAT entry of its logical destination
// to the old register and releases the new register (walk_*). While walking,
// allocation and commit stop and `busy` is high; a flush of an older tag during
// the walk extends it. The walk rate, commit width and the squashing of the
// flagged instruction itself are choices of this design.
module active_list
  import abvarf_pkg::*;
#(
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned RENAME_W  = 8,
  parameter int unsigned COMMIT_W  = 8,
  parameter int unsigned NWB       = 8,
  parameter int unsigned NUM_LREGS = 32,
  localparam int unsigned TW = $clog2(DEPTH),
  localparam int unsigned LW = $clog2(NUM_LREGS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // allocation
  input  logic                       al_fire,
  input  logic [RENAME_W-1:0]        al_valid,
  input  logic [RENAME_W-1:0]        al_has_dest,
  input  logic [RENAME_W-1:0][LW-1:0] al_ldest,
  input  preg_t [RENAME_W-1:0]       al_pdest,
  input  preg_t [RENAME_W-1:0]       al_old,
  output logic [RENAME_W-1:0][TW-1:0] al_tag,
  output logic                       al_ready,
  // completion
  input  logic [NWB-1:0]             wb_valid,
  input  logic [NWB-1:0][TW-1:0]     wb_tag,
  // commit
  output logic [COMMIT_W-1:0]        cm_valid,
  output logic [COMMIT_W-1:0]        cm_release,   // entry had a destination
  output preg_t [COMMIT_W-1:0]       cm_old,
  // recovery
  input  logic                       flush_valid,
  input  logic [TW-1:0]              flush_tag,
  output logic                       busy,
  output logic                       walk_valid,
  output logic                       walk_has_dest,
  output logic [LW-1:0]              walk_ldest,
  output preg_t                      walk_old,
  output preg_t                      walk_new,
  output logic [TW-1:0]              head_tag,
  output logic [TW:0]                occupancy
);
  typedef struct packed {
    logic           has_dest;
    logic [LW-1:0]  ldest;
    preg_t          pdest;
    preg_t          old;
  } entry_t;

  entry_t         ent  [DEPTH];
  logic           done [DEPTH];
  logic [TW-1:0]  head, tail, wptr, stop;
  logic [TW:0]    cnt;
  logic           walking;
  logic [TW:0]    nalloc, ncommit;

  function automatic logic [TW-1:0] add(input logic [TW-1:0] a, input int unsigned b);
    return TW'((int'(a) + b) % DEPTH);
  endfunction
  function automatic logic [TW-1:0] age(input logic [TW-1:0] t, input logic [TW-1:0] h);
    return TW'((int'(t) + DEPTH - int'(h)) % DEPTH);
  endfunction

  assign busy      = walking;
  assign head_tag  = head;
  assign occupancy = cnt;
  assign al_ready  = !walking && !flush_valid && (int'(cnt) + RENAME_W <= DEPTH);

  always_comb begin
    nalloc = '0;
    for (int i = 0; i < RENAME_W; i++) begin
      al_tag[i] = add(tail, int'(nalloc));
      if (al_valid[i]) nalloc++;
    end
    if (!al_fire) nalloc = '0;

    ncommit    = '0;
    cm_valid   = '0;
    cm_release = '0;
    cm_old     = '0;
    begin
      logic go;
      go = !walking;
      for (int c = 0; c < COMMIT_W; c++) begin
        automatic logic [TW-1:0] t = add(head, c);
        if (go && (c < int'(cnt)) && done[t]) begin
          cm_valid[c]   = 1'b1;
          cm_release[c] = ent[t].has_dest;
          cm_old[c]     = ent[t].old;
          ncommit++;
        end else begin
          go = 1'b0;
        end
      end
    end

    walk_valid    = walking;
    walk_has_dest = ent[wptr].has_dest;
    walk_ldest    = ent[wptr].ldest;
    walk_old      = ent[wptr].old;
    walk_new      = ent[wptr].pdest;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head    <= '0;
      tail    <= '0;
      cnt     <= '0;
      walking <= 1'b0;
      wptr    <= '0;
      stop    <= '0;
      for (int e = 0; e < DEPTH; e++) done[e] <= 1'b0;
    end else begin
      for (int i = 0; i < RENAME_W; i++) begin
        if (al_fire && al_valid[i]) begin
          ent[al_tag[i]]  <= '{has_dest: al_has_dest[i], ldest: al_ldest[i],
                               pdest: al_pdest[i], old: al_old[i]};
          done[al_tag[i]] <= 1'b0;
        end
      end
      for (int w = 0; w < NWB; w++)
        if (wb_valid[w]) done[wb_tag[w]] <= 1'b1;

      head <= add(head, int'(ncommit));

      if (walking) begin
        logic [TW-1:0] s;
        s = stop;
        if (flush_valid && age(flush_tag, head) < age(stop, head)) s = flush_tag;
        if (wptr == s) begin
          walking <= 1'b0;
          tail    <= s;
        end else begin
          wptr <= add(wptr, DEPTH - 1);
        end
        stop <= s;
        cnt  <= cnt - 1'b1;
      end else begin
        if (flush_valid) begin
          walking <= 1'b1;
          wptr    <= add(tail, DEPTH - 1);
          stop    <= flush_tag;
        end
        tail <= add(tail, int'(nalloc));
        cnt  <= cnt + nalloc - ncommit;
      end
    end
  end

  a_alloc_room: assert property (@(posedge clk) disable iff (!rst_n) al_fire |-> al_ready)
    else $error("active_list: allocation without room");
endmodule
