// free_list: circular FIFO of free physical register ids of one width class.
//
// The design keeps three of these: for the 16-bit, 34-bit and 64-bit
// registers. The list shows its first ALLOC_W ids (head_id) and how many ids it
// holds (count); the rename logic takes `pop` of them at the clock edge. Up to
// REL_W ids come back per cycle (released at commit, or returned by a recovery
// walk); valid ones are packed in port order behind the tail. At reset the list
// holds ids FIRST+SKIP .. FIRST+DEPTH-1 in increasing order: the first SKIP ids
// are the ones mapped to the architectural registers at reset. Popping more
// than count, or pushing beyond DEPTH, is a usage error caught by assertions.
// Three width-classed lists come from the published scheme; the FIFO
// organisation, port counts and reset contents are choices made here.
module free_list
  import abvarf_pkg::*;
#(
  parameter int unsigned DEPTH   = 256,
  parameter int unsigned ALLOC_W = 8,
  parameter int unsigned REL_W   = 9,
  parameter int unsigned FIRST   = 0,
  parameter int unsigned SKIP    = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output preg_t [ALLOC_W-1:0]        head_id,
  output logic [$clog2(DEPTH):0]     count,
  input  logic [$clog2(ALLOC_W):0]   pop,
  input  logic [REL_W-1:0]           rel_valid,
  input  preg_t [REL_W-1:0]          rel_id
);
  localparam int unsigned AW = $clog2(DEPTH);

  preg_t          fifo [DEPTH];
  logic [AW-1:0]  head, tail;
  logic [AW:0]    cnt;
  logic [AW:0]    npush;

  function automatic logic [AW-1:0] wrap(input int unsigned a);
    return AW'(a % DEPTH);
  endfunction

  assign count = cnt;

  always_comb begin
    for (int i = 0; i < ALLOC_W; i++) head_id[i] = fifo[wrap(int'(head) + i)];
    npush = '0;
    for (int r = 0; r < REL_W; r++) npush += (AW+1)'(rel_valid[r]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < DEPTH; e++) fifo[e] <= preg_t'(FIRST + e);
      head <= AW'(SKIP % DEPTH);
      tail <= '0;
      cnt  <= (AW+1)'(DEPTH - SKIP);
    end else begin
      automatic int unsigned k = 0;
      for (int r = 0; r < REL_W; r++) begin
        if (rel_valid[r]) begin
          fifo[wrap(int'(tail) + k)] <= rel_id[r];
          k++;
        end
      end
      head <= wrap(int'(head) + int'(pop));
      tail <= wrap(int'(tail) + int'(npush));
      cnt  <= cnt + npush - (AW+1)'(pop);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) (AW+1)'(pop) <= cnt)
    else $error("free_list: pop beyond count");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) int'(cnt) + int'(npush) - int'(pop) <= DEPTH)
    else $error("free_list: release beyond depth");
endmodule
