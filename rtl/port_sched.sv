// port_sched: register-port scheduling inside instruction selection.
//
// Bank read and write ports are treated as issue resources, so a selected
// instruction never meets a port conflict. Candidates arrive oldest first
// (index 0 is the oldest) and are granted in that order (oldest-first policy).
// Reads: an operand that must read the register file (the bypass hint has not
// marked it as coming from the bypass network) uses one read port of its bank
// in the issue cycle; a candidate is refused if any bank would need more than
// NRPB reads. Writes: every write port of every bank has a VEC_LEN-bit
// scheduling vector, a slot per future cycle, and a global pointer marks the
// current cycle. A candidate with latency L needs a clear bit at position
// ptr+L (mod VEC_LEN) on some write port of its destination bank; the first
// clear port is reserved by setting the bit. A load reserves two slots, its
// L1-hit latency L and the L1-miss latency L+L2_LAT. At each clock edge the
// bits at the pointer are cleared and the pointer advances.
// A load whose latency exceeded the vector (late_valid) writes in the current
// cycle with priority: if all write ports of its bank are reserved at the
// current slot, wb_stall is raised; then nothing is granted, the pointer holds
// and every scheduled write moves one cycle later. Holding the pointer to
// delay the scheduled writes, the vector length (24, the longest latency of a
// floating-point square root in the usual SimpleScalar configuration) and the
// L1-miss latency are choices of this design.
module port_sched
  import abvarf_pkg::*;
#(
  parameter int unsigned ISSUE_W = 8,
  parameter int unsigned NBANK   = 4,
  parameter int unsigned NRPB    = 4,
  parameter int unsigned NWPB    = 2,
  parameter int unsigned VEC_LEN = 24,
  parameter int unsigned L2_LAT  = 12,
  localparam int unsigned LAT_W  = $clog2(VEC_LEN),
  localparam int unsigned BW     = $clog2(NBANK)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [ISSUE_W-1:0]            c_valid,
  input  logic [ISSUE_W-1:0][1:0]       c_rd,        // operand reads the register file
  input  logic [ISSUE_W-1:0][1:0][BW-1:0] c_src_bank,
  input  logic [ISSUE_W-1:0]            c_has_dest,
  input  logic [ISSUE_W-1:0][BW-1:0]    c_dest_bank,
  input  logic [ISSUE_W-1:0][LAT_W-1:0] c_lat,       // cycles from issue to write-back, >= 1
  input  logic [ISSUE_W-1:0]            c_is_load,
  output logic [ISSUE_W-1:0]            grant,
  output logic [ISSUE_W-1:0]            rp_block,    // refused for lack of a read port
  output logic [ISSUE_W-1:0]            wp_block,    // refused for lack of a write port
  input  logic                          late_valid,
  input  logic [BW-1:0]                 late_bank,
  output logic                          wb_stall,
  output logic [LAT_W-1:0]              ptr_o
);
  logic [VEC_LEN-1:0] vec  [NBANK][NWPB];
  logic [VEC_LEN-1:0] nvec [NBANK][NWPB];
  logic [LAT_W-1:0]   ptr;

  function automatic int unsigned slot(input logic [LAT_W-1:0] p, input int unsigned d);
    return (int'(p) + d) % VEC_LEN;
  endfunction

  assign ptr_o = ptr;

  always_comb begin
    int unsigned rcnt [NBANK];
    wb_stall = late_valid;
    for (int p = 0; p < NWPB; p++)
      if (!vec[late_bank][p][ptr]) wb_stall = 1'b0;

    nvec = vec;
    for (int b = 0; b < NBANK; b++) rcnt[b] = 0;
    grant    = '0;
    rp_block = '0;
    wp_block = '0;
    for (int i = 0; i < ISSUE_W; i++) begin
      automatic int unsigned nr [NBANK];
      automatic logic rok = 1'b1, wok = 1'b1, f1 = 1'b0, f2 = 1'b0;
      automatic int unsigned p1 = 0, p2 = 0;
      automatic int unsigned s1 = slot(ptr, int'(c_lat[i]));
      automatic int unsigned s2 = slot(ptr, int'(c_lat[i]) + L2_LAT);
      automatic int unsigned db = int'(c_dest_bank[i]);
      for (int b = 0; b < NBANK; b++) nr[b] = 0;
      for (int s = 0; s < 2; s++)
        for (int b = 0; b < NBANK; b++)
          if (c_rd[i][s] && int'(c_src_bank[i][s]) == b) nr[b]++;
      for (int b = 0; b < NBANK; b++)
        if (rcnt[b] + nr[b] > NRPB) rok = 1'b0;
      if (c_has_dest[i]) begin
        for (int p = NWPB - 1; p >= 0; p--)
          if (!nvec[db][p][s1]) begin f1 = 1'b1; p1 = p; end
        if (c_is_load[i]) begin
          for (int p = NWPB - 1; p >= 0; p--)
            if (!nvec[db][p][s2]) begin f2 = 1'b1; p2 = p; end
        end else begin
          f2 = 1'b1;
        end
        wok = f1 && f2;
      end
      if (c_valid[i] && !wb_stall) begin
        rp_block[i] = !rok;
        wp_block[i] = rok && !wok;
        if (rok && wok) begin
          grant[i] = 1'b1;
          for (int b = 0; b < NBANK; b++) rcnt[b] += nr[b];
          if (c_has_dest[i]) begin
            nvec[db][p1][s1] = 1'b1;
            if (c_is_load[i]) nvec[db][p2][s2] = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int b = 0; b < NBANK; b++)
        for (int p = 0; p < NWPB; p++) vec[b][p] <= '0;
    end else if (!wb_stall) begin
      for (int b = 0; b < NBANK; b++)
        for (int p = 0; p < NWPB; p++) begin
          vec[b][p]      <= nvec[b][p];
          vec[b][p][ptr] <= 1'b0;
        end
      ptr <= LAT_W'(slot(ptr, 1));
    end
  end

  for (genvar i = 0; i < ISSUE_W; i++) begin : g_chk
    a_lat_range: assert property (@(posedge clk) disable iff (!rst_n)
        c_valid[i] |-> (c_lat[i] >= 1 && int'(c_lat[i]) + (c_is_load[i] ? L2_LAT : 0) < VEC_LEN))
      else $error("port_sched: latency outside the scheduling vector");
  end
endmodule
