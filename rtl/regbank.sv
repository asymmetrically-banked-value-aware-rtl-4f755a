// regbank: one bank of the asymmetrically banked register file.
//
// ENTRIES registers of WIDTH bits with their own decoder, NR combinational
// read ports and NW write ports written at the rising clock edge. The design
// uses banks of 16, 34 and 64 bits, 128 entries, 4 read and 2 write ports each.
// Data ports are WIDTH bits; sign extension to 64 bits is done by the routing.
// Two writes to one entry in the same cycle are not allowed (port scheduling
// gives each write its own register); if they happen the higher port wins.
// The storage is not reset, like a register-file array. Bank widths, entry
// count and port counts follow the published configuration; the combinational
// read, the write priority and the absence of reset are choices made here.
module regbank #(
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned NR      = 4,
  parameter int unsigned NW      = 2,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic                        clk,
  input  logic [NR-1:0][AW-1:0]       ra,
  output logic [NR-1:0][WIDTH-1:0]    rd,
  input  logic [NW-1:0]               we,
  input  logic [NW-1:0][AW-1:0]       wa,
  input  logic [NW-1:0][WIDTH-1:0]    wd
);
  logic [WIDTH-1:0] mem [ENTRIES];

  always_comb
    for (int r = 0; r < NR; r++) rd[r] = mem[ra[r]];

  always_ff @(posedge clk)
    for (int w = 0; w < NW; w++)
      if (we[w]) mem[wa[w]] <= wd[w];
endmodule
