// abvarf_pkg: types and constants shared by the AB-VARF register-file blocks.
//
// The register file holds 512 integer physical registers in four banks of 128
// entries (configuration "211": banks 0 and 1 are 16 bits wide, bank 2 is 34
// bits wide, bank 3 is 64 bits wide). A physical register id is {bank, index},
// so the id alone tells how wide the register is. Value widths are encoded with
// the two narrowness flags N1N0: 00 = fits in 16 bits, 01 = fits in 34 bits,
// 11 = regular 64-bit value, 10 = reserved. Bank counts, widths, entry counts and
// the flag encoding follow the published design; the bank numbering (which bank
// has which width) is a choice made here, with bank 3 as the widest.
package abvarf_pkg;

  localparam int unsigned XLEN         = 64;
  localparam int unsigned NUM_BANKS    = 4;
  localparam int unsigned BANK_ENTRIES = 128;
  localparam int unsigned NUM_PREGS    = NUM_BANKS * BANK_ENTRIES;  // 512
  localparam int unsigned PREG_W       = $clog2(NUM_PREGS);         // 9
  localparam int unsigned BANK_W       = $clog2(NUM_BANKS);         // 2
  localparam int unsigned IDX_W        = $clog2(BANK_ENTRIES);      // 7

  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [BANK_W-1:0] bank_t;

  // Narrowness flags N1N0.
  typedef enum logic [1:0] {
    W16  = 2'b00,
    W34  = 2'b01,
    WRSV = 2'b10,
    W64  = 2'b11
  } width_t;

  // Bit width of each bank.
  function automatic int unsigned bank_bits(input int unsigned b);
    case (b)
      0, 1:    return 16;
      2:       return 34;
      default: return 64;
    endcase
  endfunction

  function automatic bank_t bank_of(input preg_t p);
    return p[PREG_W-1 -: BANK_W];
  endfunction

  // Width class of a physical register, given by its bank.
  function automatic width_t class_of(input preg_t p);
    case (bank_of(p))
      2'd0, 2'd1: return W16;
      2'd2:       return W34;
      default:    return W64;
    endcase
  endfunction

  // True when a value of width w does not fit a register of class c.
  function automatic logic too_wide(input width_t w, input width_t c);
    logic [1:0] rw, rc;
    rw = (w == W16) ? 2'd0 : (w == W34) ? 2'd1 : 2'd2;
    rc = (c == W16) ? 2'd0 : (c == W34) ? 2'd1 : 2'd2;
    return rw > rc;
  endfunction


endpackage
