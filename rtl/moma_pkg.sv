// moma_pkg: shared types, sizes and look-up-table contents for the
// multi-operand modular adders (MOMA).
//
// The adders work on 5-bit residues. Every operand is split into a 3-bit
// low segment (bits 2..0) and a 2-bit high segment (bits 4..3), so that each
// partial addition fits in a LUT of at most 6 (or 7) address bits. All
// arithmetic is done by table look-up; this package computes the contents of
// those tables at elaboration time, which is the formula a LUT INIT value
// would be generated from:
//   LUT_ADD     address {a, b}, a and b AW/2 bits each     -> a + b
//   LUT_ADD_CIN address {a, b, c}, a and b (AW-1)/2 bits  -> a + b + c
//   LUT_MOD     address = an unsigned binary number S     -> S mod M
// The operand split and the table functions follow the described design;
// the enum encoding and the packed INIT layout are this design's own.
package moma_pkg;

  // Operand (residue) width and its split into segments.
  localparam int unsigned W  = 5;
  localparam int unsigned WL = 3;
  localparam int unsigned WH = W - WL;

  // Address inputs of one physical LUT; wider tables are built from two.
  localparam int unsigned LUT_K = 6;

  // Widest table that init_table() can fill: 2^7 entries of up to 8 bits.
  localparam int unsigned MAX_AW   = 7;
  localparam int unsigned MAX_DW   = 8;
  localparam int unsigned MAX_INIT = (1 << MAX_AW) * MAX_DW;

  // Pipeline depth of the basic adders: one cycle per LUT level.
  localparam int unsigned TOMA_LATENCY = 3;
  localparam int unsigned FOMA_LATENCY = 4;

  typedef logic [W-1:0] operand_t;

  typedef enum logic [1:0] {
    LUT_ADD     = 2'd0,
    LUT_ADD_CIN = 2'd1,
    LUT_MOD     = 2'd2
  } lut_kind_e;

  // Value stored at one address of a table of the given kind.
  function automatic int unsigned table_entry(lut_kind_e kind, int unsigned aw,
                                              int unsigned m, int unsigned addr);
    int unsigned half, a, b, c;
    case (kind)
      LUT_ADD: begin
        half = aw / 2;
        a = addr >> half;
        b = addr & ((1 << half) - 1);
        return a + b;
      end
      LUT_ADD_CIN: begin
        half = (aw - 1) / 2;
        c = addr & 1;
        a = addr >> (half + 1);
        b = (addr >> 1) & ((1 << half) - 1);
        return a + b + c;
      end
      default: return addr % m;
    endcase
  endfunction

  // Packed table contents: entry e occupies bits [e*dw +: dw].
  function automatic logic [MAX_INIT-1:0] init_table(lut_kind_e kind, int unsigned aw,
                                                     int unsigned dw, int unsigned m);
    logic [MAX_INIT-1:0] t;
    int unsigned v;
    t = '0;
    for (int unsigned e = 0; e < (1 << aw); e++) begin
      v = table_entry(kind, aw, m, e);
      for (int unsigned k = 0; k < dw; k++) t[e*dw + k] = v[k];
    end
    return t;
  endfunction

endpackage
