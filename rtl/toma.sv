// toma: 5-bit two-operand modulo-M adder (TOMA) built from three LUT tables.
//
// r = (a + b) mod M, computed in three look-up stages:
//   RAM1 (6 in, 4 out): low segments a[2:0] + b[2:0] -> {carry, sum[2:0]}
//   RAM2 (5 in, 3 out): high segments a[4:3] + b[4:3] + carry -> sum[5:3]
//   RAM3 (6 in, 5 out): the 6-bit binary sum {sum[5:3], sum[2:0]} -> mod M
// That is 4 + 3 + 5 = 12 LUTs and three LUT levels, as described.
//
// Timing: every table output is registered, so the adder is a 3-stage
// pipeline taking one operand pair per clock, result
// TOMA_LATENCY = 3 cycles later.
// The registers that delay a[4:3], b[4:3] (for RAM2) and the low sum (for
// RAM3) keep the stages aligned; they are this design's own, as is the
// default modulus M = 29. Any 5-bit inputs are reduced correctly, since RAM3
// covers every 6-bit sum; the operands are normally residues below M.
module toma
  import moma_pkg::*;
#(
  parameter int unsigned M = 29
) (
  input  logic     clk,
  input  operand_t a,
  input  operand_t b,
  output operand_t r
);

  // Stage 1: low-segment addition (RAM1); high segments wait one cycle.
  logic [WL:0]   s1_low;          // {c3, s2, s1, s0}
  logic [WH-1:0] a_hi_q, b_hi_q;

  lut_ram #(.AW(2*WL), .DW(WL+1), .KIND(LUT_ADD), .M(M)) u_ram1 (
    .clk  (clk),
    .addr ({a[WL-1:0], b[WL-1:0]}),
    .q    (s1_low)
  );

  always_ff @(posedge clk) begin
    a_hi_q <= a[W-1:WL];
    b_hi_q <= b[W-1:WL];
  end

  // Stage 2: high-segment addition with the low carry (RAM2).
  logic [WH:0]   s2_high;         // sum bits 5..3
  logic [WL-1:0] s2_low;          // sum bits 2..0, delayed

  lut_ram #(.AW(2*WH+1), .DW(WH+1), .KIND(LUT_ADD_CIN), .M(M)) u_ram2 (
    .clk  (clk),
    .addr ({a_hi_q, b_hi_q, s1_low[WL]}),
    .q    (s2_high)
  );

  always_ff @(posedge clk) s2_low <= s1_low[WL-1:0];

  // Stage 3: modulo-M generation from the 6-bit sum (RAM3).
  lut_ram #(.AW(W+1), .DW(W), .KIND(LUT_MOD), .M(M)) u_ram3 (
    .clk  (clk),
    .addr ({s2_high, s2_low}),
    .q    (r)
  );

endmodule
