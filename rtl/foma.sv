// foma: 5-bit four-operand modulo-M adder (FOMA) built from seven LUT tables.
//
// r = (x[0] + x[1] + x[2] + x[3]) mod M. Two binary additions of operand
// pairs run in parallel, their sums are added, and a single modulo
// generation follows (the described Algorithm 1):
//   RAM1A, RAM1B (6 in, 4 out): x0[2:0]+x1[2:0], x2[2:0]+x3[2:0] -> {c3, s[2:0]}
//   RAM2A, RAM2B (5 in, 3 out): x0[4:3]+x1[4:3]+c3(01), same for 2,3 -> s[5:3]
//   RAM3         (6 in, 4 out): sum of the two low sums -> {c3(0123), s[2:0]}
//   RAM4         (7 in, 4 out): sum of the two high sums + c3(0123) -> s[6:3]
//   RAM5         (7 in, 5 out): the 7-bit binary sum {s[6:3], s[2:0]} mod M
// RAM4 and RAM5 have 7 address bits and are each built from two 6-input
// halves and an MSB-selected multiplexer (see lut_ram).
//
// Timing: every table output is registered. RAM3 depends only on RAM1A/B, so
// it runs in the same stage as RAM2A/B, giving four LUT levels: a 4-stage
// pipeline accepting four operands per clock, FOMA_LATENCY = 4. The stage
// assignment, the alignment registers and the default M = 29 are this
// design's own choices; the table structure follows the described design.
module foma
  import moma_pkg::*;
#(
  parameter int unsigned M = 29
) (
  input  logic     clk,
  input  operand_t x [4],
  output operand_t r
);

  // Stage 1: low-segment additions of the pairs (0,1) and (2,3).
  logic [WL:0]   l01, l23;                  // {c3, s[2:0]}
  logic [WH-1:0] hi_q [4];

  lut_ram #(.AW(2*WL), .DW(WL+1), .KIND(LUT_ADD), .M(M)) u_ram1a (
    .clk (clk), .addr ({x[0][WL-1:0], x[1][WL-1:0]}), .q (l01)
  );
  lut_ram #(.AW(2*WL), .DW(WL+1), .KIND(LUT_ADD), .M(M)) u_ram1b (
    .clk (clk), .addr ({x[2][WL-1:0], x[3][WL-1:0]}), .q (l23)
  );

  always_ff @(posedge clk)
    for (int i = 0; i < 4; i++) hi_q[i] <= x[i][W-1:WL];

  // Stage 2: high-segment additions (RAM2A/B) and the low-sum addition (RAM3).
  logic [WH:0] h01, h23;                    // pair sums, bits 5..3
  logic [WL:0] l0123;                       // {c3(0123), s[2:0]}

  lut_ram #(.AW(2*WH+1), .DW(WH+1), .KIND(LUT_ADD_CIN), .M(M)) u_ram2a (
    .clk (clk), .addr ({hi_q[0], hi_q[1], l01[WL]}), .q (h01)
  );
  lut_ram #(.AW(2*WH+1), .DW(WH+1), .KIND(LUT_ADD_CIN), .M(M)) u_ram2b (
    .clk (clk), .addr ({hi_q[2], hi_q[3], l23[WL]}), .q (h23)
  );
  lut_ram #(.AW(2*WL), .DW(WL+1), .KIND(LUT_ADD), .M(M)) u_ram3 (
    .clk (clk), .addr ({l01[WL-1:0], l23[WL-1:0]}), .q (l0123)
  );

  // Stage 3: high-sum addition with the low carry (RAM4); low sum waits.
  logic [WH+1:0] h0123;                     // total sum, bits 6..3
  logic [WL-1:0] l0123_q;

  lut_ram #(.AW(2*(WH+1)+1), .DW(WH+2), .KIND(LUT_ADD_CIN), .M(M)) u_ram4 (
    .clk (clk), .addr ({h01, h23, l0123[WL]}), .q (h0123)
  );

  always_ff @(posedge clk) l0123_q <= l0123[WL-1:0];

  // Stage 4: modulo-M generation from the 7-bit sum (RAM5).
  lut_ram #(.AW(W+2), .DW(W), .KIND(LUT_MOD), .M(M)) u_ram5 (
    .clk (clk), .addr ({h0123, l0123_q}), .q (r)
  );

endmodule
