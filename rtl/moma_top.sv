// moma_top: the two eight-operand modulo-M adders side by side.
//
// Both structures compute (x[0] + ... + x[N-1]) mod M on the same operands:
//   - a tree of N-1 two-operand adders (moma_toma_tree), 9 LUT levels for N=8;
//   - a tree of four-operand adders closed by a two-operand adder
//     (moma_foma_tree), 7 LUT levels for N=8.
// They use the same number of LUT-table outputs for N = 8 but differ in depth,
// which is the comparison the design is built for. Each result has its own
// valid flag, since the two pipelines differ in latency (9 and 7 cycles for
// N = 8). One operand set per clock, qualified by in_valid; rst is synchronous,
// active high, and clears only the valid pipelines. Sharing the operand
// inputs between the two adders is this design's own choice.
module moma_top
  import moma_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 29
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  operand_t x [N],
  output logic     toma_valid,
  output operand_t toma_r,
  output logic     foma_valid,
  output operand_t foma_r
);

  moma_toma_tree #(.N(N), .M(M)) u_toma_tree (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .x         (x),
    .out_valid (toma_valid),
    .r         (toma_r)
  );

  moma_foma_tree #(.N(N), .M(M)) u_foma_tree (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .x         (x),
    .out_valid (foma_valid),
    .r         (foma_r)
  );

endmodule
