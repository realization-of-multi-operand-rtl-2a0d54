// moma_toma_tree: N-operand modulo-M adder as a binary tree of TOMAs.
//
// r = (x[0] + ... + x[N-1]) mod M. Level 0 adds the operand pairs (x[0],x[1]),
// (x[2],x[3]), ...; each following level adds the results of the previous
// one in pairs, so log2(N) levels and N-1 TOMAs are used (for N = 8: four,
// two and one TOMA). Every intermediate result is already a 5-bit residue.
//
// Timing: fully pipelined, one operand set per clock. The result of the
// operands presented with in_valid appears with out_valid after
// LATENCY = 3*log2(N) cycles (9 for N = 8). in_valid/out_valid, the
// synchronous active-high reset of the valid pipeline and M = 29 are this
// design's own; the data path has no reset. An assertion checks that
// out_valid only follows an accepted set. N must be a power of two >= 2.
module moma_toma_tree
  import moma_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 29
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  operand_t x [N],
  output logic     out_valid,
  output operand_t r
);

  localparam int unsigned LEVELS  = $clog2(N);
  localparam int unsigned LATENCY = TOMA_LATENCY * LEVELS;

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("moma_toma_tree: N=%0d is not a power of two >= 2", N);
  end

  // node[l][i]: i-th partial result entering level l (level 0 = operands).
  operand_t node [LEVELS+1][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign node[0][i] = x[i];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i < (N >> (l + 1))) begin : g_toma
        toma #(.M(M)) u_toma (
          .clk (clk),
          .a   (node[l][2*i]),
          .b   (node[l][2*i+1]),
          .r   (node[l+1][i])
        );
      end else begin : g_unused
        assign node[l+1][i] = '0;
      end
    end
  end

  assign r = node[LEVELS][0];

  // Valid flag travels alongside the data.
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk)
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LATENCY-2:0], in_valid};
  assign out_valid = vpipe[LATENCY-1];

  // A result is only ever flagged for a set accepted LATENCY cycles earlier.
  a_valid_latency : assert property (
    @(posedge clk) disable iff (rst) out_valid |-> $past(in_valid, LATENCY)
  );

endmodule
