// moma_foma_tree: N-operand modulo-M adder as a tree of FOMAs, closed by a
// TOMA when needed.
//
// r = (x[0] + ... + x[N-1]) mod M. Each FOMA level reduces groups of four
// (x[0..3], x[4..7], ...) to one residue. When log2(N) is odd two residues
// remain and one TOMA adds them (for N = 8: two FOMAs, then one TOMA). For
// the same power-of-two N this uses as many LUT levels as the FOMA count
// allows: 4 per FOMA level and 3 for the closing TOMA, against 3 per level
// of a pure TOMA tree, e.g. 7 against 9 levels for N = 8.
//
// Timing: fully pipelined, one operand set per clock; out_valid follows
// in_valid after LATENCY = 4*floor(log2(N)/2) + 3*(log2(N) mod 2) cycles
// (7 for N = 8). The generalisation to any power of two N >= 2, the valid
// pipeline with its synchronous active-high reset and M = 29 are this
// design's own; the data path has no reset. An assertion checks that
// out_valid only follows an accepted set.
module moma_foma_tree
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

  localparam int unsigned LOG     = $clog2(N);
  localparam int unsigned FLEVELS = LOG / 2;          // FOMA levels
  localparam bit          ODD     = (LOG % 2) == 1;   // closing TOMA needed
  localparam int unsigned LATENCY = FOMA_LATENCY * FLEVELS + (ODD ? TOMA_LATENCY : 0);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("moma_foma_tree: N=%0d is not a power of two >= 2", N);
  end

  // node[l][i]: i-th partial result entering FOMA level l.
  operand_t node [FLEVELS+1][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign node[0][i] = x[i];
  end

  for (genvar l = 0; l < FLEVELS; l++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i < (N >> (2 * (l + 1)))) begin : g_foma
        foma #(.M(M)) u_foma (
          .clk (clk),
          .x   ('{node[l][4*i], node[l][4*i+1], node[l][4*i+2], node[l][4*i+3]}),
          .r   (node[l+1][i])
        );
      end else begin : g_unused
        assign node[l+1][i] = '0;
      end
    end
  end

  if (ODD) begin : g_toma
    toma #(.M(M)) u_toma (
      .clk (clk),
      .a   (node[FLEVELS][0]),
      .b   (node[FLEVELS][1]),
      .r   (r)
    );
  end else begin : g_no_toma
    assign r = node[FLEVELS][0];
  end

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
