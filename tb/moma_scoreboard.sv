// moma_scoreboard: reference model and checker for one N-operand modulo-M
// adder pipeline, used by the adder testbenches.
//
// On every rising clock edge it samples the adder's inputs and outputs. For
// each accepted operand set (in_valid) it stores the sum mod M, computed here
// with plain integer arithmetic, and the cycle number. For each out_valid it
// takes the oldest stored set and checks both the result and that exactly
// LAT cycles have passed. checks, failures and pending (sets not yet
// returned) are read by the testbench at the end.
module moma_scoreboard
  import moma_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned M   = 29,
  parameter int unsigned LAT = 9
) (
  input  logic     clk,
  input  logic     in_valid,
  input  operand_t x [N],
  input  logic     out_valid,
  input  operand_t r,
  output int       checks,
  output int       failures,
  output int       pending
);

  int unsigned exp_r [$];
  longint      exp_c [$];
  longint      cycle = 0;

  initial begin
    checks   = 0;
    failures = 0;
  end

  assign pending = exp_r.size();

  always @(posedge clk) begin
    int unsigned s;
    cycle <= cycle + 1;
    if (in_valid) begin
      s = 0;
      for (int i = 0; i < int'(N); i++) s += x[i];
      exp_r.push_back(s % M);
      exp_c.push_back(cycle);
    end
    if (out_valid) begin
      checks <= checks + 2;
      if (exp_r.size() == 0) begin
        failures <= failures + 1;
        $display("FAIL N=%0d M=%0d: result without operands", N, M);
      end else begin
        if (int'(r) != exp_r[0] || cycle - exp_c[0] != longint'(LAT)) begin
          failures <= failures + 1;
          $display("FAIL N=%0d M=%0d: r=%0d exp=%0d after %0d cycles (exp %0d)",
                   N, M, r, exp_r[0], cycle - exp_c[0], LAT);
        end
        void'(exp_r.pop_front());
        void'(exp_c.pop_front());
      end
    end
  end

endmodule
