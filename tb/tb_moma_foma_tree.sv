// tb_moma_foma_tree: random streaming test of the FOMA-tree adder.
//
// Three trees are checked: N = 8 with the default modulus (two FOMAs and a
// TOMA, latency 7), N = 2 with M = 31 (a TOMA alone, latency 3) and N = 16
// with M = 17 (two FOMA levels, latency 8). All see random operands
// with random idle cycles between sets; a scoreboard per tree checks every
// result and its latency, and that no set is lost.
module tb_moma_foma_tree;
  import moma_pkg::*;

  localparam int unsigned NVEC = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic     rst;
  logic     in_valid;
  operand_t x [16];

  operand_t x8 [8], x2 [2];
  always_comb begin
    for (int i = 0; i < 8; i++) x8[i] = x[i];
    for (int i = 0; i < 2; i++) x2[i] = x[i];
  end

  logic     v8, v2, v16;
  operand_t r8, r2, r16;
  int       c [3], f [3], p [3];

  moma_foma_tree                     u_n8  (.clk, .rst, .in_valid, .x(x8), .out_valid(v8),  .r(r8));
  moma_foma_tree #(.N(2),  .M(31))   u_n2  (.clk, .rst, .in_valid, .x(x2), .out_valid(v2),  .r(r2));
  moma_foma_tree #(.N(16), .M(17))   u_n16 (.clk, .rst, .in_valid, .x(x),  .out_valid(v16), .r(r16));

  moma_scoreboard #(.N(8),  .M(29), .LAT(7))  sb8  (.clk, .in_valid(in_valid && !rst), .x(x8), .out_valid(v8 && !rst),  .r(r8),
                                                    .checks(c[0]), .failures(f[0]), .pending(p[0]));
  moma_scoreboard #(.N(2),  .M(31), .LAT(3))  sb2  (.clk, .in_valid(in_valid && !rst), .x(x2), .out_valid(v2 && !rst),  .r(r2),
                                                    .checks(c[1]), .failures(f[1]), .pending(p[1]));
  moma_scoreboard #(.N(16), .M(17), .LAT(8)) sb16 (.clk, .in_valid(in_valid && !rst), .x(x),  .out_valid(v16 && !rst), .r(r16),
                                                    .checks(c[2]), .failures(f[2]), .pending(p[2]));

  int checks, failures;
  int extra_f = 0;

  initial begin
    int unsigned sent = 0;
    rst = 1'b1;
    in_valid = 1'b0;
    foreach (x[i]) x[i] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (sent < NVEC) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      foreach (x[i]) x[i] = operand_t'($urandom_range(0, 31));
      if (in_valid) sent++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    for (int i = 0; i < 3; i++) if (p[i] != 0) begin
      extra_f++;
      $display("FAIL tree %0d: %0d sets never returned", i, p[i]);
    end
    checks   = c[0] + c[1] + c[2] + 3;
    failures = f[0] + f[1] + f[2] + extra_f;
    if (c[0] == 0 || c[1] == 0 || c[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NVEC + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
