// tb_moma_top: end-to-end test of both eight-operand adders at the default
// parameters (N = 8, M = 29).
//
// Random operand sets are streamed with random idle cycles, plus corner sets
// (all zero, all M-1, all 31). Two scoreboards check every result of the
// TOMA tree (latency 9) and of the FOMA tree (latency 7), and the results of
// the two trees are compared with each other in order. The test counts how
// often each mechanism of the design was exercised and fails if one never
// was: modulo reduction of the sum, a sum of at least twice M, a four-operand
// group sum of 64 or more (upper half of the 7-input tables), back-to-back
// sets, idle cycles, and a reset that drops the sets still in flight.
module tb_moma_top;
  import moma_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned M    = 29;
  localparam int unsigned NVEC = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic     rst;
  logic     in_valid;
  operand_t x [N];
  logic     toma_valid, foma_valid;
  operand_t toma_r, foma_r;

  moma_top dut (.clk, .rst, .in_valid, .x, .toma_valid, .toma_r, .foma_valid, .foma_r);

  int c [2], f [2], p [2];
  moma_scoreboard #(.N(N), .M(M), .LAT(9)) sb_toma (.clk, .in_valid(in_valid && !rst), .x,
      .out_valid(toma_valid && !rst), .r(toma_r), .checks(c[0]), .failures(f[0]), .pending(p[0]));
  moma_scoreboard #(.N(N), .M(M), .LAT(7)) sb_foma (.clk, .in_valid(in_valid && !rst), .x,
      .out_valid(foma_valid && !rst), .r(foma_r), .checks(c[1]), .failures(f[1]), .pending(p[1]));

  // Cross-check: the k-th result of one tree equals the k-th of the other.
  operand_t fq [$];
  int cross_checks = 0, cross_fail = 0;
  always @(posedge clk) begin
    if (foma_valid && !rst) fq.push_back(foma_r);
    if (toma_valid && !rst) begin
      cross_checks++;
      if (fq.size() == 0 || fq[0] != toma_r) begin
        cross_fail++;
        $display("FAIL trees disagree: toma %0d", toma_r);
      end
      if (fq.size() != 0) void'(fq.pop_front());
    end
  end

  // Mechanism counters.
  int n_reduced = 0, n_multi_wrap = 0, n_upper = 0, n_b2b = 0, n_idle = 0, n_reset_drop = 0;
  int checks = 0, failures = 0;

  task automatic need(string what, int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL never exercised: %s", what);
    end
  endtask

  initial begin
    int unsigned sent = 0, s, g0, g1;
    logic prev_valid = 1'b0;
    rst = 1'b1;
    in_valid = 1'b0;
    foreach (x[i]) x[i] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (sent < NVEC) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      foreach (x[i])
        case (sent)
          0:       x[i] = '0;
          1:       x[i] = operand_t'(M - 1);
          2:       x[i] = 5'd31;
          default: x[i] = operand_t'($urandom_range(0, M - 1));
        endcase
      if (in_valid) begin
        sent++;
        s = 0; g0 = 0; g1 = 0;
        foreach (x[i]) begin
          s += x[i];
          if (i < 4) g0 += x[i]; else g1 += x[i];
        end
        if (s >= M) n_reduced++;
        if (s >= 2 * M) n_multi_wrap++;
        if (g0 >= 64 || g1 >= 64) n_upper++;
        if (prev_valid) n_b2b++;
      end else begin
        n_idle++;
      end
      prev_valid = in_valid;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (15) @(negedge clk);

    // Reset with sets in flight: none of them may come out.
    for (int k = 0; k < 4; k++) begin
      in_valid = 1'b1;
      foreach (x[i]) x[i] = operand_t'($urandom_range(0, M - 1));
      @(negedge clk);
    end
    in_valid = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    begin
      int seen = 0;
      for (int k = 0; k < 15; k++) begin
        if (toma_valid || foma_valid) seen++;
        @(negedge clk);
      end
      checks++;
      if (seen != 0) begin
        failures++;
        $display("FAIL %0d results appeared after reset", seen);
      end else n_reset_drop++;
    end

    need("reduced sums (>= M)", n_reduced);
    need("sums >= 2M", n_multi_wrap);
    need("group sums >= 64", n_upper);
    need("back-to-back sets", n_b2b);
    need("idle cycles", n_idle);
    need("reset with sets in flight", n_reset_drop);
    // The four sets flushed by the reset stay pending in the scoreboards.
    checks += 2;
    if (p[0] != 4 || p[1] != 4) begin
      failures++;
      $display("FAIL pending after run: toma %0d foma %0d (expected 4 each)", p[0], p[1]);
    end
    checks += c[0] + c[1] + cross_checks;
    failures += f[0] + f[1] + cross_fail;
    if (c[0] == 0 || c[1] == 0 || cross_checks != int'(NVEC)) begin
      failures++;
      $display("FAIL result count: toma %0d foma %0d cross %0d", c[0] / 2, c[1] / 2, cross_checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NVEC + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
