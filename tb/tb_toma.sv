// tb_toma: exhaustive streaming test of the two-operand modulo adder.
//
// Every pair of 5-bit operands is applied, one pair per clock, to two TOMAs
// (M = 29 and M = 31). Each output is compared with (a + b) mod M of the pair
// applied three clock edges earlier (the
// result is registered by the third rising edge after the operands are set), which checks the 3-cycle latency and
// the full throughput at once. A single pair applied between idle inputs is
// also timed on its own.
module tb_toma;
  import moma_pkg::*;

  localparam int unsigned LAT = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  operand_t a, b, r29, r31;
  toma #(.M(29)) u_m29 (.clk, .a, .b, .r(r29));
  toma #(.M(31)) u_m31 (.clk, .a, .b, .r(r31));

  operand_t ha [$], hb [$];

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    operand_t ea, eb;
    int unsigned seen;
    // Streaming: all 1024 pairs back to back, then LAT flush cycles.
    for (int unsigned k = 0; k < 1024 + LAT; k++) begin
      @(negedge clk);
      a = operand_t'(k >> 5);
      b = operand_t'(k);
      ha.push_back(a);
      hb.push_back(b);
      if (ha.size() > LAT) begin
        void'(ha.pop_front());
        void'(hb.pop_front());
      end
      @(posedge clk);
      #1;
      if (k >= LAT - 1) begin
        ea = ha[0];
        eb = hb[0];
        check("m29", r29, (int'(ea) + int'(eb)) % 29);
        check("m31", r31, (int'(ea) + int'(eb)) % 31);
      end
    end
    // Latency of one isolated pair (28 + 27 = 55 -> 26 mod 29) among zeros.
    @(negedge clk);
    a = 5'd28; b = 5'd27;
    @(negedge clk);
    a = '0; b = '0;
    seen = 0;
    for (int unsigned c = 1; c <= 6; c++) begin
      if (r29 == 5'd26) seen = c;
      @(negedge clk);
    end
    check("latency", seen, LAT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
