// tb_foma: streaming test of the four-operand modulo adder.
//
// One set of four operands per clock: corner sets (all zero, all M-1, all
// 31, sums just below and above 64) followed by random sets, applied to FOMAs
// with M = 29 and M = 31. Each output is compared with the sum mod M of the
// set applied four clock edges earlier, which checks the 4-cycle latency.
// Sums of 64 and more, which address the upper halves of the 7-input tables,
// are counted and must occur.
module tb_foma;
  import moma_pkg::*;

  localparam int unsigned LAT = 4;
  localparam int unsigned NVEC = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int upper_half = 0;

  operand_t x [4];
  operand_t r29, r31;
  foma #(.M(29)) u_m29 (.clk, .x, .r(r29));
  foma #(.M(31)) u_m31 (.clk, .x, .r(r31));

  int unsigned hsum [$];

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  function automatic operand_t corner(int unsigned k, int unsigned i);
    case (k)
      0: return '0;
      1: return 5'd28;
      2: return 5'd31;
      3: return (i == 0) ? 5'd3 : 5'd20;    // sum 63
      4: return 5'd16;                      // sum 64
      default: return operand_t'($urandom_range(0, 31));
    endcase
  endfunction

  initial begin
    int unsigned s;
    for (int unsigned k = 0; k < NVEC + LAT; k++) begin
      @(negedge clk);
      s = 0;
      for (int unsigned i = 0; i < 4; i++) begin
        x[i] = (k < NVEC) ? corner(k, i) : '0;
        s += x[i];
      end
      if (k < NVEC && s >= 64) upper_half++;
      hsum.push_back(s);
      if (hsum.size() > LAT) void'(hsum.pop_front());
      @(posedge clk);
      #1;
      if (k >= LAT - 1) begin
        check("m29", r29, hsum[0] % 29);
        check("m31", r31, hsum[0] % 31);
      end
    end
    checks++;
    if (upper_half == 0) begin
      failures++;
      $display("FAIL no sum reached the upper table halves");
    end
    $display("sums >= 64: %0d of %0d", upper_half, NVEC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
