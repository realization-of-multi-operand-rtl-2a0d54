// tb_lut_ram: exhaustive check of every table shape the adders use.
//
// Five lut_ram instances (6-in add, 5-in add with carry, 7-in add with carry,
// 6-in and 7-in modulo) see every address in turn. One cycle after each
// address the registered outputs are compared with sums and remainders
// computed here from the address fields. The 7-input tables exercise the
// split into two halves with an MSB multiplexer.
module tb_lut_ram;
  import moma_pkg::*;

  localparam int unsigned M = 29;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [6:0] addr;
  logic [3:0] q_add6;
  logic [2:0] q_cin5;
  logic [3:0] q_cin7;
  logic [4:0] q_mod6, q_mod7;

  lut_ram #(.AW(6), .DW(4), .KIND(LUT_ADD),     .M(M)) u_add6 (.clk, .addr(addr[5:0]), .q(q_add6));
  lut_ram #(.AW(5), .DW(3), .KIND(LUT_ADD_CIN), .M(M)) u_cin5 (.clk, .addr(addr[4:0]), .q(q_cin5));
  lut_ram #(.AW(7), .DW(4), .KIND(LUT_ADD_CIN), .M(M)) u_cin7 (.clk, .addr(addr),      .q(q_cin7));
  lut_ram #(.AW(6), .DW(5), .KIND(LUT_MOD),     .M(M)) u_mod6 (.clk, .addr(addr[5:0]), .q(q_mod6));
  lut_ram #(.AW(7), .DW(5), .KIND(LUT_MOD),     .M(M)) u_mod7 (.clk, .addr(addr),      .q(q_mod7));

  task automatic check(string what, int unsigned got, int unsigned exp, int unsigned a);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s addr=%0d got=%0d exp=%0d", what, a, got, exp);
    end
  endtask

  initial begin
    int unsigned a;
    for (a = 0; a < 128; a++) begin
      @(negedge clk);
      addr = 7'(a);
      @(posedge clk);
      #1;
      check("add6", q_add6, ((a >> 3) & 7) + (a & 7), a);
      check("cin5", q_cin5, ((a >> 3) & 3) + ((a >> 1) & 3) + (a & 1), a);
      check("cin7", q_cin7, ((a >> 4) & 7) + ((a >> 1) & 7) + (a & 1), a);
      check("mod6", q_mod6, (a & 63) % M, a);
      check("mod7", q_mod7, a % M, a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
