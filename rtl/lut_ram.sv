// lut_ram: a registered look-up table built from FPGA LUTs used as small ROMs.
//
// DW outputs, each a 2^AW x 1 LUT, all addressed by the same AW bits; this is
// the basic element of every adder in this design, one LUT per output bit.
// The contents are fixed at elaboration by moma_pkg::init_table(KIND, AW, DW,
// M). A table of up to LUT_K (6) address bits is one LUT per output bit. A
// 7-bit table is built as the described design does it: two 2^6 halves read
// in parallel and an output multiplexer selected by the address MSB.
//
// Interface: addr is sampled combinationally; q is the looked-up word,
// registered on the rising edge of clk, so the latency is one cycle. The
// output register models the registered LUT outputs of the FPGA slice. There
// is no reset: q is valid one cycle after addr.
module lut_ram
  import moma_pkg::*;
#(
  parameter int unsigned AW   = 6,
  parameter int unsigned DW   = 4,
  parameter lut_kind_e   KIND = LUT_ADD,
  parameter int unsigned M    = 29
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] q
);

  localparam int unsigned DEPTH = 1 << AW;
  localparam logic [DEPTH*DW-1:0] INIT = (DEPTH*DW)'(init_table(KIND, AW, DW, M));

  if (AW > MAX_AW || DW > MAX_DW || AW < 2) begin : g_bad_size
    $error("lut_ram: AW=%0d DW=%0d outside the supported 2..%0d x 1..%0d", AW, DW, MAX_AW, MAX_DW);
  end

  logic [DW-1:0] rd;

  if (AW > LUT_K) begin : g_split
    // Two half-size tables and an MSB-controlled output multiplexer.
    localparam int unsigned HALF = DEPTH / 2;
    localparam logic [HALF*DW-1:0] INIT_LO = INIT[HALF*DW-1:0];
    localparam logic [HALF*DW-1:0] INIT_HI = INIT[DEPTH*DW-1:HALF*DW];
    logic [DW-1:0] rd_lo, rd_hi;
    always_comb begin
      rd_lo = INIT_LO[addr[AW-2:0]*DW +: DW];
      rd_hi = INIT_HI[addr[AW-2:0]*DW +: DW];
      rd    = addr[AW-1] ? rd_hi : rd_lo;
    end
  end else begin : g_single
    always_comb rd = INIT[addr*DW +: DW];
  end

  always_ff @(posedge clk) q <= rd;

endmodule
