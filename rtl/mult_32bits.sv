// mult_32bits: pipelined 32x32 -> 64-bit unsigned multiplier built from four
// 16x16 multipliers.
//
// Each operand is split into a high and a low 16-bit half.  Four mult_16bits
// instances form the partial products lo*lo, lo*hi, hi*lo and hi*hi (stage 1).
// Stage 2 adds the two cross products into a 33-bit middle term.  Stage 3
// places hi*hi above lo*lo and adds the middle term shifted left by 16 bits.
// Latency is 3 clock edges; a new operand pair may be applied every cycle.
//
// The decomposition into four half-width products and the two adder stages
// follow the published cascaded-multiplier scheme.  The published adder reads
// hi*hi and lo*lo straight from the first stage in its last stage, which is
// only correct while the inputs are held steady; here those two products are
// delayed by one register so that the unit is a true pipeline.  Reset is
// asynchronous and active high.
module mult_32bits (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);

  logic [31:0] p_ll, p_lh, p_hl, p_hh;   // a_lo*b_lo, a_lo*b_hi, a_hi*b_lo, a_hi*b_hi
  logic [32:0] mid;                      // p_lh + p_hl
  logic [31:0] p_ll_d, p_hh_d;

  mult_16bits u_ll (.clk, .rst, .a(a[15:0]),  .b(b[15:0]),  .p(p_ll));
  mult_16bits u_lh (.clk, .rst, .a(a[15:0]),  .b(b[31:16]), .p(p_lh));
  mult_16bits u_hl (.clk, .rst, .a(a[31:16]), .b(b[15:0]),  .p(p_hl));
  mult_16bits u_hh (.clk, .rst, .a(a[31:16]), .b(b[31:16]), .p(p_hh));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mid    <= '0;
      p_ll_d <= '0;
      p_hh_d <= '0;
      p      <= '0;
    end else begin
      mid    <= {1'b0, p_lh} + {1'b0, p_hl};
      p_ll_d <= p_ll;
      p_hh_d <= p_hh;
      p      <= {p_hh_d, p_ll_d} + {15'd0, mid, 16'd0};
    end
  end

endmodule
