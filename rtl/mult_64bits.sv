// mult_64bits: pipelined 64x64 -> 128-bit unsigned multiplier built from four
// 32x32 multipliers.
//
// The same scheme as mult_32bits one level up: the operands are split into
// 32-bit halves, four mult_32bits instances form the partial products (3
// cycles), one register stage adds the two cross products into a 65-bit
// middle term, and a final stage combines hi*hi, lo*lo and the middle term
// shifted left by 32 bits.  Latency is 5 clock edges; a new operand pair may
// be applied every cycle.  The Montgomery multiplier holds each operand pair
// for six cycles and samples the product in the sixth.
//
// The two-level cascade 16 -> 32 -> 64 bits follows the published design; as
// in mult_32bits, hi*hi and lo*lo are delayed by one register (this design's
// choice) so that the result does not depend on the inputs being held.
// Reset is asynchronous and active high.
module mult_64bits (
  input  logic         clk,
  input  logic         rst,
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  output logic [127:0] p
);

  logic [63:0] p_ll, p_lh, p_hl, p_hh;
  logic [64:0] mid;
  logic [63:0] p_ll_d, p_hh_d;

  mult_32bits u_ll (.clk, .rst, .a(a[31:0]),  .b(b[31:0]),  .p(p_ll));
  mult_32bits u_lh (.clk, .rst, .a(a[31:0]),  .b(b[63:32]), .p(p_lh));
  mult_32bits u_hl (.clk, .rst, .a(a[63:32]), .b(b[31:0]),  .p(p_hl));
  mult_32bits u_hh (.clk, .rst, .a(a[63:32]), .b(b[63:32]), .p(p_hh));

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
      p      <= {p_hh_d, p_ll_d} + {31'd0, mid, 32'd0};
    end
  end

endmodule
