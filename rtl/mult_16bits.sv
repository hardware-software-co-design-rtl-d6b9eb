// mult_16bits: registered 16x16 -> 32-bit unsigned multiplier.
//
// The leaf of the multiplier tree.  The product of the inputs present at a
// rising clock edge appears on p after that edge (latency 1, one new product
// per cycle).  On an FPGA with 18x18 hard multipliers this maps onto one
// multiplier block.  Asynchronous, active-high reset clears the product
// register, as in the published design.
module mult_16bits (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) p <= '0;
    else     p <= a * b;
  end

endmodule
