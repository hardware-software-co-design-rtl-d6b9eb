// main_mult_counter: step counter that sequences the Montgomery multiplier.
//
// While load_data is high the count is held at 0.  Once load_data is low the
// counter advances by one every clock: 1, 2, ... MULT_STEPS (20), then wraps
// to 1 and goes on.  main_mult decodes the count to load its shared 64-bit
// multiplier, to add the partial results and to reduce the sum.  Because the
// count wraps, the multiplier repeats the same computation every 20 cycles as
// long as load_data stays low; the result does not change while the operands
// stay the same.  Counting range, hold-on-load and wrap value are the
// published design's.  Reset is asynchronous and active high.
module main_mult_counter
  import rsa_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load_data,
  output logic [4:0] cnt
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                          cnt <= '0;
    else if (load_data)               cnt <= '0;
    else if (cnt == 5'(MULT_STEPS))   cnt <= 5'd1;
    else                              cnt <= cnt + 5'd1;
  end

endmodule
