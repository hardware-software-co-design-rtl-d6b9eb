// main_mult: 64-bit Montgomery multiplier, mod_ab = a * b * 2^-64 mod n.
//
// Montgomery multiplication with R = 2^64 replaces the division by n with a
// division by R.  Given n odd, a, b < n and n_prime = -n^-1 mod 2^64:
//   T = a * b                      (128 bits)
//   u = (T mod 2^64) * n_prime     (only the low 64 bits are used)
//   U = (T + (u mod 2^64) * n) / 2^64
//   mod_ab = U - n if U >= n, else U
// The sum T + u*n is a multiple of 2^64 by construction of u, so its upper
// 65 bits are exactly U, and U < 2n, so one conditional subtraction suffices.
//
// All three products share one pipelined mult_64bits (latency 5).  The step
// counter (main_mult_counter) starts when load_data falls and schedules:
//   step  1     load a, b into the multiplier
//   step  7     keep T; load T[63:0], n_prime
//   step 13     load u[63:0], n
//   step 19     U = upper 65 bits of T + u*n
//   step 20     mod_ab = U or U - n;  ready pulses high in the next cycle
// ready is a one-cycle pulse 21 clock edges after load_data goes low (the
// counter needs one edge to reach step 1).  The counter then wraps and the
// same computation repeats every 20 cycles while load_data stays low; the
// inputs must be held stable for that time (an assertion checks this, and
// that ready is a single-cycle pulse).  mod_ab holds its value between
// pulses.
//
// Schedule, widths and port names follow the published design.  The text
// describing step II names "the 32 least significant bits" of the first
// product, but Montgomery reduction with R = 2^64 needs all 64 low bits,
// which is what is built here.  Reset is asynchronous and active high.
module main_mult
  import rsa_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load_data,
  input  logic [OPERAND_W-1:0] a_operand,
  input  logic [OPERAND_W-1:0] b_operand,
  input  logic [OPERAND_W-1:0] n_modulus,
  input  logic [OPERAND_W-1:0] n_prime,
  output logic                 ready,
  output logic [OPERAND_W-1:0] mod_ab
);

  localparam int unsigned W = OPERAND_W;

  // Step numbers at which the schedule acts.
  localparam logic [4:0] STEP_LOAD_AB = 5'd1;
  localparam logic [4:0] STEP_LOAD_NP = 5'(1 + MULT_TIME);
  localparam logic [4:0] STEP_LOAD_N  = 5'(1 + 2 * MULT_TIME);
  localparam logic [4:0] STEP_SUM     = 5'(1 + 3 * MULT_TIME);
  localparam logic [4:0] STEP_REDUCE  = 5'(MULT_STEPS);

  logic [4:0]     cnt;
  logic [W-1:0]   mult_a, mult_b;
  logic [2*W-1:0] mult_p;
  logic [2*W-1:0] t_prod;   // a * b, kept for the final sum
  logic [W:0]     u_sum;    // (T + u*n) / 2^64
  logic [2*W:0]   sum_full;

  main_mult_counter u_counter (.clk, .rst, .load_data, .cnt);

  mult_64bits u_mult (.clk, .rst, .a(mult_a), .b(mult_b), .p(mult_p));

  assign sum_full = {1'b0, t_prod} + {1'b0, mult_p};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mult_a <= '0;
      mult_b <= '0;
      t_prod <= '0;
      u_sum  <= '0;
      mod_ab <= '0;
      ready  <= 1'b0;
    end else begin
      ready <= (cnt == STEP_REDUCE);
      unique case (cnt)
        STEP_LOAD_AB: begin
          mult_a <= a_operand;
          mult_b <= b_operand;
        end
        STEP_LOAD_NP: begin
          t_prod <= mult_p;
          mult_a <= mult_p[W-1:0];
          mult_b <= n_prime;
        end
        STEP_LOAD_N: begin
          mult_a <= mult_p[W-1:0];
          mult_b <= n_modulus;
        end
        STEP_SUM: begin
          u_sum <= sum_full[2*W:W];
        end
        STEP_REDUCE: begin
          if (u_sum >= {1'b0, n_modulus}) mod_ab <= W'(u_sum - {1'b0, n_modulus});
          else                            mod_ab <= u_sum[W-1:0];
        end
        default: ;
      endcase
    end
  end

  // ready is a single-cycle pulse.
  assert property (@(posedge clk) disable iff (rst) ready |=> !ready);
  // Operands may change only while the counter is held by load_data.
  assert property (@(posedge clk) disable iff (rst)
                   (!load_data && $past(!load_data))
                   |-> $stable({a_operand, b_operand, n_modulus, n_prime}));

endmodule
