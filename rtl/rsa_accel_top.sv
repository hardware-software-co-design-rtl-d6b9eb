// rsa_accel_top: FPGA-side part of the RSA accelerator -- the shared block RAM,
// the controller and the 64-bit Montgomery multiplier.
//
// The processor reaches the block RAM through port A (in the published system
// through its data-side on-chip-memory bus and the vendor's DSOCM-to-BRAM
// interface, which are not part of this RTL; their signals are this module's
// bram_*_a ports).  Port B belongs to the controller, which waits for CTRL = 1
// in the RAM, fetches A, B, MOD and PRIME, runs main_mult and writes RESULT
// and CTRL = 2 back.  One multiplication takes 36 cycles from the cycle in
// which the controller first reads CTRL = 1 to the cycle in which CTRL = 2 is
// readable on port A's next read (10 load + 22 multiply and hand-over + 4
// write).  Everything runs on one clock; reset is active high.
//
// Port A byte address is 13 bits (8 KB); the processor's 0x3100_0000 base is
// decoded outside.  The controller's 32-bit address is cut to the RAM's 13
// address bits.
module rsa_accel_top
  import rsa_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // block RAM port A, processor side
  input  logic        bram_rst_a,
  input  logic        bram_en_a,
  input  logic [3:0]  bram_wen_a,
  input  logic [12:0] bram_addr_a,
  input  logic [31:0] bram_wdata_a,
  output logic [31:0] bram_rdata_a
);

  logic                 rst_b, en_b;
  logic [3:0]           wen_b;
  logic [31:0]          addr_b;
  logic [31:0]          rdata_b, wdata_b;

  logic                 load_data, ready_mult;
  logic [OPERAND_W-1:0] a_operand, b_operand, n_modulus, n_prime, mod_ab;

  bram_block u_bram (
    .clk,
    .BRAM_Rst_A (bram_rst_a),
    .BRAM_EN_A  (bram_en_a),
    .BRAM_WEN_A (bram_wen_a),
    .BRAM_Addr_A(bram_addr_a),
    .BRAM_Dout_A(bram_wdata_a),
    .BRAM_Din_A (bram_rdata_a),
    .BRAM_Rst_B (rst_b),
    .BRAM_EN_B  (en_b),
    .BRAM_WEN_B (wen_b),
    .BRAM_Addr_B(addr_b[12:0]),
    .BRAM_Dout_B(wdata_b),
    .BRAM_Din_B (rdata_b)
  );

  controller u_ctrl (
    .clk,
    .rst,
    .BRAM_Rst_B (rst_b),
    .BRAM_EN_B  (en_b),
    .BRAM_WEN_B (wen_b),
    .BRAM_Addr_B(addr_b),
    .BRAM_Din_B (rdata_b),
    .BRAM_Dout_B(wdata_b),
    .load_data,
    .a_operand,
    .b_operand,
    .n_modulus,
    .n_prime,
    .ready_mult,
    .result     (mod_ab)
  );

  main_mult u_mult (
    .clk,
    .rst,
    .load_data,
    .a_operand,
    .b_operand,
    .n_modulus,
    .n_prime,
    .ready (ready_mult),
    .mod_ab
  );

endmodule
