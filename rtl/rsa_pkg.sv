// rsa_pkg: constants and types shared by the RSA Montgomery-multiplier core.
//
// The core exchanges its operands with the processor through a dual-ported
// block RAM.  Both sides agree on a fixed mailbox layout inside the 8 KB RAM:
// every 64-bit value is stored as two 32-bit words 0x20 bytes apart, the word
// at the lower address holding bits 63:32.  A control word at offset 0x3E0
// carries the hand-over between processor and hardware.  The byte offsets,
// the 0x3100_0000 base address seen by the processor, the CTRL encoding and
// the 20-step multiplier schedule are the published design's; the names of
// the types are this implementation's own.
package rsa_pkg;

  // Operand width of the Montgomery multiplier and width of a RAM word.
  localparam int unsigned OPERAND_W = 64;
  localparam int unsigned WORD_W    = 32;

  // Address of the RAM as seen on the processor's data-side OCM bus.  The
  // controller drives full 32-bit addresses; the RAM decodes the low 13 bits.
  localparam logic [31:0] BRAM_BASE = 32'h3100_0000;

  // Mailbox byte offsets ("1" = bits 63:32, "2" = bits 31:0).
  localparam logic [31:0] OFS_A1      = 32'h000;
  localparam logic [31:0] OFS_A2      = 32'h020;
  localparam logic [31:0] OFS_B1      = 32'h040;
  localparam logic [31:0] OFS_B2      = 32'h060;
  localparam logic [31:0] OFS_MOD1    = 32'h080;
  localparam logic [31:0] OFS_MOD2    = 32'h0A0;
  localparam logic [31:0] OFS_PRIME1  = 32'h0C0;
  localparam logic [31:0] OFS_PRIME2  = 32'h0E0;
  localparam logic [31:0] OFS_RESULT1 = 32'h100;
  localparam logic [31:0] OFS_RESULT2 = 32'h120;
  localparam logic [31:0] OFS_CTRL    = 32'h3E0;

  // Values of the CTRL word.
  localparam logic [31:0] CTRL_IDLE  = 32'h0000_0000;  // processor active, core idle
  localparam logic [31:0] CTRL_START = 32'h0000_0001;  // processor waits, core multiplying
  localparam logic [31:0] CTRL_DONE  = 32'h0000_0002;  // result available

  // Multiplier schedule: the step counter runs 1..MULT_STEPS; each of the
  // three products owns MULT_TIME steps.
  localparam int unsigned MULT_STEPS = 20;
  localparam int unsigned MULT_TIME  = 6;

  // States of the BRAM-side controller.
  typedef enum logic [3:0] {
    S_IDLE,
    S_START,
    S_LOAD_A1,
    S_LOAD_A2,
    S_LOAD_B1,
    S_LOAD_B2,
    S_LOAD_MOD1,
    S_LOAD_MOD2,
    S_LOAD_PRIME1,
    S_LOAD_PRIME2,
    S_WAIT_MULT,
    S_WRITE_1,
    S_WRITE_2,
    S_SET_DONE,
    S_DONE
  } ctrl_state_t;

endpackage
