// controller: Mealy state machine that moves operands and results between the
// shared block RAM (port B) and the Montgomery multiplier.
//
// Protocol with the processor (all through the RAM mailbox, see rsa_pkg):
// the processor writes A, B, MOD and PRIME (n' = -MOD^-1 mod 2^64) as 32-bit
// halves, then writes CTRL = 1.  The controller reads CTRL every cycle while
// idle.  When bit 0 of CTRL is set it clears CTRL, reads the eight operand
// words in eight consecutive cycles, starts the multiplier, waits for its
// ready pulse, writes RESULT1 (bits 63:32) and RESULT2 (bits 31:0), and
// finally writes CTRL = 2, for which the processor polls.
//
// Timing: the RAM returns a word one cycle after its address, so each load
// state captures the word addressed in the previous state while presenting
// the next address.  IDLE-with-start plus START and the eight load states take
// 10 cycles; load_data is high from the first to the last load state and
// falls when WAIT_MULT is entered, which starts the multiplier (ready follows
// 21 cycles later).  Writing the result and the done flag takes WRITE_1,
// WRITE_2, SET_DONE and DONE, 4 cycles.  Outside a transfer the address bus
// rests on CTRL with writes disabled.
//
// The states, their order, the addresses, the CTRL values and the operand
// word order (A1 = high half) are the published controller's.  Port B's
// reset and enable are tied to the system reset and to 1, as published.  The
// published controller also holds an unused divide-by-4 clock, which is left
// out.  Reset of the state and of the operand registers is asynchronous and
// active high.
module controller
  import rsa_pkg::*;
#(
  parameter int unsigned C_PORT_DWIDTH = WORD_W,
  parameter int unsigned C_PORT_AWIDTH = 32,
  parameter int unsigned C_NUM_WE      = C_PORT_DWIDTH / 8
) (
  input  logic                     clk,
  input  logic                     rst,
  // BRAM port B
  output logic                     BRAM_Rst_B,
  output logic                     BRAM_EN_B,
  output logic [C_NUM_WE-1:0]      BRAM_WEN_B,
  output logic [C_PORT_AWIDTH-1:0] BRAM_Addr_B,
  input  logic [C_PORT_DWIDTH-1:0] BRAM_Din_B,
  output logic [C_PORT_DWIDTH-1:0] BRAM_Dout_B,
  // Montgomery multiplier
  output logic                     load_data,
  output logic [OPERAND_W-1:0]     a_operand,
  output logic [OPERAND_W-1:0]     b_operand,
  output logic [OPERAND_W-1:0]     n_modulus,
  output logic [OPERAND_W-1:0]     n_prime,
  input  logic                     ready_mult,
  input  logic [OPERAND_W-1:0]     result
);

  ctrl_state_t state, next_state;

  function automatic logic [C_PORT_AWIDTH-1:0] bram_addr(input logic [31:0] ofs);
    logic [31:0] full;
    full = BRAM_BASE | ofs;
    return full[C_PORT_AWIDTH-1:0];
  endfunction

  assign BRAM_Rst_B = rst;
  assign BRAM_EN_B  = 1'b1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= S_IDLE;
    else     state <= next_state;
  end

  // Next state and RAM port outputs (Mealy: IDLE and WAIT_MULT look at inputs).
  always_comb begin
    next_state  = S_IDLE;
    BRAM_WEN_B  = '0;
    BRAM_Addr_B = bram_addr(OFS_CTRL);
    BRAM_Dout_B = '0;
    unique case (state)
      S_IDLE: begin
        if (BRAM_Din_B[0]) begin
          BRAM_WEN_B = '1;          // clear the start flag
          next_state = S_START;
        end
      end
      S_START: begin
        BRAM_Addr_B = bram_addr(OFS_A1);
        next_state  = S_LOAD_A1;
      end
      S_LOAD_A1: begin
        BRAM_Addr_B = bram_addr(OFS_A2);
        next_state  = S_LOAD_A2;
      end
      S_LOAD_A2: begin
        BRAM_Addr_B = bram_addr(OFS_B1);
        next_state  = S_LOAD_B1;
      end
      S_LOAD_B1: begin
        BRAM_Addr_B = bram_addr(OFS_B2);
        next_state  = S_LOAD_B2;
      end
      S_LOAD_B2: begin
        BRAM_Addr_B = bram_addr(OFS_MOD1);
        next_state  = S_LOAD_MOD1;
      end
      S_LOAD_MOD1: begin
        BRAM_Addr_B = bram_addr(OFS_MOD2);
        next_state  = S_LOAD_MOD2;
      end
      S_LOAD_MOD2: begin
        BRAM_Addr_B = bram_addr(OFS_PRIME1);
        next_state  = S_LOAD_PRIME1;
      end
      S_LOAD_PRIME1: begin
        BRAM_Addr_B = bram_addr(OFS_PRIME2);
        next_state  = S_LOAD_PRIME2;
      end
      S_LOAD_PRIME2: begin
        next_state  = S_WAIT_MULT;
      end
      S_WAIT_MULT: begin
        next_state = ready_mult ? S_WRITE_1 : S_WAIT_MULT;
      end
      S_WRITE_1: begin
        BRAM_Addr_B = bram_addr(OFS_RESULT1);
        BRAM_WEN_B  = '1;
        BRAM_Dout_B = C_PORT_DWIDTH'(result[63:32]);
        next_state  = S_WRITE_2;
      end
      S_WRITE_2: begin
        BRAM_Addr_B = bram_addr(OFS_RESULT2);
        BRAM_WEN_B  = '1;
        BRAM_Dout_B = C_PORT_DWIDTH'(result[31:0]);
        next_state  = S_SET_DONE;
      end
      S_SET_DONE: begin
        BRAM_WEN_B  = '1;
        BRAM_Dout_B = C_PORT_DWIDTH'(CTRL_DONE);
        next_state  = S_DONE;
      end
      S_DONE: begin
        next_state = S_IDLE;
      end
      default: next_state = S_IDLE;
    endcase
  end

  // Operand registers: each load state captures the word read for it.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      load_data <= 1'b0;
      a_operand <= '0;
      b_operand <= '0;
      n_modulus <= '0;
      n_prime   <= '0;
    end else begin
      unique case (state)
        S_START:       load_data         <= 1'b1;
        S_LOAD_A1:     a_operand[63:32]  <= BRAM_Din_B[31:0];
        S_LOAD_A2:     a_operand[31:0]   <= BRAM_Din_B[31:0];
        S_LOAD_B1:     b_operand[63:32]  <= BRAM_Din_B[31:0];
        S_LOAD_B2:     b_operand[31:0]   <= BRAM_Din_B[31:0];
        S_LOAD_MOD1:   n_modulus[63:32]  <= BRAM_Din_B[31:0];
        S_LOAD_MOD2:   n_modulus[31:0]   <= BRAM_Din_B[31:0];
        S_LOAD_PRIME1: n_prime[63:32]    <= BRAM_Din_B[31:0];
        S_LOAD_PRIME2: begin
          n_prime[31:0] <= BRAM_Din_B[31:0];
          load_data     <= 1'b0;
        end
        default: ;
      endcase
    end
  end

  // A write is only ever a full word.
  assert property (@(posedge clk) disable iff (rst) (BRAM_WEN_B == '0) || (BRAM_WEN_B == '1));
  // The multiplier is started only in the load sequence.
  assert property (@(posedge clk) disable iff (rst)
                   load_data |-> (state inside {S_LOAD_A1, S_LOAD_A2, S_LOAD_B1, S_LOAD_B2,
                                                S_LOAD_MOD1, S_LOAD_MOD2, S_LOAD_PRIME1,
                                                S_LOAD_PRIME2}));

endmodule
