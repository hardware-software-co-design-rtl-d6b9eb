// bram_block: dual-ported block RAM that serves as the mailbox between the
// processor (port A) and the accelerator's controller (port B).
//
// MEM_BYTES bytes (8 KB by default) organised as 32-bit words.  Each port has
// an enable, four byte write enables, a byte address and separate write and
// read data buses.  Signal names follow the FPGA vendor's block-RAM wrapper,
// in which "Dout" is the data going INTO the RAM (output of the controller)
// and "Din" the data coming OUT of it.  Words are addressed by address bits
// [AWIDTH-1:2]; the two lowest address bits are ignored.
//
// Timing: synchronous on one clock for both ports (the system runs port A
// and port B from the same 100 MHz clock).  An address presented in cycle n
// returns its word on Din in cycle n+1; a write presented in cycle n is
// stored at the edge ending cycle n.  Reads return the contents before a write
// at the same edge (read-first).  When both ports write the same byte at the
// same edge, port B's data is kept.  Reset clears a port's read-data
// register, not the memory.  Contents start as zero, as an FPGA block RAM
// does after configuration.
//
// Byte-lane order: wen[i] enables bits [8i+7:8i].  The vendor wrapper numbers
// its buses big-endian ([0:31], bit 0 = MSB, WEN(0) = most significant
// byte); the SystemVerilog vectors here are little-endian and carry the same
// values.  The read-first and collision rules and the zero start are this
// design's choices; the RAM's size, ports and one-cycle read latency are the
// published system's.
module bram_block #(
  parameter int unsigned MEM_BYTES = 8192,
  parameter int unsigned AWIDTH    = 13,
  parameter int unsigned DWIDTH    = 32,
  parameter int unsigned NUM_WE    = DWIDTH / 8
) (
  input  logic              clk,
  // port A
  input  logic              BRAM_Rst_A,
  input  logic              BRAM_EN_A,
  input  logic [NUM_WE-1:0] BRAM_WEN_A,
  input  logic [AWIDTH-1:0] BRAM_Addr_A,
  input  logic [DWIDTH-1:0] BRAM_Dout_A,
  output logic [DWIDTH-1:0] BRAM_Din_A,
  // port B
  input  logic              BRAM_Rst_B,
  input  logic              BRAM_EN_B,
  input  logic [NUM_WE-1:0] BRAM_WEN_B,
  input  logic [AWIDTH-1:0] BRAM_Addr_B,
  input  logic [DWIDTH-1:0] BRAM_Dout_B,
  output logic [DWIDTH-1:0] BRAM_Din_B
);

  localparam int unsigned WORDS  = MEM_BYTES / (DWIDTH / 8);
  localparam int unsigned WAW    = $clog2(WORDS);
  localparam int unsigned LSB    = $clog2(DWIDTH / 8);

  initial begin
    assert (NUM_WE * 8 == DWIDTH) else $error("bram_block: NUM_WE must be DWIDTH/8");
    assert (AWIDTH >= WAW + LSB) else $error("bram_block: AWIDTH too small for MEM_BYTES");
  end

  logic [DWIDTH-1:0] mem [WORDS];

  logic [WAW-1:0] widx_a, widx_b;
  assign widx_a = BRAM_Addr_A[LSB +: WAW];
  assign widx_b = BRAM_Addr_B[LSB +: WAW];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (BRAM_EN_A) begin
      for (int i = 0; i < int'(NUM_WE); i++)
        if (BRAM_WEN_A[i]) mem[widx_a][8*i +: 8] <= BRAM_Dout_A[8*i +: 8];
    end
    if (BRAM_EN_B) begin
      for (int i = 0; i < int'(NUM_WE); i++)
        if (BRAM_WEN_B[i]) mem[widx_b][8*i +: 8] <= BRAM_Dout_B[8*i +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (BRAM_Rst_A)     BRAM_Din_A <= '0;
    else if (BRAM_EN_A) BRAM_Din_A <= mem[widx_a];
  end

  always_ff @(posedge clk) begin
    if (BRAM_Rst_B)     BRAM_Din_B <= '0;
    else if (BRAM_EN_B) BRAM_Din_B <= mem[widx_b];
  end

endmodule
