// bram_block_tb: drives both ports of the 8 KB block RAM with random reads and
// byte-masked writes, concentrated on a few words so that same-address
// accesses from both ports occur, and compares every read with a word-array
// model kept in the testbench (one-cycle latency, read-first, port B wins a
// write collision).  Also checks the zero start and the read-register reset,
// and counts collisions and partial-byte writes.
module bram_block_tb;
  logic clk = 0;
  logic rst_a = 0, rst_b = 0, en_a = 0, en_b = 0;
  logic [3:0] wen_a = 0, wen_b = 0;
  logic [12:0] addr_a = 0, addr_b = 0;
  logic [31:0] wd_a = 0, wd_b = 0, rd_a, rd_b;
  int checks = 0, failures = 0;
  int collisions = 0, partial_writes = 0;

  logic [31:0] model [2048];
  logic [31:0] exp_a, exp_b;
  logic        chk_a, chk_b;

  bram_block dut (
    .clk,
    .BRAM_Rst_A(rst_a), .BRAM_EN_A(en_a), .BRAM_WEN_A(wen_a), .BRAM_Addr_A(addr_a),
    .BRAM_Dout_A(wd_a), .BRAM_Din_A(rd_a),
    .BRAM_Rst_B(rst_b), .BRAM_EN_B(en_b), .BRAM_WEN_B(wen_b), .BRAM_Addr_B(addr_b),
    .BRAM_Dout_B(wd_b), .BRAM_Din_B(rd_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] we);
    logic [31:0] r;
    r = old;
    for (int i = 0; i < 4; i++) if (we[i]) r[8*i +: 8] = d[8*i +: 8];
    return r;
  endfunction

  function automatic logic [12:0] pick_addr();
    logic [12:0] r;
    // mostly a handful of mailbox words, sometimes anywhere
    if ($urandom_range(0, 3) != 0) r = 13'($urandom_range(0, 7) * 32);
    else                           r = 13'($urandom);
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 2048; i++) model[i] = '0;
    chk_a = 0; chk_b = 0;
    @(negedge clk);
    // zero start: read a few words from both ports
    en_a = 1; en_b = 1; addr_a = 13'h3E0; addr_b = 13'h1FFC;
    @(negedge clk);
    checks += 2;
    if (rd_a !== 0 || rd_b !== 0) begin failures++; $display("memory not zero at start"); end
    for (int i = 0; i < 5000; i++) begin
      // stimulus for this cycle
      en_a   = ($urandom_range(0, 7) != 0);
      en_b   = ($urandom_range(0, 7) != 0);
      addr_a = pick_addr();
      addr_b = ($urandom_range(0, 3) == 0) ? addr_a : pick_addr();
      wen_a  = ($urandom_range(0, 1) != 0) ? 4'($urandom) : 4'h0;
      wen_b  = ($urandom_range(0, 1) != 0) ? 4'($urandom) : 4'h0;
      wd_a   = $urandom;
      wd_b   = $urandom;
      rst_a  = ($urandom_range(0, 50) == 0);
      rst_b  = ($urandom_range(0, 50) == 0);
      // expected read data, taken before this edge's writes
      chk_a = rst_a || en_a;
      chk_b = rst_b || en_b;
      exp_a = rst_a ? 32'h0 : model[addr_a[12:2]];
      exp_b = rst_b ? 32'h0 : model[addr_b[12:2]];
      if (en_a && en_b && wen_a != 0 && wen_b != 0 && addr_a[12:2] == addr_b[12:2]) collisions++;
      if ((en_a && wen_a != 0 && wen_a != 4'hF) || (en_b && wen_b != 0 && wen_b != 4'hF))
        partial_writes++;
      if (en_a) model[addr_a[12:2]] = merge(model[addr_a[12:2]], wd_a, wen_a);
      if (en_b) model[addr_b[12:2]] = merge(model[addr_b[12:2]], wd_b, wen_b);
      @(negedge clk);
      if (chk_a) begin
        checks++;
        if (rd_a !== exp_a) begin failures++; $display("A: got %h exp %h", rd_a, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (rd_b !== exp_b) begin failures++; $display("B: got %h exp %h", rd_b, exp_b); end
      end
    end
    // read back the whole mailbox region through both ports
    rst_a = 0; rst_b = 0; wen_a = 0; wen_b = 0; en_a = 1; en_b = 1;
    for (int w = 0; w < 2048; w += 8) begin
      addr_a = 13'(w * 4);
      addr_b = 13'(w * 4 + 4);
      @(negedge clk);
      checks += 2;
      if (rd_a !== model[w] || rd_b !== model[w + 1]) begin
        failures++;
        $display("readback %0d: %h/%h exp %h/%h", w, rd_a, rd_b, model[w], model[w + 1]);
      end
    end
    checks += 2;
    if (collisions == 0) begin failures++; $display("no write collision happened"); end
    if (partial_writes == 0) begin failures++; $display("no partial write happened"); end
    $display("collisions=%0d partial_writes=%0d", collisions, partial_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
