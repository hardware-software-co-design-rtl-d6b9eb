// controller_tb: runs the BRAM-side controller against a word-array model of
// port B (one-cycle read latency, read-first) and a model of the multiplier
// that answers load_data's fall with a ready pulse after a random delay and a
// random result.  For each transfer it checks that the start flag is cleared,
// that the four 64-bit operands reach the multiplier with A1/B1/MOD1/PRIME1
// as high halves, that the load phase lasts 10 cycles, that RESULT1/RESULT2
// receive the high/low result halves, that CTRL becomes 2 four cycles after
// ready, and that nothing else in the RAM is written.  It counts how often the
// controller idled polling CTRL and how often it stalled waiting for ready.
module controller_tb;
  import rsa_pkg::*;

  logic clk = 0, rst = 1;
  logic bram_rst, bram_en;
  logic [3:0] wen;
  logic [31:0] addr, din, dout;
  logic load_data, ready_mult = 0;
  logic [63:0] a_op, b_op, n_op, np_op, result = 0;
  int checks = 0, failures = 0;
  int idle_polls = 0, wait_stalls = 0;

  logic [31:0] mem [2048];
  logic [31:0] shadow [2048];

  controller dut (
    .clk, .rst,
    .BRAM_Rst_B(bram_rst), .BRAM_EN_B(bram_en), .BRAM_WEN_B(wen), .BRAM_Addr_B(addr),
    .BRAM_Din_B(din), .BRAM_Dout_B(dout),
    .load_data, .a_operand(a_op), .b_operand(b_op), .n_modulus(n_op), .n_prime(np_op),
    .ready_mult, .result);

  always #5 clk = ~clk;

  // port B model
  always @(posedge clk) begin
    if (bram_rst) din <= '0;
    else if (bram_en) din <= mem[addr[12:2]];
    if (bram_en && wen == 4'hF) mem[addr[12:2]] <= dout;
  end

  // multiplier model
  int delay = 0;
  logic load_q = 0;
  always @(posedge clk) begin
    load_q <= load_data;
    ready_mult <= 0;
    if (load_q && !load_data) delay <= $urandom_range(1, 30);
    else if (delay > 1) delay <= delay - 1;
    else if (delay == 1) begin delay <= 0; ready_mult <= 1; end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int widx(input logic [31:0] ofs);
    return int'(ofs[12:2]);
  endfunction

  task automatic put64(input logic [31:0] ofs1, input logic [31:0] ofs2, input logic [63:0] v);
    mem[widx(ofs1)] = v[63:32];
    mem[widx(ofs2)] = v[31:0];
  endtask

  initial begin
    logic [63:0] va, vb, vn, vp, vr;
    int load_cycles, after_ready;
    for (int i = 0; i < 2048; i++) mem[i] = $urandom;
    mem[widx(OFS_CTRL)] = CTRL_IDLE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 50; t++) begin
      // processor side: operands, then start
      va = {$urandom, $urandom}; vb = {$urandom, $urandom};
      vn = {$urandom, $urandom}; vp = {$urandom, $urandom}; vr = {$urandom, $urandom};
      repeat ($urandom_range(0, 5)) @(negedge clk);
      put64(OFS_A1, OFS_A2, va);
      put64(OFS_B1, OFS_B2, vb);
      put64(OFS_MOD1, OFS_MOD2, vn);
      put64(OFS_PRIME1, OFS_PRIME2, vp);
      for (int i = 0; i < 2048; i++) shadow[i] = mem[i];
      mem[widx(OFS_CTRL)] = CTRL_START;
      result = vr;
      // wait until the controller sees the flag in IDLE
      while (!(dut.state == S_IDLE && din[0])) begin
        @(negedge clk);
        if (dut.state == S_IDLE) idle_polls++;
      end
      load_cycles = 0;
      @(negedge clk);
      check(mem[widx(OFS_CTRL)] == CTRL_IDLE, "start flag not cleared");
      load_cycles = 1;
      while (!(load_q && !load_data) && load_cycles < 50) begin
        @(negedge clk);
        load_cycles++;
      end
      check(load_cycles == 10, $sformatf("load phase %0d cycles, expected 10", load_cycles));
      check(a_op == va && b_op == vb && n_op == vn && np_op == vp, "operands");
      while (!ready_mult) begin
        @(negedge clk);
        if (dut.state == S_WAIT_MULT && !ready_mult) wait_stalls++;
      end
      after_ready = 0;
      while (mem[widx(OFS_CTRL)] != CTRL_DONE && after_ready < 20) begin
        @(negedge clk);
        after_ready++;
      end
      check(after_ready == 4, $sformatf("CTRL=2 stored %0d cycles after ready, expected 4", after_ready));
      check(mem[widx(OFS_RESULT1)] == vr[63:32] && mem[widx(OFS_RESULT2)] == vr[31:0], "result");
      shadow[widx(OFS_RESULT1)] = vr[63:32];
      shadow[widx(OFS_RESULT2)] = vr[31:0];
      shadow[widx(OFS_CTRL)] = CTRL_DONE;
      begin
        int bad = 0;
        for (int i = 0; i < 2048; i++) if (mem[i] != shadow[i]) bad++;
        check(bad == 0, $sformatf("%0d stray words written", bad));
      end
      // DONE then back to IDLE, with CTRL = 2 not taken as a start
      repeat (4) @(negedge clk);
      check(dut.state == S_IDLE, "not back in IDLE");
      mem[widx(OFS_CTRL)] = CTRL_IDLE;       // processor acknowledges
    end
    check(idle_polls > 0, "never polled while idle");
    check(wait_stalls > 0, "never waited for the multiplier");
    $display("idle_polls=%0d wait_stalls=%0d", idle_polls, wait_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
