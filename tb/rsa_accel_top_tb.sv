// rsa_accel_top_tb: end-to-end test of the accelerator through its processor
// port.  A processor model (tasks below, standing in for the embedded CPU and
// its on-chip-memory bus) writes operands into the block RAM mailbox, raises
// CTRL = 1, polls CTRL until it reads 2, acknowledges with CTRL = 0 and reads
// the 64-bit result back, exactly as the driver software does.
//
// Runs: the two published 64-bit test vector sets; random Montgomery products
// checked against a bit-serial reference; the published demonstration
// exponentiation (base 0xD431, exponent 0x25318523, modulus 0x8000013B,
// n' = 0x0D979124_8D00D00D, R^2 mod m = 0x2D7EBD3D) by Montgomery
// square-and-multiply; and full 64-bit exponentiations with random moduli and
// exponents of 64 bits with 32 ones (96 multiplications each).  The
// exponentiation results are compared with plain modular exponentiation.
//
// Timing: every multiplication must take 36 clock edges from the processor's
// CTRL = 1 write to the controller's CTRL = 2 write.  Mechanisms counted, each
// must occur: controller idle polling, processor busy-polling while the core
// multiplies, the multiplier's final subtraction, squares and multiplies of
// the exponentiation.
module rsa_accel_top_tb;
  import rsa_pkg::*;
  import rsa_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic bram_rst_a = 0, bram_en_a = 0;
  logic [3:0] bram_wen_a = 0;
  logic [12:0] bram_addr_a = 0;
  logic [31:0] bram_wdata_a = 0, bram_rdata_a;

  int checks = 0, failures = 0;
  int n_mults = 0, idle_polls = 0, busy_polls = 0, subtractions = 0;
  int n_squares = 0, n_multiplies = 0;
  longint cycle = 0, t_start = 0;

  rsa_accel_top dut (.clk, .rst, .bram_rst_a, .bram_en_a, .bram_wen_a, .bram_addr_a,
                     .bram_wdata_a, .bram_rdata_a);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Cycle counter and observation of both RAM ports.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (bram_en_a && bram_wen_a == 4'hF && bram_addr_a == OFS_CTRL[12:0] &&
          bram_wdata_a == CTRL_START)
        t_start <= cycle;
      if (dut.wen_b == 4'hF && dut.addr_b[12:0] == OFS_CTRL[12:0] && dut.wdata_b == CTRL_DONE) begin
        n_mults++;
        check(cycle - t_start == 36,
              $sformatf("multiplication took %0d cycles, expected 36", cycle - t_start));
      end
      if (dut.u_ctrl.state == S_IDLE && !dut.rdata_b[0]) idle_polls++;
      if (dut.u_mult.cnt == 5'(MULT_STEPS) && dut.u_ctrl.state == S_WAIT_MULT &&
          dut.u_mult.u_sum >= {1'b0, dut.n_modulus})
        subtractions++;
    end
  end

  // ---- processor model: single-word accesses on port A ----
  task automatic cpu_write(input logic [31:0] ofs, input logic [31:0] data);
    @(negedge clk);
    bram_en_a = 1; bram_wen_a = 4'hF; bram_addr_a = ofs[12:0]; bram_wdata_a = data;
    @(negedge clk);
    bram_en_a = 0; bram_wen_a = 0;
  endtask

  task automatic cpu_read(input logic [31:0] ofs, output logic [31:0] data);
    @(negedge clk);
    bram_en_a = 1; bram_wen_a = 0; bram_addr_a = ofs[12:0];
    @(negedge clk);
    data = bram_rdata_a;
    bram_en_a = 0;
  endtask

  // One Montgomery product through the mailbox (the driver's mul()).
  task automatic cpu_mul(input u64 a, input u64 b, input u64 n, input u64 np, output u64 r);
    logic [31:0] w, hi, lo;
    int polls;
    cpu_write(OFS_A1, a[63:32]);     cpu_write(OFS_A2, a[31:0]);
    cpu_write(OFS_B1, b[63:32]);     cpu_write(OFS_B2, b[31:0]);
    cpu_write(OFS_MOD1, n[63:32]);   cpu_write(OFS_MOD2, n[31:0]);
    cpu_write(OFS_PRIME1, np[63:32]); cpu_write(OFS_PRIME2, np[31:0]);
    cpu_write(OFS_CTRL, CTRL_START);
    polls = 0;
    do begin
      cpu_read(OFS_CTRL, w);
      polls++;
    end while (w != CTRL_DONE && polls < 1000);
    busy_polls += polls - 1;
    cpu_write(OFS_CTRL, CTRL_IDLE);
    cpu_read(OFS_RESULT1, hi);
    cpu_read(OFS_RESULT2, lo);
    r = {hi, lo};
  endtask

  // Montgomery exponentiation x^e mod n, Montgomery-domain square-and-multiply.
  task automatic cpu_modexp(input u64 x, input u64 e, input u64 n, input u64 np,
                            input u64 r2, input u64 r1, output u64 res);
    u64 xt, acc;
    int top;
    cpu_mul(x, r2, n, np, xt);                 // x into the Montgomery domain
    acc = r1;                                  // R mod n
    top = 63;
    while (top > 0 && !e[top]) top--;
    for (int i = top; i >= 0; i--) begin
      cpu_mul(acc, acc, n, np, acc);
      n_squares++;
      if (e[i]) begin
        cpu_mul(acc, xt, n, np, acc);
        n_multiplies++;
      end
    end
    cpu_mul(acc, 64'd1, n, np, res);           // back to the integer domain
  endtask

  initial begin
    u64 r, n, np, a, b, e, x;
    int m0;
    // Clear the mailbox while the core is held in reset.
    for (int i = 0; i < 2; i++) @(negedge clk);
    for (int o = 0; o <= 'h120; o += 'h20) cpu_write(o, 32'h0);
    cpu_write(OFS_CTRL, CTRL_IDLE);
    @(negedge clk) rst = 0;
    repeat (5) @(negedge clk);

    // Published test vectors.
    cpu_mul(64'h7E8C0146A7158418, 64'h1D7F356E6E2F27F6, 64'h32ED94BEAFAD89AD,
            64'h9C84B039A1513DDB, r);
    check(r == 64'h23CFFA7944CC169D, $sformatf("vector set 1: %h", r));
    cpu_mul(64'h76bb25365f319426, 64'h571f169d04a5735b, 64'h88b53d612dd5b053,
            64'h7ee08ae63a0bec25, r);
    check(r == 64'h565b25c421c077cd, $sformatf("vector set 2: %h", r));

    // Random products.
    for (int i = 0; i < 40; i++) begin
      n = rand_modulus(); a = rand_below(n); b = rand_below(n);
      cpu_mul(a, b, n, neg_inv64(n), r);
      check(r == mont_ref(a, b, n), $sformatf("random product %0d", i));
    end

    // The demonstration exponentiation with its published constants.
    n = 64'h8000013B;
    check(neg_inv64(n) == 64'h0D979124_8D00D00D, "published n' for 0x8000013B");
    check(pow2mod(128, n) == 64'h2D7EBD3D, "published R^2 mod m for 0x8000013B");
    cpu_modexp(64'hD431, 64'h25318523, n, 64'h0D979124_8D00D00D, 64'h2D7EBD3D,
               pow2mod(64, n), r);
    check(r == modexp(64'hD431, 64'h25318523, n), $sformatf("demo exponentiation: %h", r));
    $display("0xD431^0x25318523 mod 0x8000013B = %h", r);

    // 64-bit exponentiations, exponent with 32 ones among 64 bits.
    for (int k = 0; k < 3; k++) begin
      n = rand_modulus();
      x = rand_below(n);
      e = 64'd0;
      e[63] = 1'b1;
      while ($countones(e) < 32) e[$urandom_range(0, 62)] = 1'b1;
      m0 = n_mults;
      cpu_modexp(x, e, n, neg_inv64(n), pow2mod(128, n), pow2mod(64, n), r);
      check(r == modexp(x, e, n), $sformatf("64-bit exponentiation %0d", k));
      $display("64-bit exponentiation %0d: %0d multiplications", k, n_mults - m0);
      check(n_mults - m0 == 98, "96 square/multiply steps plus two domain mappings");
    end

    $display("mults=%0d idle_polls=%0d busy_polls=%0d subtractions=%0d squares=%0d multiplies=%0d",
             n_mults, idle_polls, busy_polls, subtractions, n_squares, n_multiplies);
    check(idle_polls > 0, "controller never idled");
    check(busy_polls > 0, "processor never waited");
    check(subtractions > 0, "final subtraction never happened");
    check(n_squares > 0 && n_multiplies > 0, "exponentiation steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
