// main_mult_tb: Montgomery products of the 64-bit multiplier against a
// bit-serial reference, for the two published test vector sets, for corner
// operands and for random moduli and operands.  For every run it checks that
// ready pulses exactly 21 cycles after load_data falls, that the pulse lasts
// one cycle, that the result repeats on the next 20-cycle round, and it
// counts how often the final conditional subtraction was needed.
module main_mult_tb;
  import rsa_ref_pkg::*;

  logic clk = 0, rst = 1, load_data = 1;
  u64 a, b, n, np, mod_ab;
  logic ready;
  int checks = 0, failures = 0;
  int reductions = 0;

  main_mult dut (.clk, .rst, .load_data, .a_operand(a), .b_operand(b),
                 .n_modulus(n), .n_prime(np), .ready, .mod_ab);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (a=%h b=%h n=%h)", what, a, b, n);
    end
  endtask

  // One multiplication; exp is the expected product.
  task automatic run(input u64 ta, input u64 tb_, input u64 tn, input u64 tnp, input u64 exp);
    int cycles;
    logic [127:0] t;
    logic [128:0] s;
    @(negedge clk);
    a = ta; b = tb_; n = tn; np = tnp; load_data = 1;
    repeat (2) @(negedge clk);
    load_data = 0;                         // falls here: counter starts
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!ready && cycles < 100);
    check(cycles == 21, $sformatf("ready after %0d cycles, expected 21", cycles));
    check(mod_ab == exp, $sformatf("mod_ab %h expected %h", mod_ab, exp));
    // Was the final subtraction needed?  (T + u*n)/R >= n
    t = {64'd0, ta} * {64'd0, tb_};
    s = {1'b0, t} + {1'b0, ({64'd0, 64'(t[63:0] * tnp)} * {64'd0, tn})};
    if (s[128:64] >= {1'b0, tn}) reductions++;
    @(negedge clk);
    check(!ready, "ready longer than one cycle");
    // Free-running counter: the next round delivers the same value after 20 cycles.
    repeat (18) begin
      @(negedge clk);
      check(!ready, "early second ready");
    end
    @(negedge clk);
    check(ready && mod_ab == exp, "second round");
  endtask

  initial begin
    u64 rn, ra, rb;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // Published test vector sets.
    run(64'h7E8C0146A7158418, 64'h1D7F356E6E2F27F6, 64'h32ED94BEAFAD89AD,
        64'h9C84B039A1513DDB, 64'h23CFFA7944CC169D);
    run(64'h76bb25365f319426, 64'h571f169d04a5735b, 64'h88b53d612dd5b053,
        64'h7ee08ae63a0bec25, 64'h565b25c421c077cd);
    // The reference agrees with the published vectors.
    check(mont_ref(64'h7E8C0146A7158418, 64'h1D7F356E6E2F27F6, 64'h32ED94BEAFAD89AD)
          == 64'h23CFFA7944CC169D, "reference vs vector set 1");
    check(neg_inv64(64'h88b53d612dd5b053) == 64'h7ee08ae63a0bec25, "n' vs vector set 2");
    // Corner cases.
    rn = 64'hFFFF_FFFF_FFFF_FFC5;
    run(rn - 1, rn - 1, rn, neg_inv64(rn), mont_ref(rn - 1, rn - 1, rn));
    run(64'd0, rn - 1, rn, neg_inv64(rn), 64'd0);
    run(64'd1, 64'd1, 64'd3, neg_inv64(64'd3), mont_ref(1, 1, 3));
    // Random.
    for (int i = 0; i < 200; i++) begin
      rn = (i % 2 == 0) ? rand_modulus() : ({$urandom, $urandom} | 64'd1);
      if (rn == 64'd1) rn = 64'd3;
      ra = rand_below(rn);
      rb = rand_below(rn);
      run(ra, rb, rn, neg_inv64(rn), mont_ref(ra, rb, rn));
    end
    check(reductions > 0, "final subtraction never exercised");
    $display("final subtractions: %0d", reductions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
