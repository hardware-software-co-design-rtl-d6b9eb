// main_mult_counter_tb: checks that the step counter is held at 0 while
// load_data is high, counts 1..20 after load_data falls, wraps to 1 and
// restarts from 1 after a new load pulse (compared against a counter kept in
// the testbench).
module main_mult_counter_tb;
  logic clk = 0, rst = 1, load_data = 0;
  logic [4:0] cnt;
  int checks = 0, failures = 0;
  int expected;
  int wraps = 0;

  main_mult_counter dut (.clk, .rst, .load_data, .cnt);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int e);
    checks++;
    if (int'(cnt) != e) begin
      failures++;
      $display("cnt=%0d expected %0d", cnt, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    load_data = 1;
    for (int run = 0; run < 4; run++) begin
      load_data = 1;
      repeat (3 + run) begin
        @(negedge clk);
        check(0);
      end
      load_data = 0;
      expected = 0;
      for (int i = 0; i < 20 * (run + 1) + 7; i++) begin
        @(negedge clk);
        if (expected == 20) begin expected = 1; wraps++; end
        else expected = expected + 1;
        check(expected);
      end
    end
    checks++;
    if (wraps < 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
