// mult_64bits_tb: streams random and corner operand pairs into mult_64bits,
// a new pair every cycle, and checks every product 5 cycles later, i.e. both
// the value and the pipeline latency.
module mult_64bits_tb;
  localparam int W = 64;
  localparam int LAT = 5;
  logic clk = 0, rst = 1;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;
  logic [2*W-1:0] exp_q[$];

  mult_64bits dut (.clk, .rst, .a, .b, .p);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return r[W-1:0];
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 1000 + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        checks++;
        if (p !== exp_q[0]) begin
          failures++;
          $display("mismatch at %0d: got %h expected %h", i, p, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      case (i)
        0: begin a = '1; b = '1; end
        1: begin a = '1; b = W'(1); end
        2: begin a = {1'b1, {(W-1){1'b0}}}; b = {1'b1, {(W-1){1'b0}}}; end
        3: begin a = {{(W/2){1'b0}}, {(W/2){1'b1}}}; b = {{(W/2){1'b1}}, {(W/2){1'b0}}}; end
        default: begin a = rnd(); b = rnd(); end
      endcase
      exp_q.push_back((2*W)'(a) * (2*W)'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
