// mult_16bits_tb: streams random and corner operand pairs into mult_16bits,
// one per cycle, and checks each product one cycle later.
module mult_16bits_tb;
  logic clk = 0, rst = 1;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  logic [31:0] exp_q[$];

  mult_16bits dut (.clk, .rst, .a, .b, .p);

  always #5 clk = ~clk;

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
    for (int i = 0; i < 1002; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (p !== exp_q[0]) begin
          failures++;
          $display("mismatch: got %h expected %h", p, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      case (i)
        0: begin a = 16'hFFFF; b = 16'hFFFF; end
        1: begin a = 16'h0000; b = 16'h1234; end
        2: begin a = 16'h8000; b = 16'h0002; end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      exp_q.push_back(32'(a) * 32'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
