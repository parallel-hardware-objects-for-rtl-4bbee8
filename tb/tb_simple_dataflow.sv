// tb_simple_dataflow: self-checking test of the two-adder, one-multiplier
// dataflow P1 = (X1 + Y1) * (X2 + Y2). New operands every cycle; each result
// must appear exactly two cycles later, wrapped to 32 bits.
module tb_simple_dataflow;
  logic clk = 0, rst_n = 0;
  logic [31:0] x1, y1, x2, y2, p1;
  int checks = 0, failures = 0;
  logic [31:0] exp_q [$];

  simple_dataflow dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = 0; y1 = 0; x2 = 0; y2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      longint unsigned a, b;
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (p1 !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: p1=%h expected %h", i, p1, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      x1 = (i % 5 == 0) ? 32'hFFFF_FFFF : $urandom;
      y1 = $urandom;
      x2 = (i % 7 == 0) ? 32'd3 : $urandom;
      y2 = $urandom % 1000;
      a = (64'(x1) + 64'(y1)) & 64'hFFFF_FFFF;
      b = (64'(x2) + 64'(y2)) & 64'hFFFF_FFFF;
      exp_q.push_back(32'((a * b) & 64'hFFFF_FFFF));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
