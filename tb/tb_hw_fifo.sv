// tb_hw_fifo: self-checking test of hw_fifo against a queue model.
// Random pushes and pops (never a push into a full FIFO without a pop),
// including simultaneous push/pop when full; checks data order, count,
// full and empty every cycle.
module tb_hw_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int saw_full = 0;

  hw_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(count == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      if (q.size() > 0) chk(rd_data == q[0], "data");
      if (full) saw_full++;
      // phase-dependent bias so the FIFO runs both full and empty
      rd_en = ($urandom % 100) < ((i / 500) % 2 ? 70 : 30);
      wr_en = ($urandom % 100) < 50;
      if (full && !rd_en) wr_en = 0;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    chk(saw_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
