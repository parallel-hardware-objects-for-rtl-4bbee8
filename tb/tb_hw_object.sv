// tb_hw_object: self-checking test of the Hardware Object wrapper, here with
// the echo effect (multi-word context). The tb plays the matrix: it offers
// samples from a queue as the data FIFO, takes writes with random
// back-pressure, and keeps saved context words in a queue as the context
// FIFO. The object is stopped, its context saved, held in reset (unloaded),
// released (reloaded) and must continue the echo exactly where it left off.
// Checks every output sample against a reference echo, the target address
// of data and context writes, the context word count, and the one sample per
// cycle rate when nothing stalls.
module tb_hw_object;
  import hwo_pkg::*;
  localparam int DELAY = 4;
  logic clk = 0, obj_rst_n = 0;
  obj_t own;
  addr_t target, wr_addr;
  logic stop, stopped, running, rd_valid, rd_ready, ctx_valid, ctx_ready, wr_valid, wr_ready;
  stereo_t rd_data, ctx_data, wr_data;
  int checks = 0, failures = 0;

  hw_object #(.KIND(FX_ECHO), .DELAY(DELAY)) dut (.*);

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

  function automatic int sat(int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction
  function automatic int asr1(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  stereo_t in_q [$];     // data FIFO content
  stereo_t ctx_q [$];    // context FIFO content
  int hist_l [$], hist_r [$];
  int n_out = 0, n_ctx_wr = 0, bp = 100;

  // matrix model
  always_comb begin
    rd_valid  = in_q.size() > 0;
    rd_data   = rd_valid ? in_q[0] : '0;
    ctx_valid = ctx_q.size() > 0;
    ctx_data  = ctx_valid ? ctx_q[0] : '0;
  end

  always @(posedge clk) begin
    if (obj_rst_n) begin
      if (wr_valid && wr_ready) begin
        if (wr_addr == ctx_addr(own)) begin
          ctx_q.push_back(wr_data);
          n_ctx_wr++;
        end else begin
          int xl, xr, ol, orr;
          chk(wr_addr == target, "data target");
          xl = int'(in_q[0].l); xr = int'(in_q[0].r);
          ol = hist_l.size() == DELAY ? hist_l[0] : 0;
          orr = hist_r.size() == DELAY ? hist_r[0] : 0;
          chk(int'(wr_data.l) == sat(xl + asr1(ol)) && int'(wr_data.r) == sat(xr + asr1(orr)), "echo sample");
          hist_l.push_back(xl); hist_r.push_back(xr);
          if (hist_l.size() > DELAY) begin void'(hist_l.pop_front()); void'(hist_r.pop_front()); end
          n_out++;
        end
      end
      if (rd_valid && rd_ready) void'(in_q.pop_front());
      if (ctx_valid && ctx_ready) void'(ctx_q.pop_front());
    end
    wr_ready <= ($urandom % 100) < bp;
  end

  task automatic feed(int n);
    for (int i = 0; i < n; i++) begin
      stereo_t s;
      s.l = 16'($urandom % 20000) - 16'sd10000;
      s.r = 16'($urandom);
      in_q.push_back(s);
    end
  endtask

  initial begin
    own = 4'd4; target = 5'd5; stop = 0; wr_ready = 1;
    repeat (3) @(posedge clk);
    // first load: no saved context, fresh start
    @(negedge clk); obj_rst_n = 1;
    feed(40);
    begin
      automatic int t0 = n_out;
      repeat (45) @(posedge clk);
      chk(n_out - t0 == 40, "one sample per cycle");
    end
    bp = 60;
    feed(30);
    repeat (20) @(posedge clk);
    // stop in the middle of the stream
    @(negedge clk); stop = 1;
    wait (stopped);
    @(negedge clk);
    chk(n_ctx_wr == DELAY, "context words saved");
    chk(ctx_q.size() == DELAY, "context in FIFO");
    stop = 0;
    // unload, some cycles in reset, then load again
    obj_rst_n = 0;
    repeat (10) @(posedge clk);
    @(negedge clk); obj_rst_n = 1;
    feed(50);
    repeat (200) @(posedge clk);
    chk(ctx_q.size() == 0, "context restored");
    chk(in_q.size() == 0, "all samples processed");
    chk(n_out == 120, "sample count");
    $display("samples %0d, context words %0d", n_out, n_ctx_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
