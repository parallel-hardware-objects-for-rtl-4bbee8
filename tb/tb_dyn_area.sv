// tb_dyn_area: self-checking test of the dynamic area. The tb plays the
// matrix (data and context FIFOs per object as queues, selected by the
// area's read addresses) and the scheduler (load/stop/unload). It loads the
// low pass, streams, stops it (context saved), loads the distortion,
// streams, stops, reloads the low pass, which must continue from its saved
// state, and finally unloads. Every output is compared with reference
// effects; read addresses, write targets and the idle outputs of an empty
// area are checked.
module tb_dyn_area;
  import hwo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, unload, stop, stopped, running;
  obj_t obj, loaded_obj;
  addr_t target [4];
  addr_t rd_addr, ctx_rd_addr, wr_addr;
  logic rd_valid, rd_ready, ctx_valid, ctx_ready, wr_valid, wr_ready;
  stereo_t rd_data, ctx_data, wr_data;
  int checks = 0, failures = 0;

  dyn_area #(.N_OBJ(4), .DELAY(4)) dut (.*);

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

  function automatic int asr(int v, int n);
    return (v >= 0) ? v / (1 << n) : -((-v + (1 << n) - 1) / (1 << n));
  endfunction
  function automatic int clipd(int v);
    int g = v * 4;
    return g > 12000 ? 12000 : (g < -12000 ? -12000 : g);
  endfunction

  stereo_t dq [5][$];   // data FIFO per object number 1..4
  stereo_t cq [5][$];   // context FIFO per object number
  int lp_l = 0, lp_r = 0, n_out = 0, n_lp = 0;

  always_comb begin
    automatic int d = int'(rd_addr[3:0]);
    automatic int c = int'(ctx_rd_addr[3:0]);
    rd_valid  = !rd_addr[4] && d >= 1 && d <= 4 && dq[d].size() > 0;
    rd_data   = rd_valid ? dq[d][0] : '0;
    ctx_valid = ctx_rd_addr[4] && c >= 1 && c <= 4 && cq[c].size() > 0;
    ctx_data  = ctx_valid ? cq[c][0] : '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (wr_valid && wr_ready) begin
        if (wr_addr[4]) cq[wr_addr[3:0]].push_back(wr_data);
        else begin
          automatic int xl = int'(rd_data.l), xr = int'(rd_data.r);
          if (loaded_obj == OBJ_LP) begin
            lp_l = lp_l + asr(xl - lp_l, 3);
            lp_r = lp_r + asr(xr - lp_r, 3);
            chk(wr_addr == target[1], "LP target");
            chk(int'(wr_data.l) == lp_l && int'(wr_data.r) == lp_r, "LP sample");
          end else if (loaded_obj == OBJ_DIST) begin
            chk(wr_addr == target[2], "DIST target");
            chk(int'(wr_data.l) == clipd(xl) && int'(wr_data.r) == clipd(xr), "DIST sample");
          end else chk(0, "unexpected object");
          n_out++;
        end
      end
      if (rd_valid && rd_ready) void'(dq[int'(rd_addr[3:0])].pop_front());
      if (ctx_valid && ctx_ready) void'(cq[int'(ctx_rd_addr[3:0])].pop_front());
    end
  end

  task automatic feed(int o, int n);
    for (int i = 0; i < n; i++) begin
      stereo_t s;
      s.l = 16'($urandom % 16000) - 16'sd8000;
      s.r = 16'($urandom % 16000) - 16'sd8000;
      dq[o].push_back(s);
    end
  endtask

  task automatic do_load(obj_t o);
    @(negedge clk); load = 1; obj = o;
    @(negedge clk); load = 0;
    chk(loaded_obj == o, "loaded object");
    chk(rd_addr == data_addr(o) && ctx_rd_addr == ctx_addr(o), "read addresses");
  endtask

  task automatic do_stop();
    @(negedge clk); stop = 1;
    wait (stopped);
    @(negedge clk); stop = 0;
  endtask

  initial begin
    load = 0; unload = 0; stop = 0; obj = 0; wr_ready = 1;
    target = '{5'd2, 5'd3, 5'd4, 5'd5};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!wr_valid && !rd_ready && stopped && loaded_obj == OBJ_NONE, "empty area idle");
    feed(2, 30);
    feed(3, 20);
    do_load(OBJ_LP);
    repeat (40) @(posedge clk);
    chk(n_out == 30 && running, "LP ran");
    feed(2, 10);
    do_stop();
    chk(cq[2].size() == 1, "LP context saved"); n_lp = n_out;
    do_load(OBJ_DIST);
    repeat (30) @(posedge clk);
    chk(n_out == n_lp + 20, "DIST ran");
    do_stop();
    chk(cq[3].size() == 0, "DIST has no context");
    feed(2, 10);
    do_load(OBJ_LP);
    repeat (30) @(posedge clk);
    chk(cq[2].size() == 0, "LP context restored");
    chk(n_out == 70, "LP continued");
    do_stop();
    @(negedge clk); unload = 1;
    @(negedge clk); unload = 0;
    @(negedge clk);
    chk(loaded_obj == OBJ_NONE && !wr_valid && stopped, "unloaded");
    $display("samples %0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
