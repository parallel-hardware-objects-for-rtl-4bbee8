// tb_audio_dsp: end-to-end test of the audio system at reduced sizes.
// A source writes one stereo sample every PERIOD cycles (the sample clock),
// a sink reads one every PERIOD cycles once the output has buffered a
// start-up margin. The configuration port is modelled with a fixed
// reconfiguration time. Phases: no effect (straight through), one effect
// (loaded once and kept), all four effects (loaded in turn). Every output
// sample is compared with the reference chain; the tb also checks that the
// source is never blocked and the sink never starves in steady state, and
// that reconfigurations and context saves happened.
module tb_audio_dsp;
  import hwo_pkg::*;
  import tb_audio_ref_pkg::*;
  localparam int SLICE = 20, DEPTH = 32, DELAY = 4, RC = 200, PERIOD = 80;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, inst_valid, inst_add;
  stereo_t in_data, out_data;
  obj_t inst_obj, icap_obj, loaded_obj;
  logic icap_start, icap_done, obj_running, obj_stopping, icap_busy;
  logic [3:0] active;
  logic [$clog2(DEPTH+1)-1:0] out_fill;
  logic route_miss;
  int n_reconf;
  int checks = 0, failures = 0;

  audio_dsp #(.SLICE(SLICE), .DEPTH(DEPTH), .DELAY(DELAY)) dut (.*);
  icap_model #(.RECONF_CYCLES(RC)) u_icap (.clk, .rst_n, .start(icap_start), .done(icap_done),
                                          .n_reconf, .busy(icap_busy));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: left %0d expq %0d out %0d fill %0d valid %b ready %b sink %b loaded %0d active %b", n_in_left, exp_q.size(), n_out, out_fill, out_valid, out_ready, sink_on, loaded_obj, active);
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

  audio_ref ref_m = new(DELAY);
  logic [31:0] exp_q [$];
  int n_in_left = 0, n_out = 0, blocked = 0, starved = 0, ctx_saves = 0;
  int src_cnt = 0, snk_cnt = 0;
  bit sink_on = 0;
  logic [3:0] cur_act = 0;

  // source: one sample per PERIOD while n_in_left > 0
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        exp_q.push_back(ref_m.run(in_data, cur_act));
        n_in_left <= n_in_left - 1;
      end
      if (in_valid && !in_ready) blocked++;
      if (src_cnt == PERIOD - 1) src_cnt <= 0; else src_cnt <= src_cnt + 1;
    end
  end
  always_comb begin
    in_valid = rst_n && n_in_left > 0 && src_cnt == 0;
    out_ready = sink_on && snk_cnt == 0;
  end
  always @(posedge clk) if (rst_n) in_data <= stereo_t'($urandom);

  // sink
  always @(posedge clk) begin
    if (rst_n) begin
      if (snk_cnt == PERIOD - 1) snk_cnt <= 0; else snk_cnt <= snk_cnt + 1;
      if (out_ready) begin
        if (out_valid) begin
          chk(exp_q.size() > 0 && out_data == exp_q[0], "output sample");
          if (exp_q.size() > 0) void'(exp_q.pop_front());
          n_out++;
        end else if (exp_q.size() > 0) starved++;
      end
      if (dut.u_area.wr_valid && dut.u_area.wr_ready && dut.u_area.wr_addr[4]) ctx_saves++;
    end
  end

  task automatic inst(obj_t o, bit add);
    @(negedge clk); inst_valid = 1; inst_obj = o; inst_add = add;
    @(negedge clk); inst_valid = 0;
  endtask

  // run n samples with the given effects; the stream is drained before
  // the effect set changes
  task automatic phase(logic [3:0] act, int n, int margin);
    for (int k = 0; k < 4; k++) if (act[k] != cur_act[k]) inst(obj_t'(k + 1), act[k]);
    cur_act = act;
    repeat (10) @(posedge clk);
    @(negedge clk);
    sink_on = 0;
    n_in_left = n;
    // start-up margin before the sink begins
    repeat (margin) @(posedge clk);
    @(negedge clk);
    sink_on = 1;
    while (n_in_left > 0) @(posedge clk);
    while (exp_q.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("phase %b done at %0t: out %0d, reconf %0d", act, $time, n_out, n_reconf);
  endtask

  initial begin
    inst_valid = 0; inst_obj = 0; inst_add = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    phase(4'b0000, 40, 2 * PERIOD);
    chk(n_reconf == 0, "no reconfiguration without effects");
    phase(4'b0010, 60, 2 * PERIOD + RC);
    chk(n_reconf == 1, "single effect loaded once");
    begin
      automatic int s0 = starved;
      phase(4'b1111, 400, 2 * 4 * (RC + SLICE + 10));
      chk(starved == s0, "uninterrupted output with four effects");
    end
    chk(blocked == 0, "source never blocked");
    chk(n_reconf > 8, "effects loaded in turn");
    chk(ctx_saves > 0, "contexts saved");
    chk(n_out == 500, "all samples out");
    $display("samples %0d, reconfigurations %0d, context words saved %0d, starved %0d, blocked %0d",
             n_out, n_reconf, ctx_saves, starved, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
