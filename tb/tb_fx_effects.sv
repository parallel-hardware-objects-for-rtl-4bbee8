// tb_fx_effects: self-checking test of the four effect cores fx_highpass,
// fx_lowpass, fx_distortion and fx_echo. Random stereo samples are applied
// and each output is compared with a reference computed here with integer
// arithmetic; context save/restore ports are exercised too.
module tb_fx_effects;
  import hwo_pkg::*;
  localparam int DELAY = 8;
  logic clk = 0, rst_n = 0;
  logic step, ctx_load;
  stereo_t x, y_hp, y_lp, y_ds, y_ec, st_hp, st_lp, ctx_in;
  logic [$clog2(DELAY)-1:0] ec_rd_idx, ec_wr_idx;
  stereo_t ec_rd_word, ec_wr_word;
  logic ec_wr;
  int checks = 0, failures = 0;

  fx_highpass   u_hp (.clk, .rst_n, .step, .x, .y(y_hp), .state(st_hp), .ctx_load, .ctx_in);
  fx_lowpass    u_lp (.clk, .rst_n, .step, .x, .y(y_lp), .state(st_lp), .ctx_load, .ctx_in);
  fx_distortion u_ds (.x, .y(y_ds));
  fx_echo #(.DELAY(DELAY)) u_ec (.clk, .rst_n, .step, .x, .y(y_ec),
    .ctx_rd_idx(ec_rd_idx), .ctx_rd_word(ec_rd_word),
    .ctx_wr(ec_wr), .ctx_wr_idx(ec_wr_idx), .ctx_wr_word(ec_wr_word));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
  // floor division by 2**n for negative values too (arithmetic shift)
  function automatic int asr(int v, int n);
    return (v >= 0) ? v / (1 << n) : -((-v + (1 << n) - 1) / (1 << n));
  endfunction
  function automatic int clipd(int v);
    int g = v * 4;
    return g > 12000 ? 12000 : (g < -12000 ? -12000 : g);
  endfunction

  int s_lp[2], s_hp[2];
  int hist[2][$];
  int e_l, e_r, v;
  int xs[2];

  initial begin
    step = 0; ctx_load = 0; x = '0; ctx_in = '0;
    ec_rd_idx = 0; ec_wr_idx = 0; ec_wr = 0; ec_wr_word = '0;
    s_lp = '{0, 0}; s_hp = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i % 3 == 0) begin
        xs[0] = int'($urandom % 65536) - 32768;
        xs[1] = int'($urandom % 65536) - 32768;
      end else begin
        xs[0] = int'($urandom % 4000) - 2000;
        xs[1] = int'($urandom % 4000) - 2000;
      end
      x.l = 16'(xs[0]); x.r = 16'(xs[1]);
      step = ($urandom % 4) != 0;
      #1;
      for (int c = 0; c < 2; c++) begin
        int nlp, nhp, old;
        nlp = s_lp[c] + asr(xs[c] - s_lp[c], 3);
        nhp = s_hp[c] + asr(xs[c] - s_hp[c], 3);
        chk(int'(c == 0 ? y_lp.l : y_lp.r) == nlp, "lowpass");
        chk(int'(c == 0 ? y_hp.l : y_hp.r) == sat(xs[c] - nhp), "highpass");
        chk(int'(c == 0 ? y_ds.l : y_ds.r) == clipd(xs[c]), "distortion");
        old = (hist[c].size() == DELAY) ? hist[c][0] : 0;
        chk(int'(c == 0 ? y_ec.l : y_ec.r) == sat(xs[c] + asr(old, 1)), "echo");
        if (step) begin
          s_lp[c] = nlp;
          s_hp[c] = nhp;
          hist[c].push_back(xs[c]);
          if (hist[c].size() > DELAY) void'(hist[c].pop_front());
        end
      end
      @(posedge clk);
    end
    // context: read back the echo history, oldest first
    @(negedge clk);
    step = 0;
    for (int k = 0; k < DELAY; k++) begin
      ec_rd_idx = k[$clog2(DELAY)-1:0];
      #1;
      chk(int'(ec_rd_word.l) == hist[0][k] && int'(ec_rd_word.r) == hist[1][k], "echo ctx read");
    end
    chk(int'(st_lp.l) == s_lp[0] && int'(st_lp.r) == s_lp[1], "lowpass state");
    chk(int'(st_hp.l) == s_hp[0] && int'(st_hp.r) == s_hp[1], "highpass state");
    // reset, then restore a context and check that filtering continues from it
    rst_n = 0; #1; rst_n = 1;
    @(negedge clk);
    ctx_in.l = 16'sd1000; ctx_in.r = -16'sd1000; ctx_load = 1;
    ec_wr = 1;
    for (int k = 0; k < DELAY; k++) begin
      ec_wr_idx = k[$clog2(DELAY)-1:0];
      ec_wr_word.l = 16'(100 * (k + 1)); ec_wr_word.r = 16'(-100 * (k + 1));
      @(posedge clk); #1;
      ctx_load = 0;
    end
    ec_wr = 0;
    @(negedge clk);
    x = '0;
    #1;
    chk(int'(y_lp.l) == 1000 + asr(-1000, 3) && int'(y_lp.r) == -1000 + asr(1000, 3), "lowpass restored");
    chk(int'(y_ec.l) == 50 && int'(y_ec.r) == -50, "echo restored oldest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
