// tb_hwo_top: end-to-end test of hwo_top at reduced sizes (4 ball slots, 32-word FIFOs, 20-cycle slices,
// 200-cycle reconfiguration, 24x12 video frames).
// It runs the three designs one after the other:
//   dataflow  random operands every cycle, P1 checked two cycles later;
//   Pong      a ball that bounces off both bars and the bottom wall, bar
//             moves, a ball that leaves the field, and more balls than slots;
//   audio     a stereo stream at a fixed sample period through no effect, one
//             effect, and all four effects sharing the dynamic area, then a
//             burst that fills the FIFOs and blocks the source. Every output
//             sample is compared with a reference chain;
//   video     one frame through gamma correction and edge detection,
//             compared pixel by pixel with a reference.
// The configuration port is a behavioural model with a fixed reconfiguration
// time. Each mechanism (reconfiguration, context save and restore, turn
// switch, a loaded object kept, data held for an unloaded object, blocked
// source, bar hit, wall bounce, ball finished, slot full) is counted and must
// have happened at least once. The longest time a sample took from input to
// the output FIFO is printed.
module tb_hwo_top;
  import hwo_pkg::*;
  import tb_audio_ref_pkg::*;
  localparam int NB     = 4;      // ball slots
  localparam int SLICE  = 20;   // cycles per object and turn
  localparam int DEPTH  = 32;   // FIFO words
  localparam int DELAY  = 4;   // echo delay
  localparam int RC     = 200;      // reconfiguration time in cycles
  localparam int PERIOD = 80;  // cycles per audio sample
  localparam int NSAMP  = 300;   // samples with all four effects
  localparam int NBURST = 200;  // samples in the burst

  logic clk = 0, rst_n = 0;
  logic [31:0] df_x1, df_y1, df_x2, df_y2, df_p1;
  logic pong_cmd_valid, pong_tick, pong_add_rejected;
  logic [2:0] pong_cmd;
  logic signed [7:0] pong_new_x, pong_new_y;
  logic [NB-1:0] pong_ball_alive, pong_ball_hit_bar, pong_ball_finished;
  logic signed [7:0] pong_ball_x [NB], pong_ball_y [NB], pong_bar_x [2], pong_bar_y [2];
  logic aud_in_valid, aud_in_ready, aud_out_valid, aud_out_ready;
  logic [31:0] aud_in_data, aud_out_data;
  logic fx_inst_valid, fx_inst_add, icap_start, icap_done, fx_running, fx_stopping, fx_route_miss;
  logic [3:0] fx_inst_obj, icap_obj, fx_loaded, fx_active;
  logic [$clog2(DEPTH+1)-1:0] aud_out_fill;
  int n_reconf; logic icap_busy;
  logic vid_gamma_en, vid_edge_en, vid_in_valid, vid_out_valid;
  logic [23:0] vid_in_pixel, vid_out_pixel;
  int checks = 0, failures = 0;
  localparam int VW = 24, VH = 12;

  hwo_top #(.N_BALLS(4), .SLICE(20), .DEPTH(32), .DELAY(4), .VID_W(24), .VID_H(12)) dut (.*);
  icap_model #(.RECONF_CYCLES(RC)) u_icap (.clk, .rst_n, .start(icap_start), .done(icap_done),
                                          .n_reconf, .busy(icap_busy));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  // ------------------------------------------------------------ counters
  int n_df = 0, n_bar_hit = 0, n_wall = 0, n_finish = 0, n_reject = 0, n_barmove = 0;
  int n_ctx_save = 0, n_ctx_restore = 0, n_switch = 0, n_kept = 0, n_held = 0, n_blocked = 0;
  int n_out = 0, starved = 0;
  logic [3:0] last_loaded = 0;

  always @(posedge clk) if (rst_n) begin
    if (|pong_ball_hit_bar) n_bar_hit++;
    if (|pong_ball_finished) n_finish++;
    if (pong_add_rejected) n_reject++;
    if (dut.u_audio.u_area.wr_valid && dut.u_audio.u_area.wr_ready && dut.u_audio.u_area.wr_addr[4]) n_ctx_save++;
    if (dut.u_audio.u_area.ctx_valid && dut.u_audio.u_area.ctx_ready) n_ctx_restore++;
    if (fx_loaded != 0 && fx_loaded != last_loaded) begin
      if (last_loaded != 0) n_switch++;
      last_loaded <= fx_loaded;
    end
    // a sample waits in the FIFO of an object that is not configured
    for (int k = 0; k < 4; k++)
      if (dut.u_audio.m_count[k] != 0 && fx_loaded != 4'(k + 1)) n_held++;
    if (aud_in_valid && !aud_in_ready) n_blocked++;
  end

  // ------------------------------------------------------------ audio stream
  audio_ref ref_m = new(DELAY);
  logic [31:0] exp_q [$];
  longint t_in [$];
  longint cyc = 0, max_lat = 0;
  int n_in_left = 0, src_cnt = 0, snk_cnt = 0, src_period = PERIOD, snk_period = PERIOD;
  bit sink_on = 0, lat_on = 0;
  logic [3:0] cur_act = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (aud_in_valid && aud_in_ready) begin
      exp_q.push_back(ref_m.run(aud_in_data, cur_act));
      t_in.push_back(cyc);
      n_in_left <= n_in_left - 1;
    end
    src_cnt <= (src_cnt >= src_period - 1) ? 0 : src_cnt + 1;
    snk_cnt <= (snk_cnt >= snk_period - 1) ? 0 : snk_cnt + 1;
    aud_in_data <= $urandom;
    // latency: input to arrival in the output FIFO
    if (dut.u_audio.u_matrix.f_wr_en[8]) begin
      if (lat_on && t_in.size() > 0 && cyc - t_in[0] > max_lat) max_lat = cyc - t_in[0];
      if (t_in.size() > 0) void'(t_in.pop_front());
    end
    if (aud_out_ready) begin
      if (aud_out_valid) begin
        chk(exp_q.size() > 0 && aud_out_data == exp_q[0], "audio sample");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        n_out++;
      end else if (exp_q.size() > 0) starved++;
    end
  end
  assign aud_in_valid  = rst_n && n_in_left > 0 && src_cnt == 0;
  assign aud_out_ready = sink_on && snk_cnt == 0;

  task automatic inst(logic [3:0] o, bit add);
    @(negedge clk); fx_inst_valid = 1; fx_inst_obj = o; fx_inst_add = add;
    @(negedge clk); fx_inst_valid = 0;
  endtask

  task automatic audio_phase(logic [3:0] act, int n, int margin, int period);
    for (int k = 0; k < 4; k++) if (act[k] != cur_act[k]) inst(4'(k + 1), act[k]);
    cur_act = act;
    repeat (10) @(posedge clk);
    @(negedge clk);
    sink_on = 0;
    src_period = period;
    snk_period = period;
    n_in_left = n;
    repeat (margin) @(posedge clk);
    @(negedge clk);
    sink_on = 1;
    while (n_in_left > 0) @(posedge clk);
    while (exp_q.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("audio phase %b: %0d samples out, %0d reconfigurations, t=%0d cycles", act, n_out, n_reconf, cyc);
  endtask

  // ------------------------------------------------------------ video
  logic [23:0] vexp_q [$];
  int n_vid = 0;
  always @(posedge clk) if (rst_n && vid_out_valid) begin
    chk(vexp_q.size() > 0 && vid_out_pixel == vexp_q[0], "video pixel");
    if (vexp_q.size() > 0) void'(vexp_q.pop_front());
    n_vid++;
  end

  function automatic int gam(int v);
    return $rtoi(255.0 * $pow(real'(v) / 255.0, 1.0 / 2.2) + 0.5);
  endfunction

  task automatic video_frame();
    int l [VH][VW];
    @(negedge clk);
    vid_gamma_en = 1; vid_edge_en = 1;
    for (int y = 0; y < VH; y++) for (int x = 0; x < VW; x++) begin
      logic [23:0] p, g;
      p = ((x / 8 + y / 8) % 2) ? 24'hE0C0A0 : 24'h102030;   // checkerboard
      if (x % 5 == 0) p = $urandom;
      g = {8'(gam(p[23:16])), 8'(gam(p[15:8])), 8'(gam(p[7:0]))};
      l[y][x] = (int'(g[23:16]) * 77 + int'(g[15:8]) * 150 + int'(g[7:0]) * 29) / 256;
      if (x < 2 || y < 2) vexp_q.push_back(0);
      else begin
        int gx, gy, m;
        gx = (l[y-2][x] + 2 * l[y-1][x] + l[y][x]) - (l[y-2][x-2] + 2 * l[y-1][x-2] + l[y][x-2]);
        gy = (l[y][x-2] + 2 * l[y][x-1] + l[y][x]) - (l[y-2][x-2] + 2 * l[y-2][x-1] + l[y-2][x]);
        m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        if (m > 255) m = 255;
        vexp_q.push_back({8'(m), 8'(m), 8'(m)});
      end
      vid_in_valid = 1; vid_in_pixel = p;
      @(negedge clk);
    end
    vid_in_valid = 0;
    repeat (4) @(negedge clk);
    chk(vexp_q.size() == 0 && n_vid == VW * VH, "video frame complete");
    $display("video frame %0dx%0d done, t=%0d cycles", VW, VH, cyc);
  endtask

  // ------------------------------------------------------------ Pong helpers
  task automatic pong(bit cv, int c, int nx, int ny, bit tk);
    @(negedge clk);
    pong_cmd_valid = cv; pong_cmd = 3'(c); pong_new_x = 8'(nx); pong_new_y = 8'(ny); pong_tick = tk;
    @(negedge clk);
    pong_cmd_valid = 0; pong_tick = 0;
    @(negedge clk);   // pulses are counted one clock after they appear
    if (tk) for (int i = 0; i < NB; i++)
      if (pong_ball_alive[i] && (pong_ball_y[i] == 0 || pong_ball_y[i] == 40)) n_wall++;
  endtask

  initial begin
    df_x1 = 0; df_y1 = 0; df_x2 = 0; df_y2 = 0;
    pong_cmd_valid = 0; pong_cmd = 0; pong_new_x = 0; pong_new_y = 0; pong_tick = 0;
    fx_inst_valid = 0; fx_inst_obj = 0; fx_inst_add = 0;
    vid_gamma_en = 0; vid_edge_en = 0; vid_in_valid = 0; vid_in_pixel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- dataflow
    begin
      logic [31:0] e [$];
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        if (i >= 2) begin
          chk(df_p1 == e[0], "dataflow P1");
          void'(e.pop_front());
          n_df++;
        end
        df_x1 = $urandom; df_y1 = $urandom; df_x2 = $urandom; df_y2 = $urandom;
        e.push_back((df_x1 + df_y1) * (df_x2 + df_y2));
      end
    end

    // ---------------- Pong
    pong(1, 5, 20, 0, 0);                         // ball at (20,0) in slot 0
    chk(pong_ball_alive[0] && pong_ball_x[0] == 20 && pong_ball_y[0] == 0, "ball created");
    for (int t = 0; t < 20; t++) pong(0, 0, 0, 0, 1);
    chk(pong_ball_x[0] == 40 && pong_ball_y[0] == 20 && n_bar_hit == 1, "hit right bar");
    for (int t = 0; t < 40; t++) pong(0, 0, 0, 0, 1);
    chk(pong_ball_x[0] == 0 && pong_ball_y[0] == 20 && n_bar_hit == 2, "hit left bar");
    pong(1, 1, 0, 0, 0);                          // bar 0 up
    pong(1, 4, 0, 0, 0);                          // bar 1 down
    chk(pong_bar_y[0] == 19 && pong_bar_y[1] == 21, "bars moved");
    n_barmove += 2;
    pong(1, 5, 38, 5, 0);                         // ball in slot 1 about to leave
    for (int t = 0; t < 3; t++) pong(0, 0, 0, 0, 1);
    chk(!pong_ball_alive[1] && n_finish == 1, "ball left the field");
    for (int i = 0; i < NB; i++) pong(1, 5, 10, 10, 0);   // NB-1 slots free
    chk(&pong_ball_alive && n_reject == 1, "slots full, one request dropped");

    // ---------------- video
    video_frame();

    // ---------------- audio
    audio_phase(4'b0000, 20, 2 * PERIOD, PERIOD);
    chk(n_reconf == 0, "no reconfiguration without effects");
    audio_phase(4'b0001, 40, 2 * PERIOD + RC, PERIOD);
    chk(n_reconf == 1, "single effect loaded once");
    n_kept = (n_reconf == 1 && fx_loaded == 1) ? 1 : 0;
    begin
      automatic int s0 = starved;
      lat_on = 1;
      audio_phase(4'b1111, NSAMP, 2 * 4 * (RC + SLICE + 10), PERIOD);
      lat_on = 0;
      chk(starved == s0, "uninterrupted output with four effects");
      chk(n_blocked == 0, "source not blocked at the sample rate");
    end
    audio_phase(4'b1111, NBURST, 0, 1);           // burst: one sample per cycle
    chk(n_out == 60 + NSAMP + NBURST, "all samples out");
    chk(fx_route_miss == 0, "no unrouted word");

    $display("dataflow %0d, bar hits %0d, wall bounces %0d, finished %0d, rejected %0d, bar moves %0d",
             n_df, n_bar_hit, n_wall, n_finish, n_reject, n_barmove);
    $display("reconfigurations %0d, context words saved %0d restored %0d, switches %0d, kept %0d, held %0d, blocked %0d",
             n_reconf, n_ctx_save, n_ctx_restore, n_switch, n_kept, n_held, n_blocked);
    $display("max latency input->output FIFO: %0d cycles (%0d us at 100 MHz)", max_lat, max_lat / 100);
    chk(n_df > 0, "mechanism: dataflow");
    chk(n_vid > 0, "mechanism: video objects");
    chk(n_bar_hit > 0, "mechanism: bar hit");
    chk(n_wall > 0, "mechanism: wall bounce");
    chk(n_finish > 0, "mechanism: ball finished");
    chk(n_reject > 0, "mechanism: slots full");
    chk(n_barmove > 0, "mechanism: bar move");
    chk(n_reconf > 4, "mechanism: reconfiguration");
    chk(n_ctx_save > 0, "mechanism: context save");
    chk(n_ctx_restore > 0, "mechanism: context restore");
    chk(n_switch > 3, "mechanism: objects in turn");
    chk(n_kept > 0, "mechanism: single object kept");
    chk(n_held > 0, "mechanism: data held for unloaded object");
    chk(n_blocked > 0, "mechanism: source blocked by full FIFO");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
