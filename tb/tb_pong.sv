// tb_pong: self-checking test of the Pong game (pong_game with pong_bar and
// pong_ball). Random button commands and frame ticks drive the game; a model
// of the balls and bars written here is compared with every output after
// every clock. Balls are also placed so that they hit both bars and the top
// and bottom walls, and more balls are requested than there are slots. Each
// of these events is counted and must occur.
module tb_pong;
  localparam int CW = 8, NB = 4, MX = 40, MY = 40;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, tick, add_rejected;
  logic [2:0] cmd;
  logic signed [CW-1:0] new_x, new_y;
  logic [NB-1:0] ball_alive, ball_hit_bar, ball_finished;
  logic signed [CW-1:0] ball_x [NB], ball_y [NB], bar_x [2], bar_y [2];
  int checks = 0, failures = 0;
  int n_bar_hits = 0, n_wall = 0, n_finish = 0, n_reject = 0, n_spawn = 0, n_barmove = 0;

  pong_game #(.CW(CW), .N_BALLS(NB), .MAX_X(MX), .MAX_Y(MY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // model
  int m_alive[NB], m_x[NB], m_y[NB], m_dx[NB], m_dy[NB];
  int m_by[2];
  int m_bx[2] = '{0, MX};
  bit m_rej, m_hit[NB], m_fin[NB];

  task automatic model_step(bit cv, int c, int nx, int ny, bit tk);
    bit add;
    m_rej = 0;
    foreach (m_hit[i]) begin m_hit[i] = 0; m_fin[i] = 0; end
    add = cv && c == 5;
    if (cv && c == 1 && m_by[0] > 0)  begin m_by[0]--; n_barmove++; end
    if (cv && c == 2 && m_by[0] < MY) begin m_by[0]++; n_barmove++; end
    if (cv && c == 3 && m_by[1] > 0)  begin m_by[1]--; n_barmove++; end
    if (cv && c == 4 && m_by[1] < MY) begin m_by[1]++; n_barmove++; end
    // balls use the bar positions before this clock's bar move
    for (int i = 0; i < NB; i++) begin
      if (m_alive[i] && tk && !(add && i == first_free())) begin
        m_x[i] += m_dx[i];
        m_y[i] += m_dy[i];
        if (m_y[i] <= 0)  begin m_dy[i] = 1;  n_wall++; end
        if (m_y[i] >= MY) begin m_dy[i] = -1; n_wall++; end
        for (int b = 0; b < 2; b++)
          if (m_x[i] == m_bx[b] && m_y[i] == old_by[b]) begin m_dx[i] = -m_dx[i]; m_hit[i] = 1; n_bar_hits++; end
        if (m_x[i] < 0 || m_x[i] > MX) begin m_alive[i] = 0; m_fin[i] = 1; n_finish++; end
      end
    end
    if (add) begin
      int f = first_free();
      if (f < 0) begin m_rej = 1; n_reject++; end
      else begin
        m_alive[f] = 1; m_x[f] = nx; m_y[f] = ny; m_dx[f] = 1; m_dy[f] = 1; n_spawn++;
      end
    end
  endtask

  int old_by[2];
  int ff_cache;
  function automatic int first_free();
    return ff_cache;
  endfunction

  task automatic compare();
    for (int i = 0; i < NB; i++) begin
      chk(ball_alive[i] == m_alive[i][0], "alive");
      if (m_alive[i]) chk(int'(ball_x[i]) == m_x[i] && int'(ball_y[i]) == m_y[i], "ball position");
      chk(ball_hit_bar[i] == m_hit[i], "hit pulse");
      chk(ball_finished[i] == m_fin[i], "finish pulse");
    end
    chk(int'(bar_y[0]) == m_by[0] && int'(bar_y[1]) == m_by[1], "bar y");
    chk(int'(bar_x[0]) == 0 && int'(bar_x[1]) == MX, "bar x");
    chk(add_rejected == m_rej, "reject pulse");
  endtask

  task automatic cycle(bit cv, int c, int nx, int ny, bit tk);
    @(negedge clk);
    cmd_valid = cv; cmd = 3'(c); new_x = CW'(nx); new_y = CW'(ny); tick = tk;
    old_by = m_by;
    ff_cache = -1;
    for (int i = NB - 1; i >= 0; i--) if (!m_alive[i]) ff_cache = i;
    model_step(cv, c, nx, ny, tk);
    @(posedge clk); #1;
    compare();
  endtask

  initial begin
    cmd_valid = 0; cmd = 0; new_x = 0; new_y = 0; tick = 0;
    foreach (m_alive[i]) begin m_alive[i] = 0; m_x[i] = 0; m_y[i] = 0; m_dx[i] = 1; m_dy[i] = 1; end
    m_by = '{20, 20};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a ball that bounces between the two bars, which stay at row 20
    cycle(1, 5, 20, 0, 0);
    for (int i = 0; i < 130; i++) cycle(0, 0, 0, 0, 1);
    // fill all slots and ask for one more
    for (int i = 0; i < NB + 1; i++) cycle(1, 5, 10 + i, 5 + 3 * i, 0);
    // random play
    for (int i = 0; i < 6000; i++) begin
      automatic int c = 1 + int'($urandom % 5);
      automatic bit cv = ($urandom % 100) < 30;
      if (c == 5 && ($urandom % 4) != 0) cv = 0;
      cycle(cv, c, int'($urandom % 39) + 1, int'($urandom % 39) + 1, ($urandom % 2) == 1);
    end
    $display("bar hits %0d, wall bounces %0d, finished %0d, spawned %0d, rejected %0d, bar moves %0d",
             n_bar_hits, n_wall, n_finish, n_spawn, n_reject, n_barmove);
    chk(n_bar_hits >= 2 && n_wall > 0 && n_finish > 0 && n_reject > 0 && n_barmove > 0, "all events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
