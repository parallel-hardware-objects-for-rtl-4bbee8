// tb_video: self-checking test of the video pipeline (video_dsp with
// video_gamma and video_edge) on small frames. For each of the four
// combinations of the two objects it streams two random frames with random
// gaps, computes the expected pixels here (gamma curve with real arithmetic,
// Sobel magnitude from a stored frame) and compares every output pixel and
// the two-clock latency.
module tb_video;
  localparam int W = 16, H = 8;
  localparam int FRAMES = 2;
  logic clk = 0, rst_n = 0;
  logic gamma_en, edge_en, in_valid, out_valid;
  logic [23:0] in_pixel, out_pixel;
  int checks = 0, failures = 0;

  video_dsp #(.WIDTH(W), .HEIGHT(H)) dut (.*);

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

  function automatic int gam(int v);
    return $rtoi(255.0 * $pow(real'(v) / 255.0, 1.0 / 2.2) + 0.5);
  endfunction
  function automatic int lum(logic [23:0] p);
    return (int'(p[23:16]) * 77 + int'(p[15:8]) * 150 + int'(p[7:0]) * 29) / 256;
  endfunction

  logic [23:0] exp_q [$];
  int lat_q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    chk(exp_q.size() > 0 && out_pixel == exp_q[0], "pixel");
    chk(lat_q.size() > 0 && cyc - lat_q[0] == 2, "latency");
    if (exp_q.size() > 0) void'(exp_q.pop_front());
    if (lat_q.size() > 0) void'(lat_q.pop_front());
  end

  task automatic run(bit ge, bit ee);
    logic [23:0] f [H][W];
    int l [H][W];
    @(negedge clk);
    gamma_en = ge; edge_en = ee;
    for (int fr = 0; fr < FRAMES; fr++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        logic [23:0] p, g;
        p = $urandom;
        if (x > W / 2) p = (y % 2) ? 24'hFFFFFF : 24'h000000;   // strong edges
        g = ge ? {8'(gam(p[23:16])), 8'(gam(p[15:8])), 8'(gam(p[7:0]))} : p;
        f[y][x] = g;
        l[y][x] = lum(g);
        if (!ee) exp_q.push_back(g);
        else if (x < 2 || y < 2) exp_q.push_back(0);
        else begin
          int gx, gy, m;
          gx = (l[y-2][x] + 2 * l[y-1][x] + l[y][x]) - (l[y-2][x-2] + 2 * l[y-1][x-2] + l[y][x-2]);
          gy = (l[y][x-2] + 2 * l[y][x-1] + l[y][x]) - (l[y-2][x-2] + 2 * l[y-2][x-1] + l[y-2][x]);
          m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
          if (m > 255) m = 255;
          exp_q.push_back({8'(m), 8'(m), 8'(m)});
        end
        while (($urandom % 4) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1; in_pixel = p;
        lat_q.push_back(cyc);
        @(negedge clk);
        in_valid = 0;
      end
    end
    repeat (4) @(negedge clk);
    chk(exp_q.size() == 0, "all pixels out");
  endtask

  initial begin
    gamma_en = 0; edge_en = 0; in_valid = 0; in_pixel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 0);
    run(1, 0);
    run(0, 1);
    run(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
