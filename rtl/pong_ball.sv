// pong_ball: a Ball Parallel Object of the Pong game.
//
// spawn creates the ball at (nx, ny) with direction (+1, +1). On every tick
// a live ball runs calc():
//   x += dirx; y += diry;
//   if (y <= 0) diry = +1;  if (y >= MAX_Y) diry = -1;
//   for every bar: if (x, y) equals the bar position, dirx = -dirx;
//   if (x < 0 or x > MAX_X) the ball finishes (alive drops).
// The tests use the moved position, in this order, as the game's Ball does.
// Coordinates are CW-bit signed. One tick takes one clock; spawn has
// priority over tick. MAX_X = 40 matches the right bar's column; MAX_Y = 40
// and the widths are this design's choices.
module pong_ball #(
  parameter int CW     = 8,
  parameter int N_BARS = 2,
  parameter int MAX_X  = 40,
  parameter int MAX_Y  = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 spawn,
  input  logic signed [CW-1:0] nx,
  input  logic signed [CW-1:0] ny,
  input  logic                 tick,
  input  logic signed [CW-1:0] bar_x [N_BARS],
  input  logic signed [CW-1:0] bar_y [N_BARS],
  output logic                 alive,
  output logic signed [CW-1:0] x,
  output logic signed [CW-1:0] y,
  output logic                 hit_bar,    // pulse: reflected by a bar
  output logic                 finished    // pulse: left the field
);
  logic signed [CW-1:0] dirx, diry;
  logic signed [CW-1:0] x_n, y_n, dx_n, dy_n;
  logic                 hit, out;

  always_comb begin
    x_n  = x + dirx;
    y_n  = y + diry;
    dy_n = diry;
    dx_n = dirx;
    if (y_n <= 0)          dy_n = CW'(1);
    if (y_n >= CW'(MAX_Y)) dy_n = -CW'(1);
    hit = 1'b0;
    for (int b = 0; b < N_BARS; b++) begin
      if (x_n == bar_x[b] && y_n == bar_y[b]) begin
        dx_n = -dx_n;
        hit  = 1'b1;
      end
    end
    out = (x_n < 0) || (x_n > CW'(MAX_X));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alive    <= 1'b0;
      x        <= '0;
      y        <= '0;
      dirx     <= CW'(1);
      diry     <= CW'(1);
      hit_bar  <= 1'b0;
      finished <= 1'b0;
    end else begin
      hit_bar  <= 1'b0;
      finished <= 1'b0;
      if (spawn) begin
        alive <= 1'b1;
        x     <= nx;
        y     <= ny;
        dirx  <= CW'(1);
        diry  <= CW'(1);
      end else if (tick && alive) begin
        x    <= x_n;
        y    <= y_n;
        dirx <= dx_n;
        diry <= dy_n;
        hit_bar <= hit;
        if (out) begin
          alive    <= 1'b0;
          finished <= 1'b1;
        end
      end
    end
  end
endmodule
