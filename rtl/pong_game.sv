// pong_game: the Pong game object with its bars and dynamically created
// balls.
//
// A button command (cmd_valid with cmd = 1..5) is decoded as in the game's
// main calc(): 1/2 move bar 0 up/down, 3/4 move bar 1 up/down, 5 creates a
// new ball at (new_x, new_y). Balls live in N_BALLS ball slots, which stand
// for the dynamic areas a ball object is configured into: a new ball takes
// the lowest free slot (a command 5 with every slot taken is dropped and
// reported on add_rejected), and a ball that finishes frees its slot again.
// Every tick advances all live balls by one step in parallel. Bar 0 stands
// in column 0, bar 1 in column MAX_X. Outputs are the positions that a video
// or serial output would display; they change one clock after the command
// or tick. Slot count, command encoding width and the drop rule are this
// design's choices.
module pong_game #(
  parameter int CW      = 8,
  parameter int N_BALLS = 16,
  parameter int MAX_X   = 40,
  parameter int MAX_Y   = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  input  logic [2:0]           cmd,
  input  logic signed [CW-1:0] new_x,
  input  logic signed [CW-1:0] new_y,
  input  logic                 tick,
  output logic [N_BALLS-1:0]   ball_alive,
  output logic signed [CW-1:0] ball_x [N_BALLS],
  output logic signed [CW-1:0] ball_y [N_BALLS],
  output logic signed [CW-1:0] bar_x  [2],
  output logic signed [CW-1:0] bar_y  [2],
  output logic                 add_rejected,   // pulse
  output logic [N_BALLS-1:0]   ball_hit_bar,   // pulses
  output logic [N_BALLS-1:0]   ball_finished   // pulses
);
  logic [1:0] up, down;
  logic       add;
  logic [N_BALLS-1:0] spawn;

  always_comb begin
    up   = '0;
    down = '0;
    add  = 1'b0;
    if (cmd_valid) begin
      case (cmd)
        3'd1: up[0]   = 1'b1;
        3'd2: down[0] = 1'b1;
        3'd3: up[1]   = 1'b1;
        3'd4: down[1] = 1'b1;
        3'd5: add     = 1'b1;
        default: ;
      endcase
    end
    // lowest free slot
    spawn = '0;
    for (int i = N_BALLS - 1; i >= 0; i--) begin
      if (!ball_alive[i]) begin
        spawn    = '0;
        spawn[i] = add;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) add_rejected <= 1'b0;
    else        add_rejected <= add && (&ball_alive);
  end

  pong_bar #(.CW(CW), .X(0), .MAX_Y(MAX_Y)) u_bar0 (
    .clk, .rst_n, .up(up[0]), .down(down[0]), .x(bar_x[0]), .y(bar_y[0]));
  pong_bar #(.CW(CW), .X(MAX_X), .MAX_Y(MAX_Y)) u_bar1 (
    .clk, .rst_n, .up(up[1]), .down(down[1]), .x(bar_x[1]), .y(bar_y[1]));

  for (genvar i = 0; i < N_BALLS; i++) begin : g_ball
    pong_ball #(.CW(CW), .N_BARS(2), .MAX_X(MAX_X), .MAX_Y(MAX_Y)) u_ball (
      .clk, .rst_n,
      .spawn   (spawn[i]),
      .nx      (new_x),
      .ny      (new_y),
      .tick,
      .bar_x, .bar_y,
      .alive   (ball_alive[i]),
      .x       (ball_x[i]),
      .y       (ball_y[i]),
      .hit_bar (ball_hit_bar[i]),
      .finished(ball_finished[i])
    );
  end
endmodule
