// pong_bar: a Bar Parallel Object of the Pong game.
//
// The bar stands at a fixed column X and moves one row per up or down
// command (up decreases y). y stays within 0..MAX_Y. Its get methods are
// the position outputs x and y. Step size, clamping and the start row
// Y0 are this design's choices; the up/down methods are the game's.
module pong_bar #(
  parameter int CW    = 8,
  parameter int X     = 0,
  parameter int Y0    = 20,
  parameter int MAX_Y = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 up,
  input  logic                 down,
  output logic signed [CW-1:0] x,
  output logic signed [CW-1:0] y
);
  assign x = CW'(X);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= CW'(Y0);
    else if (up && !down && y > 0)                  y <= y - 1'b1;
    else if (down && !up && y < CW'(MAX_Y))         y <= y + 1'b1;
  end
endmodule
