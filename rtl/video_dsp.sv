// video_dsp: the video example as a pixel pipeline of the two video
// Hardware Objects, gamma correction followed by edge detection.
//
// gamma_en and edge_en say which objects are instantiated; an object that
// is not is replaced by a one-clock register, so the latency (two clocks)
// and the pixel order do not depend on the choice. Change the enables only
// between frames. 24-bit {R, G, B} pixels, one per clock, no back-pressure.
// Both objects are built in fixed logic here: the reference reports that
// loading the two alternately into one dynamic area would need FIFOs far
// larger than the device offers. The order of the two objects is this
// design's choice.
module video_dsp #(
  parameter int  WIDTH  = 352,
  parameter int  HEIGHT = 288,
  parameter real GAMMA  = 2.2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        gamma_en,
  input  logic        edge_en,
  input  logic        in_valid,
  input  logic [23:0] in_pixel,
  output logic        out_valid,
  output logic [23:0] out_pixel
);
  logic        g_valid, b1_valid, s1_valid, e_valid, b2_valid;
  logic [23:0] g_pixel, b1_pixel, s1_pixel, e_pixel, b2_pixel;

  video_gamma #(.GAMMA(GAMMA)) u_gamma (
    .clk, .rst_n, .in_valid(in_valid && gamma_en), .in_pixel,
    .out_valid(g_valid), .out_pixel(g_pixel));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1_valid <= 1'b0;
      b1_pixel <= '0;
      b2_valid <= 1'b0;
      b2_pixel <= '0;
    end else begin
      b1_valid <= in_valid && !gamma_en;
      b1_pixel <= in_pixel;
      b2_valid <= s1_valid && !edge_en;
      b2_pixel <= s1_pixel;
    end
  end

  assign s1_valid = g_valid || b1_valid;
  assign s1_pixel = g_valid ? g_pixel : b1_pixel;

  video_edge #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_edge (
    .clk, .rst_n, .in_valid(s1_valid && edge_en), .in_pixel(s1_pixel),
    .out_valid(e_valid), .out_pixel(e_pixel));

  assign out_valid = e_valid || b2_valid;
  assign out_pixel = e_valid ? e_pixel : b2_pixel;
endmodule
