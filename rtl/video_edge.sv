// video_edge: edge-detection Hardware Object for an RGB pixel stream.
//
// Pixels arrive in raster order, one per in_valid, frames of WIDTH x HEIGHT
// (default 352 x 288); a column and a row counter follow the position and
// wrap at the frame end. Each pixel is reduced to a luminance
// L = (77 R + 150 G + 29 B) >> 8. Two line buffers hold the two previous rows
// of luminance, and a 3x3 window moves along with the stream. For the input
// pixel at (x, y) the object outputs the Sobel magnitude
// min(255, |Gx| + |Gy|) of the window centred on (x-1, y-1) as a grey pixel
// {m, m, m}; where that window would reach over the frame border (x < 2 or
// y < 2) the output is 0. So the output frame is the edge image shifted by one
// row and one column. out_valid follows in_valid one clock later; one pixel
// per clock, no back-pressure. The system names an edge-detection object;
// the Sobel operator, the luminance weights and the border rule are this
// design's choices.
module video_edge #(
  parameter int WIDTH  = 352,
  parameter int HEIGHT = 288
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [23:0] in_pixel,
  output logic        out_valid,
  output logic [23:0] out_pixel
);
  localparam int XW = $clog2(WIDTH);
  localparam int YW = $clog2(HEIGHT);

  logic [7:0] lb1 [WIDTH];   // row y-1
  logic [7:0] lb2 [WIDTH];   // row y-2
  logic [7:0] w [3][3];      // w[row][col], row 0 = oldest, col 2 = newest
  logic [XW-1:0] x;
  logic [YW-1:0] y;

  logic [7:0]  lum;
  logic [7:0]  c [3][3];     // window including the new column
  logic signed [11:0] gx, gy;
  logic [11:0] mag;

  always_comb begin
    logic [17:0] acc;
    acc = 18'(in_pixel[23:16]) * 18'd77 + 18'(in_pixel[15:8]) * 18'd150 +
          18'(in_pixel[7:0]) * 18'd29;
    lum = acc[15:8];
    for (int r = 0; r < 3; r++) begin
      c[r][0] = w[r][1];
      c[r][1] = w[r][2];
    end
    c[0][2] = lb2[x];
    c[1][2] = lb1[x];
    c[2][2] = lum;
    gx = (12'(c[0][2]) + 12'(c[1][2]) * 2 + 12'(c[2][2]))
       - (12'(c[0][0]) + 12'(c[1][0]) * 2 + 12'(c[2][0]));
    gy = (12'(c[2][0]) + 12'(c[2][1]) * 2 + 12'(c[2][2]))
       - (12'(c[0][0]) + 12'(c[0][1]) * 2 + 12'(c[0][2]));
    mag = 12'(gx < 0 ? -gx : gx) + 12'(gy < 0 ? -gy : gy);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb2[x] <= lb1[x];
      lb1[x] <= lum;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      out_valid <= 1'b0;
      out_pixel <= '0;
      for (int r = 0; r < 3; r++)
        for (int k = 0; k < 3; k++) w[r][k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++) w[r][k] <= c[r][k];
        if (x >= 2 && y >= 2) begin
          logic [7:0] m;
          m = (mag > 12'd255) ? 8'd255 : mag[7:0];
          out_pixel <= {m, m, m};
        end else begin
          out_pixel <= '0;
        end
        if (x == XW'(WIDTH - 1)) begin
          x <= '0;
          y <= (y == YW'(HEIGHT - 1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end
endmodule
