// video_gamma: gamma-correction Hardware Object for an RGB pixel stream.
//
// Each 8-bit colour channel is mapped through a 256-entry table
// out = round(255 * (in / 255) ** (1 / GAMMA)). The table is computed when
// the design is elaborated. One pixel per clock: in_valid/in_pixel are
// registered, and out_valid/out_pixel follow one clock later. The pixel
// format is 24 bits {R, G, B}. The system names a gamma-correction object on
// a 352x288, 3-byte-per-pixel stream; the curve and GAMMA = 2.2 are this
// design's choice.
module video_gamma #(
  parameter real GAMMA = 2.2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [23:0] in_pixel,
  output logic        out_valid,
  output logic [23:0] out_pixel
);
  typedef logic [7:0] lut_t [256];

  function automatic lut_t make_lut();
    lut_t t;
    for (int i = 0; i < 256; i++)
      t[i] = 8'($rtoi(255.0 * $pow(real'(i) / 255.0, 1.0 / GAMMA) + 0.5));
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pixel <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_pixel <= {LUT[in_pixel[23:16]], LUT[in_pixel[15:8]], LUT[in_pixel[7:0]]};
    end
  end
endmodule
