// fx_distortion: hard-clipping distortion for a 16/16-bit stereo sample.
//
// Per channel: y = clamp(x * 2**GAIN_SH, -LIMIT, +LIMIT). It is purely
// combinational and has no state, so the object has no context to save.
// The system only names a distortion effect; the curve, GAIN_SH = 2 and
// LIMIT = 12000 are this design's choice.
module fx_distortion
  import hwo_pkg::*;
#(
  parameter int GAIN_SH = 2,
  parameter int LIMIT   = 12000
) (
  input  stereo_t x,
  output stereo_t y
);
  function automatic logic signed [15:0] clip(logic signed [15:0] v);
    logic signed [31:0] g;
    g = 32'(v) <<< GAIN_SH;
    if (g > 32'(LIMIT))       return 16'(LIMIT);
    else if (g < -32'(LIMIT)) return 16'(-LIMIT);
    else                      return g[15:0];
  endfunction

  always_comb begin
    y.l = clip(x.l);
    y.r = clip(x.r);
  end
endmodule
