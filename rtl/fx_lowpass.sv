// fx_lowpass: first-order IIR low-pass effect, applied to both channels of a
// 16/16-bit stereo sample.
//
// Per channel: s_new = s + ((x - s) >>> SHIFT), y = s_new. The state s of
// both channels (one 32-bit word) is the object's context: it is shown on
// state and can be replaced through ctx_load/ctx_in, so the wrapper can save
// it before the object is removed and restore it when it is loaded again.
// y is combinational in x and s; s advances on a clock edge when step is
// high. The system only names a low pass; the filter form and the default
// SHIFT = 3 (pole at 7/8) are this design's choice.
module fx_lowpass
  import hwo_pkg::*;
#(
  parameter int SHIFT = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step,
  input  stereo_t x,
  output stereo_t y,
  output stereo_t state,
  input  logic    ctx_load,
  input  stereo_t ctx_in
);
  stereo_t s;

  function automatic logic signed [15:0] lp(logic signed [15:0] xs, logic signed [15:0] ss);
    logic signed [16:0] d;
    d = 17'(xs) - 17'(ss);
    return 16'(17'(ss) + (d >>> SHIFT));
  endfunction

  always_comb begin
    y.l = lp(x.l, s.l);
    y.r = lp(x.r, s.r);
  end
  assign state = s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        s <= '0;
    else if (ctx_load) s <= ctx_in;
    else if (step)     s <= y;
  end
endmodule
