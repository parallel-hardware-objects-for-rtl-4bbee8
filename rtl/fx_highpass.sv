// fx_highpass: first-order high-pass effect for a 16/16-bit stereo sample.
//
// Per channel it tracks the same one-pole low-pass as fx_lowpass,
// s_new = s + ((x - s) >>> SHIFT), and outputs the remainder y = x - s_new,
// saturated to 16 bits. The low-pass state (one 32-bit word) is the context
// that the object wrapper saves and restores around a reconfiguration.
// y is combinational; s advances when step is high. The system only names a
// high pass; its form and SHIFT = 3 are this design's choice.
module fx_highpass
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
  stereo_t s, s_nx;

  function automatic logic signed [15:0] lp(logic signed [15:0] xs, logic signed [15:0] ss);
    logic signed [16:0] d;
    d = 17'(xs) - 17'(ss);
    return 16'(17'(ss) + (d >>> SHIFT));
  endfunction

  always_comb begin
    s_nx.l = lp(x.l, s.l);
    s_nx.r = lp(x.r, s.r);
    y.l = sat16(20'(x.l) - 20'(s_nx.l));
    y.r = sat16(20'(x.r) - 20'(s_nx.r));
  end
  assign state = s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        s <= '0;
    else if (ctx_load) s <= ctx_in;
    else if (step)     s <= s_nx;
  end
endmodule
