// fx_echo: feed-forward echo for a 16/16-bit stereo sample.
//
// Per channel: y[n] = sat(x[n] + x[n-DELAY] / 2). The last DELAY input
// samples are kept in a ring; the ring is the object's context. For saving,
// ctx_rd_idx selects a word of the ring in age order (0 = oldest) and
// ctx_rd_word shows it; for restoring, ctx_wr writes ctx_wr_word at position
// ctx_wr_idx in the same order (the ring pointer is reset by rst_n, so a
// restore right after loading places the words back in age order). Samples
// older than the stored history count as silence (the fill counter).
// y is combinational; the ring advances when step is high. The system only
// names an echo; the form, gain 1/2 and DELAY = 16 are this design's choice
// (a short delay keeps the context small, since it is moved to a FIFO at each
// reconfiguration).
module fx_echo
  import hwo_pkg::*;
#(
  parameter int DELAY = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step,
  input  stereo_t x,
  output stereo_t y,
  input  logic [$clog2(DELAY)-1:0] ctx_rd_idx,
  output stereo_t ctx_rd_word,
  input  logic    ctx_wr,
  input  logic [$clog2(DELAY)-1:0] ctx_wr_idx,
  input  stereo_t ctx_wr_word
);
  localparam int PW = $clog2(DELAY);

  stereo_t ring [DELAY];
  logic [PW-1:0] ptr;      // position of the oldest sample
  logic [PW:0]   fill;     // how many valid samples the ring holds
  stereo_t old;

  assign old = (fill == (PW+1)'(DELAY)) ? ring[ptr] : '0;

  always_comb begin
    y.l = sat16(20'(x.l) + 20'(old.l >>> 1));
    y.r = sat16(20'(x.r) + 20'(old.r >>> 1));
  end

  assign ctx_rd_word = (fill == (PW+1)'(DELAY)) ? ring[PW'(ptr + ctx_rd_idx)] : '0;

  always_ff @(posedge clk) begin
    if (ctx_wr)    ring[PW'(ptr + ctx_wr_idx)] <= ctx_wr_word;
    else if (step) ring[ptr] <= x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      fill <= '0;
    end else if (ctx_wr) begin
      fill <= (PW+1)'(DELAY);
    end else if (step) begin
      ptr <= ptr + 1'b1;
      if (fill != (PW+1)'(DELAY)) fill <= fill + 1'b1;
    end
  end
endmodule
