// po_multiplier: the Multiplier Parallel Object of the simple dataflow
// example.
//
// calc() p = a * b runs every clock; the product is truncated to W bits
// (wrap-around, like a 32-bit Java int; the low W bits do not depend on
// signedness) and registered: one cycle latency.
module po_multiplier #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= W'(a * b);
  end
endmodule
