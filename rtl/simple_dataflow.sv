// simple_dataflow: two adder objects feeding one multiplier object,
// P1 = (X1 + Y1) * (X2 + Y2).
//
// The three objects run in parallel all the time, as hardware does. Each
// registers its result, so p1 follows the operands two clock cycles later
// and a new set of operands can be applied every cycle. Structure and names
// follow the example dataflow; the per-object registers are this design's way
// of keeping the results consistent from one object to the next.
module simple_dataflow #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] y1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] y2,
  output logic [W-1:0] p1
);
  logic [W-1:0] s1, s2;

  po_adder      #(.W(W)) u_a1 (.clk, .rst_n, .a(x1), .b(y1), .s(s1));
  po_adder      #(.W(W)) u_a2 (.clk, .rst_n, .a(x2), .b(y2), .s(s2));
  po_multiplier #(.W(W)) u_m  (.clk, .rst_n, .a(s1), .b(s2), .p(p1));
endmodule
