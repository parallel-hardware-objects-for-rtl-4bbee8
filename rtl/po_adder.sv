// po_adder: the Adder Parallel Object of the simple dataflow example.
//
// Its set methods a and b are inputs, its get method s an output, and its
// calc() s = a + b runs every clock: the sum is registered, so s shows the
// sum of the operands of the previous cycle (one cycle latency). W-bit two's
// complement with wrap-around, like a 32-bit Java int. Registering the result
// is how the hardware keeps the outputs consistent between objects.
module po_adder #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else        s <= a + b;
  end
endmodule
