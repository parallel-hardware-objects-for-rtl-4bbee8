// hw_fifo: synchronous first-word-fall-through FIFO, one member of the FIFO
// pool of the communication matrix.
//
// rd_data always shows the oldest word while empty is low; rd_en pops it.
// A push and a pop may happen in the same cycle, also when the FIFO is full
// (the pop makes room). Pushes into a full FIFO without a pop are ignored.
// The memory is a plain array (a block RAM on an FPGA); only the pointers and
// the fill count are reset. Default size 128 x 32 bit = 512 bytes, the FIFO
// size of the audio example; the timing above is this design's choice.
module hw_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic push, pop;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign pop   = rd_en && !empty;
  assign push  = wr_en && (!full || pop);
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= inc(wptr);
      if (pop)  rptr <= inc(rptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // An overflowing push is a usage error of the writer.
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en);
  endproperty
  a_no_overflow: assert property (p_no_overflow)
    else $error("hw_fifo: write into full FIFO");

endmodule
