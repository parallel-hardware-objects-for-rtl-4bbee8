// comm_matrix: parallel inter-object communication matrix.
//
// A pool of N_FIFO FIFOs. Each FIFO stores the words sent to one target
// address (fifo_owner) and may also belong to one Object Vector (fifo_vec):
// a word sent to the vector number is stored in every member FIFO. The
// owner table is an input because it is fixed by whoever builds the system
// (in the described flow: the compiler); a vector entry of 0 means "member
// of no vector".
//
// Writers: each of N_WR ports offers {valid, addr, data}. For every FIFO a
// write multiplexer picks the lowest-numbered port that aims at it. A port's
// ready is high when every FIFO it aims at has granted it and has room, so a
// broadcast is stored in all members in the same cycle or in none. A word
// whose address matches no FIFO is accepted and dropped, flagged on wr_miss.
// Readers: each of N_RD ports names the address it reads (its object number);
// a read multiplexer shows it the head of the first FIFO with that owner.
// All ports transfer in parallel, one word per port per cycle, which is the
// point of the matrix compared with a shared bus. Writer ready depends
// combinationally on valid and addr, not on data.
//
// Arbitration, the drop rule and the atomic broadcast are this design's
// choices; the FIFO pool, addressing by target object number, vector numbers
// and the multiplexers follow the described system.
module comm_matrix
  import hwo_pkg::*;
#(
  parameter int N_WR   = 2,
  parameter int N_RD   = 3,
  parameter int N_FIFO = 9,
  parameter int WIDTH  = 32,
  parameter int DEPTH  = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  addr_t            fifo_owner [N_FIFO],
  input  addr_t            fifo_vec   [N_FIFO],
  // writer ports
  input  logic             wr_valid [N_WR],
  input  addr_t            wr_addr  [N_WR],
  input  logic [WIDTH-1:0] wr_data  [N_WR],
  output logic             wr_ready [N_WR],
  output logic             wr_miss  [N_WR],
  // reader ports
  input  addr_t            rd_addr  [N_RD],
  output logic             rd_valid [N_RD],
  output logic [WIDTH-1:0] rd_data  [N_RD],
  input  logic             rd_ready [N_RD],
  // status
  output logic [$clog2(DEPTH+1)-1:0] fifo_count [N_FIFO]
);
  localparam int WSEL_W = (N_WR > 1) ? $clog2(N_WR) : 1;
  localparam int RSEL_W = (N_FIFO > 1) ? $clog2(N_FIFO) : 1;

  logic             f_wr_en   [N_FIFO];
  logic [WIDTH-1:0] f_wr_data [N_FIFO];
  logic             f_rd_en   [N_FIFO];
  logic [WIDTH-1:0] f_rd_data [N_FIFO];
  logic             f_full    [N_FIFO];
  logic             f_empty   [N_FIFO];

  // hit[p][f]: port p aims at FIFO f
  logic [N_FIFO-1:0] hit [N_WR];
  // grant: which port each FIFO listens to
  logic              f_req [N_FIFO];
  logic [WSEL_W-1:0] f_sel [N_FIFO];

  always_comb begin
    for (int p = 0; p < N_WR; p++) begin
      for (int f = 0; f < N_FIFO; f++) begin
        hit[p][f] = wr_valid[p] && (wr_addr[p] == fifo_owner[f] ||
                    (fifo_vec[f] != '0 && wr_addr[p] == fifo_vec[f]));
      end
    end
    for (int f = 0; f < N_FIFO; f++) begin
      f_req[f] = 1'b0;
      f_sel[f] = '0;
      for (int p = N_WR - 1; p >= 0; p--) begin
        if (hit[p][f]) begin
          f_req[f] = 1'b1;
          f_sel[f] = WSEL_W'(p);
        end
      end
    end
    for (int p = 0; p < N_WR; p++) begin
      wr_ready[p] = 1'b1;
      for (int f = 0; f < N_FIFO; f++) begin
        if (hit[p][f] && (f_sel[f] != WSEL_W'(p) || f_full[f])) wr_ready[p] = 1'b0;
      end
      wr_miss[p] = wr_valid[p] && (hit[p] == '0);
    end
    for (int f = 0; f < N_FIFO; f++) begin
      f_wr_en[f]   = f_req[f] && wr_ready[f_sel[f]];
      f_wr_data[f] = wr_data[f_sel[f]];
    end
  end

  // read multiplexers
  logic              r_hit [N_RD];
  logic [RSEL_W-1:0] r_sel [N_RD];

  always_comb begin
    for (int r = 0; r < N_RD; r++) begin
      r_hit[r] = 1'b0;
      r_sel[r] = '0;
      for (int f = N_FIFO - 1; f >= 0; f--) begin
        if (rd_addr[r] == fifo_owner[f]) begin
          r_hit[r] = 1'b1;
          r_sel[r] = RSEL_W'(f);
        end
      end
      rd_valid[r] = r_hit[r] && !f_empty[r_sel[r]];
      rd_data[r]  = f_rd_data[r_sel[r]];
    end
  end

  always_comb begin
    for (int f = 0; f < N_FIFO; f++) f_rd_en[f] = 1'b0;
    for (int r = 0; r < N_RD; r++) begin
      if (rd_valid[r] && rd_ready[r]) f_rd_en[r_sel[r]] = 1'b1;
    end
  end

  for (genvar f = 0; f < N_FIFO; f++) begin : g_pool
    hw_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en  (f_wr_en[f]),
      .wr_data(f_wr_data[f]),
      .rd_en  (f_rd_en[f]),
      .rd_data(f_rd_data[f]),
      .full   (f_full[f]),
      .empty  (f_empty[f]),
      .count  (fifo_count[f])
    );
  end

endmodule
