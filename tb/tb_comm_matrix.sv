// tb_comm_matrix: self-checking test of the communication matrix.
// Three writers send to random addresses (single objects, an Object Vector
// number, and an address no FIFO owns); three readers read their own object
// numbers with random back-pressure. A scoreboard keeps one queue per FIFO
// and checks every word read, rd_valid, the ready rules (no write into a full
// FIFO, lower port wins a shared FIFO, broadcast all-or-nothing), the miss
// flag, and that several transfers happen in the same cycle.
module tb_comm_matrix;
  import hwo_pkg::*;
  localparam int NW = 3, NR = 3, NF = 4, D = 4, W = 16;
  logic clk = 0, rst_n = 0;
  addr_t fifo_owner [NF];
  addr_t fifo_vec   [NF];
  logic  wr_valid [NW]; addr_t wr_addr [NW]; logic [W-1:0] wr_data [NW];
  logic  wr_ready [NW]; logic  wr_miss [NW];
  addr_t rd_addr [NR]; logic rd_valid [NR]; logic [W-1:0] rd_data [NR]; logic rd_ready [NR];
  logic [$clog2(D+1)-1:0] fifo_count [NF];
  int checks = 0, failures = 0;
  int par_wr = 0, par_rd = 0, bcast = 0, misses = 0, stalls = 0;

  comm_matrix #(.N_WR(NW), .N_RD(NR), .N_FIFO(NF), .WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t q0=%0d q1=%0d q2=%0d q3=%0d cnt=%0d %0d %0d %0d", what, $time, q[0].size(), q[1].size(), q[2].size(), q[3].size(), fifo_count[0], fifo_count[1], fifo_count[2], fifo_count[3]);
    end
  endtask

  logic [W-1:0] q [NF][$];
  addr_t choices [6] = '{5'd1, 5'd2, 5'd3, 5'd4, 5'd8, 5'd9};

  function automatic bit aims_at(addr_t a, int f);
    return a == fifo_owner[f] || (fifo_vec[f] != 0 && a == fifo_vec[f]);
  endfunction

  initial begin
    fifo_owner = '{5'd1, 5'd2, 5'd3, 5'd4};
    fifo_vec   = '{5'd8, 5'd8, 5'd0, 5'd0};
    rd_addr    = '{5'd1, 5'd2, 5'd3};
    for (int p = 0; p < NW; p++) begin wr_valid[p] = 0; wr_addr[p] = 0; wr_data[p] = 0; end
    for (int r = 0; r < NR; r++) rd_ready[r] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int nw, nr;
      bit full_b [NF];
      bit taken  [NF];
      bit acc_w [NW];
      bit acc_r [NR];
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        wr_valid[p] = ($urandom % 100) < 60;
        wr_addr[p]  = choices[$urandom % 6];
        wr_data[p]  = W'($urandom);
      end
      // reader 2 reads object 3 or object 4 (which no one else reads)
      rd_addr[2] = ((i / 200) % 2) ? 5'd4 : 5'd3;
      for (int r = 0; r < NR; r++) rd_ready[r] = ($urandom % 100) < ((i / 700) % 2 ? 30 : 80);
      #1;
      // reads
      nr = 0;
      for (int r = 0; r < NR; r++) begin
        int f;
        f = -1;
        for (int k = NF - 1; k >= 0; k--) if (rd_addr[r] == fifo_owner[k]) f = k;
        chk(rd_valid[r] == (f >= 0 && q[f].size() > 0), "rd_valid");
        if (rd_valid[r]) chk(rd_data[r] == q[f][0], "rd_data");
      end
      for (int f = 0; f < NF; f++) begin
        full_b[f] = q[f].size() == D;
        taken[f]  = 0;
        chk(fifo_count[f] == q[f].size(), "count");
      end
      // ready rules and writes, in port priority order
      nw = 0;
      for (int p = 0; p < NW; p++) begin
        bit any, exp_ready;
        any = 0; exp_ready = 1;
        if (wr_valid[p]) begin
          for (int f = 0; f < NF; f++) if (aims_at(wr_addr[p], f)) begin
            any = 1;
            if (full_b[f] || taken[f]) exp_ready = 0;
          end
          for (int f = 0; f < NF; f++) if (aims_at(wr_addr[p], f)) taken[f] = 1;
        end
        chk(wr_ready[p] == exp_ready, "wr_ready");
        chk(wr_miss[p] == (wr_valid[p] && !any), "wr_miss");
        if (wr_valid[p] && !any) misses++;
        if (wr_valid[p] && !exp_ready) stalls++;
        if (wr_valid[p] && wr_ready[p] && any) begin
          nw++;
          if (wr_addr[p] == 5'd8) bcast++;
        end
      end
      if (nw >= 2) par_wr++;
      for (int r = 0; r < NR; r++) if (rd_valid[r] && rd_ready[r]) nr++;
      if (nr >= 2) par_rd++;
      for (int p = 0; p < NW; p++) acc_w[p] = wr_valid[p] && wr_ready[p];
      for (int r = 0; r < NR; r++) acc_r[r] = rd_valid[r] && rd_ready[r];
      @(posedge clk);
      #1;
      for (int r = 0; r < NR; r++) if (acc_r[r]) begin
        for (int k = NF - 1; k >= 0; k--) if (rd_addr[r] == fifo_owner[k]) begin
          void'(q[k].pop_front());
          break;
        end
      end
      for (int p = 0; p < NW; p++) if (acc_w[p])
        for (int f = 0; f < NF; f++) if (aims_at(wr_addr[p], f)) q[f].push_back(wr_data[p]);
    end
    chk(par_wr > 0, "parallel writes");
    chk(par_rd > 0, "parallel reads");
    chk(bcast > 0, "vector broadcast");
    chk(misses > 0, "address miss");
    chk(stalls > 0, "writer stall");
    $display("parallel writes %0d, parallel reads %0d, broadcasts %0d, misses %0d, stalls %0d",
             par_wr, par_rd, bcast, misses, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
