// tb_hw_scheduler: self-checking test of the Hardware Scheduler with a
// configuration-port model and a simple area model (stopped follows stop
// after a few cycles, like an object saving its context).
// Checks: nothing is loaded while no object is active; a single active
// object is loaded once and kept; with several active objects each keeps the
// area for exactly SLICE cycles and they are loaded in round-robin order;
// a finished object leaves the rotation; when all are finished the area is
// emptied.
// A second instance with two areas checks: two active objects are each
// loaded once and kept; with three they take turns, no object is ever in
// both areas, every active object gets an area, each keeps it for at least
// SLICE cycles and the configuration port is never started while busy;
// back to two objects the reconfigurations stop; with none both areas are
// emptied.
module tb_hw_scheduler;
  import hwo_pkg::*;
  localparam int SLICE = 20, RC = 30, N = 4;
  logic clk = 0, rst_n = 0;
  logic inst_valid, inst_add, icap_start, icap_done, area_stop, area_stopped;
  logic area_load, area_unload;
  obj_t inst_obj, icap_obj, area_obj;
  logic [N-1:0] active;
  logic icap_area;
  int n_reconf; logic icap_busy;
  int checks = 0, failures = 0;

  hw_scheduler #(.N_OBJ(N), .SLICE(SLICE)) dut (.*);
  icap_model #(.RECONF_CYCLES(RC)) u_icap (.clk, .rst_n, .start(icap_start), .done(icap_done),
                                          .n_reconf, .busy(icap_busy));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // area model: stopped 3 cycles after stop rises
  int stop_cnt;
  always_ff @(posedge clk) begin
    if (!area_stop) stop_cnt <= 0;
    else if (stop_cnt < 3) stop_cnt <= stop_cnt + 1;
  end
  assign area_stopped = area_stop && stop_cnt == 3;

  // record loads and the run length of each load
  obj_t loads [$];
  int   run_len [$];
  int   cyc, load_cyc;
  obj_t cur_obj = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (area_load && rst_n) begin
      loads.push_back(area_obj);
      load_cyc = cyc;
      cur_obj = area_obj;
    end
    if (rst_n && area_stop && !dut_stop_q) run_len.push_back(cyc - load_cyc);
    dut_stop_q <= area_stop;
  end
  logic dut_stop_q = 0;
  initial cyc = 0;

  task automatic inst(obj_t o, bit add);
    @(negedge clk);
    inst_valid = 1; inst_obj = o; inst_add = add;
    @(negedge clk);
    inst_valid = 0;
  endtask

  initial begin
    inst_valid = 0; inst_obj = 0; inst_add = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    chk(loads.size() == 0 && n_reconf == 0, "idle without objects");
    // one object: loaded once, kept
    inst(3, 1);
    repeat (400) @(posedge clk);
    chk(loads.size() == 1 && loads[0] == 3, "single object loaded");
    chk(n_reconf == 1 && run_len.size() == 0, "single object kept");
    chk(active == 4'b0100, "active mask");
    // three objects: round robin 3 -> 4 -> 1 -> 3 -> 4 ...
    inst(1, 1);
    inst(4, 1);
    repeat (600) @(posedge clk);
    begin
      automatic obj_t exp_seq [7] = '{3, 4, 1, 3, 4, 1, 3};
      chk(loads.size() >= 7, "enough turns");
      for (int i = 0; i < 7 && i < loads.size(); i++) chk(loads[i] == exp_seq[i], "round-robin order");
      // the first stop ends the single object's open-ended stay
      for (int i = 1; i < run_len.size(); i++) chk(run_len[i] == SLICE, "slice length");
    end
    // finish object 4: it leaves the rotation
    inst(4, 0);
    begin
      automatic int n0 = loads.size();
      repeat (300) @(posedge clk);
      for (int i = n0 + 1; i < loads.size(); i++) chk(loads[i] != 4, "finished object not reloaded");
      chk(loads.size() > n0 + 2, "rotation continues");
    end
    // finish all: area emptied
    inst(1, 0);
    inst(3, 0);
    repeat (200) @(posedge clk);
    chk(active == 0, "none active");
    chk(!icap_busy && !area_stop, "scheduler idle");
    begin
      automatic int n1 = loads.size();
      repeat (200) @(posedge clk);
      chk(loads.size() == n1, "no loads after all finished");
    end
    chk(saw_unload, "area emptied");
    $display("loads %0d, reconfigurations %0d", loads.size(), n_reconf);
    wait (done2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic saw_unload = 0;

  // ------------------------------------------------ two-area instance
  logic       i2_valid, i2_add, i2_start, i2_done;
  obj_t       i2_obj, i2_icap_obj;
  logic [1:0] i2_area;
  logic [1:0] a2_stop, a2_stopped, a2_load, a2_unload;
  obj_t [1:0] a2_obj;
  logic [N-1:0] active2;
  int n_reconf2; logic icap2_busy;
  hw_scheduler #(.N_OBJ(N), .N_AREA(2), .SLICE(SLICE)) dut2 (
    .clk, .rst_n, .inst_valid(i2_valid), .inst_obj(i2_obj), .inst_add(i2_add),
    .active(active2), .icap_start(i2_start), .icap_obj(i2_icap_obj), .icap_area(i2_area),
    .icap_done(i2_done), .area_stop(a2_stop), .area_stopped(a2_stopped),
    .area_load(a2_load), .area_unload(a2_unload), .area_obj(a2_obj));
  icap_model #(.RECONF_CYCLES(RC)) u_icap2 (.clk, .rst_n, .start(i2_start), .done(i2_done),
                                           .n_reconf(n_reconf2), .busy(icap2_busy));

  // area models: stopped 3 cycles after stop; record what each area holds
  int   stop2 [2];
  obj_t held2 [2];
  int   since2 [2];
  int   loads2 = 0, short_run2 = 0, busy_start2 = 0, both2 = 0;
  logic [N-1:0] got2 = '0;
  for (genvar a = 0; a < 2; a++) begin : g_area
    always_ff @(posedge clk) begin
      if (!a2_stop[a]) stop2[a] <= 0;
      else if (stop2[a] < 3) stop2[a] <= stop2[a] + 1;
    end
    assign a2_stopped[a] = a2_stop[a] && stop2[a] == 3;
  end
  logic [1:0] a2_stop_q = '0;
  always @(posedge clk) begin
    if (!rst_n) begin
      held2[0] = 0; held2[1] = 0;
    end else begin
      for (int a = 0; a < 2; a++) begin
        since2[a]++;
        if (a2_load[a]) begin
          held2[a] = a2_obj[a]; since2[a] = 0; loads2++;
          got2[int'(a2_obj[a]) - 1] = 1'b1;
        end
        if (a2_unload[a]) held2[a] = 0;
        if (a2_stop[a] && !a2_stop_q[a] && since2[a] < SLICE) short_run2++;
      end
      if (held2[0] != 0 && held2[0] == held2[1]) both2++;
      if (i2_start && icap2_busy) busy_start2++;
      a2_stop_q <= a2_stop;
    end
  end

  task automatic inst2(obj_t o, bit add);
    @(negedge clk);
    i2_valid = 1; i2_obj = o; i2_add = add;
    @(negedge clk);
    i2_valid = 0;
  endtask

  initial begin
    i2_valid = 0; i2_obj = 0; i2_add = 0;
    wait (rst_n);
    repeat (20) @(posedge clk);
    // two objects, two areas: each loaded once and kept
    inst2(2, 1);
    inst2(4, 1);
    repeat (400) @(posedge clk);
    chk(n_reconf2 == 2 && loads2 == 2, "two areas: both loaded once");
    chk(a2_stop == 0, "two areas: both kept");
    chk({held2[0], held2[1]} == {obj_t'(2), obj_t'(4)} || {held2[0], held2[1]} == {obj_t'(4), obj_t'(2)},
        "two areas: objects placed");
    // three objects: take turns
    inst2(1, 1);
    got2 = '0;
    repeat (1500) @(posedge clk);
    chk(got2 == 4'b1011, "two areas: every active object got an area");
    chk(n_reconf2 > 6, "two areas: objects in turn");
    // back to two objects: the turns stop
    inst2(2, 0);
    repeat (300) @(posedge clk);
    begin
      automatic int r0 = n_reconf2;
      repeat (500) @(posedge clk);
      chk(n_reconf2 == r0, "two areas: no reconfiguration with two objects");
      chk(a2_stop == 0 && held2[0] != held2[1] && held2[0] != 2 && held2[1] != 2 &&
          held2[0] != 0 && held2[1] != 0, "two areas: remaining objects kept");
    end
    // none: both areas emptied
    inst2(1, 0);
    inst2(4, 0);
    repeat (300) @(posedge clk);
    chk(held2[0] == 0 && held2[1] == 0 && !icap2_busy, "two areas: emptied");
    chk(both2 == 0, "two areas: no object in both areas");
    chk(short_run2 == 0, "two areas: slice kept");
    chk(busy_start2 == 0, "two areas: port not started while busy");
    $display("two areas: loads %0d, reconfigurations %0d", loads2, n_reconf2);
    done2 = 1;
  end
  bit done2 = 0;
  always @(posedge clk) if (area_unload && rst_n) saw_unload = 1;
endmodule
