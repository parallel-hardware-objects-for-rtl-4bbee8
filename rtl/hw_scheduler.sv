// hw_scheduler: Hardware Scheduler for N_AREA dynamic areas sharing one
// configuration port.
//
// It keeps the set of instantiated objects (active, bit k = object number
// k+1), changed by the instantiation bus: inst_valid with inst_add = 1
// creates object inst_obj ("new"), inst_add = 0 finishes it. It decides
// which object each dynamic area holds:
//   - an empty area is given an active object that no area holds yet;
//   - while there are at least as many areas as active objects, every
//     object is loaded once and stays loaded;
//   - with more active objects than areas they are loaded in turn, round
//     robin by object number. A loaded object keeps its area for at least
//     SLICE cycles of work. After that, if an active object is waiting for
//     an area, the object is asked to stop (area_stop[a], held until
//     area_stopped[a]: the object saves its context first), the waiting
//     object is written through the configuration port (icap_start pulse with
//     icap_obj and icap_area, completion on icap_done) and announced to the
//     area with an area_load[a] pulse.
//   - a finished object is stopped at the end of its slice; its area is
//     emptied (area_unload[a]) if no object is waiting for it.
// If the waiting object was meanwhile taken by another area, a stopped
// object that is still active is restarted in place (area_load without
// reconfiguration) and restores its own context.
// Only one reconfiguration runs at a time; when several areas want the
// port, the lowest-numbered one goes first.
// The default SLICE = 100 cycles is the 1 microsecond per object at 100 MHz
// of the audio example, which uses a single area. The reconfiguration time
// is not counted here: it is whatever the configuration port takes (0.2 ms
// in the audio example). Turn order, slice rule, port arbitration and the
// handshakes are this design's choices.
module hw_scheduler
  import hwo_pkg::*;
#(
  parameter int N_OBJ  = 4,
  parameter int N_AREA = 1,
  parameter int SLICE  = 100
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // instantiation bus
  input  logic                    inst_valid,
  input  obj_t                    inst_obj,
  input  logic                    inst_add,
  output logic [N_OBJ-1:0]        active,
  // configuration port
  output logic                    icap_start,
  output obj_t                    icap_obj,
  output logic [$clog2(N_AREA+1)-1:0] icap_area,
  input  logic                    icap_done,
  // dynamic areas
  output logic [N_AREA-1:0]       area_stop,
  input  logic [N_AREA-1:0]       area_stopped,
  output logic [N_AREA-1:0]       area_load,
  output logic [N_AREA-1:0]       area_unload,
  output obj_t [N_AREA-1:0]       area_obj
);
  localparam int CW = $clog2(SLICE + 1);
  localparam int AW = $clog2(N_AREA + 1);

  typedef enum logic [1:0] {S_EMPTY, S_RECONF, S_RUN, S_STOP} state_e;
  state_e        state     [N_AREA];
  obj_t          cur       [N_AREA];   // object loaded in the area
  obj_t          tgt       [N_AREA];   // object being configured into it
  logic [CW-1:0] slice_cnt [N_AREA];
  logic          icap_busy;
  obj_t          rr;                   // last object given an area

  // Next object of 'act' after 'from' in round-robin order (from itself last).
  function automatic obj_t next_obj(obj_t from, logic [N_OBJ-1:0] act);
    obj_t r;
    int   start;
    r = OBJ_NONE;
    start = (from == OBJ_NONE) ? N_OBJ - 1 : int'(from) - 1;
    for (int i = N_OBJ; i >= 1; i--) begin
      int k;
      k = (start + i) % N_OBJ;
      if (act[k]) r = obj_t'(k + 1);
    end
    return r;
  endfunction

  function automatic logic [N_OBJ-1:0] onehot(obj_t o);
    logic [N_OBJ-1:0] m;
    m = '0;
    for (int k = 0; k < N_OBJ; k++) if (obj_t'(k + 1) == o) m[k] = 1'b1;
    return m;
  endfunction

  // Objects held by an area (loaded, stopping or being configured).
  logic [N_OBJ-1:0] placed;
  logic [N_OBJ-1:0] waiting;
  logic [N_AREA-1:0] cur_act;
  obj_t             nxt;

  always_comb begin
    placed = '0;
    for (int a = 0; a < N_AREA; a++) begin
      if (state[a] == S_RECONF) placed |= onehot(tgt[a]);
      else                      placed |= onehot(cur[a]);
      cur_act[a] = (onehot(cur[a]) & active) != '0;
    end
    waiting = active & ~placed;
    nxt     = next_obj(rr, waiting);
  end

  always_comb begin
    for (int a = 0; a < N_AREA; a++) begin
      area_stop[a] = (state[a] == S_STOP);
      area_obj[a]  = cur[a];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
    end else if (inst_valid && inst_obj != OBJ_NONE && int'(inst_obj) <= N_OBJ) begin
      active[int'(inst_obj) - 1] <= inst_add;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < N_AREA; a++) begin
        state[a]     <= S_EMPTY;
        cur[a]       <= OBJ_NONE;
        tgt[a]       <= OBJ_NONE;
        slice_cnt[a] <= '0;
      end
      icap_busy   <= 1'b0;
      icap_start  <= 1'b0;
      icap_obj    <= OBJ_NONE;
      icap_area   <= '0;
      rr          <= OBJ_NONE;
      area_load   <= '0;
      area_unload <= '0;
    end else begin : sched
      logic granted;   // the port has been given away in this cycle
      granted = icap_busy;
      icap_start  <= 1'b0;
      area_load   <= '0;
      area_unload <= '0;
      if (icap_done) icap_busy <= 1'b0;
      for (int a = 0; a < N_AREA; a++) begin
        case (state[a])
          S_EMPTY: begin
            if (waiting != '0 && !granted) begin
              granted    = 1'b1;
              icap_busy  <= 1'b1;
              icap_start <= 1'b1;
              icap_obj   <= nxt;
              icap_area  <= AW'(a);
              tgt[a]     <= nxt;
              rr         <= nxt;
              state[a]   <= S_RECONF;
            end
          end
          S_RECONF: begin
            if (icap_done && icap_area == AW'(a)) begin
              cur[a]       <= tgt[a];
              area_load[a] <= 1'b1;
              slice_cnt[a] <= '0;
              state[a]     <= S_RUN;
            end
          end
          S_RUN: begin
            if (slice_cnt[a] != CW'(SLICE)) slice_cnt[a] <= slice_cnt[a] + 1'b1;
            if (slice_cnt[a] >= CW'(SLICE - 1) && (waiting != '0 || !cur_act[a]))
              state[a] <= S_STOP;
          end
          S_STOP: begin
            if (area_stopped[a]) begin
              if (waiting != '0) begin
                // give the area to the next waiting object
                if (!granted) begin
                  granted    = 1'b1;
                  icap_busy  <= 1'b1;
                  icap_start <= 1'b1;
                  icap_obj   <= nxt;
                  icap_area  <= AW'(a);
                  tgt[a]     <= nxt;
                  rr         <= nxt;
                  state[a]   <= S_RECONF;
                end
              end else if (cur_act[a]) begin
                // nobody waits any more: restart the object in place
                area_load[a] <= 1'b1;
                slice_cnt[a] <= '0;
                state[a]     <= S_RUN;
              end else begin
                cur[a]         <= OBJ_NONE;
                area_unload[a] <= 1'b1;
                state[a]       <= S_EMPTY;
              end
            end
          end
          default: state[a] <= S_EMPTY;
        endcase
      end
    end
  end

  // The configuration port is only started when it is idle.
  a_icap_idle: assert property (@(posedge clk) disable iff (!rst_n)
    icap_start |-> !$past(icap_busy))
    else $error("hw_scheduler: icap_start while the port is busy");

endmodule
