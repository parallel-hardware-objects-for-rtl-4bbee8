// hw_object: a streaming Hardware Object - one audio effect plus the control
// every dynamically loaded object needs.
//
// The object's calc() is the effect core selected by KIND (fx_highpass,
// fx_lowpass, fx_distortion or fx_echo). Its set method is the read port on
// the object's own data FIFO in the communication matrix, its get method the
// write port into the matrix, addressed to the object number on target.
//
// Life cycle, starting when the enclosing area releases obj_rst_n (the
// object has just been configured):
//   RESTORE  if the object's context FIFO holds a saved context, read
//            CTX_WORDS words from it back into the core; else start fresh.
//   RUN      one stereo sample per cycle: pop from the data FIFO, compute,
//            push to the target; stalls when either side cannot move.
//   SAVE     after stop is raised: write the context, CTX_WORDS words, to
//            the matrix addressed to this object's context FIFO.
//   STOPPED  stopped is high; the area may now be reconfigured.
// stop is a level held by the scheduler until stopped is seen. The
// save-before-removal and the per-object addressing follow the described
// system; the state machine, the context format and the separate context
// FIFO (context flag in the address) are this design's choices.
module hw_object
  import hwo_pkg::*;
#(
  parameter fx_kind_e KIND  = FX_HP,
  parameter int       DELAY = 16      // echo delay, used when KIND == FX_ECHO
) (
  input  logic    clk,
  input  logic    obj_rst_n,    // low while the object is not configured
  input  obj_t    own,          // this object's number
  input  addr_t   target,       // where results go
  input  logic    stop,
  output logic    stopped,
  output logic    running,
  // data FIFO (set)
  input  logic    rd_valid,
  input  stereo_t rd_data,
  output logic    rd_ready,
  // context FIFO
  input  logic    ctx_valid,
  input  stereo_t ctx_data,
  output logic    ctx_ready,
  // matrix write port (get)
  output logic    wr_valid,
  output addr_t   wr_addr,
  output stereo_t wr_data,
  input  logic    wr_ready
);
  localparam int CTX_WORDS = (KIND == FX_ECHO) ? DELAY :
                             (KIND == FX_DIST) ? 0 : 1;
  localparam int IW = $clog2(DELAY + 1);

  typedef enum logic [1:0] {S_RESTORE, S_RUN, S_SAVE, S_STOPPED} state_e;
  state_e state;
  logic [IW-1:0] idx;

  logic    step;
  stereo_t y;
  stereo_t ctx_word;     // context word idx, for SAVE
  logic    ctx_apply;    // write restored word idx into the core

  // ---------------------------------------------------------------- core
  if (KIND == FX_HP) begin : g_hp
    fx_highpass u_core (.clk, .rst_n(obj_rst_n), .step, .x(rd_data), .y,
                        .state(ctx_word), .ctx_load(ctx_apply), .ctx_in(ctx_data));
  end else if (KIND == FX_LP) begin : g_lp
    fx_lowpass u_core (.clk, .rst_n(obj_rst_n), .step, .x(rd_data), .y,
                       .state(ctx_word), .ctx_load(ctx_apply), .ctx_in(ctx_data));
  end else if (KIND == FX_DIST) begin : g_dist
    fx_distortion u_core (.x(rd_data), .y);
    assign ctx_word = '0;
  end else begin : g_echo
    fx_echo #(.DELAY(DELAY)) u_core (
      .clk, .rst_n(obj_rst_n), .step, .x(rd_data), .y,
      .ctx_rd_idx($clog2(DELAY)'(idx)), .ctx_rd_word(ctx_word),
      .ctx_wr(ctx_apply), .ctx_wr_idx($clog2(DELAY)'(idx)), .ctx_wr_word(ctx_data));
  end

  // ---------------------------------------------------------------- control
  always_comb begin
    rd_ready  = 1'b0;
    ctx_ready = 1'b0;
    ctx_apply = 1'b0;
    wr_valid  = 1'b0;
    wr_addr   = target;
    wr_data   = y;
    step      = 1'b0;
    case (state)
      S_RESTORE: begin
        ctx_ready = ctx_valid && (CTX_WORDS != 0);
        ctx_apply = ctx_valid && (CTX_WORDS != 0);
      end
      S_RUN: begin
        wr_valid = rd_valid && !stop;
        rd_ready = wr_ready && !stop;
        step     = rd_valid && wr_ready && !stop;
      end
      S_SAVE: begin
        wr_valid = 1'b1;
        wr_addr  = ctx_addr(own);
        wr_data  = ctx_word;
      end
      default: ;
    endcase
  end

  assign stopped = (state == S_STOPPED);
  assign running = (state == S_RUN);

  always_ff @(posedge clk or negedge obj_rst_n) begin
    if (!obj_rst_n) begin
      state <= S_RESTORE;
      idx   <= '0;
    end else begin
      case (state)
        S_RESTORE: begin
          if (CTX_WORDS == 0 || (idx == '0 && !ctx_valid)) begin
            state <= S_RUN;
          end else if (ctx_valid) begin
            if (idx == IW'(CTX_WORDS - 1)) begin
              idx   <= '0;
              state <= S_RUN;
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
        S_RUN: begin
          if (stop) begin
            idx   <= '0;
            state <= (CTX_WORDS == 0) ? S_STOPPED : S_SAVE;
          end
        end
        S_SAVE: begin
          if (wr_ready) begin
            if (idx == IW'(CTX_WORDS - 1)) state <= S_STOPPED;
            else                           idx <= idx + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
