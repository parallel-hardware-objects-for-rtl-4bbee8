// hwo_top: the Hardware Object example designs side by side.
//
//   simple dataflow  P1 = (X1 + Y1) * (X2 + Y2) from two adder objects and a
//                    multiplier object (2 cycles latency);
//   Pong             two bars and up to N_BALLS dynamically created balls,
//                    driven by button commands and a frame tick;
//   audio DSP        a stereo stream through the instantiated effects (high
//                    pass, low pass, distortion, echo) that share one
//                    dynamic area through a communication matrix and the
//                    Hardware Scheduler;
//   video            an RGB pixel stream through gamma correction and edge
//                    detection, each object switched in or out.
// The four share only clock and reset. The device configuration port that
// writes the partial bitstreams is outside: the audio system asks for a
// reconfiguration on icap_start/icap_obj and expects icap_done when the
// area holds the new object. The video and serial outputs of Pong are also
// outside; the ball and bar positions are outputs.
module hwo_top
  import hwo_pkg::*;
#(
  parameter int W       = 32,
  parameter int CW      = 8,
  parameter int N_BALLS = 16,
  parameter int SLICE   = 100,
  parameter int DEPTH   = 128,
  parameter int DELAY   = 16,
  parameter int VID_W   = 352,
  parameter int VID_H   = 288
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // simple dataflow
  input  logic [W-1:0]         df_x1,
  input  logic [W-1:0]         df_y1,
  input  logic [W-1:0]         df_x2,
  input  logic [W-1:0]         df_y2,
  output logic [W-1:0]         df_p1,
  // Pong
  input  logic                 pong_cmd_valid,
  input  logic [2:0]           pong_cmd,
  input  logic signed [CW-1:0] pong_new_x,
  input  logic signed [CW-1:0] pong_new_y,
  input  logic                 pong_tick,
  output logic [N_BALLS-1:0]   pong_ball_alive,
  output logic signed [CW-1:0] pong_ball_x [N_BALLS],
  output logic signed [CW-1:0] pong_ball_y [N_BALLS],
  output logic signed [CW-1:0] pong_bar_x  [2],
  output logic signed [CW-1:0] pong_bar_y  [2],
  output logic                 pong_add_rejected,
  output logic [N_BALLS-1:0]   pong_ball_hit_bar,
  output logic [N_BALLS-1:0]   pong_ball_finished,
  // audio DSP
  input  logic                 aud_in_valid,
  input  logic [31:0]          aud_in_data,
  output logic                 aud_in_ready,
  output logic                 aud_out_valid,
  output logic [31:0]          aud_out_data,
  input  logic                 aud_out_ready,
  input  logic                 fx_inst_valid,
  input  logic [OBJ_W-1:0]     fx_inst_obj,
  input  logic                 fx_inst_add,
  output logic                 icap_start,
  output logic [OBJ_W-1:0]     icap_obj,
  input  logic                 icap_done,
  output logic [3:0]           fx_active,
  output logic [OBJ_W-1:0]     fx_loaded,
  output logic                 fx_running,
  output logic                 fx_stopping,
  output logic [$clog2(DEPTH+1)-1:0] aud_out_fill,
  output logic                 fx_route_miss,
  // video
  input  logic                 vid_gamma_en,
  input  logic                 vid_edge_en,
  input  logic                 vid_in_valid,
  input  logic [23:0]          vid_in_pixel,
  output logic                 vid_out_valid,
  output logic [23:0]          vid_out_pixel
);
  simple_dataflow #(.W(W)) u_dataflow (
    .clk, .rst_n, .x1(df_x1), .y1(df_y1), .x2(df_x2), .y2(df_y2), .p1(df_p1));

  pong_game #(.CW(CW), .N_BALLS(N_BALLS)) u_pong (
    .clk, .rst_n,
    .cmd_valid(pong_cmd_valid), .cmd(pong_cmd),
    .new_x(pong_new_x), .new_y(pong_new_y), .tick(pong_tick),
    .ball_alive(pong_ball_alive), .ball_x(pong_ball_x), .ball_y(pong_ball_y),
    .bar_x(pong_bar_x), .bar_y(pong_bar_y),
    .add_rejected(pong_add_rejected),
    .ball_hit_bar(pong_ball_hit_bar), .ball_finished(pong_ball_finished));

  stereo_t in_s, out_s;
  assign in_s         = stereo_t'(aud_in_data);
  assign aud_out_data = 32'(out_s);

  audio_dsp #(.SLICE(SLICE), .DEPTH(DEPTH), .DELAY(DELAY)) u_audio (
    .clk, .rst_n,
    .in_valid(aud_in_valid), .in_data(in_s), .in_ready(aud_in_ready),
    .out_valid(aud_out_valid), .out_data(out_s), .out_ready(aud_out_ready),
    .inst_valid(fx_inst_valid), .inst_obj(fx_inst_obj), .inst_add(fx_inst_add),
    .icap_start, .icap_obj, .icap_done,
    .active(fx_active), .loaded_obj(fx_loaded),
    .obj_running(fx_running), .obj_stopping(fx_stopping),
    .out_fill(aud_out_fill), .route_miss(fx_route_miss));

  video_dsp #(.WIDTH(VID_W), .HEIGHT(VID_H)) u_video (
    .clk, .rst_n,
    .gamma_en(vid_gamma_en), .edge_en(vid_edge_en),
    .in_valid(vid_in_valid), .in_pixel(vid_in_pixel),
    .out_valid(vid_out_valid), .out_pixel(vid_out_pixel));
endmodule
