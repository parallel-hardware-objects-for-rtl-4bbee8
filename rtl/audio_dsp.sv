// audio_dsp: the audio example system built from Hardware Objects.
//
// A 32-bit stereo stream (16 bits per channel) enters on in_*, passes the
// instantiated effects in the fixed order high pass -> low pass ->
// distortion -> echo, and leaves on out_*. Effects that are not instantiated
// are skipped. Each effect is a Hardware Object; all of them share one
// dynamic area, so when several are instantiated the scheduler loads them in
// turn and the FIFOs of the communication matrix hold the samples of the
// objects that are currently not configured.
//
// Matrix layout (object numbers: 1 HP, 2 LP, 3 DIST, 4 ECHO, 5 output):
//   FIFO 0..3  data FIFOs of objects 1..4 (members of vector VEC_FX)
//   FIFO 4..7  context FIFOs of objects 1..4
//   FIFO 8     output FIFO towards the outer world
//   write port 0 = stream input, 1 = dynamic area
//   read port 0 = area data, 1 = area context, 2 = stream output
// The target address of the input and of each object is the next
// instantiated effect in the chain, or the output. The routing in the
// matrix is set here, where the described system has its compiler do it.
// Reconfiguration is requested on icap_start/icap_obj and must be answered
// with icap_done by the device configuration port outside this block.
module audio_dsp
  import hwo_pkg::*;
#(
  parameter int SLICE = 100,   // cycles an object keeps the area per turn
  parameter int DEPTH = 128,   // words per FIFO (512 bytes)
  parameter int DELAY = 16     // echo delay in samples
) (
  input  logic    clk,
  input  logic    rst_n,
  // stream in / out
  input  logic    in_valid,
  input  stereo_t in_data,
  output logic    in_ready,
  output logic    out_valid,
  output stereo_t out_data,
  input  logic    out_ready,
  // instantiation bus
  input  logic    inst_valid,
  input  obj_t    inst_obj,
  input  logic    inst_add,
  // configuration port
  output logic    icap_start,
  output obj_t    icap_obj,
  input  logic    icap_done,
  // status
  output logic [3:0] active,
  output obj_t    loaded_obj,
  output logic    obj_running,
  output logic    obj_stopping,
  output logic [$clog2(DEPTH+1)-1:0] out_fill,
  output logic    route_miss      // a word was sent to an address no FIFO owns
);
  localparam int N_OBJ  = 4;
  localparam int N_FIFO = 9;
  localparam int CW     = $clog2(DEPTH + 1);

  // ------------------------------------------------------------ routing table
  addr_t fifo_owner [N_FIFO];
  addr_t fifo_vec   [N_FIFO];
  always_comb begin
    for (int k = 0; k < N_OBJ; k++) begin
      fifo_owner[k]         = data_addr(obj_t'(k + 1));
      fifo_vec[k]           = data_addr(VEC_FX);
      fifo_owner[N_OBJ + k] = ctx_addr(obj_t'(k + 1));
      fifo_vec[N_OBJ + k]   = '0;
    end
    fifo_owner[8] = data_addr(OBJ_OUT);
    fifo_vec[8]   = '0;
  end

  // next instantiated effect after position k (k = -1: the input)
  addr_t in_target;
  addr_t target [N_OBJ];
  always_comb begin
    addr_t nx;
    nx = data_addr(OBJ_OUT);
    for (int k = N_OBJ - 1; k >= 0; k--) begin
      target[k] = nx;
      if (active[k]) nx = data_addr(obj_t'(k + 1));
    end
    in_target = nx;
  end

  // ------------------------------------------------------------ scheduler
  logic area_stop, area_stopped, area_load, area_unload;
  obj_t area_obj;

  // one dynamic area: the configuration port always writes area 0
  hw_scheduler #(.N_OBJ(N_OBJ), .N_AREA(1), .SLICE(SLICE)) u_sched (
    .clk, .rst_n,
    .inst_valid, .inst_obj, .inst_add,
    .active,
    .icap_start, .icap_obj, .icap_area(), .icap_done,
    .area_stop, .area_stopped, .area_load, .area_unload, .area_obj
  );
  assign obj_stopping = area_stop;

  // ------------------------------------------------------------ matrix
  logic             m_wr_valid [2];
  addr_t            m_wr_addr  [2];
  logic [31:0]      m_wr_data  [2];
  logic             m_wr_ready [2];
  logic             m_wr_miss  [2];
  addr_t            m_rd_addr  [3];
  logic             m_rd_valid [3];
  logic [31:0]      m_rd_data  [3];
  logic             m_rd_ready [3];
  logic [CW-1:0]    m_count    [N_FIFO];

  comm_matrix #(.N_WR(2), .N_RD(3), .N_FIFO(N_FIFO), .WIDTH(32), .DEPTH(DEPTH)) u_matrix (
    .clk, .rst_n,
    .fifo_owner, .fifo_vec,
    .wr_valid(m_wr_valid), .wr_addr(m_wr_addr), .wr_data(m_wr_data),
    .wr_ready(m_wr_ready), .wr_miss(m_wr_miss),
    .rd_addr(m_rd_addr), .rd_valid(m_rd_valid), .rd_data(m_rd_data),
    .rd_ready(m_rd_ready),
    .fifo_count(m_count)
  );

  // stream input = writer 0
  assign m_wr_valid[0] = in_valid;
  assign m_wr_addr[0]  = in_target;
  assign m_wr_data[0]  = in_data;
  assign in_ready      = m_wr_ready[0];

  // stream output = reader 2
  assign m_rd_addr[2]  = data_addr(OBJ_OUT);
  assign out_valid     = m_rd_valid[2];
  assign out_data      = m_rd_data[2];
  assign m_rd_ready[2] = out_ready;
  assign out_fill      = m_count[8];

  // ------------------------------------------------------------ dynamic area
  stereo_t a_wr_data;

  dyn_area #(.N_OBJ(N_OBJ), .DELAY(DELAY)) u_area (
    .clk, .rst_n,
    .load(area_load), .unload(area_unload), .obj(area_obj),
    .stop(area_stop), .stopped(area_stopped),
    .loaded_obj, .running(obj_running),
    .target,
    .rd_addr(m_rd_addr[0]), .rd_valid(m_rd_valid[0]), .rd_data(m_rd_data[0]),
    .rd_ready(m_rd_ready[0]),
    .ctx_rd_addr(m_rd_addr[1]), .ctx_valid(m_rd_valid[1]), .ctx_data(m_rd_data[1]),
    .ctx_ready(m_rd_ready[1]),
    .wr_valid(m_wr_valid[1]), .wr_addr(m_wr_addr[1]), .wr_data(a_wr_data),
    .wr_ready(m_wr_ready[1])
  );
  assign m_wr_data[1] = a_wr_data;
  assign route_miss   = m_wr_miss[0] || m_wr_miss[1];

endmodule
