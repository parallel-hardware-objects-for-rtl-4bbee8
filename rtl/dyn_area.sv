// dyn_area: the dynamic (partially reconfigurable) area of the audio system,
// with the signals that cross its boundary (the bus macros on an FPGA).
//
// The area holds at most one of the four effect objects at a time. Object
// k (k = 0..3) has object number k+1 and kind HP, LP, DIST, ECHO in that
// order. Partial reconfiguration itself cannot be written as RTL, so all four
// objects are present and the configuration is modelled by their resets:
// only the loaded object is out of reset. A load pulse (object number on
// obj) marks the end of a reconfiguration; the object comes out of reset one
// clock later and starts from a fresh state, as a newly written bitstream
// would, then restores its context itself. unload empties the area. While the
// area is empty or its object is in reset, all outputs towards the matrix are
// idle and stopped reads high.
//
// Towards the matrix the area has one write port and two read ports: data
// and context, both addressed by the loaded object's number.
module dyn_area
  import hwo_pkg::*;
#(
  parameter int N_OBJ = 4,
  parameter int DELAY = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  // from the scheduler
  input  logic    load,
  input  logic    unload,
  input  obj_t    obj,
  input  logic    stop,
  output logic    stopped,
  output obj_t    loaded_obj,    // OBJ_NONE when empty
  output logic    running,
  input  addr_t   target [N_OBJ],
  // matrix read ports
  output addr_t   rd_addr,
  input  logic    rd_valid,
  input  stereo_t rd_data,
  output logic    rd_ready,
  output addr_t   ctx_rd_addr,
  input  logic    ctx_valid,
  input  stereo_t ctx_data,
  output logic    ctx_ready,
  // matrix write port
  output logic    wr_valid,
  output addr_t   wr_addr,
  output stereo_t wr_data,
  input  logic    wr_ready
);
  obj_t cur;
  logic [N_OBJ-1:0] obj_rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= OBJ_NONE;
      obj_rst_n <= '0;
    end else begin
      if (load)        cur <= obj;
      else if (unload) cur <= OBJ_NONE;
      for (int k = 0; k < N_OBJ; k++)
        obj_rst_n[k] <= !load && !unload && (cur == obj_t'(k + 1));
    end
  end

  assign loaded_obj  = cur;
  assign rd_addr     = data_addr(cur);
  assign ctx_rd_addr = ctx_addr(cur);

  logic    o_stopped [N_OBJ];
  logic    o_running [N_OBJ];
  logic    o_rd_ready[N_OBJ];
  logic    o_ctx_ready[N_OBJ];
  logic    o_wr_valid[N_OBJ];
  addr_t   o_wr_addr [N_OBJ];
  stereo_t o_wr_data [N_OBJ];

  for (genvar k = 0; k < N_OBJ; k++) begin : g_obj
    logic sel;
    assign sel = obj_rst_n[k];
    hw_object #(.KIND(fx_kind_e'(k)), .DELAY(DELAY)) u_obj (
      .clk,
      .obj_rst_n(obj_rst_n[k]),
      .own      (obj_t'(k + 1)),
      .target   (target[k]),
      .stop     (stop),
      .stopped  (o_stopped[k]),
      .running  (o_running[k]),
      .rd_valid (rd_valid && sel),
      .rd_data  (rd_data),
      .rd_ready (o_rd_ready[k]),
      .ctx_valid(ctx_valid && sel),
      .ctx_data (ctx_data),
      .ctx_ready(o_ctx_ready[k]),
      .wr_valid (o_wr_valid[k]),
      .wr_addr  (o_wr_addr[k]),
      .wr_data  (o_wr_data[k]),
      .wr_ready (wr_ready && sel)
    );
  end

  always_comb begin
    stopped   = 1'b1;
    running   = 1'b0;
    rd_ready  = 1'b0;
    ctx_ready = 1'b0;
    wr_valid  = 1'b0;
    wr_addr   = '0;
    wr_data   = '0;
    for (int k = 0; k < N_OBJ; k++) begin
      if (obj_rst_n[k]) begin
        stopped   = o_stopped[k];
        running   = o_running[k];
        rd_ready  = o_rd_ready[k];
        ctx_ready = o_ctx_ready[k];
        wr_valid  = o_wr_valid[k];
        wr_addr   = o_wr_addr[k];
        wr_data   = o_wr_data[k];
      end
    end
  end
endmodule
