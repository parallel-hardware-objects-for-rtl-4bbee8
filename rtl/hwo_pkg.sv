// hwo_pkg: types and constants shared by the Hardware Object system.
//
// A stereo audio sample is 32 bits: 16 bits left channel, 16 bits right
// channel (the two-channel 16/16 split is the system's stated format; which
// half carries which channel is this design's choice: left in the upper half).
// Matrix addresses are an object number plus a context flag. Setting the flag
// addresses the context FIFO of that object instead of its data FIFO. The
// object numbers of the audio system are this design's own assignment.
package hwo_pkg;

  localparam int OBJ_W  = 4;          // object number width
  localparam int ADDR_W = OBJ_W + 1;  // {ctx flag, object number}

  typedef logic [OBJ_W-1:0]  obj_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    logic signed [15:0] l;
    logic signed [15:0] r;
  } stereo_t;

  // Effect kinds of the audio example.
  typedef enum logic [1:0] {
    FX_HP   = 2'd0,
    FX_LP   = 2'd1,
    FX_DIST = 2'd2,
    FX_ECHO = 2'd3
  } fx_kind_e;

  // Object numbers of the audio system (0 means "none").
  localparam obj_t OBJ_NONE = 4'd0;
  localparam obj_t OBJ_HP   = 4'd1;
  localparam obj_t OBJ_LP   = 4'd2;
  localparam obj_t OBJ_DIST = 4'd3;
  localparam obj_t OBJ_ECHO = 4'd4;
  localparam obj_t OBJ_OUT  = 4'd5;   // the outer world (output stream)
  localparam obj_t VEC_FX   = 4'd8;   // Object Vector: all effect objects

  function automatic addr_t data_addr(obj_t o);
    return {1'b0, o};
  endfunction

  function automatic addr_t ctx_addr(obj_t o);
    return {1'b1, o};
  endfunction

  // Saturate a 17+ bit signed value to 16 bits.
  function automatic logic signed [15:0] sat16(logic signed [19:0] v);
    if (v > 20'sd32767)       return 16'sd32767;
    else if (v < -20'sd32768) return -16'sd32768;
    else                      return v[15:0];
  endfunction

endpackage
