// asp_pkg: widths, instruction format and broadcast-bus bundle shared by the
// Associative String Processor (ASP) substring and its parts.
//
// The widths follow the VASP64/H1 substring: 64 APEs (associative processing
// elements), each with a 64-bit data register and a 6-bit activity register,
// a 32-bit shared Data bus and a 12-bit shared Activity bus, and four clock
// periods (time slots) per instruction step. The instruction set, the
// control-bus fields and the encoding of the Activity bus (6 value bits plus
// 6 "care" bits, so that each activity bit can be matched, ignored or written)
// are this design's own choice: the source describes the busses, the flags
// and the kinds of operation, not their encodings.
package asp_pkg;

  localparam int unsigned N_APE   = 64;  // APEs per substring
  localparam int unsigned DREG_W  = 64;  // APE data register
  localparam int unsigned AREG_W  = 6;   // APE activity register
  localparam int unsigned DBUS_W  = 32;  // shared Data bus
  localparam int unsigned ABUS_W  = 12;  // shared Activity bus (value + care)
  localparam int unsigned CMP_W   = DREG_W + AREG_W;  // 70-bit comparator
  localparam int unsigned SLOTS   = 4;   // clock periods per step
  localparam int unsigned BIDX_W  = $clog2(DREG_W);   // bit index into data register
  localparam int unsigned VBYTE_W = 8;   // vector data buffer port width

  // Instruction opcodes carried on the Control bus.
  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_MATCH  = 4'd1,  // M <= (data field, activity) matches (Data bus, Activity bus)
    OP_TAG    = 4'd2,  // A or M <= M / D / 1 / 0
    OP_WRITE  = 4'd3,  // active APEs: masked assignment of Data/Activity bus values
    OP_ADD    = 4'd4,  // active APEs: one bit-serial full-adder step
    OP_CARRY  = 4'd5,  // active APEs: C <= cin
    OP_NET    = 4'd6,  // all APEs: D <= activity signal delivered by the network
    OP_READ   = 4'd7,  // leftmost M-tagged APE's data field returned on the Data bus
    OP_VLOAD  = 4'd8,  // active APEs: data field <= vector data buffer word
    OP_VSTORE = 4'd9   // vector data buffer <= every APE's data field
  } asp_op_e;

  typedef enum logic [1:0] {
    SRC_M    = 2'd0,
    SRC_D    = 2'd1,
    SRC_ONE  = 2'd2,
    SRC_ZERO = 2'd3
  } tag_src_e;

  // Control bus word.
  typedef struct packed {
    asp_op_e           op;
    logic              half;      // data field: 0 = bits 31:0, 1 = bits 63:32
    logic              in_active; // MATCH: only active APEs can match (M <= match & A)
    logic [DBUS_W-1:0] mask;      // per-bit care (MATCH) / write enable (WRITE, VLOAD)
    logic [BIDX_W-1:0] a_idx;     // ADD: operand a bit
    logic [BIDX_W-1:0] b_idx;     // ADD: operand b bit (vector-vector)
    logic [BIDX_W-1:0] d_idx;     // ADD: sum bit
    logic              b_scalar;  // ADD: operand b is Data bus bit 0 (scalar-vector)
    logic              cin;       // CARRY: value loaded into C
    logic              tag_m;     // TAG: 1 = write M, 0 = write A
    tag_src_e          tag_src;   // TAG: source
    logic              net_left;  // NET: 1 = towards LKL, 0 = towards LKR
    logic              net_gated; // NET: deliver to the next active APE, not the neighbour
  } asp_ctrl_t;

  // One instruction as issued by the substring controller.
  typedef struct packed {
    asp_ctrl_t         ctrl;
    logic [DBUS_W-1:0] data;  // scalar for the Data bus
    logic [ABUS_W-1:0] act;   // {care[5:0], value[5:0]} for the Activity bus
  } asp_instr_t;

  // Everything the scalar data and control interface broadcasts to the APEs.
  typedef struct packed {
    asp_ctrl_t         ctrl;
    logic [DBUS_W-1:0] dbus;
    logic [ABUS_W-1:0] abus;
    logic              commit;  // last time slot of a step: APE state updates
  } asp_bcast_t;

  function automatic asp_ctrl_t ctrl_nop();
    asp_ctrl_t c;
    c = '0;
    c.op = OP_NOP;
    return c;
  endfunction

endpackage
