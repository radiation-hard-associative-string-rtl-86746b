// asp_substring: one Associative String Processor substring (VASP64/H1
// organisation): a string of N identical APEs driven in SIMD fashion.
//
// All APEs share the broadcast Control, 32-bit Data and 12-bit Activity
// busses from the scalar data and control interface and answer on the
// one-bit Match Reply line. Processing is associative: the controller
// selects APEs by content (MATCH sets M where {activity, data field}
// equals the broadcast pattern under a mask), turns matches into activity
// directly (TAG) or through the inter-APE network (NET delivers each M tag to
// a neighbour or to the next active APE and sets D there), and the active
// APEs then assign (WRITE) or compute bit-serially (ADD, one bit per step).
// Scalar results come back through READ (the leftmost tagged APE's field)
// and MR; vectors go in and out through the vector data buffer, whose byte
// port runs while the APEs process.
//
// Interface:
//   instr_valid/instr_ready/instr : one instruction per four-clock step
//   mr, rd_valid, rd_hit, rd_data : Match Reply and READ results
//   vshift, vin, vout             : byte-serial vector port (one byte/clock)
//   lkl_in/lkl_out, lkr_in/lkr_out: network ends; wire LKR of one substring
//                                   to LKL of the next to extend the string
//   step_done                     : pulses in the last slot of every step
// Timing: a step's effects are visible on the clock edge ending its slot 3;
// mr reflects the M flags combinationally; rd_* one clock after a READ step.
// The string of 64 APEs, the bus widths, the flags and the LKL/LKR links
// follow the source; instruction encoding and the buffer organisation are
// this design's own choice.
module asp_substring
  import asp_pkg::*;
#(
  parameter int unsigned N = N_APE
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                instr_valid,
  output logic                instr_ready,
  input  asp_instr_t          instr,
  output logic                step_done,
  output logic                mr,
  output logic                rd_valid,
  output logic                rd_hit,
  output logic [DBUS_W-1:0]   rd_data,
  input  logic                vshift,
  input  logic [VBYTE_W-1:0]  vin,
  output logic [VBYTE_W-1:0]  vout,
  input  logic                lkl_in,
  output logic                lkl_out,
  input  logic                lkr_in,
  output logic                lkr_out
);
  asp_bcast_t                 bc;
  logic [N-1:0]               m, d, a, c, net_d;
  logic [N-1:0][DBUS_W-1:0]   field, vwords;

  scalar_ctrl_if #(.N(N)) u_if (
    .clk, .rst_n,
    .instr_valid, .instr_ready, .instr,
    .bc,
    .ape_m    (m),
    .ape_field(field),
    .mr, .rd_valid, .rd_hit, .rd_data
  );

  ape_comm_net #(.N(N)) u_net (
    .net_left (bc.ctrl.net_left),
    .net_gated(bc.ctrl.net_gated),
    .m, .a,
    .lkl_in, .lkr_in,
    .d        (net_d),
    .lkl_out, .lkr_out
  );

  vector_data_buffer #(.N(N)) u_vbuf (
    .clk, .rst_n,
    .shift    (vshift),
    .vin, .vout,
    .capture  (bc.commit && bc.ctrl.op == OP_VSTORE),
    .cap_words(field),
    .words    (vwords)
  );

  for (genvar i = 0; i < N; i++) begin : g_ape
    ape u_ape (
      .clk, .rst_n,
      .bc,
      .net_in   (net_d[i]),
      .vbuf_word(vwords[i]),
      .m        (m[i]),
      .d        (d[i]),
      .a        (a[i]),
      .c        (c[i]),
      .field_out(field[i]),
      .dreg_out (),
      .areg_out ()
    );
  end

  assign step_done = bc.commit;
endmodule
