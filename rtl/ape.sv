// ape: one Associative Processing Element of the ASP substring.
//
// Holds a 64-bit data register, a 6-bit activity register and four one-bit
// flags: C (arithmetic carry), M (matching APE), D (destination APE) and A
// (active APE). Its comparator matches {activity, data} against the
// broadcast Data and Activity busses; its full adder performs one step of
// bit-serial arithmetic. Every APE of a substring sees the same broadcast
// (Control, Data and Activity busses) and executes the same instruction on
// its own data; APEs differ only in their registers and flags, and A decides
// which of them take part in assignments and arithmetic.
//
// Instruction effects (state changes on the clock edge where bc.commit is 1,
// the last of the four time slots of a step):
//   MATCH  : M <= match (and A, if in_active). The 32-bit Data bus and
//            bc.ctrl.mask address the data field chosen by bc.ctrl.half;
//            the other field is ignored.
//            Activity bus = {care[5:0], value[5:0]}.
//   TAG    : A (tag_m=0) or M (tag_m=1) <= M, D, 1 or 0.
//   WRITE  : if A: field bits with mask=1 <= Data bus; activity bits with
//            care=1 <= activity value.
//   ADD    : if A: data[d_idx] <= data[a_idx] + b + C, C <= carry-out, with
//            b = data[b_idx] or, if b_scalar, Data bus bit 0.
//   CARRY  : if A: C <= cin.
//   NET    : D <= net_in (the activity signal the inter-APE network
//            delivers to this APE).
//   VLOAD  : if A: field bits with mask=1 <= vbuf_word.
//   READ, VSTORE, NOP: no state change; field_out feeds them.
// Outputs m, d, a, c and field_out are registered state, stable through a
// step. The register set and flags follow the source; the instruction set,
// the field addressing and the reset values (all zero) are this design's
// own choice.
module ape
  import asp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  asp_bcast_t        bc,
  input  logic              net_in,
  input  logic [DBUS_W-1:0] vbuf_word,
  output logic              m,
  output logic              d,
  output logic              a,
  output logic              c,
  output logic [DBUS_W-1:0] field_out,
  output logic [DREG_W-1:0] dreg_out,
  output logic [AREG_W-1:0] areg_out
);
  logic [DREG_W-1:0] dreg_q;
  logic [AREG_W-1:0] areg_q;
  logic              m_q, d_q, a_q, c_q;

  asp_ctrl_t ctrl;
  assign ctrl = bc.ctrl;

  // ---- comparator ------------------------------------------------------
  logic [CMP_W-1:0] cmp_pat, cmp_care;
  logic             match;

  always_comb begin
    cmp_pat  = '0;
    cmp_care = '0;
    if (ctrl.half) begin
      cmp_pat [DREG_W-1:DBUS_W] = bc.dbus;
      cmp_care[DREG_W-1:DBUS_W] = ctrl.mask;
    end else begin
      cmp_pat [DBUS_W-1:0] = bc.dbus;
      cmp_care[DBUS_W-1:0] = ctrl.mask;
    end
    cmp_pat [CMP_W-1:DREG_W] = bc.abus[AREG_W-1:0];
    cmp_care[CMP_W-1:DREG_W] = bc.abus[ABUS_W-1:AREG_W];
  end

  ape_comparator #(.W(CMP_W)) u_cmp (
    .word ({areg_q, dreg_q}),
    .pat  (cmp_pat),
    .care (cmp_care),
    .match(match)
  );

  // ---- full adder ------------------------------------------------------
  logic add_a, add_b, add_s, add_co;
  assign add_a = dreg_q[ctrl.a_idx];
  assign add_b = ctrl.b_scalar ? bc.dbus[0] : dreg_q[ctrl.b_idx];

  ape_adder u_add (
    .a   (add_a),
    .b   (add_b),
    .cin (c_q),
    .s   (add_s),
    .cout(add_co)
  );

  // ---- control logic ---------------------------------------------------
  logic [DBUS_W-1:0] field;
  assign field = ctrl.half ? dreg_q[DREG_W-1:DBUS_W] : dreg_q[DBUS_W-1:0];

  logic tag_val;
  always_comb begin
    unique case (ctrl.tag_src)
      SRC_M:    tag_val = m_q;
      SRC_D:    tag_val = d_q;
      SRC_ONE:  tag_val = 1'b1;
      SRC_ZERO: tag_val = 1'b0;
    endcase
  end

  // Masked replacement of the addressed field.
  function automatic logic [DREG_W-1:0] put_field(
      logic [DREG_W-1:0] r, logic hi, logic [DBUS_W-1:0] v, logic [DBUS_W-1:0] en);
    logic [DREG_W-1:0] o;
    o = r;
    if (hi) o[DREG_W-1:DBUS_W] = (r[DREG_W-1:DBUS_W] & ~en) | (v & en);
    else    o[DBUS_W-1:0]      = (r[DBUS_W-1:0] & ~en)      | (v & en);
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dreg_q <= '0;
      areg_q <= '0;
      m_q    <= 1'b0;
      d_q    <= 1'b0;
      a_q    <= 1'b0;
      c_q    <= 1'b0;
    end else if (bc.commit) begin
      unique case (ctrl.op)
        OP_MATCH: m_q <= match & (a_q | ~ctrl.in_active);
        OP_TAG: begin
          if (ctrl.tag_m) m_q <= tag_val;
          else            a_q <= tag_val;
        end
        OP_WRITE: if (a_q) begin
          dreg_q <= put_field(dreg_q, ctrl.half, bc.dbus, ctrl.mask);
          areg_q <= (areg_q & ~bc.abus[ABUS_W-1:AREG_W])
                  | (bc.abus[AREG_W-1:0] & bc.abus[ABUS_W-1:AREG_W]);
        end
        OP_ADD: if (a_q) begin
          dreg_q[ctrl.d_idx] <= add_s;
          c_q                <= add_co;
        end
        OP_CARRY: if (a_q) c_q <= ctrl.cin;
        OP_NET:   d_q <= net_in;
        OP_VLOAD: if (a_q) dreg_q <= put_field(dreg_q, ctrl.half, vbuf_word, ctrl.mask);
        default: ;
      endcase
    end
  end

  assign m         = m_q;
  assign d         = d_q;
  assign a         = a_q;
  assign c         = c_q;
  assign field_out = field;
  assign dreg_out  = dreg_q;
  assign areg_out  = areg_q;
endmodule
