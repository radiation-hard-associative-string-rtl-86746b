// scalar_ctrl_if: the scalar data and control interface of an ASP substring.
//
// The substring controller issues one instruction at a time (valid/ready).
// Each accepted instruction occupies one step of four clock periods (time
// slots 0..3): the interface holds its control word, Data bus scalar and
// Activity bus pattern on the broadcast bus for all four slots and raises
// bc.commit in slot 3, the clock edge at which every APE updates its state.
// The next instruction may be accepted in slot 3, so a stream of
// instructions runs at one step per four clocks (10 M steps/s at 40 MHz).
// Between instructions the broadcast bus carries a NOP.
//
// Back towards the controller it provides:
//   mr      : Match Reply, the OR of all M flags (1 = some APE is tagged);
//   rd_*    : on a READ step, the data field of the leftmost M-tagged APE
//             (bit-parallel single-APE communication over the Data bus),
//             valid for one clock after the step; rd_hit says whether any
//             APE responded (rd_data is 0 if none did).
//
// The four-slot step and the Match Reply line follow the source; the
// handshake, the place of the commit slot and the leftmost-responder rule
// for reads are this design's own choice.
module scalar_ctrl_if
  import asp_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     instr_valid,
  output logic                     instr_ready,
  input  asp_instr_t               instr,
  output asp_bcast_t               bc,
  input  logic [N-1:0]             ape_m,
  input  logic [N-1:0][DBUS_W-1:0] ape_field,
  output logic                     mr,
  output logic                     rd_valid,
  output logic                     rd_hit,
  output logic [DBUS_W-1:0]        rd_data
);
  logic       busy_q;
  logic [1:0] slot_q;
  asp_instr_t cur_q;
  logic       commit, accept;

  assign commit      = busy_q && (slot_q == 2'(SLOTS - 1));
  assign instr_ready = !busy_q || commit;
  assign accept      = instr_valid && instr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      slot_q <= '0;
      cur_q  <= '0;
    end else if (accept) begin
      busy_q <= 1'b1;
      slot_q <= '0;
      cur_q  <= instr;
    end else if (busy_q) begin
      slot_q <= slot_q + 2'd1;
      if (commit) busy_q <= 1'b0;
    end
  end

  always_comb begin
    if (busy_q) begin
      bc.ctrl = cur_q.ctrl;
      bc.dbus = cur_q.data;
      bc.abus = cur_q.act;
    end else begin
      bc.ctrl = ctrl_nop();
      bc.dbus = '0;
      bc.abus = '0;
    end
    bc.commit = commit;
  end

  // Match Reply and leftmost responder.
  logic [DBUS_W-1:0] first_field;
  always_comb begin
    mr          = |ape_m;
    first_field = '0;
    for (int i = N - 1; i >= 0; i--)
      if (ape_m[i]) first_field = ape_field[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_hit   <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= commit && (cur_q.ctrl.op == OP_READ);
      if (commit && cur_q.ctrl.op == OP_READ) begin
        rd_hit  <= mr;
        rd_data <= first_field;
      end
    end
  end

  // A step is never cut short: slots advance one per clock while busy.
  assert property (@(posedge clk) disable iff (!rst_n)
                   busy_q && !commit |=> busy_q && slot_q == $past(slot_q) + 2'd1);
endmodule
