// tb_ape: self-checking test of one APE driven directly through its
// broadcast bus. Each instruction is held for four clocks with commit in
// the last, as the interface does. Checked against a reference model of
// the registers and flags kept in the testbench: activation, masked writes
// to both data fields and the activity register, matching on data and on
// activity (hit and miss), bit-serial 12-bit additions (vector-vector and
// scalar-vector), carry load, network delivery into D, vector loads, and
// that an inactive APE ignores assignments and arithmetic.
module tb_ape;
  import asp_pkg::*;

  logic clk = 0, rst_n = 0;
  asp_bcast_t bc;
  logic net_in;
  logic [DBUS_W-1:0] vbuf_word;
  logic m, d, a, c;
  logic [DBUS_W-1:0] field_out;
  logic [DREG_W-1:0] dreg_out;
  logic [AREG_W-1:0] areg_out;
  int checks = 0, failures = 0;

  ape dut (.clk, .rst_n, .bc, .net_in, .vbuf_word, .m, .d, .a, .c,
           .field_out, .dreg_out, .areg_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [DREG_W-1:0] r_d;
  logic [AREG_W-1:0] r_a;
  logic r_m, r_dd, r_act, r_c;

  task automatic step(asp_ctrl_t ct, logic [DBUS_W-1:0] db, logic [ABUS_W-1:0] ab);
    bc.ctrl = ct; bc.dbus = db; bc.abus = ab; bc.commit = 1'b0;
    repeat (3) @(negedge clk);
    bc.commit = 1'b1;
    @(negedge clk);
    bc.commit = 1'b0; bc.ctrl = ctrl_nop();
  endtask

  task automatic check_state(string what);
    checks++;
    if (dreg_out !== r_d || areg_out !== r_a || m !== r_m || d !== r_dd || a !== r_act || c !== r_c) begin
      failures++;
      $display("FAIL %s: dreg=%h/%h areg=%h/%h m=%b/%b d=%b/%b a=%b/%b c=%b/%b", what,
               dreg_out, r_d, areg_out, r_a, m, r_m, d, r_dd, a, r_act, c, r_c);
    end
  endtask

  function automatic asp_ctrl_t mk(asp_op_e op);
    asp_ctrl_t ct = '0;
    ct.op = op;
    return ct;
  endfunction

  initial begin
    asp_ctrl_t ct;
    bc = '0; bc.ctrl = ctrl_nop(); net_in = 0; vbuf_word = '0;
    r_d = '0; r_a = '0; r_m = 0; r_dd = 0; r_act = 0; r_c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state("reset");

    // inactive: write and add ignored
    ct = mk(OP_WRITE); ct.mask = '1;
    step(ct, 32'hDEADBEEF, 12'hFFF);
    check_state("write while inactive");

    // activate
    ct = mk(OP_TAG); ct.tag_m = 0; ct.tag_src = SRC_ONE;
    step(ct, '0, '0); r_act = 1;
    check_state("activate");

    // masked write low field, then high field, activity bits
    ct = mk(OP_WRITE); ct.mask = 32'h0000FFFF; ct.half = 0;
    step(ct, 32'h12345678, {6'b000011, 6'b101001});
    r_d[15:0] = 16'h5678; r_a[1:0] = 2'b01;
    check_state("write low");
    ct.mask = 32'hFF00FF00; ct.half = 1;
    step(ct, 32'hA1B2C3D4, {6'b110000, 6'b100000});
    r_d[63:32] = 32'hA100C300; r_a[5:4] = 2'b10;
    check_state("write high");
    bc.ctrl.half = 1; #1;   // field_out follows the addressed half
    checks++; if (field_out !== 32'hA100C300) failures++;
    bc.ctrl.half = 0; #1;
    checks++; if (field_out !== 32'h00005678) failures++;

    // match: data hit, data miss, activity hit/miss
    ct = mk(OP_MATCH); ct.half = 0; ct.mask = 32'h0000FFFF;
    step(ct, 32'hFFFF5678, '0); r_m = 1; check_state("match hit");
    step(ct, 32'h00005679, '0); r_m = 0; check_state("match miss");
    ct.mask = '0;
    step(ct, '0, {6'b110011, 6'b100001}); r_m = 1; check_state("activity hit");
    step(ct, '0, {6'b000001, 6'b000000}); r_m = 0; check_state("activity miss");
    ct.half = 1; ct.mask = 32'hFFFFFFFF;
    step(ct, 32'hA100C300, {6'b010000, 6'b000000}); r_m = 1; check_state("high hit");

    // MATCH limited to active APEs: hit while active, miss while inactive
    ct.in_active = 1;
    step(ct, 32'hA100C300, '0); r_m = 1; check_state("in_active hit");
    begin
      asp_ctrl_t t2 = mk(OP_TAG);
      t2.tag_m = 0; t2.tag_src = SRC_ZERO; step(t2, '0, '0); r_act = 0;
      step(ct, 32'hA100C300, '0); r_m = 0; check_state("in_active, APE inactive");
      ct.in_active = 0;
      step(ct, 32'hA100C300, '0); r_m = 1; check_state("plain match, APE inactive");
      t2.tag_src = SRC_ONE; step(t2, '0, '0); r_act = 1;
    end

    // TAG M <= 0, A <= M
    ct = mk(OP_TAG); ct.tag_m = 1; ct.tag_src = SRC_ZERO;
    step(ct, '0, '0); r_m = 0; check_state("M <= 0");

    // bit-serial 12-bit additions: x in bits 0..11, y in 16..27, sum to 32..44
    for (int t = 0; t < 6; t++) begin
      logic [11:0] x, y;
      logic [12:0] sum;
      x = 12'($urandom()); y = 12'($urandom());
      ct = mk(OP_WRITE); ct.half = 0; ct.mask = '1;
      step(ct, {4'h0, y, 4'h0, x}, '0); r_d[31:0] = {4'h0, y, 4'h0, x};
      ct = mk(OP_CARRY); ct.cin = 0;
      step(ct, '0, '0); r_c = 0;
      for (int i = 0; i < 12; i++) begin
        ct = mk(OP_ADD); ct.a_idx = 6'(i); ct.b_idx = 6'(16 + i); ct.d_idx = 6'(32 + i);
        step(ct, '0, '0);
      end
      sum = 13'(x) + 13'(y);
      r_d[43:32] = sum[11:0]; r_c = sum[12];
      check_state("vector add");
      // scalar-vector: add constant k bit by bit from Data bus bit 0
      begin
        logic [11:0] k;
        logic [12:0] s2;
        k = 12'($urandom());
        ct = mk(OP_CARRY); ct.cin = 0; step(ct, '0, '0);
        for (int i = 0; i < 12; i++) begin
          ct = mk(OP_ADD); ct.a_idx = 6'(i); ct.b_scalar = 1; ct.d_idx = 6'(48 + i);
          step(ct, 32'(k[i]), '0);
        end
        s2 = 13'(x) + 13'(k);
        r_d[59:48] = s2[11:0]; r_c = s2[12];
        check_state("scalar add");
      end
    end

    // carry load 1
    ct = mk(OP_CARRY); ct.cin = 1; step(ct, '0, '0); r_c = 1; check_state("carry 1");

    // network delivery into D (both values)
    net_in = 1; step(mk(OP_NET), '0, '0); r_dd = 1; check_state("net 1");
    net_in = 0; step(mk(OP_NET), '0, '0); r_dd = 0; check_state("net 0");
    net_in = 1; step(mk(OP_NET), '0, '0); r_dd = 1;
    // A <= D, M <= D
    ct = mk(OP_TAG); ct.tag_m = 1; ct.tag_src = SRC_D; step(ct, '0, '0); r_m = 1;
    check_state("M <= D");
    ct.tag_m = 0; ct.tag_src = SRC_ZERO; step(ct, '0, '0); r_act = 0;
    ct.tag_m = 0; ct.tag_src = SRC_M; step(ct, '0, '0); r_act = 1;
    check_state("A <= M");

    // vector load into the high field, masked
    vbuf_word = 32'hCAFEF00D;
    ct = mk(OP_VLOAD); ct.half = 1; ct.mask = 32'hFFFF0000;
    step(ct, '0, '0); r_d[63:48] = 16'hCAFE; check_state("vload");
    // deactivate, then vload/add are ignored
    ct = mk(OP_TAG); ct.tag_m = 0; ct.tag_src = SRC_ZERO; step(ct, '0, '0); r_act = 0;
    ct = mk(OP_VLOAD); ct.half = 0; ct.mask = '1; step(ct, '0, '0);
    ct = mk(OP_ADD); ct.a_idx = 0; ct.b_idx = 1; ct.d_idx = 2; step(ct, '0, '0);
    // C is 1 and data bit 61 is 0: an active APE would clear C here
    ct = mk(OP_ADD); ct.a_idx = 61; ct.b_idx = 61; ct.d_idx = 3; step(ct, '0, '0);
    ct = mk(OP_CARRY); ct.cin = 0; step(ct, '0, '0);
    check_state("inactive vload/add");

    // no commit: nothing changes
    bc.ctrl = mk(OP_TAG); bc.ctrl.tag_src = SRC_ONE; bc.commit = 0;
    repeat (4) @(negedge clk);
    bc.ctrl = ctrl_nop();
    check_state("no commit");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
