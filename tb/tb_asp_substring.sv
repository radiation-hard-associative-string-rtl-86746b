// tb_asp_substring: end-to-end test of one ASP substring at its default
// size (64 APEs), driving it only through its ports as a substring
// controller would.
//
// Program: load 64 operand pairs through the byte-serial vector port, move
// them into the APEs (VLOAD), add them bit-serially (13 ADD steps for
// 12-bit operands, issued back to back), move the sums out (VSTORE) and
// unload them while new data is shifted in. Then associative operations on
// the result: content match with Match Reply (hit and miss), READ of the
// leftmost responder, a neighbour transfer through the inter-APE network,
// activity-register tagging and matching, a gated transfer to a remote
// selected APE, and signals entering/leaving by LKL and LKR. Every value is
// checked against integers computed here; step timing (four clocks per
// step) and vector port rate (one byte per clock) are checked, and each
// mechanism must occur at least once.
module tb_asp_substring;
  import asp_pkg::*;
  localparam int N = N_APE;

  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, step_done;
  asp_instr_t instr;
  logic mr, rd_valid, rd_hit;
  logic [DBUS_W-1:0] rd_data;
  logic vshift = 0;
  logic [7:0] vin = 0, vout;
  logic lkl_in = 0, lkl_out, lkr_in = 0, lkr_out;

  asp_substring dut (.clk, .rst_n, .instr_valid, .instr_ready, .instr, .step_done,
                     .mr, .rd_valid, .rd_hit, .rd_data, .vshift, .vin, .vout,
                     .lkl_in, .lkl_out, .lkr_in, .lkr_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, ncommit = 0;
  int commit_cyc[$];
  // mechanism counters
  int n_vin = 0, n_vout = 0, n_vload = 0, n_vstore = 0, n_carry_out = 0;
  int n_match_hit = 0, n_match_miss = 0, n_read_hit = 0, n_read_miss = 0;
  int n_net_shift = 0, n_net_remote = 0, n_lkl_in = 0, n_lkl_out = 0, n_lkr_out = 0;
  int n_act_match = 0, n_masked_write = 0, n_back_to_back = 0, n_in_active = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (step_done) begin
      ncommit <= ncommit + 1;
      commit_cyc.push_back(cyc);
      if (lkr_out) n_lkr_out++;
      if (lkl_out) n_lkl_out++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic asp_instr_t mk(asp_op_e op);
    asp_instr_t x = '0;
    x.ctrl.op = op;
    return x;
  endfunction

  // issue one instruction and wait until its step has committed
  task automatic exec(asp_instr_t x);
    int target;
    target = ncommit + 1;
    instr = x; instr_valid = 1;
    do @(posedge clk); while (!instr_ready);
    #1 instr_valid = 0;
    wait (ncommit == target);
    @(negedge clk);
  endtask

  function automatic asp_instr_t match_x(logic [11:0] x);   // low field bits 11:0
    asp_instr_t i = mk(OP_MATCH);
    i.ctrl.half = 0; i.ctrl.mask = 32'h0000_0FFF; i.data = {20'h0, x};
    return i;
  endfunction

  function automatic asp_instr_t tag(logic to_m, tag_src_e src);
    asp_instr_t i = mk(OP_TAG);
    i.ctrl.tag_m = to_m; i.ctrl.tag_src = src;
    return i;
  endfunction

  function automatic asp_instr_t net(logic left, logic gated);
    asp_instr_t i = mk(OP_NET);
    i.ctrl.net_left = left; i.ctrl.net_gated = gated;
    return i;
  endfunction

  function automatic asp_instr_t rd(logic half);
    asp_instr_t i = mk(OP_READ);
    i.ctrl.half = half;
    return i;
  endfunction

  logic [11:0] xs[N], ys[N];
  logic [31:0] wd[N];

  initial begin
    asp_instr_t ins;
    int t0, expect_idx;
    instr = '0;
    for (int i = 0; i < N; i++) begin
      xs[i] = 12'(i * 61 + 7);             // distinct per APE
      ys[i] = 12'($urandom());
      wd[i] = {4'h0, ys[i], 4'h0, xs[i]};
    end
    ys[5] = 12'hFFF; wd[5] = {4'h0, ys[5], 4'h0, xs[5]};   // forces a carry out
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(mr == 0 && instr_ready == 1, "idle after reset");

    // ---- vector input, one byte per clock ---------------------------------
    t0 = cyc;
    for (int k = 0; k < 4 * N; k++) begin
      vshift = 1; vin = wd[k / 4][8 * (k % 4) +: 8];
      @(negedge clk);
      n_vin++;
    end
    vshift = 0;
    check(cyc - t0 == 4 * N, "vector input takes one clock per byte");

    // ---- activate all, load, add -------------------------------------------
    exec(tag(0, SRC_ONE));
    ins = mk(OP_VLOAD); ins.ctrl.half = 0; ins.ctrl.mask = '1;
    exec(ins); n_vload++;
    ins = mk(OP_CARRY); ins.ctrl.cin = 0;
    exec(ins);
    // 13 ADD steps issued back to back: bits 0..11, then carry into bit 44
    commit_cyc.delete();
    instr_valid = 1;
    for (int b = 0; b < 13; b++) begin
      ins = mk(OP_ADD);
      ins.ctrl.a_idx = 6'(b); ins.ctrl.b_idx = 6'(16 + b); ins.ctrl.d_idx = 6'(32 + b);
      if (b == 12) begin ins.ctrl.a_idx = 6'd12; ins.ctrl.b_idx = 6'd12; end  // both zero
      instr = ins;
      do @(posedge clk); while (!instr_ready);
      #1;
    end
    instr_valid = 0;
    wait (commit_cyc.size() == 13);
    @(negedge clk);
    for (int k = 1; k < 13; k++) begin
      check(commit_cyc[k] - commit_cyc[k-1] == SLOTS, "ADD steps four clocks apart");
      n_back_to_back++;
    end

    // ---- store, unload while loading the next vector ----------------------
    ins = mk(OP_VSTORE); ins.ctrl.half = 1;
    exec(ins); n_vstore++;
    for (int k = 0; k < 4 * N; k++) begin
      logic [12:0] s;
      s = 13'(xs[k / 4]) + 13'(ys[k / 4]);
      check(vout == 8'(32'(s) >> (8 * (k % 4))), $sformatf("sum byte %0d", k));
      if (k % 4 == 0 && s[12]) n_carry_out++;
      vshift = 1; vin = 8'(k);
      @(negedge clk);
      n_vout++;
    end
    vshift = 0;

    // ---- match on sums, Match Reply, READ ----------------------------------
    begin
      logic [12:0] target;
      target = 13'(xs[9]) + 13'(ys[9]);
      expect_idx = -1;
      for (int i = N - 1; i >= 0; i--) if (13'(xs[i]) + 13'(ys[i]) == target) expect_idx = i;
      ins = mk(OP_MATCH); ins.ctrl.half = 1; ins.ctrl.mask = 32'h1FFF; ins.data = 32'(target);
      exec(ins);
      check(mr == 1, "match on a sum gives Match Reply"); if (mr) n_match_hit++;
      exec(rd(1));
      check(rd_hit == 1 && rd_data == 32'(target), "READ of matching sum");
      if (rd_hit) n_read_hit++;
      exec(rd(0));
      check(rd_data == wd[expect_idx], "READ low field of leftmost responder");
      ins.data = 32'h1000_0000; ins.ctrl.mask = 32'hF000_0000;
      exec(ins);
      check(mr == 0, "no APE matches"); if (!mr) n_match_miss++;
      exec(rd(1));
      check(rd_hit == 0 && rd_data == 0, "READ with no responder"); if (!rd_hit) n_read_miss++;
    end

    // ---- selection on both fields: x of APE 9 and its sum -------------------
    begin
      exec(match_x(xs[9]));
      exec(tag(0, SRC_M));
      ins = mk(OP_MATCH); ins.ctrl.half = 1; ins.ctrl.mask = 32'h1FFF; ins.ctrl.in_active = 1;
      ins.data = 32'(13'(xs[9]) + 13'(ys[9]));
      exec(ins);
      exec(rd(0));
      check(rd_hit && rd_data == wd[9], "two-field selection finds APE 9 only");
      ins.data = 32'(13'(xs[9]) + 13'(ys[9]) + 13'd1);
      exec(ins);
      check(mr == 0, "two-field selection with wrong sum misses");
      if (rd_data == wd[9] && mr == 0) n_in_active++;
      exec(tag(0, SRC_ONE));
    end

    // ---- neighbour transfer: M at APE 20 -> D at APE 21 -----------------------
    exec(match_x(xs[20]));
    check(mr == 1, "unique x matched");
    exec(net(0, 0)); n_net_shift++;
    exec(tag(1, SRC_D));
    exec(rd(0));
    check(rd_hit && rd_data == wd[21], "neighbour transfer right reaches APE 21");
    exec(match_x(xs[20]));
    exec(net(1, 0));
    exec(tag(1, SRC_D));
    exec(rd(0));
    check(rd_hit && rd_data == wd[19], "neighbour transfer left reaches APE 19");

    // ---- activity register: mark APE 40, select it by activity ------------
    exec(tag(0, SRC_ZERO));
    exec(match_x(xs[40]));
    exec(tag(0, SRC_M));
    ins = mk(OP_WRITE); ins.ctrl.mask = '0; ins.act = {6'b000001, 6'b000001};
    exec(ins); n_masked_write++;
    exec(tag(0, SRC_ONE));
    ins = mk(OP_MATCH); ins.ctrl.mask = '0; ins.act = {6'b000001, 6'b000001};
    exec(ins);
    exec(rd(0));
    check(rd_hit && rd_data == wd[40], "activity match selects APE 40");
    n_act_match++;
    exec(tag(0, SRC_M));   // only APE 40 active

    // ---- gated remote transfer: from APE 10 to the next active APE (40) -----
    exec(match_x(xs[10]));
    exec(net(0, 1)); n_net_remote++;
    exec(tag(1, SRC_D));
    exec(rd(0));
    check(rd_hit && rd_data == wd[40], "remote transfer reaches next active APE");
    // masked write into the active APE only, read back
    ins = mk(OP_WRITE); ins.ctrl.half = 1; ins.ctrl.mask = 32'hFFFF_0000; ins.data = 32'hBEEF_0000;
    exec(ins); n_masked_write++;
    exec(rd(1));
    check(rd_data == {16'hBEEF, 3'b0, 13'(13'(xs[40]) + 13'(ys[40]))}, "masked write of active APE");
    exec(match_x(xs[41]));
    exec(rd(1));
    check(rd_data[31:16] == 16'h0000, "inactive APE not written");

    // ---- LKL / LKR --------------------------------------------------------
    exec(tag(1, SRC_ZERO));
    lkl_in = 1;
    exec(net(0, 0)); n_lkl_in++;
    lkl_in = 0;
    exec(tag(1, SRC_D));
    exec(rd(0));
    check(rd_hit && rd_data == wd[0], "LKL input reaches APE 0");
    exec(net(1, 0));    // M at APE 0 leaves through LKL
    check(n_lkl_out > 0, "M of APE 0 leaves by LKL");
    exec(match_x(xs[N-1]));
    exec(net(0, 0));    // M at APE N-1 leaves through LKR
    check(n_lkr_out > 0, "M of last APE leaves by LKR");

    // ---- every mechanism happened ----------------------------------------
    check(n_vin > 0 && n_vout > 0, "vector input and output");
    check(n_vload > 0 && n_vstore > 0, "VLOAD and VSTORE");
    check(n_carry_out > 0, "carry out of 12-bit add");
    check(n_match_hit > 0 && n_match_miss > 0, "match hit and miss");
    check(n_read_hit > 0 && n_read_miss > 0, "read hit and miss");
    check(n_net_shift > 0 && n_net_remote > 0, "neighbour and remote transfers");
    check(n_lkl_in > 0, "LKL input");
    check(n_act_match > 0 && n_masked_write > 0, "activity match and masked write");
    check(n_back_to_back > 0, "back-to-back steps");
    check(n_in_active > 0, "match restricted to active APEs");
    $display("vin=%0d vout=%0d vload=%0d vstore=%0d carry_out=%0d match_hit=%0d match_miss=%0d read_hit=%0d read_miss=%0d net_shift=%0d net_remote=%0d lkl_in=%0d lkl_out=%0d lkr_out=%0d act_match=%0d masked_write=%0d back_to_back=%0d in_active=%0d",
             n_vin, n_vout, n_vload, n_vstore, n_carry_out, n_match_hit, n_match_miss, n_read_hit,
             n_read_miss, n_net_shift, n_net_remote, n_lkl_in, n_lkl_out, n_lkr_out, n_act_match,
             n_masked_write, n_back_to_back, n_in_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
