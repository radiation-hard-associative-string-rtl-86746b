// tb_asp_chain: two full-size substrings linked into one 128-APE string.
//
// Both substrings receive the same instruction stream. The network is
// chained LKR(left) -> LKL(right) and LKL(right) -> LKR(left), and the
// vector ports are chained right.vout -> left.vin, so the two buffers form
// one 512-byte shift register fed at the right end. The testbench plays the
// controller: it ORs the two Match Reply lines and takes a READ from the
// leftmost substring that reports a hit. Checked: 12-bit additions across
// all 128 APEs, tag transfers across the substring boundary in both
// directions, a gated transfer that skips from one substring into the other,
// and the global Match Reply.
module tb_asp_chain;
  import asp_pkg::*;
  localparam int N = N_APE;
  localparam int G = 2 * N;

  logic clk = 0, rst_n = 0;
  logic instr_valid = 0;
  logic [1:0] ready, done, mr, rdv, rdh;
  asp_instr_t instr;
  logic [1:0][DBUS_W-1:0] rdd;
  logic vshift = 0;
  logic [7:0] vin = 0, vmid, vout;
  logic l0_lkl_out, r_lkl_out, l_lkr_out, r_lkr_out, lkl_in = 0;

  asp_substring u_left (.clk, .rst_n, .instr_valid, .instr_ready(ready[0]), .instr,
                        .step_done(done[0]), .mr(mr[0]), .rd_valid(rdv[0]), .rd_hit(rdh[0]),
                        .rd_data(rdd[0]), .vshift, .vin(vmid), .vout,
                        .lkl_in, .lkl_out(l0_lkl_out), .lkr_in(r_lkl_out), .lkr_out(l_lkr_out));
  asp_substring u_right (.clk, .rst_n, .instr_valid, .instr_ready(ready[1]), .instr,
                         .step_done(done[1]), .mr(mr[1]), .rd_valid(rdv[1]), .rd_hit(rdh[1]),
                         .rd_data(rdd[1]), .vshift, .vin, .vout(vmid),
                         .lkl_in(l_lkr_out), .lkl_out(r_lkl_out), .lkr_in(1'b0), .lkr_out(r_lkr_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, ncommit = 0;
  int n_cross_r = 0, n_cross_l = 0, n_cross_gated = 0, n_sync = 0;

  always @(posedge clk) begin
    if (done[0]) ncommit <= ncommit + 1;
    if (done != 2'b00 && done != 2'b11) failures++;   // lock-step
    else if (done == 2'b11) n_sync++;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic exec(asp_instr_t x);
    int target;
    target = ncommit + 1;
    instr = x; instr_valid = 1;
    do @(posedge clk); while (ready != 2'b11);
    #1 instr_valid = 0;
    wait (ncommit == target);
    @(negedge clk);
  endtask

  function automatic asp_instr_t mk(asp_op_e op);
    asp_instr_t x = '0;
    x.ctrl.op = op;
    return x;
  endfunction

  function automatic asp_instr_t match_x(logic [11:0] x);
    asp_instr_t i = mk(OP_MATCH);
    i.ctrl.mask = 32'h0000_0FFF; i.data = {20'h0, x};
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

  // READ across the string: leftmost substring with a hit wins
  task automatic read_global(logic half, output logic hit, output logic [31:0] data);
    asp_instr_t i = mk(OP_READ);
    i.ctrl.half = half;
    exec(i);
    hit  = rdh[0] | rdh[1];
    data = rdh[0] ? rdd[0] : rdd[1];
  endtask

  logic [11:0] xs[G], ys[G];
  logic [31:0] wd[G];

  initial begin
    asp_instr_t ins;
    logic hit;
    logic [31:0] data;
    instr = '0;
    for (int g = 0; g < G; g++) begin
      xs[g] = 12'(g * 29 + 11);
      ys[g] = 12'($urandom());
      wd[g] = {4'h0, ys[g], 4'h0, xs[g]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // one 512-byte vector stream through both buffers
    for (int k = 0; k < 4 * G; k++) begin
      vshift = 1; vin = wd[k / 4][8 * (k % 4) +: 8];
      @(negedge clk);
    end
    vshift = 0;

    exec(tag(0, SRC_ONE));
    ins = mk(OP_VLOAD); ins.ctrl.mask = '1; exec(ins);
    ins = mk(OP_CARRY); exec(ins);
    for (int b = 0; b < 13; b++) begin
      ins = mk(OP_ADD);
      ins.ctrl.a_idx = 6'(b); ins.ctrl.b_idx = 6'(16 + b); ins.ctrl.d_idx = 6'(32 + b);
      if (b == 12) begin ins.ctrl.a_idx = 6'd12; ins.ctrl.b_idx = 6'd12; end
      exec(ins);
    end
    ins = mk(OP_VSTORE); ins.ctrl.half = 1; exec(ins);
    for (int k = 0; k < 4 * G; k++) begin
      logic [12:0] s;
      s = 13'(xs[k / 4]) + 13'(ys[k / 4]);
      check(vout == 8'(32'(s) >> (8 * (k % 4))), $sformatf("sum byte %0d", k));
      vshift = 1; vin = 8'h00;
      @(negedge clk);
    end
    vshift = 0;

    // rightward transfer across the boundary: APE 63 -> APE 64
    exec(match_x(xs[N-1]));
    check(mr == 2'b01, "only the left substring replies");
    exec(net(0, 0));
    exec(tag(1, SRC_D));
    check(mr == 2'b10, "tag now in the right substring");
    read_global(0, hit, data);
    check(hit && data == wd[N], "transfer right crosses into APE 64");
    if (hit && data == wd[N]) n_cross_r++;

    // leftward: APE 64 -> APE 63
    exec(net(1, 0));
    exec(tag(1, SRC_D));
    read_global(0, hit, data);
    check(hit && data == wd[N-1], "transfer left crosses into APE 63");
    if (hit && data == wd[N-1]) n_cross_l++;

    // gated: only APE 100 active, responder at APE 30
    exec(tag(0, SRC_ZERO));
    exec(match_x(xs[100]));
    exec(tag(0, SRC_M));
    exec(match_x(xs[30]));
    exec(net(0, 1));
    exec(tag(1, SRC_D));
    read_global(0, hit, data);
    check(hit && data == wd[100], "gated transfer from APE 30 reaches APE 100");
    if (hit && data == wd[100]) n_cross_gated++;

    // global Match Reply with responders in both substrings, read leftmost
    ins = mk(OP_MATCH); ins.ctrl.mask = '0; exec(ins);   // everything matches
    check(mr == 2'b11, "Match Reply from both substrings");
    read_global(0, hit, data);
    check(hit && data == wd[0], "leftmost of the whole string");

    check(n_cross_r > 0 && n_cross_l > 0 && n_cross_gated > 0 && n_sync > 0, "all mechanisms");
    $display("cross_r=%0d cross_l=%0d cross_gated=%0d steps=%0d", n_cross_r, n_cross_l,
             n_cross_gated, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
