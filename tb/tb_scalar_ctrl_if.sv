// tb_scalar_ctrl_if: self-checking test of the scalar data and control
// interface (N = 8). Checks that each instruction is held on the broadcast
// bus for exactly four clocks with commit in the fourth, that back-to-back
// instructions commit every four clocks, that an idle bus carries NOP, the
// Match Reply OR, and that READ returns the leftmost tagged APE's field one
// clock after its step (and rd_hit = 0 when none is tagged).
module tb_scalar_ctrl_if;
  import asp_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready;
  asp_instr_t instr;
  asp_bcast_t bc;
  logic [N-1:0] ape_m;
  logic [N-1:0][DBUS_W-1:0] ape_field;
  logic mr, rd_valid, rd_hit;
  logic [DBUS_W-1:0] rd_data;
  int checks = 0, failures = 0;
  int cyc = 0;
  int commits[$];

  scalar_ctrl_if #(.N(N)) dut (.clk, .rst_n, .instr_valid, .instr_ready, .instr, .bc,
                               .ape_m, .ape_field, .mr, .rd_valid, .rd_hit, .rd_data);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bc.commit) commits.push_back(cyc);
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic asp_instr_t mk(asp_op_e op, logic [31:0] data);
    asp_instr_t x = '0;
    x.ctrl.op = op; x.ctrl.mask = 32'h0F0F0F0F; x.data = data; x.act = 12'hA5C;
    return x;
  endfunction

  // issue one instruction (waits for ready), returns at the accept edge
  task automatic issue(asp_instr_t x);
    instr = x; instr_valid = 1;
    do @(posedge clk); while (!instr_ready);
    #1 instr_valid = 0;
  endtask

  initial begin
    instr = '0;
    for (int i = 0; i < N; i++) ape_field[i] = 32'h1000 + i;
    ape_m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (bc.ctrl.op !== OP_NOP || bc.commit !== 0 || instr_ready !== 1) failures++;
    checks++; if (mr !== 0) failures++;

    // one instruction: held four clocks, commit only in the fourth
    issue(mk(OP_MATCH, 32'h11223344));
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (bc.ctrl.op !== OP_MATCH || bc.dbus !== 32'h11223344 || bc.abus !== 12'hA5C ||
          bc.ctrl.mask !== 32'h0F0F0F0F || bc.commit !== (s == 3) || instr_ready !== (s == 3))
        failures++;
      @(posedge clk); #1;
    end
    checks++; if (bc.ctrl.op !== OP_NOP) failures++;

    // back-to-back stream of 6: commits exactly 4 apart
    commits.delete();
    instr_valid = 1;
    for (int k = 0; k < 6; k++) begin
      instr = mk(OP_WRITE, 32'(k));
      do @(posedge clk); while (!instr_ready);
      #1;
    end
    instr_valid = 0;
    repeat (6) @(posedge clk);
    checks++; if (commits.size() != 6) failures++;
    for (int k = 1; k < commits.size(); k++) begin
      checks++; if (commits[k] - commits[k-1] != SLOTS) failures++;
    end

    // Match Reply and READ
    ape_m = 8'b0110_0100; #1;
    checks++; if (mr !== 1) failures++;
    issue(mk(OP_READ, 0));
    repeat (4) @(posedge clk);    // edge ending slot 3
    #1;
    checks++; if (rd_valid !== 1 || rd_hit !== 1 || rd_data !== 32'h1002) failures++;
    @(posedge clk); #1;
    checks++; if (rd_valid !== 0) failures++;
    ape_m = '0; #1;
    checks++; if (mr !== 0) failures++;
    issue(mk(OP_READ, 0));
    repeat (4) @(posedge clk); #1;
    checks++; if (rd_valid !== 1 || rd_hit !== 0 || rd_data !== 0) failures++;
    ape_m = 8'b1000_0000; #1;
    issue(mk(OP_READ, 0));
    repeat (4) @(posedge clk); #1;
    checks++; if (rd_data !== 32'h1007) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
