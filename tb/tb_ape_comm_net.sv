// tb_ape_comm_net: self-checking test of the inter-APE network (N = 16).
// Random M patterns, activity gates, directions, modes and LKL/LKR inputs
// are compared with a reference that, for every APE, searches back along
// the string for the nearest source (an M-tagged APE or the link input)
// with no open gate in between. Also counts that neighbour shifts, gated
// remote transfers and both link outputs all occurred.
module tb_ape_comm_net;
  localparam int N = 16;
  logic net_left, net_gated, lkl_in, lkr_in, lkl_out, lkr_out;
  logic [N-1:0] m, a, d;
  int checks = 0, failures = 0;
  int n_shift = 0, n_remote = 0, n_lkl = 0, n_lkr = 0;

  ape_comm_net #(.N(N)) dut (.net_left, .net_gated, .m, .a, .lkl_in, .lkr_in,
                             .d, .lkl_out, .lkr_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic open_gate(int i);
    return net_gated ? a[i] : 1'b1;
  endfunction

  // does the signal arriving at position i (from upstream) exist?
  function automatic logic arrives(int i);
    if (!net_left) begin
      for (int j = i - 1; j >= 0; j--) begin
        if (m[j]) return 1'b1;
        if (open_gate(j)) return 1'b0;
      end
      return lkl_in;
    end else begin
      for (int j = i + 1; j < N; j++) begin
        if (m[j]) return 1'b1;
        if (open_gate(j)) return 1'b0;
      end
      return lkr_in;
    end
  endfunction

  initial begin
    logic [N-1:0] exp_d;
    logic exp_lkl, exp_lkr;
    for (int t = 0; t < 3000; t++) begin
      m = N'($urandom()) & N'($urandom());
      a = N'($urandom()) & N'($urandom()) & N'($urandom());
      net_left = 1'($urandom()); net_gated = 1'($urandom());
      lkl_in = 1'($urandom()); lkr_in = 1'($urandom());
      #1;
      for (int i = 0; i < N; i++) exp_d[i] = open_gate(i) & arrives(i);
      exp_lkr = !net_left && arrives(N);
      exp_lkl =  net_left && arrives(-1);
      checks++;
      if (d !== exp_d || lkl_out !== exp_lkl || lkr_out !== exp_lkr) begin
        failures++;
        if (failures < 5)
          $display("FAIL m=%b a=%b left=%b gated=%b lkl=%b lkr=%b d=%b exp=%b", m, a, net_left,
                   net_gated, lkl_in, lkr_in, d, exp_d);
      end
      if (!net_gated && |d) n_shift++;
      if (net_gated && |d) n_remote++;
      if (lkl_out) n_lkl++;
      if (lkr_out) n_lkr++;
    end
    // directed: one marker at 2, gated right with selected APE at 9 only
    m = '0; m[2] = 1; a = '0; a[9] = 1; net_left = 0; net_gated = 1; lkl_in = 0; lkr_in = 0;
    #1; checks++; if (d !== N'(1 << 9)) failures++;
    // plain right shift of a pattern
    net_gated = 0; m = 16'b0000_0000_1001_0001; lkl_in = 1;
    #1; checks++; if (d !== 16'b0000_0001_0010_0011) failures++;
    checks++; if (n_shift == 0 || n_remote == 0 || n_lkl == 0 || n_lkr == 0) failures++;
    $display("shift=%0d remote=%0d lkl_out=%0d lkr_out=%0d", n_shift, n_remote, n_lkl, n_lkr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
