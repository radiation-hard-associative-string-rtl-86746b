// tb_vector_data_buffer: self-checking test of the vector data buffer at
// its default size (64 words). Fills it through the byte port, checks the
// word each APE sees and the fill time (4 bytes per APE, one per clock),
// captures a parallel set of words, then shifts them out while shifting new
// data in, checking both streams; also checks that capture wins over shift.
module tb_vector_data_buffer;
  import asp_pkg::*;
  localparam int N = 64;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, shift = 0, capture = 0;
  logic [7:0] vin, vout;
  logic [N-1:0][W-1:0] cap_words, words;
  int checks = 0, failures = 0;

  vector_data_buffer #(.N(N), .W(W)) dut (.clk, .rst_n, .shift, .vin, .vout,
                                          .capture, .cap_words, .words);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pat_a(int k); return 8'(k * 7 + 3); endfunction
  function automatic logic [7:0] pat_b(int k); return 8'(k * 13 + 101); endfunction

  initial begin
    int cycles;
    vin = 0; cap_words = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (words !== '0) failures++;
    // fill
    cycles = 0;
    for (int k = 0; k < 4 * N; k++) begin
      shift = 1; vin = pat_a(k);
      @(negedge clk); cycles++;
    end
    shift = 0;
    checks++; if (cycles != 4 * N) failures++;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (words[i] !== {pat_a(4*i+3), pat_a(4*i+2), pat_a(4*i+1), pat_a(4*i)}) failures++;
    end
    // capture
    for (int i = 0; i < N; i++) cap_words[i] = {$urandom()};
    capture = 1; shift = 1; vin = 8'hEE;   // capture has priority
    @(negedge clk);
    capture = 0; shift = 0;
    checks++; if (words !== cap_words) failures++;
    // unload while loading
    for (int k = 0; k < 4 * N; k++) begin
      checks++;
      if (vout !== cap_words[k / 4][8 * (k % 4) +: 8]) failures++;
      shift = 1; vin = pat_b(k);
      @(negedge clk);
    end
    shift = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (words[i] !== {pat_b(4*i+3), pat_b(4*i+2), pat_b(4*i+1), pat_b(4*i)}) failures++;
    end
    // no shift: holds
    repeat (3) @(negedge clk);
    checks++; if (words[0] !== {pat_b(3), pat_b(2), pat_b(1), pat_b(0)}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
