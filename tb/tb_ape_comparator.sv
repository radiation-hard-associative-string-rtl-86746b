// tb_ape_comparator: self-checking test of the 70-bit masked comparator.
// Random words, patterns and care masks are checked against a bit-by-bit
// reference; half of the patterns are derived from the word (with a few
// bits flipped, in cared or ignored positions) so matches are common.
module tb_ape_comparator;
  localparam int W = 70;
  logic [W-1:0] word, pat, care;
  logic         match;
  int checks = 0, failures = 0, hits = 0;

  ape_comparator #(.W(W)) dut (.word, .pat, .care, .match);

  function automatic logic [W-1:0] rnd();
    return {$urandom(), $urandom(), $urandom()};
  endfunction

  function automatic logic ref_match(logic [W-1:0] w, logic [W-1:0] p, logic [W-1:0] c);
    for (int i = 0; i < W; i++)
      if (c[i] && (w[i] != p[i])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      word = rnd();
      care = rnd();
      case (t % 4)
        0: pat = rnd();
        1: pat = word;
        2: begin pat = word; pat[$urandom_range(W-1)] ^= 1'b1; end
        3: begin pat = word ^ ~care; end   // differ only where ignored
      endcase
      if (t % 50 == 0) care = '0;
      #1;
      checks++;
      if (match !== ref_match(word, pat, care)) begin
        failures++;
        if (failures < 5) $display("mismatch t=%0d word=%h pat=%h care=%h match=%b", t, word, pat, care, match);
      end
      if (match) hits++;
    end
    // the activity end (bits 69:64) alone decides a match
    word = '0; pat = '0; care = '0;
    pat[69] = 1'b1; care[69] = 1'b1; #1;
    checks++; if (match !== 1'b0) failures++;
    word[69] = 1'b1; #1;
    checks++; if (match !== 1'b1) failures++;
    checks++; if (hits < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
