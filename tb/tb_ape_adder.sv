// tb_ape_adder: exhaustive check of the single-bit full adder, then a
// 16-bit ripple of it used bit-serially against integer addition.
module tb_ape_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  ape_adder dut (.a, .b, .cin, .s, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, s} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("a=%b b=%b cin=%b -> s=%b cout=%b", a, b, cin, s, cout);
      end
    end
    for (int t = 0; t < 200; t++) begin
      logic [15:0] x, y;
      logic [16:0] sum;
      logic        carry;
      x = 16'($urandom()); y = 16'($urandom());
      carry = 1'b0;
      for (int i = 0; i < 16; i++) begin
        a = x[i]; b = y[i]; cin = carry;
        #1;
        sum[i] = s;
        carry  = cout;
      end
      sum[16] = carry;
      checks++;
      if (sum !== 17'(x) + 17'(y)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
