// tb_golden_gen: self-checking test of the golden output generator.
// All eight {a,b,cin} inputs must give the full-adder sum and carry; a
// flipped LUT bit must invert exactly the addressed output.
module tb_golden_gen;
  logic        a, b, cin, gsum, gcarry;
  logic [15:0] lut_flip;
  int checks = 0, failures = 0;

  golden_gen dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, c, idx;
    for (int rep = 0; rep < 50; rep++) begin
      lut_flip = (rep == 0) ? 16'h0 : 16'($urandom);
      for (int v = 0; v < 8; v++) begin
        {a, b, cin} = 3'(v);
        #1;
        s   = (int'(a) + int'(b) + int'(cin)) % 2;
        c   = (int'(a) + int'(b) + int'(cin)) / 2;
        idx = v;
        s ^= int'(lut_flip[idx]);
        c ^= int'(lut_flip[8 + idx]);
        checks++;
        if (int'(gsum) != s || int'(gcarry) != c) begin
          failures++;
          $display("abc=%0d flip=%h got %b%b exp %0d%0d", v, lut_flip, gsum, gcarry, s, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
