// tb_self_check: self-checking test of the TMR self-check unit.
// For every {a,b,cin} and every claimed {sum,carry}, err must be 1 exactly
// when the claim differs from the full adder. Upsets are put into the LUTs
// of one lane at a time (err must not change, and lane_mismatch must show
// the disagreement when the upset lane's answer differs).
module tb_self_check;
  logic        a, b, cin, sum, carry, err, lane_mismatch;
  logic [15:0] lut_flip [3];
  int checks = 0, failures = 0;

  self_check dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, c, exp_err, lane, lane_wrong, idx;
    for (int rep = 0; rep < 60; rep++) begin
      lut_flip = '{default: 16'h0};
      lane = rep % 3;
      if (rep >= 3) lut_flip[lane] = 16'($urandom);
      for (int v = 0; v < 32; v++) begin
        {a, b, cin, sum, carry} = 5'(v);
        #1;
        s = (int'(a) + int'(b) + int'(cin)) % 2;
        c = (int'(a) + int'(b) + int'(cin)) / 2;
        exp_err = (int'(sum) != s || int'(carry) != c) ? 1 : 0;
        // Does the upset lane reach a different verdict from the others?
        idx = v >> 2;
        lane_wrong = (int'(sum) != (s ^ int'(lut_flip[lane][idx])) ||
                      int'(carry) != (c ^ int'(lut_flip[lane][8 + idx]))) ? 1 : 0;
        checks++;
        if (int'(err) != exp_err || int'(lane_mismatch) != (lane_wrong ^ exp_err)) begin
          failures++;
          if (failures < 10)
            $display("v=%b flip[%0d]=%h err=%b exp %0d mism=%b exp %0d", v[4:0], lane,
                     lut_flip[lane], err, exp_err, lane_mismatch, lane_wrong ^ exp_err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
