// tb_booth_mult_fw: checks the fixed-width Booth multiplier against integer
// arithmetic: p = floor((a*b + 2^(FRAC-1)) / 2^FRAC), for corner values
// (zero, +/-1, the extremes of both operands) and random operands, at the
// default 20x20 size and at an odd coefficient width.
module tb_booth_mult_fw;
  int checks = 0, failures = 0;

  logic signed [19:0] a, b, p;
  logic signed [15:0] a2, p2;
  logic signed [10:0] b2;
  booth_mult_fw #(.AW(20), .BW(20), .FRAC(18), .OW(20)) dut  (.a(a),  .b(b),  .p(p));
  booth_mult_fw #(.AW(16), .BW(11), .FRAC(9),  .OW(16)) dut2 (.a(a2), .b(b2), .p(p2));

  function automatic longint rmul(input longint x, input longint y, input int frac);
    return (x * y + (64'sd1 <<< (frac - 1))) >>> frac;
  endfunction

  task automatic check(input longint x, input longint y);
    longint e;
    a = 20'(x); b = 20'(y);
    #1;
    e = rmul(longint'(a), longint'(b), 18);
    checks++;
    if (p != 20'(e)) begin
      failures++;
      $display("%0d * %0d: got %0d expected %0d", a, b, p, 20'(e));
    end
  endtask

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint corner [7] = '{0, 1, -1, 524287, -524288, 262144, -262144};
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++)
        check(corner[i], corner[j]);
    for (int i = 0; i < 500; i++)
      check(longint'($signed(20'($urandom))), longint'($signed(20'($urandom))));
    for (int i = 0; i < 300; i++) begin
      longint e;
      a2 = 16'($urandom); b2 = 11'($urandom);
      #1;
      e = rmul(longint'(a2), longint'(b2), 9);
      checks++;
      if (p2 != 16'(e)) begin
        failures++;
        $display("odd width %0d * %0d: got %0d expected %0d", a2, b2, p2, 16'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
