// tb_bf2_sdf: checks one radix-2 SDF butterfly stage (D = 4 and D = 1).
// For every block of 2D valid inputs x[0..2D-1] the stage must emit
// x[i]+x[i+D] for i = 0..D-1 and then x[i]-x[i+D], with output j leaving in
// the cycle after input j+D is accepted, positions counted from 0, and no
// valid output before the first sum. Random gaps in en stall the stage.
module tb_bf2_sdf;
  localparam int DW = 16, NB = 6;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always #5 clk = ~clk;

  // Two stages under test, driven with the same stream.
  logic                 v_in = 1'b0;
  logic signed [DW-1:0] x_re = '0, x_im = '0;
  logic                 v4, v1;
  logic signed [DW-1:0] r4, i4, r1, i1;
  logic [5:0]           k4, k1;

  bf2_sdf #(.DW(DW), .D(4), .IDXW(6)) dut4 (.clk, .rst_n, .en, .in_valid(v_in), .in_re(x_re), .in_im(x_im),
                                          .out_valid(v4), .out_re(r4), .out_im(i4), .out_idx(k4));
  bf2_sdf #(.DW(DW), .D(1), .IDXW(6)) dut1 (.clk, .rst_n, .en, .in_valid(v_in), .in_re(x_re), .in_im(x_im),
                                          .out_valid(v1), .out_re(r1), .out_im(i1), .out_idx(k1));

  int sr [NB*8], si [NB*8];
  int n_acc = 0, o4 = 0, o1 = 0;
  logic en_q = 1'b0;
  always @(posedge clk) begin
    en_q <= en;
    if (en && v_in) n_acc <= n_acc + 1;
  end

  function automatic int expect_out(input int j, input int d, input bit im);
    int b, p, a0, a1;
    b = j / (2 * d); p = j % (2 * d);
    if (p < d) begin
      a0 = im ? si[b*2*d + p] : sr[b*2*d + p];
      a1 = im ? si[b*2*d + p + d] : sr[b*2*d + p + d];
      return a0 + a1;
    end else begin
      a0 = im ? si[b*2*d + p - d] : sr[b*2*d + p - d];
      a1 = im ? si[b*2*d + p] : sr[b*2*d + p];
      return a0 - a1;
    end
  endfunction

  always @(posedge clk) begin
    if (en_q && v4 && o4 < NB * 8 - 8) begin
      checks++;
      if (r4 != DW'(expect_out(o4, 4, 0)) || i4 != DW'(expect_out(o4, 4, 1)) ||
          k4 != 6'(o4) || n_acc != o4 + 4 + 1) begin
        failures++;
        $display("D=4 out %0d: got (%0d,%0d) idx %0d after %0d inputs, exp (%0d,%0d)",
                 o4, r4, i4, k4, n_acc, expect_out(o4, 4, 0), expect_out(o4, 4, 1));
      end
    end
    if (en_q && v4) o4++;
    if (en_q && v1 && o1 < NB * 8 - 8) begin
      checks++;
      if (r1 != DW'(expect_out(o1, 1, 0)) || i1 != DW'(expect_out(o1, 1, 1)) ||
          k1 != 6'(o1) || n_acc != o1 + 1 + 1) begin
        failures++;
        $display("D=1 out %0d: got (%0d,%0d) idx %0d", o1, r1, i1, k1);
      end
    end
    if (en_q && v1) o1++;
  end

  initial begin
    for (int i = 0; i < NB * 8; i++) begin
      sr[i] = int'($urandom_range(2000)) - 1000;
      si[i] = int'($urandom_range(2000)) - 1000;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // A few enabled cycles with no valid input first: nothing may move.
    en <= 1'b1; v_in <= 1'b0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < NB * 8; i++) begin
      if ($urandom_range(4) == 0) begin en <= 1'b0; @(posedge clk); end
      en <= 1'b1; v_in <= 1'b1; x_re <= DW'(sr[i]); x_im <= DW'(si[i]);
      @(posedge clk);
    end
    en <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (o4 != NB * 8 - 4 || o1 != NB * 8 - 1) begin
      failures++;
      $display("output counts %0d %0d", o4, o1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
