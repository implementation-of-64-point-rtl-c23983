// tb_r23sdf_pe: checks the radix-2^3 processing element for N = 64 and
// N = 8. Within each block of N samples, output position
// t = (N/2)k1 + (N/4)k2 + (N/8)k3 + n' must equal the 8-point DFT
//   sum over m = 0..7 of x[(N/8)m + n'] * W8^(m*k),  k = k1 + 2k2 + 4k3,
// computed here in double precision (within two LSBs). The positions
// reported with each output and the latency (output j leaves in the cycle
// after input j + 7N/8 + 3 is accepted) are checked too. The stream has
// random gaps with en low.
module tb_r23sdf_pe;
  localparam int DW = 20, CW = 20, NB = 4;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, v_in = 1'b0;
  logic signed [DW-1:0] x_re = '0, x_im = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic                 va, vb;
  logic signed [DW-1:0] ra, ia, rb, ib;
  logic [5:0]           ka, kb;

  r23sdf_pe #(.DW(DW), .CW(CW), .N(64), .IDXW(6)) dut64 (.clk, .rst_n, .en, .in_valid(v_in),
    .in_re(x_re), .in_im(x_im), .out_valid(va), .out_re(ra), .out_im(ia), .out_idx(ka));
  r23sdf_pe #(.DW(DW), .CW(CW), .N(8), .IDXW(6)) dut8 (.clk, .rst_n, .en, .in_valid(v_in),
    .in_re(x_re), .in_im(x_im), .out_valid(vb), .out_re(rb), .out_im(ib), .out_idx(kb));

  int xr [NB*64+64], xi [NB*64+64];
  int n_acc = 0, oa = 0, ob = 0;
  logic en_q = 1'b0;
  always @(posedge clk) begin
    en_q <= en;
    if (en && v_in) n_acc <= n_acc + 1;
  end

  task automatic ref_pe(input int n, input int j, output real yr, output real yi);
    int b, t, k, np, s;
    real ang;
    b = j / n; t = j % n; s = n / 8;
    k  = (t / (n/2)) % 2 + 2 * ((t / (n/4)) % 2) + 4 * ((t / s) % 2);
    np = t % s;
    yr = 0.0; yi = 0.0;
    for (int m = 0; m < 8; m++) begin
      ang = -TWO_PI * ((m * k) % 8) / 8.0;
      yr += xr[b*n + s*m + np] * $cos(ang) - xi[b*n + s*m + np] * $sin(ang);
      yi += xr[b*n + s*m + np] * $sin(ang) + xi[b*n + s*m + np] * $cos(ang);
    end
  endtask

  task automatic check(input int n, input int j, input logic signed [DW-1:0] r, input logic signed [DW-1:0] i,
                       input logic [5:0] k);
    real yr, yi;
    ref_pe(n, j, yr, yi);
    checks++;
    if ((real'(r) - yr) > 2.0 || (yr - real'(r)) > 2.0 || (real'(i) - yi) > 2.0 || (yi - real'(i)) > 2.0 ||
        k != 6'(j) || n_acc != j + 7 * n / 8 + 3 + 1) begin
      failures++;
      $display("N=%0d out %0d: got (%0d,%0d) pos %0d after %0d inputs, exp (%f,%f)", n, j, r, i, k, n_acc, yr, yi);
    end
  endtask

  always @(posedge clk) begin
    if (en_q && va) begin
      if (oa < NB * 64) check(64, oa, ra, ia, ka);
      oa++;
    end
    if (en_q && vb) begin
      if (ob < NB * 64) check(8, ob, rb, ib, kb);
      ob++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB * 64 + 64; i++) begin
      xr[i] = (i < NB * 64) ? int'($urandom_range(20000)) - 10000 : 0;
      xi[i] = (i < NB * 64) ? int'($urandom_range(20000)) - 10000 : 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < NB * 64 + 64; i++) begin
      if ($urandom_range(5) == 0) begin en <= 1'b0; @(posedge clk); end
      en <= 1'b1; v_in <= 1'b1; x_re <= DW'(xr[i]); x_im <= DW'(xi[i]);
      @(posedge clk);
    end
    en <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (oa < NB * 64 || ob < NB * 64) begin
      failures++;
      $display("too few outputs: %0d %0d", oa, ob);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
