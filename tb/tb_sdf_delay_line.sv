// tb_sdf_delay_line: checks that the feedback buffer returns every word
// exactly DEPTH enabled cycles after it was written, with random cycles of
// en low in between (which must neither move nor corrupt the buffer).
module tb_sdf_delay_line;
  localparam int W = 12, DEPTH = 5;
  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, dout;
  int           checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  sdf_delay_line #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en  = ($urandom_range(3) != 0);
      din = W'($urandom);
      #1;
      if (en) begin
        if (hist.size() >= DEPTH) begin
          checks++;
          if (dout != hist[hist.size() - DEPTH]) begin
            failures++;
            $display("word %0d: got %h expected %h", hist.size(), dout, hist[hist.size() - DEPTH]);
          end
        end
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
