// sdf_delay_line: the feedback buffer of one single-path delay feedback
// (SDF) butterfly stage, a first-in first-out delay of DEPTH words.
//
// It is a DEPTH-word memory addressed by one circular pointer. On a cycle
// with en high the word at the pointer is presented on dout (it was written
// DEPTH enabled cycles ago) and is replaced by din, and the pointer moves
// on. dout is therefore din delayed by DEPTH enabled cycles; it is a
// combinational read of the current pointer, so dout is valid throughout the
// cycle in which the matching din is written. The depth comes from the
// stage (N/2, N/4 or N/8 words); building the buffer as a pointer-addressed
// memory rather than a shift register is a choice of this design. The
// contents are not reset: the stage that owns the buffer ignores what it
// reads until it has written the buffer once.
module sdf_delay_line #(
  parameter int unsigned W     = 40,
  parameter int unsigned DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  ptr <= '0;
    else if (en) begin
      if (ptr == AW'(DEPTH - 1)) ptr <= '0;
      else                       ptr <= ptr + 1'b1;
    end
  end
endmodule
