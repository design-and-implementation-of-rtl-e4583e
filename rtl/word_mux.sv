// word_mux: N-input, WIDTH-bit multiplexer.
//
// y = d[sel]. A select value of N or above (possible when N is not a power of
// two) gives all zeros. Purely combinational. The same module serves as the
// operand multiplexers that pick the ALU's two inputs from the eligible
// operands and as the result multiplexers that pick one precomputed result by
// the operation code; the zero output for an unused select value is this
// design's choice.
module word_mux #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned SELW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [WIDTH-1:0] d [N],
  input  logic [SELW-1:0]  sel,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (int'(sel) == i) y = d[i];
    end
  end

endmodule
