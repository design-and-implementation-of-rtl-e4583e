// lut_multiplier: unsigned WIDTH x WIDTH multiplier from 2x2 LUT products.
//
// Each operand is cut into WIDTH/2 two-bit digits. Every pair of digits
// (a digit i, b digit j) is multiplied by the product table of one lut2_cell,
// giving a 4-bit partial product of weight 4^(i+j). The (WIDTH/2)^2 partial
// products are then shifted into place and added to form the full 2*WIDTH-bit
// product. Purely combinational.
// The 2x2 product table follows the design's A*B table; how the partial
// products are summed is not specified there, and here it is a plain sum
// that synthesis maps to an adder tree.
module lut_multiplier #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  localparam int unsigned DIGITS = WIDTH / 2;

  if (WIDTH < 2 || (WIDTH % 2) != 0) begin : g_bad_width
    $error("lut_multiplier: WIDTH must be even and at least 2");
  end

  logic [3:0] pp [DIGITS][DIGITS];

  for (genvar i = 0; i < DIGITS; i++) begin : g_a
    for (genvar j = 0; j < DIGITS; j++) begin : g_b
      lut2_cell u_cell (
        .a   (a[2*i +: 2]),
        .b   (b[2*j +: 2]),
        .cin (1'b0),
        .bin (1'b0),
        .sum (),
        .cout(),
        .diff(),
        .bout(),
        .prod(pp[i][j])
      );
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < int'(DIGITS); i++) begin
      for (int j = 0; j < int'(DIGITS); j++) begin
        p = p + ((2*WIDTH)'(pp[i][j]) << (2 * (i + j)));
      end
    end
  end

endmodule
