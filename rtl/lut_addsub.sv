// lut_addsub: WIDTH-bit adder / subtractor built from 2-bit LUT cells.
//
// The operands are cut into WIDTH/2 two-bit digits. Digit i goes to one
// lut2_cell, whose sum (or difference) comes straight out of a table and whose
// carry (or borrow) into the next digit is chosen by the cell's 2:1 multiplexer
// on the incoming carry. No gate-level adder is used: the word is a ripple of
// table reads and 2:1 multiplexers.
//   sub = 0 : y = a + b,  carry = carry out of the top digit
//   sub = 1 : y = a - b,  carry = borrow out of the top digit (1 when a < b,
//             operands taken as unsigned)
// The carry / borrow into digit 0 is 0. Purely combinational.
// WIDTH must be even; its default, 16, is the operand width of the design's
// simulated ALU. Choosing the sum or difference chain by `sub` is this
// design's choice.
module lut_addsub #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] y,
  output logic             carry
);

  localparam int unsigned DIGITS = WIDTH / 2;

  // synthesis-time check of the parameter
  if (WIDTH < 2 || (WIDTH % 2) != 0) begin : g_bad_width
    $error("lut_addsub: WIDTH must be even and at least 2");
  end

  logic [DIGITS:0]   c;      // c[i] is the carry / borrow into digit i
  logic [DIGITS-1:0] cout_d, bout_d;
  logic [WIDTH-1:0]  sum_w, diff_w;

  assign c[0] = 1'b0;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    lut2_cell u_cell (
      .a   (a[2*i +: 2]),
      .b   (b[2*i +: 2]),
      .cin (c[i]),
      .bin (c[i]),
      .sum (sum_w[2*i +: 2]),
      .cout(cout_d[i]),
      .diff(diff_w[2*i +: 2]),
      .bout(bout_d[i]),
      .prod()
    );
    assign c[i+1] = sub ? bout_d[i] : cout_d[i];
  end

  assign y     = sub ? diff_w : sum_w;
  assign carry = c[DIGITS];

endmodule
