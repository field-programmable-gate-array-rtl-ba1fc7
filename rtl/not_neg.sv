// not_neg: first stage of the ALU, pass / one's complement / two's
// complement of operand A.
//
//   n_pass not_n_neg | y
//     0       x      | a              (pass-through)
//     1       0      | -a  (two's complement)
//     1       1      | ~a  (one's complement)
//
// Each bit of `a` is XORed with n_pass, which complements it when n_pass
// is 1, and the result goes through an incrementer whose increment input
// is n_pass AND NOT not_n_neg, adding 1 only for the two's complement.
// `cry` is the incrementer's carry (1 only for the two's complement of 0).
// Structure and truth table follow the document's NOT/NEG schematic;
// combinational.
module not_neg #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic         n_pass,
  input  logic         not_n_neg,
  output logic [W-1:0] y,
  output logic         cry
);

  logic [W-1:0] a_x;
  logic         inc;

  assign a_x = a ^ {W{n_pass}};
  assign inc = n_pass & ~not_n_neg;

  inc4 #(.W(W)) u_inc (
    .a   (a_x),
    .inc (inc),
    .y   (y),
    .cry (cry)
  );

endmodule
