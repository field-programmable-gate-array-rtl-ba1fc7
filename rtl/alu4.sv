// alu4: 4-bit arithmetic and logic unit of the introductory CPU lab.
//
// Two stages in series. not_neg passes operand A or complements it;
// and_add then passes that value or combines it with B by addition (with
// carry in) or AND. Three control lines select one of eight functions:
//
//   n_a_only logic_n_arith invert | y
//      0          0          0    | a
//      0          0          1    | -a            (two's complement)
//      0          1          0    | a
//      0          1          1    | ~a            (one's complement)
//      1          0          0    | a + b + cin
//      1          0          1    | -a + b + cin
//      1          1          0    | a & b
//      1          1          1    | ~a & b
//
// logic_n_arith drives both the NOT/~NEG select of the first stage and the
// AND/~ADD select of the second, so "logic" pairs the one's complement
// with AND and "arithmetic" pairs the two's complement with addition.
// cout is the adder's carry out in every mode (meaningful for the two add
// rows); neg_cry is the first stage's incrementer carry.
//
// Wiring and function table follow the document. Where its schematic
// shows an inverter on the invert input, this design follows the function
// table instead: invert = 1 complements A. Purely combinational.
module alu4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         logic_n_arith,
  input  logic         invert,
  input  logic         n_a_only,
  output logic [W-1:0] y,
  output logic         cout,
  output logic         neg_cry
);

  logic [W-1:0] z;

  not_neg #(.W(W)) u_not_neg (
    .a         (a),
    .n_pass    (invert),
    .not_n_neg (logic_n_arith),
    .y         (z),
    .cry       (neg_cry)
  );

  and_add #(.W(W)) u_and_add (
    .a         (z),
    .b         (b),
    .and_n_add (logic_n_arith),
    .n_pass    (n_a_only),
    .cin       (cin),
    .y         (y),
    .cout      (cout)
  );

endmodule
