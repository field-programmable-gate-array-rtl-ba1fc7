// and_add: second stage of the ALU, pass / add / AND.
//
//   n_pass and_n_add | y
//     0       x      | a              (pass-through)
//     1       0      | a + b + cin    (add)
//     1       1      | a & b          (AND)
//
// A W-bit adder and W AND gates work in parallel; a first multiplexer
// picks the AND result (and_n_add = 1) or the sum (0), a second one picks
// that result (n_pass = 1) or `a` unchanged (0). `cout` is the adder's
// carry in every mode. Structure and truth table follow the document's
// AND/ADD schematic with pass-through; combinational.
module and_add #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         and_n_add,
  input  logic         n_pass,
  input  logic         cin,
  output logic [W-1:0] y,
  output logic         cout
);

  logic [W-1:0] an;   // AND results
  logic [W-1:0] ad;   // adder results
  logic [W-1:0] op;   // selected operation

  assign an = a & b;

  fa4 #(.W(W)) u_fa (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .y    (ad),
    .cout (cout)
  );

  mux4 #(.W(W)) u_mux_op (
    .a     (an),
    .b     (ad),
    .a_n_b (and_n_add),
    .y     (op)
  );

  mux4 #(.W(W)) u_mux_pass (
    .a     (op),
    .b     (a),
    .a_n_b (n_pass),
    .y     (y)
  );

endmodule
