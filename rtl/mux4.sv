// mux4: W-bit two-way multiplexer, y = a_n_b ? a : b.
//
// Combinational. The select is named A/~B on the document's MUX_4 box: 1
// selects the A inputs, 0 the B inputs.
module mux4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         a_n_b,
  output logic [W-1:0] y
);

  assign y = a_n_b ? a : b;

endmodule
