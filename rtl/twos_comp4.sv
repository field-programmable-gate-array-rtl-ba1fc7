// twos_comp4: W-bit two's complement, y = -a, the first step toward the ALU.
//
// Every bit of `a` is inverted and the result goes through the W-bit
// incrementer (inc4) with its increment input tied to 1, so
// y = ~a + 1 = -a (mod 2**W). `cry` is the incrementer's carry, 1 only for
// a = 0. Structure as in the course's introductory two's-complement
// circuit (inverters into INC_4 with INC tied high); combinational. The
// ALU's NOT/NEG stage (not_neg) extends this circuit with pass-through and
// one's-complement modes.
module twos_comp4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y,
  output logic         cry
);

  inc4 #(.W(W)) u_inc (
    .a   (~a),
    .inc (1'b1),
    .y   (y),
    .cry (cry)
  );

endmodule
