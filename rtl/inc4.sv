// inc4: W-bit incrementer, y = a + inc, cry = carry out.
//
// A ripple chain of half adders: bit i sums a[i] with the carry into it,
// the carry into bit 0 being `inc`. Purely combinational. The document
// shows the block (INC_4) as a box with this function; the ripple
// structure is this design's choice.
module inc4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic         inc,
  output logic [W-1:0] y,
  output logic         cry
);

  logic [W:0] c;

  assign c[0] = inc;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign y[i]   = a[i] ^ c[i];
    assign c[i+1] = a[i] & c[i];
  end

  assign cry = c[W];

endmodule
