// lab_top: the course designs side by side.
//
// The 4-bit ALU (alu4, combinational), the introductory two's complement
// circuit (twos_comp4, combinational) and the security-alarm system
// (security, clocked by clk) share nothing; each keeps its own ports,
// prefixed alu_ for the ALU and tc_ for the two's complement circuit. The security system is built in its main
// configuration, without the optional fire sensor. DIV_BITS and SCAN_BITS
// are passed to the security system (defaults: 1.49 Hz timer tick and
// 381 Hz digit scan from a 50 MHz clock).
module lab_top #(
  parameter int unsigned DIV_BITS  = 25,
  parameter int unsigned SCAN_BITS = 16
) (
  // 4-bit ALU
  input  logic [3:0] alu_a,
  input  logic [3:0] alu_b,
  input  logic       alu_cin,
  input  logic       alu_logic_n_arith,
  input  logic       alu_invert,
  input  logic       alu_n_a_only,
  output logic [3:0] alu_y,
  output logic       alu_cout,
  output logic       alu_neg_cry,
  // two's complement circuit
  input  logic [3:0] tc_a,
  output logic [3:0] tc_y,
  output logic       tc_cry,
  // security system
  input  logic       clk,
  input  logic       arm,
  input  logic       front_door,
  input  logic       rear_door,
  input  logic       window,
  output logic       siren,
  output logic       arm_ind,
  output logic       front_door_ind,
  output logic       rear_door_ind,
  output logic       window_ind,
  output logic [7:0] leds,
  output logic       cat_control
);

  alu4 u_alu (
    .a             (alu_a),
    .b             (alu_b),
    .cin           (alu_cin),
    .logic_n_arith (alu_logic_n_arith),
    .invert        (alu_invert),
    .n_a_only      (alu_n_a_only),
    .y             (alu_y),
    .cout          (alu_cout),
    .neg_cry       (alu_neg_cry)
  );

  twos_comp4 u_twos_comp (
    .a   (tc_a),
    .y   (tc_y),
    .cry (tc_cry)
  );

  security #(
    .DIV_BITS    (DIV_BITS),
    .SCAN_BITS   (SCAN_BITS),
    .FIRE_SENSOR (1'b0)
  ) u_security (
    .clk            (clk),
    .arm            (arm),
    .front_door     (front_door),
    .rear_door      (rear_door),
    .window         (window),
    .siren          (siren),
    .sprinkler      (),
    .arm_ind        (arm_ind),
    .front_door_ind (front_door_ind),
    .rear_door_ind  (rear_door_ind),
    .window_ind     (window_ind),
    .leds           (leds),
    .cat_control    (cat_control)
  );

endmodule
