// Carry output of the approximate 5:2 compressor.
//
// The five inputs are split into group A = {X0,X1,X2} and group B = {X3,X4}:
//   Carry = Cf(X0,X1,X2) + Ch(X3,X4) + Ch(X0+X1+X2, X3+X4)
// where Cf/Ch are the carries of the modified full/half adders and '+' is OR.
// The first term sees two ones inside A, the second two ones inside B, the
// third one one in each group, so Carry is 1 exactly when at least two of the
// five inputs are 1. The equation and the grouping follow the published
// design. Pure combinational logic, no clock.
module approx_carry52 (
  input  logic [4:0] x,      // X4..X0, all of the same weight
  output logic       carry   // weight 2
);

  logic cf_a;     // two or more ones in group A
  logic ch_b;     // two ones in group B
  logic ch_ab;    // at least one one in each group
  logic any_a, any_b;

  assign any_a = x[0] | x[1] | x[2];
  assign any_b = x[3] | x[4];

  modified_full_adder u_mfa (.x0(x[0]), .x1(x[1]), .x2(x[2]), .cf(cf_a));
  modified_half_adder u_mha_b (.a(x[3]), .b(x[4]), .c(ch_b));
  modified_half_adder u_mha_ab (.a(any_a), .b(any_b), .c(ch_ab));

  assign carry = cf_a | ch_b | ch_ab;

endmodule
