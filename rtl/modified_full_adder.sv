// Modified full adder: the carry half of a full adder,
// Cf(X0,X1,X2) = X0X1 + X0X2 + X1X2, i.e. 1 when at least two inputs are 1.
//
// Built as three pairwise ANDs combined by an OR, the two-level structure of
// the published cell; no sum output is produced. Pure combinational logic,
// no clock. Used on the group X0,X1,X2 of the approximate 5:2 compressor.
module modified_full_adder (
  input  logic x0,
  input  logic x1,
  input  logic x2,
  output logic cf   // carry Cf
);

  logic p01, p02, p12;

  assign p01 = x0 & x1;
  assign p02 = x0 & x2;
  assign p12 = x1 & x2;
  assign cf  = p01 | p02 | p12;

endmodule
