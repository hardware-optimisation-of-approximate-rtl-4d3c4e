// Modified half adder: the carry half of a half adder, Ch(a,b) = a AND b.
//
// The approximate 5:2 compressor needs only the carries of its small adders,
// so this cell has no sum output. It is used twice in approx_carry52: once on
// the inputs X3,X4 and once on the OR of each input group. Pure combinational
// logic, no clock. That Ch is the AND of its inputs is this design's reading
// of the cell's name; its use in the carry equation follows the published
// design.
module modified_half_adder (
  input  logic a,  // first bit
  input  logic b,  // second bit
  output logic c   // carry Ch(a,b)
);

  assign c = a & b;

endmodule
