// Approximate 5:2 compressor (a "high order" compressor).
//
// Takes five bits of one column and returns Sum (weight 1, same column) and
// Carry (weight 2, next column). The exact count of ones (0..5) does not fit
// two outputs; this cell gives Carry = 1 when two or more inputs are 1 and an
// XOR-free approximate Sum. Value 2*Carry+Sum compared with the true count:
//   0 ones -> 0 exact; 1 one -> 1 if it is on X4, else 0;
//   2 ones -> 2 or 3;  3 ones -> 2 or 3;  4 ones -> 2 or 3;  5 ones -> 3.
// There is no carry chain between neighbouring compressors, so a row of them
// has the delay of one cell. Pure combinational logic, no clock.
module approx_compressor52 (
  input  logic [4:0] x,      // X4..X0
  output logic       sum,
  output logic       carry
);

  approx_carry52 u_carry (.x(x), .carry(carry));
  approx_sum52   u_sum   (.x(x), .sum(sum));

endmodule
