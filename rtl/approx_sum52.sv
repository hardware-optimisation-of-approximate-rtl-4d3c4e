// Sum output of the approximate 5:2 compressor, built without XOR gates.
//
//   Sum = ((X0 XNOR X1) NOR (X2 XNOR X3)) OR X4
//
// which equals X4 OR ((X0 != X1) AND (X2 != X3)). An exact sum would be the
// parity of all five inputs; this version is 1 whenever X4 is 1, and
// otherwise only when each of the pairs (X0,X1) and (X2,X3) holds exactly one
// 1. A single 1 on X0..X3 is therefore lost, which is where most of the
// compressor's error comes from. The XOR-free goal and the structure (two
// pair gates, a combining gate, a final gate with X4) follow the published
// design; the gate types XNOR/NOR/OR are this design's reading of its
// drawing. Pure combinational logic, no clock.
module approx_sum52 (
  input  logic [4:0] x,    // X4..X0
  output logic       sum   // weight 1
);

  logic xn01, xn23, nor_pairs;

  assign xn01      = ~(x[0] ^ x[1]);
  assign xn23      = ~(x[2] ^ x[3]);
  assign nor_pairs = ~(xn01 | xn23);
  assign sum       = nor_pairs | x[4];

endmodule
