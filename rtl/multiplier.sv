// Approximate unsigned WIDTH x WIDTH multiplier built with approximate 5:2
// compressors (default 8 x 8 -> 16 bits, the published configuration).
//
// 1. Partial products: bit (i, j) is a[j] AND b[i], weight 2^(i+j).
// 2. Approximation: in every column k below APPROX_COLS, each full group of
//    five partial products (numbered by rising b index) enters one
//    approximate 5:2 compressor on X0..X4 in that order. The compressor's Sum
//    lands in column k and its Carry in column k+1. With the defaults the
//    lower half of the product is approximated and columns 4..7 hold one
//    compressor each (their heights are 5, 6, 7 and 8).
// 3. Exact accumulation: the compressor outputs, the partial products that
//    no compressor took (all of the upper columns, and the leftovers below)
//    are added exactly, modulo 2^(2*WIDTH).
// The compressor cell with its carry and sum logic, the port list a, b, out
// and the 8-bit operand width follow the published design. How partial
// products are assigned to compressors, the restriction of approximation to
// the lower half of the columns and the exact accumulation are this design's
// own choices; the published output waveform has all its errors in columns
// 3..7, which the lower-half choice agrees with.
// Purely combinational: out is valid one propagation delay after a and b.
module multiplier
  import approx_mult_pkg::*;
#(
  parameter int unsigned WIDTH       = DEFAULT_WIDTH,
  parameter int unsigned APPROX_COLS = WIDTH   // columns 0..APPROX_COLS-1 are approximated
) (
  input  logic [WIDTH-1:0]   a,    // multiplicand
  input  logic [WIDTH-1:0]   b,    // multiplier
  output logic [2*WIDTH-1:0] out   // approximate product
);

  localparam int unsigned NB = 2 * WIDTH;
  localparam int unsigned NG = (max_groups(WIDTH) > 0) ? max_groups(WIDTH) : 1;

  logic [WIDTH-1:0] pp     [WIDTH];  // pp[i][j] = a[j] & b[i]
  logic [NB-1:0]    rest   [WIDTH];  // row i, shifted, without the compressed bits
  logic [NB-1:0]    s_row  [NG];     // Sum of group g of every column
  logic [NB-1:0]    c_row  [NG];     // Carry of group g, one column up
  logic [NB-1:0]    acc;

  for (genvar i = 0; i < WIDTH; i++) begin : g_row
    assign pp[i] = a & {WIDTH{b[i]}};
    for (genvar k = 0; k < NB; k++) begin : g_bit
      if (k >= i && k - i < WIDTH && !pp_compressed(i, k - i, WIDTH, APPROX_COLS)) begin : g_keep
        assign rest[i][k] = pp[i][k-i];
      end else begin : g_zero
        assign rest[i][k] = 1'b0;
      end
    end
  end

  for (genvar g = 0; g < NG; g++) begin : g_grp
    assign c_row[g][0] = 1'b0;
    for (genvar k = 0; k < NB; k++) begin : g_col
      if (g < col_groups(k, WIDTH, APPROX_COLS)) begin : g_comp
        localparam int unsigned I0 = col_first_row(k, WIDTH) + COMP_INPUTS * g;
        logic carry;
        approx_compressor52 u_comp (
          .x    ({pp[I0+4][k-I0-4], pp[I0+3][k-I0-3], pp[I0+2][k-I0-2],
                  pp[I0+1][k-I0-1], pp[I0][k-I0]}),
          .sum  (s_row[g][k]),
          .carry(carry)
        );
        // The carry of the top column has no product bit to go to.
        if (k + 1 < NB) begin : g_up
          assign c_row[g][k+1] = carry;
        end
      end else begin : g_none
        assign s_row[g][k] = 1'b0;
        if (k + 1 < NB) begin : g_up
          assign c_row[g][k+1] = 1'b0;
        end
      end
    end
  end

  // Exact addition of everything that is left.
  always_comb begin
    acc = '0;
    for (int g = 0; g < NG; g++) acc += s_row[g] + c_row[g];
    for (int i = 0; i < WIDTH; i++) acc += rest[i];
  end

  assign out = acc;

endmodule
