// wallace_mult: 8 x 8 unsigned reduced complexity Wallace tree multiplier,
// p = a * b.
//
// Step 1: 64 AND gates form the partial-product bits; row i is a & b[i],
// weighted by 2^i. Step 2: the rows are reduced to two. At each stage the
// rows are taken three at a time and each group of three is compressed by a
// row of full adders into a sum row and a carry row (shifted up one place);
// a single row or a pair of rows left over moves to the next stage
// unchanged. Eight rows shrink 8 -> 6 -> 4 -> 3 -> 2 in four stages. Step 3:
// the last two rows are added by the reduced complexity SQRT carry select
// adder (sqrt_csla), as the source prescribes for the final stage.
//
// The source reduces a dot matrix column by column; this module groups whole
// rows, which gives the same rule (full adders on three bits, one or two bits
// passed on) with full adders whose unused inputs are constant zero, which
// synthesis removes.
//
// Interface: a, b (8 bits) -> p (16 bits). Combinational.
module wallace_mult (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  typedef logic [15:0] row_t;

  // Row of full adders: 3 rows in, sum row and carry row out.
  function automatic row_t fa_sum(row_t x, row_t y, row_t z);
    return x ^ y ^ z;
  endfunction

  function automatic row_t fa_carry(row_t x, row_t y, row_t z);
    return ((x & y) | (x & z) | (y & z)) << 1;
  endfunction

  row_t pp [8];
  row_t s1 [6];
  row_t s2 [4];
  row_t s3 [3];
  row_t s4 [2];
  logic unused_cout;

  // Step 1: AND-gate partial products.
  for (genvar i = 0; i < 8; i++) begin : g_and
    assign pp[i] = row_t'({8'b0, a & {8{b[i]}}}) << i;
  end

  // Stage 1: (0,1,2) (3,4,5) compressed, rows 6 and 7 passed.
  assign s1[0] = fa_sum  (pp[0], pp[1], pp[2]);
  assign s1[1] = fa_carry(pp[0], pp[1], pp[2]);
  assign s1[2] = fa_sum  (pp[3], pp[4], pp[5]);
  assign s1[3] = fa_carry(pp[3], pp[4], pp[5]);
  assign s1[4] = pp[6];
  assign s1[5] = pp[7];

  // Stage 2: two groups of three.
  assign s2[0] = fa_sum  (s1[0], s1[1], s1[2]);
  assign s2[1] = fa_carry(s1[0], s1[1], s1[2]);
  assign s2[2] = fa_sum  (s1[3], s1[4], s1[5]);
  assign s2[3] = fa_carry(s1[3], s1[4], s1[5]);

  // Stage 3: one group of three, one row passed.
  assign s3[0] = fa_sum  (s2[0], s2[1], s2[2]);
  assign s3[1] = fa_carry(s2[0], s2[1], s2[2]);
  assign s3[2] = s2[3];

  // Stage 4: last group of three.
  assign s4[0] = fa_sum  (s3[0], s3[1], s3[2]);
  assign s4[1] = fa_carry(s3[0], s3[1], s3[2]);

  // Final carry-propagate addition.
  sqrt_csla u_final (.a(s4[0]), .b(s4[1]), .cin(1'b0), .sum(p), .cout(unused_cout));

endmodule
