// birecoder_mult: 8 x 8 unsigned Bi-Recoder multiplier, p = a * b.
//
// The multiplier b is cut into four 2-bit groups b[1:0], b[3:2], b[5:4] and
// b[7:6]. Each group drives a partial-product multiplexer (birecoder_ppgen)
// that gives 0, a, 2a or 3a as a 10-bit value P1..P4. The partial products
// are weighted by 4^k and summed with three 16-bit reduced complexity SQRT
// carry select adders, as a two-level tree:
//   s01 = P1 + (P2 << 2),  s23 = (P3 << 4) + (P4 << 6),  p = s01 + s23.
// The grouping and the multiplexer follow the source; the shape of the adder
// tree is this design's choice (the source says only that the SQRT CSLA is
// used for the addition part). No sum can exceed 16 bits, so the carries out
// are unused.
//
// Interface: a, b (8 bits) -> p (16 bits). Combinational.
module birecoder_mult (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [9:0]  pp [4];
  logic [15:0] w  [4];
  logic [15:0] s01, s23;
  logic        unused_c0, unused_c1, unused_c2;

  for (genvar k = 0; k < 4; k++) begin : g_pp
    birecoder_ppgen u_mux (.a(a), .sel(b[2*k+1:2*k]), .pp(pp[k]));
    assign w[k] = 16'(pp[k]) << (2 * k);
  end

  sqrt_csla u_add01 (.a(w[0]), .b(w[1]), .cin(1'b0), .sum(s01), .cout(unused_c0));
  sqrt_csla u_add23 (.a(w[2]), .b(w[3]), .cin(1'b0), .sum(s23), .cout(unused_c1));
  sqrt_csla u_addf  (.a(s01),  .b(s23),  .cin(1'b0), .sum(p),   .cout(unused_c2));

endmodule
