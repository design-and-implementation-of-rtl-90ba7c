// fir_mult: the multiplier of one FIR tap, chosen by a parameter.
//
// MULT_BIRECODER (default) instantiates the proposed Bi-Recoder multiplier,
// MULT_WALLACE the reduced complexity Wallace tree multiplier. The source
// builds its filters with either; which one is fitted is fixed at
// elaboration.
//
// Interface: a, b (8 bits, unsigned) -> p (16 bits). Combinational.
module fir_mult
  import fir_pkg::*;
#(
  parameter mult_kind_e MULT = MULT_BIRECODER
) (
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [PW-1:0] p
);

  if (MULT == MULT_WALLACE) begin : g_wallace
    wallace_mult u_mult (.a(a), .b(b), .p(p));
  end else begin : g_birecoder
    birecoder_mult u_mult (.a(a), .b(b), .p(p));
  end

endmodule
