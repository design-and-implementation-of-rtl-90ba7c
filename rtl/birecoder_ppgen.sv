// birecoder_ppgen: partial-product multiplexer of the Bi-Recoder multiplier.
//
// Two multiplier bits sel = b[2k+1:2k] pick one 10-bit partial product from
// the 8-bit multiplicand a:
//   00 -> 0,  01 -> a,  10 -> a << 1,  11 -> a + (a << 1) = 3a
// as the source describes the multiplexer. The 3a input is formed by a
// 10-bit chain of the proposed carry-select cells (csla_group); the source
// says only that the two values are added.
//
// Interface: a (8 bits), sel (2 bits) -> pp (10 bits). Combinational.
module birecoder_ppgen (
  input  logic [7:0] a,
  input  logic [1:0] sel,
  output logic [9:0] pp
);

  logic [9:0] a1, a2, a3;
  logic       unused_cout;

  assign a1 = {2'b00, a};
  assign a2 = {1'b0, a, 1'b0};

  csla_group #(.W(10)) u_add3 (.a(a1), .b(a2), .cin(1'b0), .sum(a3), .cout(unused_cout));

  always_comb begin
    unique case (sel)
      2'b00:   pp = '0;
      2'b01:   pp = a1;
      2'b10:   pp = a2;
      default: pp = a3;
    endcase
  end

endmodule
