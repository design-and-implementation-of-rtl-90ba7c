// sqrt_csla: 16-bit reduced complexity square-root carry select adder.
//
// The operand is split into the groups of the SQRT CSLA figure: bits [1:0],
// [3:2], [6:4], [10:7] and [15:11] (2, 2, 3, 4 and 5 bits). The first group is
// a plain ripple carry adder with carry in cin. The four upper groups are the
// proposed structure (csla_group): half adders whose sum and carry are
// corrected by multiplexers selected by the carry of the group below, in place
// of the conventional second ripple adder plus binary-to-excess-1 converter.
// The carry out of each group is the carry in of the next.
//
// Interface: a, b (16 bits), cin -> sum (16 bits), cout. Combinational.
module sqrt_csla (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);

  logic [2:0] g1;       // group 1 ripple result with carry
  logic c1, c2, c3, c4; // carries between groups

  // Group 1: 2-bit ripple carry adder.
  assign g1 = {1'b0, a[1:0]} + {1'b0, b[1:0]} + {2'b00, cin};
  assign sum[1:0] = g1[1:0];
  assign c1 = g1[2];

  csla_group #(.W(2)) u_g2 (.a(a[3:2]),   .b(b[3:2]),   .cin(c1), .sum(sum[3:2]),   .cout(c2));
  csla_group #(.W(3)) u_g3 (.a(a[6:4]),   .b(b[6:4]),   .cin(c2), .sum(sum[6:4]),   .cout(c3));
  csla_group #(.W(4)) u_g4 (.a(a[10:7]),  .b(b[10:7]),  .cin(c3), .sum(sum[10:7]),  .cout(c4));
  csla_group #(.W(5)) u_g5 (.a(a[15:11]), .b(b[15:11]), .cin(c4), .sum(sum[15:11]), .cout(cout));

endmodule
