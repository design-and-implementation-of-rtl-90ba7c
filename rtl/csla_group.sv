// csla_group: one group of the reduced complexity square-root carry select
// adder, built from the "proposed" group cell.
//
// Each bit has a half adder (s = a ^ b, c = a & b), an inverter on s and an
// XOR of s and c. Two 2:1 multiplexers, selected by the carry coming into the
// bit, choose the outputs:
//   carry in 0: sum = s,  carry out = c
//   carry in 1: sum = ~s, carry out = s ^ c
// The carry out of a bit selects the multiplexers of the next bit, and the
// carry out of the last bit leaves the group for the next group. This matches
// the group figures and the text of the source; the width W is a parameter so
// the same cell chain serves groups of 2 to 5 bits and the 10-bit 3a adder of
// the Bi-Recoder partial-product stage.
//
// Interface: a, b (W bits), cin -> sum (W bits), cout. Purely combinational.
module csla_group #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] ha_s, ha_c;   // half adder outputs
  logic [W:0]   sel;          // carry chain, sel[i] selects bit i

  assign sel[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign ha_s[i]   = a[i] ^ b[i];
    assign ha_c[i]   = a[i] & b[i];
    // sum multiplexer: input 0 is the direct sum, input 1 the inverted sum
    assign sum[i]    = sel[i] ? ~ha_s[i] : ha_s[i];
    // carry multiplexer: input 0 is the half adder carry, input 1 is s ^ c
    assign sel[i+1]  = sel[i] ? (ha_s[i] ^ ha_c[i]) : ha_c[i];
  end

  assign cout = sel[W];

endmodule
