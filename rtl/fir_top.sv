// fir_top: scalable microprogrammed FIR filter, sequential and parallel
// architectures side by side.
//
// Both filters compute y(n) = sum_{p=0}^{TAPS-1} coef[p] * x(n - p) on 8-bit
// unsigned samples and coefficients, with the multiplier chosen by MULT
// (the proposed Bi-Recoder multiplier by default, or the reduced complexity
// Wallace tree). fir_seq shares one multiplier across the taps under a
// microprogram; fir_par has one multiplier per tap. One coefficient write
// port loads both banks. A sample is accepted when x_valid && x_ready, and
// x_ready is the sequential filter's, so both filters see the same sample
// stream and produce the same outputs: the parallel one after 1 cycle, the
// sequential one after TAPS + 2 cycles. Pairing the two in one top, the
// shared ports and TAPS = 8 are this design's choices.
module fir_top
  import fir_pkg::*;
#(
  parameter int unsigned TAPS = 8,
  parameter mult_kind_e  MULT = MULT_BIRECODER,
  localparam int unsigned TW  = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned YW  = PW + $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [TW-1:0] coef_addr,
  input  logic [DW-1:0] coef_data,
  input  logic          x_valid,
  output logic          x_ready,
  input  logic [DW-1:0] x_data,
  output logic          yseq_valid,
  output logic [YW-1:0] yseq_data,
  output logic          ypar_valid,
  output logic [YW-1:0] ypar_data
);

  logic take;

  assign take = x_valid && x_ready;

  fir_seq #(.TAPS(TAPS), .MULT(MULT)) u_seq (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .x_valid(x_valid), .x_ready(x_ready), .x_data(x_data),
    .y_valid(yseq_valid), .y_data(yseq_data)
  );

  fir_par #(.TAPS(TAPS), .MULT(MULT)) u_par (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .x_valid(take), .x_data(x_data),
    .y_valid(ypar_valid), .y_data(ypar_data)
  );

endmodule
