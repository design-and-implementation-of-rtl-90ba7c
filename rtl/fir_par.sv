// fir_par: parallel (direct form) FIR filter,
//   y(n) = sum_{p=0}^{TAPS-1} coef[p] * x(n - p).
//
// Every tap has its own multiplier (fir_mult, Bi-Recoder by default); the
// TAPS products are summed combinationally and the sum is registered. The
// delay line holds the TAPS - 1 previous samples; the incoming sample is
// tap 0. Coefficients sit in a register bank written through
// coef_we/coef_addr/coef_data. Structure and multiplier choice follow the
// source; widths beyond the 8-bit operands, the handshake and the reset are
// this design's choices. Samples and coefficients are unsigned; the output
// is 16 + clog2(TAPS) bits, so it cannot overflow.
//
// Timing: a sample is taken on every clock edge with x_valid high; y_valid
// and y_data follow one cycle later (latency 1, one sample per cycle).
// Reset is synchronous and active low.
module fir_par
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
  input  logic [DW-1:0] x_data,
  output logic          y_valid,
  output logic [YW-1:0] y_data
);

  logic [DW-1:0] coef [TAPS];
  logic [DW-1:0] xs   [TAPS];   // xs[0] is the incoming sample
  logic [DW-1:0] hist [TAPS];   // registered history, hist[p] = x(n-1-p)
  logic [PW-1:0] prod [TAPS];
  logic [YW-1:0] sum;

  assign xs[0] = x_data;
  for (genvar p = 1; p < TAPS; p++) begin : g_tap
    assign xs[p] = hist[p-1];
  end

  for (genvar p = 0; p < TAPS; p++) begin : g_mult
    fir_mult #(.MULT(MULT)) u_mult (.a(xs[p]), .b(coef[p]), .p(prod[p]));
  end

  always_comb begin
    sum = '0;
    for (int p = 0; p < TAPS; p++) sum = sum + YW'(prod[p]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) coef[i] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) hist[i] <= '0;
      y_valid <= 1'b0;
      y_data  <= '0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        for (int i = 0; i < TAPS; i++) hist[i] <= xs[i];
        y_data <= sum;
      end
    end
  end

endmodule
