// fir_seq: sequential microprogrammed FIR filter,
//   y(n) = sum_{p=0}^{TAPS-1} coef[p] * x(n - p).
//
// One multiplier (fir_mult, Bi-Recoder by default) and one accumulator are
// stepped through the taps by the microprogram controller (fir_useq). A
// TAPS-deep delay line holds x(n) .. x(n-TAPS+1), xs[0] the newest; a
// register bank holds the coefficients, written one at a time through
// coef_we/coef_addr/coef_data. The filter structure and the use of either
// multiplier follow the source; widths beyond the 8-bit operands, the
// handshake, the coefficient port and the reset are this design's choices.
// Samples and coefficients are unsigned; the accumulator is
// 16 + clog2(TAPS) bits wide, so it cannot overflow.
//
// Timing: a sample is accepted on a clock edge with x_valid && x_ready.
// TAPS cycles of multiply-accumulate and one emit cycle follow; y_valid is
// a one-cycle pulse TAPS + 2 cycles after the accepting edge, and x_ready is
// high again in that same cycle. Throughput is one sample per TAPS + 2
// cycles. Reset is synchronous and active low.
module fir_seq
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
  output logic          y_valid,
  output logic [YW-1:0] y_data
);

  logic [DW-1:0] coef [TAPS];
  logic [DW-1:0] xs   [TAPS];
  logic [YW-1:0] acc;
  logic [PW-1:0] prod;
  logic [DW-1:0] mul_x, mul_c;
  uinstr_t       uop;
  logic          go;

  fir_useq #(.TAPS(TAPS)) u_ctl (
    .clk(clk), .rst_n(rst_n), .start(x_valid), .uop(uop), .go(go), .ready(x_ready)
  );

  assign mul_x = xs[TW'(uop.tap)];
  assign mul_c = coef[TW'(uop.tap)];

  fir_mult #(.MULT(MULT)) u_mult (.a(mul_x), .b(mul_c), .p(prod));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) coef[i] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) xs[i] <= '0;
      acc     <= '0;
      y_valid <= 1'b0;
      y_data  <= '0;
    end else begin
      y_valid <= 1'b0;
      if (uop.take_sample && go) begin
        xs[0] <= x_data;
        for (int i = 1; i < TAPS; i++) xs[i] <= xs[i-1];
      end
      if (uop.clr_acc && go) acc <= '0;
      else if (uop.mac)      acc <= acc + YW'(prod);
      if (uop.emit) begin
        y_data  <= acc;
        y_valid <= 1'b1;
      end
    end
  end

endmodule
