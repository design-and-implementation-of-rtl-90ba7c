// fir_useq: microprogram controller of the sequential FIR filter.
//
// A control store of TAPS + 2 microinstructions (fir_pkg::uinstr_t) is read
// at the micro-program counter upc; the word read is the control output uop.
// The program, built at elaboration from TAPS, is:
//   0          WAIT: take the sample and clear the accumulator; hold until
//              start (a sample offered) is high, then go on
//   1 .. TAPS  MAC tap k-1, go to the next word
//   TAPS + 1   EMIT the accumulator as the output, jump to 0
// so a sample costs TAPS + 2 cycles. go is high in the cycle a WAIT word
// meets start, i.e. when the sample is accepted; ready is high while the
// controller waits. The source names the filter microprogrammed without
// giving its control store, so the word format and the program are this
// design's own.
//
// Timing: upc is a register, reset (synchronous, active low) to 0; uop, go
// and ready are combinational from upc and start.
module fir_useq
  import fir_pkg::*;
#(
  parameter int unsigned TAPS = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output uinstr_t uop,
  output logic    go,
  output logic    ready
);

  localparam int unsigned DEPTH = TAPS + 2;
  localparam int unsigned AW    = $clog2(DEPTH);

  function automatic uinstr_t ucode(int unsigned addr);
    uinstr_t w;
    w = '0;
    if (addr == 0) begin
      w.take_sample = 1'b1;
      w.clr_acc     = 1'b1;
      w.next        = SEQ_WAIT;
    end else if (addr <= TAPS) begin
      w.mac  = 1'b1;
      w.tap  = 8'(addr - 1);
      w.next = SEQ_NEXT;
    end else begin
      w.emit = 1'b1;
      w.next = SEQ_JUMP;
      w.addr = 8'd0;
    end
    return w;
  endfunction

  uinstr_t       store [DEPTH];
  logic [AW-1:0] upc;

  for (genvar i = 0; i < DEPTH; i++) begin : g_store
    assign store[i] = ucode(i);
  end

  assign uop   = store[upc];
  assign ready = (uop.next == SEQ_WAIT);
  assign go    = ready && start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upc <= '0;
    end else begin
      unique case (uop.next)
        SEQ_WAIT: if (start) upc <= upc + 1'b1;
        SEQ_JUMP: upc <= AW'(uop.addr);
        default:  upc <= upc + 1'b1;
      endcase
    end
  end

  // The micro-program counter never leaves the control store.
  a_upc_in_store: assert property (@(posedge clk) disable iff (!rst_n) int'(upc) < DEPTH)
    else $error("fir_useq: upc %0d outside the control store", upc);

  initial begin
    assert (TAPS >= 1 && TAPS <= 256) else $error("fir_useq: TAPS must be 1..256");
  end

endmodule
