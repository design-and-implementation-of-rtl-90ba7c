// tb_fir_top: end-to-end run of the filter pair at its default size (8 taps,
// Bi-Recoder multipliers). It programs the coefficients, streams samples
// with idle gaps and with samples held waiting while the sequential filter is
// busy, reprograms coefficients between samples, and checks every output of
// both architectures against a convolution computed here, together with
// their latencies (1 cycle parallel, TAPS + 2 cycles sequential). It counts
// how often each mechanism happened and fails any that never did: stalled
// offers, idle cycles, coefficient rewrites, microprogram MAC and EMIT
// steps, and each of the four Bi-Recoder partial-product selections
// (0, a, 2a, 3a) in the sequential filter's multiplier.
module tb_fir_top;
  import fir_pkg::*;
  localparam int unsigned TAPS  = 8;
  localparam int unsigned TW    = $clog2(TAPS);
  localparam int unsigned YW    = PW + $clog2(TAPS);
  localparam int unsigned NSAMP = 400;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic          coef_we = 1'b0;
  logic [TW-1:0] coef_addr = '0;
  logic [DW-1:0] coef_data = '0;
  logic          x_valid = 1'b0, x_ready;
  logic [DW-1:0] x_data = '0;
  logic          yseq_valid, ypar_valid;
  logic [YW-1:0] yseq_data, ypar_data;

  fir_top dut (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .x_valid, .x_ready, .x_data,
    .yseq_valid, .yseq_data, .ypar_valid, .ypar_data);

  always #5 clk = ~clk;

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [DW-1:0] c_model [TAPS];
  logic [DW-1:0] x_hist  [TAPS];
  longint unsigned exp_s [$], exp_p [$];
  int unsigned     ts_q  [$], tp_q  [$];
  int n_seq = 0, n_par = 0;
  int n_stall = 0, n_idle = 0, n_rewrite = 0, n_mac = 0, n_emit = 0;
  int n_sel [4] = '{0, 0, 0, 0};

  function automatic longint unsigned conv();
    longint unsigned s = 0;
    for (int p = 0; p < TAPS; p++) s += longint'(c_model[p]) * longint'(x_hist[p]);
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (x_valid && x_ready) begin
        for (int p = TAPS - 1; p > 0; p--) x_hist[p] = x_hist[p-1];
        x_hist[0] = x_data;
        exp_s.push_back(conv()); ts_q.push_back(cycle);
        exp_p.push_back(conv()); tp_q.push_back(cycle);
      end
      if (x_valid && !x_ready) n_stall++;
      if (!x_valid && x_ready) n_idle++;
      if (coef_we) c_model[coef_addr] = coef_data;
      if (dut.u_seq.uop.mac) begin
        n_mac++;
        for (int k = 0; k < 4; k++) n_sel[dut.u_seq.mul_c[2*k +: 2]]++;
      end
      if (dut.u_seq.uop.emit) n_emit++;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (ypar_valid) begin
        n_par++;
        checks += 2;
        if (exp_p.size() == 0) begin failures++; $display("%0t: parallel output with none expected", $time); end
        else begin
          longint unsigned e;
          int unsigned t;
          e = exp_p.pop_front();
          t = tp_q.pop_front();
          if (64'(ypar_data) != e) begin failures++; $display("%0t: parallel y=%0d exp %0d", $time, ypar_data, e); end
          if (cycle - t != 1) begin failures++; $display("%0t: parallel latency %0d", $time, cycle - t); end
        end
      end
      if (yseq_valid) begin
        n_seq++;
        checks += 2;
        if (exp_s.size() == 0) begin failures++; $display("%0t: sequential output with none expected", $time); end
        else begin
          longint unsigned e;
          int unsigned t;
          e = exp_s.pop_front();
          t = ts_q.pop_front();
          if (64'(yseq_data) != e) begin failures++; $display("%0t: sequential y=%0d exp %0d", $time, yseq_data, e); end
          if (cycle - t != TAPS + 2) begin failures++; $display("%0t: sequential latency %0d", $time, cycle - t); end
        end
      end
    end
  end

  initial begin
    repeat (NSAMP * (TAPS + 12) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_coef(int p, logic [DW-1:0] v);
    @(negedge clk);
    coef_we = 1'b1; coef_addr = TW'(p); coef_data = v;
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  task automatic count_ok(int n, string what);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin failures++; $display("never happened: %s", what); end
  endtask

  initial begin
    for (int p = 0; p < TAPS; p++) begin c_model[p] = '0; x_hist[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // coefficients holding every 2-bit digit: 0xE4 = 11 10 01 00
    for (int p = 0; p < TAPS; p++) write_coef(p, (p == 0) ? 8'hE4 : (p == 1) ? 8'hFF : DW'($urandom));
    for (int n = 0; n < NSAMP; n++) begin
      if (n % 40 == 20) begin
        while (!x_ready) @(negedge clk);
        write_coef($urandom_range(TAPS - 1), DW'($urandom));
        n_rewrite++;
      end
      repeat ($urandom_range(3)) @(negedge clk);
      x_valid = 1'b1;
      x_data  = (n < 12) ? 8'hFF : DW'($urandom);
      @(posedge clk);
      while (!x_ready) @(posedge clk);
      @(negedge clk);
      x_valid = 1'b0;
    end
    while (exp_s.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 2;
    if (n_seq != NSAMP) begin failures++; $display("sequential outputs %0d, expected %0d", n_seq, NSAMP); end
    if (n_par != NSAMP) begin failures++; $display("parallel outputs %0d, expected %0d", n_par, NSAMP); end
    count_ok(n_stall,   "stalled sample offers");
    count_ok(n_idle,    "idle cycles");
    count_ok(n_rewrite, "coefficient rewrites");
    count_ok(n_mac,     "microprogram MAC steps");
    count_ok(n_emit,    "microprogram EMIT steps");
    count_ok(n_sel[0],  "recoder selects 0");
    count_ok(n_sel[1],  "recoder selects a");
    count_ok(n_sel[2],  "recoder selects 2a");
    count_ok(n_sel[3],  "recoder selects 3a");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
