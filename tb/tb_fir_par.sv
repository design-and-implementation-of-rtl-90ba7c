// tb_fir_par: the parallel FIR, once with each multiplier, against a
// convolution computed in the testbench. Samples arrive back to back and
// with random gaps, coefficients (including all-ones and zero) are rewritten
// between samples; every output is checked for value and for its latency of
// one cycle.
module tb_fir_par;
  import fir_pkg::*;
  localparam int unsigned TAPS = 8;
  localparam int unsigned TW   = $clog2(TAPS);
  localparam int unsigned YW   = PW + $clog2(TAPS);
  localparam int unsigned NSAMP = 2000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic          coef_we = 1'b0;
  logic [TW-1:0] coef_addr = '0;
  logic [DW-1:0] coef_data = '0;
  logic          x_valid = 1'b0;
  logic [DW-1:0] x_data = '0;
  logic          yv_b, yv_w;
  logic [YW-1:0] y_b, y_w;

  fir_par #(.TAPS(TAPS), .MULT(MULT_BIRECODER)) dut_b (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .x_valid, .x_data, .y_valid(yv_b), .y_data(y_b));
  fir_par #(.TAPS(TAPS), .MULT(MULT_WALLACE)) dut_w (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .x_valid, .x_data, .y_valid(yv_w), .y_data(y_w));

  always #5 clk = ~clk;

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [DW-1:0] c_model [TAPS];
  logic [DW-1:0] x_hist  [TAPS];
  longint unsigned exp_q [$];
  int unsigned     t_q   [$];
  int n_out = 0;

  function automatic longint unsigned conv();
    longint unsigned s = 0;
    for (int p = 0; p < TAPS; p++) s += longint'(c_model[p]) * longint'(x_hist[p]);
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst_n && x_valid) begin
      for (int p = TAPS - 1; p > 0; p--) x_hist[p] = x_hist[p-1];
      x_hist[0] = x_data;
      exp_q.push_back(conv());
      t_q.push_back(cycle);
    end
    if (rst_n && coef_we) c_model[coef_addr] = coef_data;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (yv_b !== yv_w) begin failures++; $display("%0t: valid differs", $time); end
      if (yv_b) begin
        longint unsigned e;
        int unsigned t;
        n_out++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("%0t: output with none expected", $time);
        end else begin
          e = exp_q.pop_front();
          t = t_q.pop_front();
          checks += 3;
          if (64'(y_b) != e) begin failures++; $display("%0t: Bi-Recoder y=%0d exp %0d", $time, y_b, e); end
          if (64'(y_w) != e) begin failures++; $display("%0t: Wallace y=%0d exp %0d", $time, y_w, e); end
          if (cycle - t != 1) begin failures++; $display("%0t: latency %0d", $time, cycle - t); end
        end
      end
    end
  end

  initial begin
    repeat (NSAMP * 4 + 500) @(posedge clk);
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

  initial begin
    for (int p = 0; p < TAPS; p++) begin c_model[p] = '0; x_hist[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < TAPS; p++) write_coef(p, (p == 0) ? 8'hFF : (p == 1) ? 8'h00 : DW'($urandom));
    for (int n = 0; n < NSAMP; n++) begin
      if (n % 200 == 100) write_coef($urandom_range(TAPS - 1), DW'($urandom));
      if (n > NSAMP / 2) repeat ($urandom_range(2)) @(negedge clk);
      x_valid = 1'b1;
      x_data  = (n < 10) ? 8'hFF : DW'($urandom);
      @(negedge clk);
      x_valid = 1'b0;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_out != NSAMP) begin failures++; $display("outputs %0d, expected %0d", n_out, NSAMP); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
