// tb_fir_useq: steps the microprogram controller and checks every word it
// issues: WAIT holds while no sample is offered, then TAPS MAC words with
// tap indices 0..TAPS-1 in order, one EMIT word, and back to WAIT; with a
// sample always offered the go pulses come exactly TAPS + 2 cycles apart.
module tb_fir_useq;
  import fir_pkg::*;
  localparam int unsigned TAPS = 8;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  uinstr_t uop;
  logic go, ready;

  fir_useq #(.TAPS(TAPS)) dut (.clk(clk), .rst_n(rst_n), .start(start), .uop(uop), .go(go), .ready(ready));

  always #5 clk = ~clk;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t: failed: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_go, n_go;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // idle: the controller must hold its WAIT word
    repeat (5) begin
      @(negedge clk);
      expect_true(ready && uop.take_sample && uop.clr_acc && !go, "idle WAIT word");
    end
    // one sample
    start = 1'b1;
    #1 expect_true(go, "go with a sample offered");
    @(negedge clk);
    start = 1'b0;
    expect_true(uop.mac && int'(uop.tap) == 0, "first MAC after go");
    for (int k = 1; k < TAPS; k++) begin
      @(negedge clk);
      expect_true(uop.mac && int'(uop.tap) == k, $sformatf("MAC word for tap %0d", k));
    end
    @(negedge clk);
    expect_true(uop.emit, "EMIT word");
    @(negedge clk);
    expect_true(ready && !go, "back to WAIT");
    // samples always offered: go period must be TAPS + 2
    start = 1'b1;
    last_go = -1; n_go = 0;
    for (int c = 0; c < 5 * (TAPS + 2); c++) begin
      #1;
      if (go) begin
        if (last_go >= 0) expect_true(c - last_go == TAPS + 2, $sformatf("go period %0d", c - last_go));
        last_go = c; n_go++;
      end
      @(negedge clk);
    end
    expect_true(n_go == 5, "five samples in 5 * (TAPS + 2) cycles");
    start = 1'b0;
    // reset in the middle of a program returns to WAIT
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    expect_true(ready, "reset returns to WAIT");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check_program_tail();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_program_tail();
    expect_true(uop.mac && int'(uop.tap) == 0, "MAC tap 0 after reset");
    for (int k = 1; k < TAPS; k++) begin
      @(negedge clk);
      expect_true(uop.mac && int'(uop.tap) == k, $sformatf("MAC word for tap %0d", k));
    end
    @(negedge clk);
    expect_true(uop.emit, "EMIT word after reset");
  endtask
endmodule
