// tb_wallace_mult: all 65536 operand pairs of the 8 x 8 unsigned multiplier against
// the product computed by the simulator.
module tb_wallace_mult;
  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;

  wallace_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = v[15:0];
      #1;
      checks++;
      if (p !== 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("mismatch a=%0d b=%0d got %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
