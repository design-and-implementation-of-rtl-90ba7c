// tb_csla_group: exhaustive check of the proposed carry-select group cell
// chain at widths 2 and 5 (sum and carry out against a + b + cin).
module tb_csla_group;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;  logic c2, co2;
  logic [4:0] a5, b5, s5;  logic c5, co5;

  csla_group #(.W(2)) dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));
  csla_group #(.W(5)) dut5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(co5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {c2, a2, b2} = v[4:0];
      #1;
      checks++;
      if ({co2, s2} !== 3'(a2) + 3'(b2) + 3'(c2)) begin
        failures++;
        $display("W=2 mismatch a=%0d b=%0d cin=%0d got %0d", a2, b2, c2, {co2, s2});
      end
    end
    for (int v = 0; v < 2048; v++) begin
      {c5, a5, b5} = v[10:0];
      #1;
      checks++;
      if ({co5, s5} !== 6'(a5) + 6'(b5) + 6'(c5)) begin
        failures++;
        $display("W=5 mismatch a=%0d b=%0d cin=%0d got %0d", a5, b5, c5, {co5, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
