// tb_birecoder_ppgen: every multiplicand and every 2-bit select of the
// Bi-Recoder partial-product multiplexer against sel * a.
module tb_birecoder_ppgen;
  int checks = 0, failures = 0;
  logic [7:0] a;
  logic [1:0] sel;
  logic [9:0] pp;

  birecoder_ppgen dut (.a(a), .sel(sel), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {sel, a} = v[9:0];
      #1;
      checks++;
      if (pp !== 10'(a) * 10'(sel)) begin
        failures++;
        $display("mismatch a=%0d sel=%0d got %0d", a, sel, pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
