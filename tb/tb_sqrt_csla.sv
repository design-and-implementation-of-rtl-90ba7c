// tb_sqrt_csla: the 16-bit SQRT carry select adder against a + b + cin, on
// carry chains across every group boundary plus random operands.
module tb_sqrt_csla;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic cin, cout;

  sqrt_csla dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));

  task automatic check();
    logic [16:0] exp_v;
    #1;
    exp_v = 17'(a) + 17'(b) + 17'(cin);
    checks++;
    if ({cout, s} !== exp_v) begin
      failures++;
      $display("mismatch a=%h b=%h cin=%0d got %h exp %h", a, b, cin, {cout, s}, exp_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // full carry ripple: all ones plus one, and every single-bit carry entry
    a = 16'hFFFF; b = 16'h0000; cin = 1'b1; check();
    a = 16'hFFFF; b = 16'hFFFF; cin = 1'b1; check();
    for (int i = 0; i < 16; i++) begin
      a = 16'hFFFF >> i; b = 16'(1) << 0; cin = 1'b0; check();
      a = 16'(1) << i;   b = 16'(1) << i; cin = 1'b1; check();
    end
    for (int n = 0; n < 20000; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
