// tb_csgc_type1: exhaustive check of the type I control cell.
// Expected ctl is high when both operand bits are 1 or ctl_left is high.
module tb_csgc_type1;
  logic a, b, ctl_left, ctl;
  int checks = 0, failures = 0;

  csgc_type1 dut (.a(a), .b(b), .ctl_left(ctl_left), .ctl(ctl));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ctl_left, a, b} = 3'(v);
      #1;
      checks++;
      if (ctl !== ((a && b) || ctl_left)) begin
        failures++;
        $display("FAIL a=%b b=%b left=%b ctl=%b", a, b, ctl_left, ctl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
