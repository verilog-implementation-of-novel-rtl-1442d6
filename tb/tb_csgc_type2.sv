// tb_csgc_type2: exhaustive check of the type II control cell.
// Expected ctl is high when both operand bits are 1, or the left neighbour's
// control is high, or the previous group's control (jump input) is high.
module tb_csgc_type2;
  logic a, b, ctl_left, ctl_jump, ctl;
  int checks = 0, failures = 0;

  csgc_type2 dut (.a(a), .b(b), .ctl_left(ctl_left), .ctl_jump(ctl_jump), .ctl(ctl));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {ctl_jump, ctl_left, a, b} = 4'(v);
      #1;
      checks++;
      if (ctl !== ((a && b) || ctl_left || ctl_jump)) begin
        failures++;
        $display("FAIL a=%b b=%b left=%b jump=%b ctl=%b", a, b, ctl_left, ctl_jump, ctl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
