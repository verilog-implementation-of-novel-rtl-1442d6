// tb_modified_xor: exhaustive check of the modified XOR cell.
// All eight input combinations; expected sum is 1 when ctl = 1, else a ^ b.
module tb_modified_xor;
  logic a, b, ctl, sum;
  int checks = 0, failures = 0;

  modified_xor dut (.a(a), .b(b), .ctl(ctl), .sum(sum));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ctl, a, b} = 3'(v);
      #1;
      checks++;
      if (sum !== (ctl ? 1'b1 : (a ^ b))) begin
        failures++;
        $display("FAIL ctl=%b a=%b b=%b sum=%b", ctl, a, b, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
