// tb_carry_free_adder: checks the row of modified XOR gates (20 bits).
// The control vector is driven directly, as in the block-level simulation of
// the carry-free adder: first a vector with a = E6000h, b = DF9FFh,
// ctl = 00002h whose expected sum is 399FFh, then every single-bit control
// pattern and random operand/control triples. Expected: (a ^ b) | ctl.
module tb_carry_free_adder;
  localparam int unsigned N = eta_pkg::ETA_N_INACC;

  logic [N-1:0] a, b, ctl, sum;
  int checks = 0, failures = 0;

  carry_free_adder dut (.a(a), .b(b), .ctl(ctl), .sum(sum));

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y,
                       input logic [N-1:0] c);
    logic [N-1:0] expected;
    a = x;
    b = y;
    ctl = c;
    #1;
    for (int i = 0; i < N; i++) expected[i] = c[i] ? 1'b1 : (x[i] ^ y[i]);
    checks++;
    if (sum !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h ctl=%h: got %h expected %h", x, y, c, sum, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 20'hE6000;
    b = 20'hDF9FF;
    ctl = 20'h00002;
    #1;
    checks++;
    if (sum !== 20'h399FF) begin
      failures++;
      $display("FAIL sample vector: got %h expected 399ff", sum);
    end
    apply('1, '1, '0);   // all ones on both inputs, normal mode: all zeros
    apply('0, '0, '1);   // forced mode everywhere: all ones
    for (int i = 0; i < N; i++) apply('1, '1, N'(1) << i);
    for (int i = 0; i < 2000; i++) apply(N'($urandom), N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
