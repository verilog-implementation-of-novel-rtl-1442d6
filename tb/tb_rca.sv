// tb_rca: checks the ripple-carry accurate part at its default width (20).
// Corner cases (zero, all ones, carry through every stage) and random operand
// pairs are compared against a + b computed by the simulator.
module tb_rca;
  localparam int unsigned N = eta_pkg::ETA_WIDTH - eta_pkg::ETA_N_INACC;

  logic [N-1:0] a, b, sum;
  logic         cout;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .sum(sum), .cout(cout));

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0] expected;
    a = x;
    b = y;
    #1;
    expected = {1'b0, x} + {1'b0, y};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL %h + %h: got %h expected %h", x, y, {cout, sum}, expected);
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
    apply('0, '0);
    apply('1, '0);
    apply('1, N'(1));     // carry ripples through every stage
    apply('1, '1);
    for (int i = 0; i < N; i++) apply(N'(1) << i, N'(1) << i);
    for (int i = 0; i < 2000; i++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
