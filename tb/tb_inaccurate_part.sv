// tb_inaccurate_part: checks the 20-bit carry-free approximate adder against
// the bit-scan reference model, including its mode vector. Counts how often
// the result was exact (no 1-1 position) and how often forcing took place;
// both must occur.
module tb_inaccurate_part;
  import eta_ref_pkg::*;
  localparam int unsigned N = eta_pkg::ETA_N_INACC;

  logic [N-1:0] a, b, sum, ctl;
  int checks = 0, failures = 0;
  int n_exact = 0, n_forced = 0;

  inaccurate_part dut (.a(a), .b(b), .sum(sum), .ctl(ctl));

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    u64_t es, ec;
    a = x;
    b = y;
    #1;
    es = eta_sum(u64_t'(x), u64_t'(y), N, N);
    ec = ctl_ref(u64_t'(x), u64_t'(y), N);
    checks++;
    if (sum !== es[N-1:0] || ctl !== ec[N-1:0]) begin
      failures++;
      $display("FAIL a=%h b=%h: sum %h ctl %h, expected %h %h", x, y, sum, ctl,
               es[N-1:0], ec[N-1:0]);
    end
    if (ec == 0) n_exact++;
    else         n_forced++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('1, '1);
    for (int i = 0; i < N; i++) apply(N'(1) << i, N'(1) << i);
    for (int i = 0; i < 3000; i++) apply(N'($urandom), N'($urandom));
    // Disjoint operands: never forced, result equals the true sum.
    for (int i = 0; i < 200; i++) begin
      logic [N-1:0] x;
      x = N'($urandom);
      apply(x, ~x & N'($urandom));
      checks++;
      if (sum !== x + b) begin
        failures++;
        $display("FAIL disjoint operands not exact");
      end
    end
    $display("exact=%0d forced=%0d", n_exact, n_forced);
    checks++;
    if (n_exact == 0 || n_forced == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
