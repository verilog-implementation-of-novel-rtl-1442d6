// tb_eta: end-to-end test of the 40-bit error-tolerant adder at its default
// parameters (20 accurate + 20 inaccurate bits, control groups of 4).
//
// Every result is compared with the bit-scan reference model, and with two
// properties that hold for this adder whatever its inputs:
//   * the result never exceeds the true sum, and falls short of it by less
//     than 2^20 (the inaccurate part can only lose the carry it drops);
//   * the result is exact exactly when ctl[0] is low.
// Each mechanism of the design is counted and must occur at least once:
// exact carry-free addition, forcing to 1, forcing from the top inaccurate
// bit, forcing that crosses a control group boundary, a carry out of the
// accurate part, and a carry rippling through the whole accurate part.
module tb_eta;
  import eta_ref_pkg::*;
  localparam int unsigned W = eta_pkg::ETA_WIDTH;
  localparam int unsigned N = eta_pkg::ETA_N_INACC;
  localparam int unsigned G = eta_pkg::CSGC_GROUP;

  logic [W-1:0] a, b;
  logic [W:0]   sum;
  logic [N-1:0] ctl;
  int checks = 0, failures = 0;
  int n_exact = 0, n_forced = 0, n_top_forced = 0, n_group_cross = 0;
  int n_cout = 0, n_full_ripple = 0;

  eta dut (.a(a), .b(b), .sum(sum), .ctl(ctl));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h sum=%h ctl=%h", what, a, b, sum, ctl);
    end
  endtask

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    u64_t rc, re, ec;
    int   first;
    a = x;
    b = y;
    #1;
    rc = u64_t'(x) + u64_t'(y);
    re = eta_sum(u64_t'(x), u64_t'(y), W, N);
    ec = ctl_ref(u64_t'(x), u64_t'(y), N);
    check("sum vs reference", u64_t'(sum) == re);
    check("ctl vs reference", u64_t'(ctl) == ec);
    check("never above true sum", u64_t'(sum) <= rc);
    check("error below 2^N", rc - u64_t'(sum) < (u64_t'(1) << N));
    check("exact iff ctl[0] low", (u64_t'(sum) == rc) == !ctl[0]);
    // mechanism counters, from the operands only
    first = -1;
    for (int i = N - 1; i >= 0; i--) if (first < 0 && x[i] && y[i]) first = i;
    if (first < 0) n_exact++;
    else begin
      n_forced++;
      if (first == N - 1) n_top_forced++;
      if (first >= G) n_group_cross++;
    end
    if (sum[W]) n_cout++;
    if (&(x[W-1:N+1] ^ y[W-1:N+1]) && (x[N] & y[N])) n_full_ripple++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, W'(1));
    // carry generated at the lowest accurate bit ripples through all 20
    apply({{(W-N-1){1'b1}}, 1'b1, {N{1'b0}}}, {{(W-N-1){1'b0}}, 1'b1, {N{1'b0}}});
    // lone 1-1 at every inaccurate position
    for (int i = 0; i < N; i++) apply(W'(1) << i, W'(1) << i);
    // random operands
    for (int i = 0; i < 20000; i++)
      apply(W'({$urandom, $urandom}), W'({$urandom, $urandom}));
    // random with a sparse low part, so exact results are common
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] x, y;
      x = W'({$urandom, $urandom});
      y = W'({$urandom, $urandom});
      y[N-1:0] = ~x[N-1:0] & y[N-1:0];
      apply(x, y);
    end
    $display("exact=%0d forced=%0d top_forced=%0d group_cross=%0d cout=%0d full_ripple=%0d",
             n_exact, n_forced, n_top_forced, n_group_cross, n_cout, n_full_ripple);
    check("exact addition seen", n_exact > 0);
    check("forcing seen", n_forced > 0);
    check("forcing from top bit seen", n_top_forced > 0);
    check("group crossing seen", n_group_cross > 0);
    check("carry out seen", n_cout > 0);
    check("full ripple seen", n_full_ripple > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
