// tb_control_block: checks the grouped CSGC chain (20 cells, groups of 4).
// Expected ctl[i] = OR of (a[j] & b[j]) over j >= i. Directed patterns place a
// single "both ones" position at every bit, so the high signal must reach
// every cell to its right, across all group boundaries; random operands
// follow. A small instance with 7 cells (groups 4 + 3) checks the uneven
// grouping exhaustively.
module tb_control_block;
  localparam int unsigned N = eta_pkg::ETA_N_INACC;

  logic [N-1:0] a, b, ctl;
  logic [6:0]   sa, sb, sctl;
  int checks = 0, failures = 0;

  control_block dut (.a(a), .b(b), .ctl(ctl));
  control_block #(.N(7), .GROUP(4)) dut_small (.a(sa), .b(sb), .ctl(sctl));

  function automatic logic [N-1:0] expect_ctl(logic [N-1:0] x, logic [N-1:0] y);
    logic seen = 1'b0;
    logic [N-1:0] c;
    for (int i = N - 1; i >= 0; i--) begin
      seen = seen | (x[i] & y[i]);
      c[i] = seen;
    end
    return c;
  endfunction

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = expect_ctl(x, y);
    checks++;
    if (ctl !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h: got %h expected %h", x, y, ctl, expected);
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
    apply('0, '0);
    apply('1, '0);        // bits differ everywhere: no control signal
    for (int i = 0; i < N; i++) begin
      logic [N-1:0] x, y;
      apply(N'(1) << i, N'(1) << i);                  // lone 1-1 at bit i
      // bits above i differ, bit i is 1-1, bits below are random
      x = N'($urandom);
      y = ~x;
      x[i] = 1'b1;
      y[i] = 1'b1;
      for (int j = 0; j < i; j++) y[j] = 1'($urandom);
      apply(x, y);
    end
    for (int i = 0; i < 3000; i++) apply(N'($urandom), N'($urandom));
    for (int v = 0; v < (1 << 14); v++) begin
      logic seen;
      logic [6:0] expected;
      {sa, sb} = 14'(v);
      #1;
      seen = 1'b0;
      for (int i = 6; i >= 0; i--) begin
        seen = seen | (sa[i] & sb[i]);
        expected[i] = seen;
      end
      checks++;
      if (sctl !== expected) begin
        failures++;
        $display("FAIL small a=%b b=%b: got %b expected %b", sa, sb, sctl, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
