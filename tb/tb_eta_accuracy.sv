// tb_eta_accuracy: accuracy study of the error-tolerant adder.
//
// Builds twelve adders and measures, over 10000 random operand pairs each
// (operands uniform over their full width), the acceptance probability
// AP = P(ACC > MAA) for minimum acceptable accuracies MAA = 90 % .. 99 %, and
// the probability of an exact result.
//   cfg 0..3 : 16-bit adders split 8-8, 6-10, 4-12, 2-14 (accurate-inaccurate)
//   cfg 4..11: adders of 4, 8, ..., 32 bits whose inaccurate part is three
//              times the accurate part
// First it runs the worked example 45978 + 26899 on the 16-bit 8-8 adder,
// which must give 72863 (true sum 72877, error 14).
//
// Checks: every output equals the reference model; the exact-result rate is
// within 0.02 of (3/4)^N_INACC, the probability that no inaccurate position
// holds two ones; AP does not rise with MAA; from 8 bits up, AP does not fall
// (beyond 0.01 of sampling noise) as the adder grows; and a few points of the
// published curves, read approximately off the plots, agree within 0.05.
module tb_eta_accuracy;
  import eta_ref_pkg::*;

  localparam int NCFG    = 12;
  localparam int NSAMPLE = 10000;
  localparam int MAA_LO  = 90;
  localparam int NMAA    = 10;            // 90 .. 99 %
  localparam int CFG_W [NCFG] = '{16, 16, 16, 16, 4, 8, 12, 16, 20, 24, 28, 32};
  localparam int CFG_N [NCFG] = '{ 8, 10, 12, 14, 3, 6,  9, 12, 15, 18, 21, 24};

  int checks = 0, failures = 0;
  int accepted [NCFG][NMAA];
  int exact    [NCFG];
  bit done     [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int W = CFG_W[c];
    localparam int N = CFG_N[c];
    logic [W-1:0]   a, b;
    logic [W:0]     sum;
    logic [N-1:0]   ctl;

    eta #(.WIDTH(W), .N_INACC(N)) dut (.a(a), .b(b), .sum(sum), .ctl(ctl));

    initial begin
      u64_t rc, re;
      int   bad;
      bad = 0;
      exact[c] = 0;
      for (int m = 0; m < NMAA; m++) accepted[c][m] = 0;
      if (c == 0) begin
        a = W'(45978);
        b = W'(26899);
        #1;
        checks++;
        if (u64_t'(sum) != 72863) begin
          failures++;
          $display("FAIL worked example: got %0d expected 72863", sum);
        end
      end
      for (int s = 0; s < NSAMPLE; s++) begin
        a = W'({$urandom, $urandom});
        b = W'({$urandom, $urandom});
        #1;
        rc = u64_t'(a) + u64_t'(b);
        re = u64_t'(sum);
        if (re != eta_sum(u64_t'(a), u64_t'(b), W, N)) bad++;
        if (re == rc) exact[c]++;
        for (int m = 0; m < NMAA; m++)
          if (acceptable(rc, re, MAA_LO + m)) accepted[c][m]++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL cfg %0d (%0d-%0d): %0d outputs differ from the reference",
                 c, W - N, N, bad);
      end
      done[c] = 1'b1;
    end
  end

  function automatic real ap(int c, int maa);
    return real'(accepted[c][maa - MAA_LO]) / NSAMPLE;
  endfunction

  task automatic near(string what, real got, real want, real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %s: %0.4f, expected %0.4f +- %0.3f", what, got, want, tol);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #10;
      all_done = 1'b1;
      for (int c = 0; c < NCFG; c++) all_done &= done[c];
    end while (!all_done);

    for (int c = 0; c < NCFG; c++) begin
      string line;
      line = $sformatf("%2d-bit %2d-%-2d exact=%0.4f AP:", CFG_W[c], CFG_W[c] - CFG_N[c],
                       CFG_N[c], real'(exact[c]) / NSAMPLE);
      for (int m = 0; m < NMAA; m++) line = {line, $sformatf(" %0.3f", ap(c, MAA_LO + m))};
      $display("%s", line);
      near($sformatf("cfg %0d exact rate", c), real'(exact[c]) / NSAMPLE,
           0.75 ** CFG_N[c], 0.02);
      for (int m = 1; m < NMAA; m++) begin
        checks++;
        if (accepted[c][m] > accepted[c][m-1]) begin
          failures++;
          $display("FAIL cfg %0d: AP rises from MAA %0d to %0d", c, MAA_LO + m - 1, MAA_LO + m);
        end
      end
    end
    for (int c = 6; c < NCFG; c++)
      for (int maa = 95; maa <= 99; maa++) begin
        checks++;
        if (ap(c, maa) < ap(c - 1, maa) - 0.01) begin
          failures++;
          $display("FAIL AP falls from %0d to %0d bits at MAA %0d", CFG_W[c-1], CFG_W[c], maa);
        end
      end
    // points of the published curves
    near("2-14 at MAA 90", ap(3, 90), 0.80, 0.05);
    near("2-14 at MAA 99", ap(3, 99), 0.32, 0.05);
    near("4-12 at MAA 98", ap(2, 98), 0.73, 0.05);
    near("4-12 at MAA 99", ap(2, 99), 0.56, 0.05);
    near("6-10 at MAA 99", ap(1, 99), 0.90, 0.05);
    near("8-8 at MAA 99",  ap(0, 99), 1.00, 0.05);
    near("4-bit at MAA 95",  ap(4, 95), 0.47, 0.05);
    near("8-bit at MAA 99",  ap(5, 99), 0.31, 0.05);
    near("16-bit at MAA 95", ap(7, 95), 0.93, 0.05);
    near("20-bit at MAA 99", ap(8, 99), 0.73, 0.05);
    near("32-bit at MAA 99", ap(11, 99), 1.00, 0.05);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
