// tb_flc_fuzzifier: sweeps the normalised input over and beyond [-1, 1] and
// compares the degrees of all five sets with a real-valued evaluation of
// triangles centred at -1, -0.5, 0, 0.5, 1 (half-width 0.5, shoulders at
// the ends). Checks the active pair, both degrees (within 1 LSB) and that
// the degrees sum to 1.
module tb_flc_fuzzifier;
  import flc_pkg::*;
  logic signed [NORM_W-1:0] x;
  fuzzy_t f;
  int checks = 0, failures = 0;

  flc_fuzzifier dut (.x, .f);

  function automatic real tri_mu(input real v, input int k);
    real c = -1.0 + 0.5 * k;
    if (k == 0 && v <= c) return 1.0;
    if (k == 4 && v >= c) return 1.0;
    if (v <= c - 0.5 || v >= c + 0.5) return 0.0;
    return 1.0 - ((v > c) ? (v - c) : (c - v)) / 0.5;
  endfunction

  task automatic check_point(input int xi);
    real v, mu_ref[5], got[5];
    x = NORM_W'(xi);
    #1;
    v = xi / 1024.0;
    for (int k = 0; k < 5; k++) begin
      mu_ref[k] = tri_mu(v, k);
      got[k] = 0.0;
    end
    got[int'(f.lo)]     = f.mu_lo / 1024.0;
    if (int'(f.lo) < 4) got[int'(f.lo) + 1] = f.mu_hi / 1024.0;
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (got[k] - mu_ref[k] > 1.5/1024 || mu_ref[k] - got[k] > 1.5/1024) begin
        failures++;
        $display("x=%0d set %0d: got %f expected %f", xi, k, got[k], mu_ref[k]);
      end
    end
    checks++;
    if (int'(f.mu_lo) + int'(f.mu_hi) != 1024) begin
      failures++;
      $display("x=%0d degrees sum %0d", xi, int'(f.mu_lo) + int'(f.mu_hi));
    end
  endtask

  initial begin
    for (int xi = -1400; xi <= 1400; xi += 7) check_point(xi);
    foreach (MF_CENTER[k]) check_point(int'(MF_CENTER[k]));
    check_point(-32768);
    check_point(32767);
    for (int n = 0; n < 200; n++) check_point(int'($urandom_range(0, 2600)) - 1300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
