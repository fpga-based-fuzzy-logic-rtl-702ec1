// tb_flc_inference: applies random fuzzified inputs (any lower set, any
// degree split) and compares the registered sums with a full evaluation of
// all 25 rules done here: for every (i, j) the weight is degree_e(i) *
// degree_de(j) and the contribution weight * 512 * level(i, j). Also checks
// the one-cycle latency and that the `fired` flags match non-zero weights.
module tb_flc_inference;
  import flc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  fuzzy_t fe, fde;
  logic signed [2*MU_W+MF_W:0] num;
  logic [2*MU_W:0] den;
  logic out_valid;
  logic [3:0] fired;
  int checks = 0, failures = 0;

  int lvl [5][5] = '{
    '{-2, -2, -2, -1,  0},
    '{-2, -2, -1,  0,  1},
    '{-2, -1,  0,  1,  1},
    '{-1,  0,  1,  2,  2},
    '{ 0,  1,  2,  2,  2}
  };

  flc_inference dut (.clk, .rst_n, .in_valid, .fe, .fde, .num, .den, .out_valid, .fired);

  always #10 clk = ~clk;

  task automatic step(input int elo, input int emu, input int dlo, input int dmu);
    longint mu_e[5], mu_d[5], n_ref, d_ref;
    int nfired;
    for (int k = 0; k < 5; k++) begin mu_e[k] = 0; mu_d[k] = 0; end
    mu_e[elo] = 1024 - emu; mu_e[elo + 1] = emu;
    mu_d[dlo] = 1024 - dmu; mu_d[dlo + 1] = dmu;
    n_ref = 0; d_ref = 0; nfired = 0;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        n_ref += mu_e[i] * mu_d[j] * 512 * lvl[i][j];
        d_ref += mu_e[i] * mu_d[j];
        if (mu_e[i] * mu_d[j] != 0) nfired++;
      end
    @(negedge clk);
    fe  = '{lo: fset_t'(elo), mu_lo: MU_W'(1024 - emu), mu_hi: MU_W'(emu)};
    fde = '{lo: fset_t'(dlo), mu_lo: MU_W'(1024 - dmu), mu_hi: MU_W'(dmu)};
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing"); end
    checks++;
    if (longint'(num) != n_ref || longint'(den) != d_ref) begin
      failures++;
      $display("e(%0d,%0d) de(%0d,%0d): num %0d/%0d den %0d/%0d", elo, emu, dlo, dmu, num, n_ref, den, d_ref);
    end
    checks++;
    if ($countones(fired) != nfired) begin failures++; $display("fired %b, expected %0d rules", fired, nfired); end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
  endtask

  initial begin
    fe = '0; fde = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        step(a, 0, b, 0);
        step(a, 1024, b, 512);
      end
    for (int n = 0; n < 300; n++)
      step($urandom_range(0, 3), $urandom_range(0, 1024), $urandom_range(0, 3), $urandom_range(0, 1024));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
