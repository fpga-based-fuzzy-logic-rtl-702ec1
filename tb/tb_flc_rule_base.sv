// tb_flc_rule_base: reads all 25 rules and compares the consequent with the
// rule matrix written out here row by row (error NB..PB down, change of
// error NB..PB across; -2 = NB .. 2 = PB), and the singleton value with
// 512 * consequent.
module tb_flc_rule_base;
  import flc_pkg::*;
  fset_t e_set, de_set, c_set;
  mf_t   c_val;
  int checks = 0, failures = 0;

  flc_rule_base dut (.e_set, .de_set, .c_set, .c_val);

  // Expected consequents, as signed levels.
  int exp_tab [5][5] = '{
    '{-2, -2, -2, -1,  0},
    '{-2, -2, -1,  0,  1},
    '{-2, -1,  0,  1,  1},
    '{-1,  0,  1,  2,  2},
    '{ 0,  1,  2,  2,  2}
  };

  initial begin
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        e_set  = fset_t'(i);
        de_set = fset_t'(j);
        #1;
        checks++;
        if (int'(c_set) - 2 != exp_tab[i][j]) begin
          failures++;
          $display("rule (%0d,%0d): set %0d expected %0d", i, j, int'(c_set) - 2, exp_tab[i][j]);
        end
        checks++;
        if (int'(c_val) != 512 * exp_tab[i][j]) begin
          failures++;
          $display("rule (%0d,%0d): value %0d", i, j, c_val);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
