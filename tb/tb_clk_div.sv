// tb_clk_div: checks that clk_div issues exactly one tick every SCALE clocks
// (50 at the default) and that clk_out is high for SCALE/2 of them.
module tb_clk_div;
  logic clk = 0, rst_n = 0;
  logic tick, clk_out;
  int checks = 0, failures = 0;
  int last_tick = -1, cyc = 0, ticks = 0, high = 0;

  clk_div dut (.clk, .rst_n, .tick, .clk_out);

  always #10 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (clk_out) high++;
    if (tick) begin
      if (last_tick >= 0) begin
        checks++;
        if (cyc - last_tick != 50) begin
          failures++;
          $display("tick spacing %0d, expected 50", cyc - last_tick);
        end
      end
      last_tick = cyc;
      ticks++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50 * 20 + 2) @(posedge clk);
    checks++;
    if (ticks != 20) begin failures++; $display("ticks=%0d expected 20", ticks); end
    checks++;
    if (high < 25 * 20 || high > 25 * 20 + 2) begin failures++; $display("clk_out high %0d of 1000", high); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
