// tb_flc_defuzzifier: feeds numerator/denominator pairs whose quotient lies
// in [-1, 1] (|num| <= 1024 * den) plus a zero denominator, and checks the
// quotient against integer division truncated toward zero, the 12-cycle
// latency from `start` to `done`, and that a `start` while busy is ignored.
module tb_flc_defuzzifier;
  import flc_pkg::*;
  localparam int NUM_W = 2 * MU_W + MF_W + 1;
  localparam int DEN_W = 2 * MU_W + 1;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [NUM_W-1:0] num;
  logic [DEN_W-1:0] den;
  logic signed [NORM_W-1:0] dd;
  logic done, busy;
  int checks = 0, failures = 0;

  flc_defuzzifier dut (.clk, .rst_n, .start, .num, .den, .dd, .done, .busy);

  always #10 clk = ~clk;

  task automatic run(input longint n, input longint d);
    longint q_ref;
    int lat;
    q_ref = (d == 0) ? 0 : n / d;      // SystemVerilog division truncates toward zero
    @(negedge clk);
    num = NUM_W'(n); den = DEN_W'(d); start = 1;
    @(negedge clk);
    start = 1;                         // held high: must not restart while busy
    num = '0; den = DEN_W'(1);
    lat = 0;
    while (!done && lat < 40) begin
      @(negedge clk);
      start = 0;
      lat++;
    end
    start = 0;
    checks++;
    if (lat != 12) begin failures++; $display("latency %0d, expected 12", lat); end
    checks++;
    if (longint'(dd) != q_ref) begin failures++; $display("%0d / %0d = %0d, expected %0d", n, d, dd, q_ref); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 1 << 20);
    run(1024 * (1 << 20), 1 << 20);
    run(-1024 * (1 << 20), 1 << 20);
    run(512 * (1 << 20) + 5, 1 << 20);
    run(-(512 * (1 << 20) + 5), 1 << 20);
    run(12345, 0);
    for (int k = 0; k < 300; k++) begin
      longint d, n;
      d = longint'($urandom_range(1, 1 << 20));
      n = (longint'($urandom) % (1024 * d + 1));
      if ($urandom_range(0, 1)) n = -n;
      run(n, d);
    end
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
