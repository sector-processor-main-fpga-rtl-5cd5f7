// tb_ms_clk_gen -- self-checking testbench of ms_clk_gen.
// Runs a 160 MHz clock, releases reset on a 40 MHz rising edge and checks,
// in every quarter of every crossing, the three mux clocks against the
// expected pattern: CLK80 high in quarters 0 and 2, CLK40-90 in 1 and 2,
// CLK40-270 in 3 and 0. Also checks each one's period (two or four
// quarters) by counting rising edges.
module tb_ms_clk_gen;
  logic clk160 = 0, rst = 1;
  logic [2:0] mx_clk;
  int checks = 0, failures = 0;
  int rises [3];
  logic [2:0] prev;

  ms_clk_gen dut (.clk160, .rst, .mx_clk);

  always #3.125 clk160 = ~clk160;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rises = '{0, 0, 0};
    repeat (8) @(posedge clk160);   // the 8th edge is a 40 MHz rising edge
    #1 check("reset value", mx_clk, 3'b101);
    @(negedge clk160) rst = 0;
    prev = mx_clk;
    for (int q = 1; q <= 4000; q++) begin
      int ph;
      @(posedge clk160); #1;
      ph = q % 4;
      check("clk80",     mx_clk[2], int'(ph == 0 || ph == 2));
      check("clk40_90",  mx_clk[1], int'(ph == 1 || ph == 2));
      check("clk40_270", mx_clk[0], int'(ph == 3 || ph == 0));
      for (int b = 0; b < 3; b++) if (mx_clk[b] && !prev[b]) rises[b]++;
      prev = mx_clk;
    end
    check("clk80 rises", rises[2], 2000);
    check("clk40_90 rises", rises[1], 1000);
    check("clk40_270 rises", rises[0], 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
