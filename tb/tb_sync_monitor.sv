// tb_sync_monitor -- self-checking testbench of sync_monitor.
// Feeds a running BX number, BC1 markers on the expected crossing (no
// error) and, now and then, on a wrong crossing or a BC0 error, and checks
// the sticky osy flag and its source bits against a model, including clear.
module tb_sync_monitor;
  import sp_main_pkg::*;

  logic clk = 0, rst = 1;
  logic [BX_W-1:0] bx, bc1_bx;
  logic [N_BC1-1:0] bc1;
  logic bc0_err, clr, osy;
  logic [N_BC1:0] osy_src;
  int checks = 0, failures = 0, n_set = 0, n_clr = 0;
  logic [N_BC1:0] m_src;

  sync_monitor dut (.clk, .rst, .bx, .bc1, .bc1_bx, .bc0_err, .clr, .osy, .osy_src);

  always #12.5 clk = ~clk;

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
    bx = 0; bc1 = 0; bc0_err = 0; clr = 0; bc1_bx = 12'd7; m_src = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bx = 12'(cyc % 100);
      bc1 = '0;
      for (int i = 0; i < N_BC1; i++) begin
        if (bx == bc1_bx) bc1[i] = ($urandom_range(0, 3) != 0);
        else              bc1[i] = ($urandom_range(0, 2999) == 0);
      end
      bc0_err = ($urandom_range(0, 4999) == 0);
      clr = ($urandom_range(0, 499) == 0);
      if (clr) begin m_src = '0; n_clr++; end
      else begin
        logic [N_BC1:0] e;
        for (int i = 0; i < N_BC1; i++) e[i] = bc1[i] && (bx != bc1_bx);
        e[N_BC1] = bc0_err;
        if ((e & ~m_src) != 0) n_set++;
        m_src = m_src | e;
      end
      @(posedge clk); #1;
      check("osy_src", osy_src, m_src);
      check("osy", osy, int'(m_src != 0));
      @(negedge clk);
    end
    check("errors seen", int'(n_set > 5), 1);
    check("clears seen", int'(n_clr > 5), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
