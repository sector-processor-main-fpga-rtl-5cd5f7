// tb_ccb_fast_ctrl -- self-checking testbench of ccb_fast_ctrl.
// Drives random CCB lines (BCR, BC0, L1A, TEST, CLKEN) and compares every
// output, every clock, with a reference model kept in the testbench. Runs
// through two full orbits so the counter wrap at 3563 is seen, and checks
// that BC0 on BX 0 is clean and BC0 elsewhere is flagged.
module tb_ccb_fast_ctrl;
  import sp_main_pkg::*;

  logic clk = 0, rst = 1;
  logic clken, bc0_i, bcr_i, test_i, l1a_i;
  logic [BX_W-1:0] bx, evn;
  logic bc0, bc0_err, bcr, l1a, test;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_bc0_ok = 0, n_bc0_err = 0, n_l1a = 0, n_hold = 0;

  ccb_fast_ctrl dut (.clk, .rst, .ccb_clken(clken), .ccb_bc0(bc0_i), .ccb_bcr(bcr_i),
    .ccb_test(test_i), .ccb_l1a(l1a_i), .bx, .bc0, .bc0_err, .bcr, .l1a, .test, .evn);

  always #12.5 clk = ~clk;

  // reference model
  int m_bx, m_evn; bit m_bc0, m_err, m_bcr, m_l1a, m_test;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {clken, bc0_i, bcr_i, test_i, l1a_i} = '0;
    m_bx = 0; m_evn = 0; {m_bc0, m_err, m_bcr, m_l1a, m_test} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 3 * 3564 + 50; cyc++) begin
      // stimulus on the falling edge
      clken  = ($urandom_range(0, 19) != 0);
      bcr_i  = (cyc == 10) || ($urandom_range(0, 4999) == 0);
      // BC0 mostly where the model says the next crossing is BX 0
      bc0_i  = ((m_bx == 3563) && ($urandom_range(0, 3) != 0)) || ($urandom_range(0, 999) == 0);
      l1a_i  = ($urandom_range(0, 29) == 0);
      test_i = ($urandom_range(0, 99) == 0);
      // model of the next state
      if (clken) begin
        int nb;
        nb = bcr_i ? 0 : (m_bx == 3563 ? 0 : m_bx + 1);
        if (!bcr_i && m_bx == 3563) n_wrap++;
        m_err  = bc0_i && (nb != 0);
        if (bc0_i && nb == 0) n_bc0_ok++;
        if (m_err) n_bc0_err++;
        m_bx   = nb;
        m_bc0  = bc0_i; m_bcr = bcr_i; m_l1a = l1a_i; m_test = test_i && !l1a_i;
        if (l1a_i || test_i) m_evn = (m_evn + 1) % 4096;
        if (l1a_i) n_l1a++;
      end else begin
        {m_bc0, m_err, m_bcr, m_l1a, m_test} = '0;
        n_hold++;
      end
      @(posedge clk); #1;
      check("bx", bx, m_bx);
      check("evn", evn, m_evn);
      check("bc0", bc0, m_bc0);
      check("bc0_err", bc0_err, m_err);
      check("bcr", bcr, m_bcr);
      check("l1a", l1a, m_l1a);
      check("test", test, m_test);
      @(negedge clk);
    end
    check("orbit wrap seen", int'(n_wrap > 0), 1);
    check("good BC0 seen", int'(n_bc0_ok > 0), 1);
    check("bad BC0 seen", int'(n_bc0_err > 0), 1);
    check("clken low seen", int'(n_hold > 0), 1);
    $display("wraps=%0d bc0_ok=%0d bc0_err=%0d l1a=%0d", n_wrap, n_bc0_ok, n_bc0_err, n_l1a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
