// tb_dt_align -- self-checking testbench of dt_align.
// Two DT links run on their own 40 MHz clocks, 7 ns and 19 ns out of phase
// with the CCB clock. Each sends a numbered segment every crossing (phi =
// sequence number, DT_BXN = its 2 LSBs). After the FIFOs settle, the test
// checks on every clock that the output sequence is gap-free, that raising
// the delay setting by d moves the output exactly d crossings later, that
// the BXN check fires exactly when DT_BXN differs from the local BX, and
// that no FIFO error occurs.
module tb_dt_align;
  import sp_main_pkg::*;

  logic clk = 0, rst = 1;
  logic [N_DT-1:0] dt_clk = '0;
  dt_seg_t [N_DT-1:0] dt_seg_i, dt_seg_o;
  logic [N_DT-1:0][3:0] dly;
  logic [1:0] bx_lsb, bx_prev;
  logic [N_DT-1:0] bxn_err, fifo_err;
  int checks = 0, failures = 0;
  int seq [N_DT];
  int k0 [N_DT];
  int n_bxn_err = 0, n_bxn_ok = 0;

  dt_align dut (.clk, .rst, .dt_clk, .dt_seg_i, .dly, .bx_lsb, .dt_seg_o, .bxn_err, .fifo_err);

  always #12.5 clk = ~clk;
  initial begin #7;  forever #12.5 dt_clk[0] = ~dt_clk[0]; end
  initial begin #19; forever #12.5 dt_clk[1] = ~dt_clk[1]; end

  // DT link transmitters: new word shortly after each rising DT clock edge
  for (genvar l = 0; l < N_DT; l++) begin : g_tx
    always @(posedge dt_clk[l]) begin
      #2;
      seq[l] = seq[l] + 1;
      dt_seg_i[l].q     = 3'(1 + seq[l] % 7);
      dt_seg_i[l].phi   = 12'(seq[l]);
      dt_seg_i[l].phib  = 5'(seq[l] * 3);
      dt_seg_i[l].bxn   = 2'(seq[l]);
      dt_seg_i[l].flag  = 1'(seq[l] >> 3);
      dt_seg_i[l].synch = 1'(seq[l] >> 4);
    end
  end

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

  int c = 0;
  initial begin
    seq = '{1000, 2000};
    dt_seg_i = '0; dly = '0; bx_lsb = 0; bx_prev = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    // settle
    repeat (20) begin @(negedge clk); c++; bx_prev = bx_lsb; bx_lsb = 2'(c); end
    for (int l = 0; l < N_DT; l++) k0[l] = int'(dt_seg_o[l].phi) - c;
    for (int step = 0; step < 40; step++) begin
      logic [N_DT-1:0][3:0] nd;
      for (int l = 0; l < N_DT; l++) nd[l] = 4'($urandom);
      dly = nd;
      // let the new delay take effect
      repeat (3) begin @(negedge clk); c++; bx_prev = bx_lsb; bx_lsb = 2'(c); end
      for (int n = 0; n < 30; n++) begin
        for (int l = 0; l < N_DT; l++) begin
          check("sequence/delay", int'(dt_seg_o[l].phi), (c + k0[l] - int'(dly[l])) & 12'hFFF);
          check("phib follows", dt_seg_o[l].phib, (int'(dt_seg_o[l].phi) * 3) & 31);
          check("bxn_err", bxn_err[l], int'(dt_seg_o[l].bxn != bx_prev));
          check("fifo_err", fifo_err[l], 0);
          if (bxn_err[l]) n_bxn_err++; else n_bxn_ok++;
        end
        @(negedge clk); c++; bx_prev = bx_lsb; bx_lsb = 2'(c);
      end
    end
    check("bxn mismatch seen", int'(n_bxn_err > 0), 1);
    check("bxn match seen", int'(n_bxn_ok > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
