// tb_vme_regs -- self-checking testbench of vme_regs.
// Runs VME write and read cycles with strobes asynchronous to the 40 MHz
// clock (cycle times in ns, not clocks), writes every configuration
// register with random values, reads them back, reads the status registers
// fed from the testbench, and checks the command pulses (LUT load request,
// OSY clear, overflow clear) are exactly one clock long and only on the
// right writes. VM_D is driven by the FPGA only during reads.
module tb_vme_regs;
  import sp_main_pkg::*;

  logic clk = 0, rst = 1;
  logic [VME_A_W-1:0] vm_a;
  logic [VME_D_W-1:0] vm_d_i, vm_d_o;
  logic vm_d_oe, vm_wr_n, vm_ce_n;
  sp_cfg_t cfg;
  logic lut_load_req, osy_clr, ovf_clr;
  sp_stat_t stat;
  int checks = 0, failures = 0;
  int n_load = 0, n_osy_clr = 0, n_ovf_clr = 0, n_oe_bad = 0;

  vme_regs dut (.clk, .rst, .vm_a, .vm_d_i, .vm_d_o, .vm_d_oe, .vm_wr_n, .vm_ce_n,
    .cfg, .lut_load_req, .osy_clr, .ovf_clr, .stat);

  always #12.5 clk = ~clk;

  always @(posedge clk) begin
    n_load    += int'(lut_load_req);
    n_osy_clr += int'(osy_clr);
    n_ovf_clr += int'(ovf_clr);
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic vme_write(input logic [11:0] a, input logic [15:0] d);
    #($urandom_range(3, 17));
    vm_a = a; vm_d_i = d; vm_wr_n = 0;
    #7 vm_ce_n = 0;
    #150;                       // 6 clocks
    vm_ce_n = 1;
    #5 vm_wr_n = 1;
    #100;
  endtask

  task automatic vme_read(input logic [11:0] a, output logic [15:0] d);
    #($urandom_range(3, 17));
    vm_a = a; vm_wr_n = 1;
    #7 vm_ce_n = 0;
    #150;
    checks++;
    if (!vm_d_oe) begin failures++; $display("FAIL vm_d_oe low during read"); end
    d = vm_d_o;
    vm_ce_n = 1;
    #100;
    checks++;
    if (vm_d_oe) begin failures++; $display("FAIL vm_d_oe high after read"); end
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] rd, v_dly0, v_dly1, v_lat, v_bc1, v_alo, v_ahi, v_dat;
  initial begin
    vm_a = 0; vm_d_i = 0; vm_wr_n = 1; vm_ce_n = 1;
    stat = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) @(posedge clk);
    check("oe idle", vm_d_oe, 0);
    for (int it = 0; it < 40; it++) begin
      v_dly0 = 16'($urandom); v_dly1 = 16'($urandom); v_lat = 16'($urandom);
      v_bc1 = 16'($urandom); v_alo = 16'($urandom); v_ahi = 16'($urandom); v_dat = 16'($urandom);
      vme_write(RA_DT_DLY0, v_dly0);
      vme_write(RA_DT_DLY1, v_dly1);
      vme_write(RA_L1A_LAT, v_lat);
      vme_write(RA_BC1_BX, v_bc1);
      vme_write(RA_LUT_ALO, v_alo);
      vme_write(RA_LUT_AHI, v_ahi);
      check("no load before data", n_load, it);
      vme_write(RA_LUT_DAT, v_dat);
      check("load request", n_load, it + 1);
      check("cfg.dt_dly0", cfg.dt_dly[0], v_dly0[3:0]);
      check("cfg.dt_dly1", cfg.dt_dly[1], v_dly1[3:0]);
      check("cfg.l1a_lat", cfg.l1a_lat, v_lat[7:0]);
      check("cfg.bc1_bx", cfg.bc1_bx, v_bc1[11:0]);
      check("cfg.lut_addr", cfg.lut_addr, {v_ahi[5:0], v_alo});
      check("cfg.lut_sel", cfg.lut_sel, v_ahi[9:8]);
      check("cfg.lut_data", cfg.lut_data, v_dat[7:0]);
      vme_read(RA_DT_DLY0, rd); check("rd dly0", rd, {12'b0, v_dly0[3:0]});
      vme_read(RA_DT_DLY1, rd); check("rd dly1", rd, {12'b0, v_dly1[3:0]});
      vme_read(RA_L1A_LAT, rd); check("rd lat", rd, {8'b0, v_lat[7:0]});
      vme_read(RA_BC1_BX, rd);  check("rd bc1", rd, {4'b0, v_bc1[11:0]});
      vme_read(RA_LUT_ALO, rd); check("rd alo", rd, v_alo);
      vme_read(RA_LUT_AHI, rd); check("rd ahi", rd, {6'b0, v_ahi[9:8], 2'b0, v_ahi[5:0]});
      vme_read(RA_LUT_DAT, rd); check("rd dat", rd, {8'b0, v_dat[7:0]});
      // status registers
      stat.lut_busy = 1'($urandom); stat.osy = 1'($urandom); stat.osy_src = 6'($urandom);
      stat.ddu_ovf = 1'($urandom); stat.bx = 12'($urandom); stat.evn = 12'($urandom);
      stat.ovf_cnt = 16'($urandom); stat.bxn_err_cnt = 16'($urandom);
      vme_read(RA_STATUS, rd);
      check("rd status", rd, {7'b0, stat.osy_src, stat.ddu_ovf, stat.osy, stat.lut_busy});
      vme_read(RA_BX, rd);      check("rd bx", rd, {4'b0, stat.bx});
      vme_read(RA_EVN, rd);     check("rd evn", rd, {4'b0, stat.evn});
      vme_read(RA_OVF_CNT, rd); check("rd ovf", rd, stat.ovf_cnt);
      vme_read(RA_BXN_ERR, rd); check("rd bxn", rd, stat.bxn_err_cnt);
      vme_read(12'hFFF, rd);    check("rd unmapped", rd, 0);
      // CSR: mode bit and clear pulses
      begin
        logic [15:0] c;
        int o0, v0;
        c = 16'($urandom);
        o0 = n_osy_clr; v0 = n_ovf_clr;
        vme_write(RA_CSR, c);
        check("cfg.lut_load_mode", cfg.lut_load_mode, c[0]);
        check("osy_clr pulses", n_osy_clr - o0, c[1]);
        check("ovf_clr pulses", n_ovf_clr - v0, c[2]);
        vme_read(RA_CSR, rd); check("rd csr", rd, {15'b0, c[0]});
      end
    end
    check("load pulses total", n_load, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
