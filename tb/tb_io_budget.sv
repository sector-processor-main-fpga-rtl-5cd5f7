// tb_io_budget -- checks the Main FPGA pin budget against the widths of the
// ports the top module actually has.
//
// The board's Main FPGA pin table gives, per interface, how many user I/Os
// each group of signals takes, and a total of 716 against the 720 user I/Os of
// an XC2V3000 in the FF1152 package. This bench instantiates sp_main_fpga at
// its defaults, measures every board-facing port with $bits through the
// hierarchy, and compares each group with the pin table's subtotal. Groups
// the top does not bring out (the reserved CCB_SPARE, DDU_RSVD and FM_SPARE
// lines and the three configuration pins that count as user I/O) are added
// from the table, and the sum must reach 716 and fit in 720. It also checks
// the 64-bit Muon Sorter word (40 FPGA bits plus three 8-bit PT bytes, sent
// as two 32-bit frames), the 22-bit PT LUT address of a 4M x 8 SRAM, and the
// 726 mezzanine contacts against four 200-contact connectors.
// Ports that never leave the chip (the track finder interface, clk160, rst)
// are left out of the pin count. VM_D is one bidirectional bus: its _i, _o
// and _oe sides count as 16 pins. The bench then runs the top for a few
// clocks after reset so the instance is exercised, not only elaborated.
// The watchdog ends the run after 2000 clocks.
`timescale 1ns/1ps
module tb_io_budget;
  import sp_main_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end else
      $display("ok   %s: %0d", what, got);
  endtask

  task automatic check_le(string what, int got, int lim);
    checks++;
    if (got > lim) begin
      failures++;
      $display("FAIL %s: %0d exceeds %0d", what, got, lim);
    end else
      $display("ok   %s: %0d of %0d", what, got, lim);
  endtask

  // ------------------------------------------------------------ the top
  logic clk = 1'b0, clk160 = 1'b0, rst = 1'b1;
  always #12.5  clk    = ~clk;
  always #3.125 clk160 = ~clk160;

  csc_seg_t [N_ME234-1:0]        csc_me234;
  me1_seg_t [N_ME1-1:0]          csc_me1;
  logic [N_BC1-1:0]              csc_bc1;
  logic [N_DT-1:0]               dt_clk;
  dt_seg_t [N_DT-1:0]            dt_seg;
  csc_seg_t [N_ME234-1:0]        me234_o;
  me1_seg_t [N_ME1-1:0]          me1_o;
  dt_seg_t [N_DT-1:0]            dt_o;
  logic [BX_W-1:0]               bx_o;
  track_t [N_TRK-1:0]            trk;
  logic [N_TRK-1:0][PT_ADDR_W-1:0] pt_a;
  logic [N_TRK-1:0]              pt_ce_n, pt_we_n, buf_oe_n;
  logic [N_TRK-1:0][1:0]         pt_oe_n;
  logic [PT_DATA_W-1:0]          buf_d;
  logic                          buf_dir_n;
  logic [N_TRK-1:0][4:0]         sp_phi, sp_eta;
  logic [N_TRK-1:0]              sp_halo, sp_charge;
  logic [1:0]                    sp_bxn;
  logic                          sp_error, sp_spare;
  logic [2:0]                    mx_clk;
  logic [VME_A_W-1:0]            vm_a;
  logic [VME_D_W-1:0]            vm_d_i, vm_d_o;
  logic                          vm_d_oe, vm_wr_n, vm_ce_n;
  logic                          clken, bc0, bcr, test, l1a;
  logic [DDU_D_W-1:0]            ddu_d;
  logic [DDU_VP_W-1:0]           ddu_vp;
  logic                          ddu_rr, ddu_ra, ddu_st;
  logic                          fm_osy;

  sp_main_fpga dut (
    .ccb_clk40(clk), .clk160, .rst,
    .csc_me234_i(csc_me234), .csc_me1_i(csc_me1), .csc_bc1_i(csc_bc1),
    .dt_clk40_i(dt_clk), .dt_seg_i(dt_seg),
    .me234_o, .me1_o, .dt_o, .bx_o, .trk_i(trk),
    .pt_a_o(pt_a), .pt_ce_n_o(pt_ce_n), .pt_we_n_o(pt_we_n),
    .pt_oe_n_o(pt_oe_n), .buf_d_o(buf_d), .buf_oe_n_o(buf_oe_n),
    .buf_dir_n_o(buf_dir_n),
    .sp_phi_o(sp_phi), .sp_eta_o(sp_eta), .sp_halo_o(sp_halo),
    .sp_charge_o(sp_charge), .sp_bxn_o(sp_bxn), .sp_error_o(sp_error),
    .sp_spare_o(sp_spare), .mx_clk_o(mx_clk),
    .vm_a_i(vm_a), .vm_d_i, .vm_d_o, .vm_d_oe, .vm_wr_n_i(vm_wr_n),
    .vm_ce_n_i(vm_ce_n),
    .ccb_clken_i(clken), .ccb_bc0_i(bc0), .ccb_bcr_i(bcr),
    .ccb_test_i(test), .ccb_l1a_i(l1a),
    .ddu_d_o(ddu_d), .ddu_vp_o(ddu_vp), .ddu_rr_i(ddu_rr), .ddu_ra_o(ddu_ra),
    .ddu_st_i(ddu_st),
    .fm_osy_o(fm_osy)
  );

  // DT links run on their own clocks, here in step with the main clock.
  assign dt_clk = {N_DT{clk}};

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ budget
  // Pin-table subtotals and the numbers outside the top's ports.
  localparam int TBL_VME   = 30;
  localparam int TBL_ME234 = 264;
  localparam int TBL_ME1   = 200;
  localparam int TBL_DT    = 50;
  localparam int TBL_MS    = 43;
  localparam int TBL_PT    = 78;
  localparam int TBL_BUF   = 12;
  localparam int TBL_DDU   = 26;   // includes 3 reserved lines
  localparam int TBL_FC    = 8;    // includes 2 reserved lines
  localparam int TBL_FM    = 2;    // includes 1 reserved line
  localparam int TBL_CFG   = 3;    // configuration pins counted as user I/O
  localparam int RSVD_DDU  = 3, RSVD_CCB = 2, RSVD_FM = 1;
  localparam int TBL_TOTAL = 716;
  localparam int XC2V3000_FF1152_IO = 720;
  localparam int XC2V4000_FF1152_IO = 824;
  localparam int MEZZ_PINS = 726;  // including JTAG and all CFG pins
  localparam int MEZZ_CONTACTS = 4 * 200;

  int vme, me234, me1, dt, ms, pt, bufp, ddu, fc, fm, total;

  initial begin
    csc_me234 = '0; csc_me1 = '0; csc_bc1 = '0; dt_seg = '0; trk = '0;
    vm_a = '0; vm_d_i = '0; vm_wr_n = 1'b1; vm_ce_n = 1'b1;
    clken = 1'b1; bc0 = 1'b0; bcr = 1'b0; test = 1'b0; l1a = 1'b0;
    ddu_rr = 1'b0; ddu_st = 1'b0;

    vme   = $bits(dut.vm_d_i) + $bits(dut.vm_a_i) + $bits(dut.vm_wr_n_i)
          + $bits(dut.vm_ce_n_i);
    me234 = $bits(dut.csc_me234_i) + 3;              // 3 of the 5 BC1 lines
    me1   = $bits(dut.csc_me1_i) + 2;                // the other 2
    dt    = $bits(dut.dt_seg_i) + $bits(dut.dt_clk40_i);
    ms    = $bits(dut.sp_phi_o) + $bits(dut.sp_eta_o) + $bits(dut.sp_halo_o)
          + $bits(dut.sp_charge_o) + $bits(dut.sp_bxn_o)
          + $bits(dut.sp_error_o) + $bits(dut.sp_spare_o)
          + $bits(dut.mx_clk_o);
    pt    = $bits(dut.pt_a_o) + $bits(dut.pt_ce_n_o) + $bits(dut.pt_we_n_o)
          + $bits(dut.pt_oe_n_o);
    bufp  = $bits(dut.buf_d_o) + $bits(dut.buf_oe_n_o)
          + $bits(dut.buf_dir_n_o);
    ddu   = $bits(dut.ddu_d_o) + $bits(dut.ddu_vp_o) + $bits(dut.ddu_rr_i)
          + $bits(dut.ddu_ra_o) + $bits(dut.ddu_st_i);
    fc    = $bits(dut.ccb_clk40) + $bits(dut.ccb_clken_i)
          + $bits(dut.ccb_bc0_i) + $bits(dut.ccb_bcr_i)
          + $bits(dut.ccb_test_i) + $bits(dut.ccb_l1a_i);
    fm    = $bits(dut.fm_osy_o);

    check("BC1 lines", $bits(dut.csc_bc1_i), 5);
    check("VME pins", vme, TBL_VME);
    check("ME2-ME4 pins", me234, TBL_ME234);
    check("ME1 pins", me1, TBL_ME1);
    check("DT pins", dt, TBL_DT);
    check("MS mux pins", ms, TBL_MS);
    check("PT LUT pins", pt, TBL_PT);
    check("LUT buffer pins", bufp, TBL_BUF);
    check("DDU pins + reserved", ddu + RSVD_DDU, TBL_DDU);
    check("fast control pins + reserved", fc + RSVD_CCB, TBL_FC);
    check("fast monitoring pins + reserved", fm + RSVD_FM, TBL_FM);

    total = vme + me234 + me1 + dt + ms + pt + bufp + ddu + fc + fm;
    check("pins brought out by the top", total, 707);
    total += RSVD_DDU + RSVD_CCB + RSVD_FM + TBL_CFG;
    check("user I/O total", total, TBL_TOTAL);
    check_le("user I/O on XC2V3000-FF1152", total, XC2V3000_FF1152_IO);
    check_le("user I/O on XC2V4000-FF1152", total, XC2V4000_FF1152_IO);
    check_le("mezzanine contacts", MEZZ_PINS, MEZZ_CONTACTS);

    // Muon Sorter word: FPGA bits plus the three PT LUT bytes.
    check("MS FPGA bits", $bits(ms_fpga_t), ms - $bits(dut.mx_clk_o));
    check("MS word bits", $bits(ms_fpga_t) + N_TRK * PT_DATA_W,
          2 * MS_FRAME_W);
    check("MS frame function width", $bits(ms_frames('0, '0)), 64);
    // PT LUT: 4M x 8 needs 22 address lines, made of dphi, sign, eta, mode.
    check("PT address bits", $bits(pt_addr_t), PT_ADDR_W);
    check("PT LUT words", 1 << PT_ADDR_W, 4 * 1024 * 1024);
    check("PT address pins per LUT", $bits(dut.pt_a_o) / N_TRK, 13 + 1 + 4 + 4);

    // Bring the top out of reset and let it run a little: with no inputs
    // active, no LUT is written and no readout word is valid.
    repeat (8) @(posedge clk);
    rst = 1'b0;
    repeat (200) begin
      @(posedge clk);
      if (pt_we_n != 3'h7) begin
        failures++;
        $display("FAIL PT LUT written with no load request");
      end
    end
    check("idle DDU valid bit", int'(ddu_vp[VP_VALID]), 0);
    check("idle LUT buffer direction", int'(buf_dir_n), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
