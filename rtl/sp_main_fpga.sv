// sp_main_fpga -- Main FPGA of the Sector Processor (SP2002), without its
// track reconstruction core.
//
// The Main FPGA receives track segments from 9 ME2-ME4 and 6 ME1 CSC links
// (already aligned in time upstream) and from 2 DT links (not aligned), and
// hands them, all on the crossing they belong to, to the track finder. The
// track finder itself is not part of this RTL: its inputs are the outputs
// me234_o, me1_o and dt_o, and its three tracks come back on trk_i, one set
// per crossing. Around it this module builds what the board needs:
//   vme_regs      VME slave port and registers (configuration, status)
//   ccb_fast_ctrl CCB fast control, BX counter, L1A and event number
//   sync_monitor  FM_OSY out-of-synch flag from CSC_BC1 and CCB_BC0
//   dt_align      DT_CLK40 to CCB_CLK40 transfer and BX alignment of DT
//   pt_lut_ctrl   address/control of the three 4M x 8 PT LUTs and their
//                 loading from VME through the loading buffer
//   ms_out_fmt    the 40 FPGA-driven bits of the 64-bit Muon Sorter word
//   ms_clk_gen    MX_CLK: CLK80, CLK40-90, CLK40-270 for the GTLP muxes
//   ddu_readout   DT segments and tracks of L1A-selected crossings to DDU
// Timing: CSC segments and bc1 are registered once, like the BX counter, so
// all refer to the same crossing one clock after the pins. trk_i is taken as
// the tracks of the crossing TF_LAT clocks before; the DDU record pairs them
// with the DT segments delayed by the same TF_LAT. The PT LUT addresses and
// the FPGA part of the MS word leave on the same clock edge, one clock after
// trk_i. Bidirectional pins (VM_D) are split into _i, _o and _oe.
// The block list and the pin list follow the board's Main FPGA description;
// TF_LAT, the reset input, the clk160 input and the way blocks are joined
// are this design's choices. The reserved pins (CCB_SPARE, DDU_RSVD,
// FM_SPARE) are not brought out.
module sp_main_fpga
  import sp_main_pkg::*;
#(
  parameter int unsigned TF_LAT = 2     // track finder latency in BX
) (
  // clocks and reset
  input  logic                          ccb_clk40,
  input  logic                          clk160,
  input  logic                          rst,
  // CSC segments
  input  csc_seg_t [N_ME234-1:0]        csc_me234_i,
  input  me1_seg_t [N_ME1-1:0]          csc_me1_i,
  input  logic [N_BC1-1:0]              csc_bc1_i,
  // DT segments
  input  logic [N_DT-1:0]               dt_clk40_i,
  input  dt_seg_t [N_DT-1:0]            dt_seg_i,
  // track finder interface
  output csc_seg_t [N_ME234-1:0]        me234_o,
  output me1_seg_t [N_ME1-1:0]          me1_o,
  output dt_seg_t [N_DT-1:0]            dt_o,
  output logic [BX_W-1:0]               bx_o,
  input  track_t [N_TRK-1:0]            trk_i,
  // PT LUTs and loading buffer
  output logic [N_TRK-1:0][PT_ADDR_W-1:0] pt_a_o,
  output logic [N_TRK-1:0]              pt_ce_n_o,
  output logic [N_TRK-1:0]              pt_we_n_o,
  output logic [N_TRK-1:0][1:0]         pt_oe_n_o,
  output logic [PT_DATA_W-1:0]          buf_d_o,
  output logic [N_TRK-1:0]              buf_oe_n_o,
  output logic                          buf_dir_n_o,
  // Muon Sorter mux
  output logic [N_TRK-1:0][4:0]         sp_phi_o,
  output logic [N_TRK-1:0][4:0]         sp_eta_o,
  output logic [N_TRK-1:0]              sp_halo_o,
  output logic [N_TRK-1:0]              sp_charge_o,
  output logic [1:0]                    sp_bxn_o,
  output logic                          sp_error_o,
  output logic                          sp_spare_o,
  output logic [2:0]                    mx_clk_o,
  // VME
  input  logic [VME_A_W-1:0]            vm_a_i,
  input  logic [VME_D_W-1:0]            vm_d_i,
  output logic [VME_D_W-1:0]            vm_d_o,
  output logic                          vm_d_oe,
  input  logic                          vm_wr_n_i,
  input  logic                          vm_ce_n_i,
  // CCB fast control
  input  logic                          ccb_clken_i,
  input  logic                          ccb_bc0_i,
  input  logic                          ccb_bcr_i,
  input  logic                          ccb_test_i,
  input  logic                          ccb_l1a_i,
  // DDU readout
  output logic [DDU_D_W-1:0]            ddu_d_o,
  output logic [DDU_VP_W-1:0]           ddu_vp_o,
  input  logic                          ddu_rr_i,
  output logic                          ddu_ra_o,
  input  logic                          ddu_st_i,
  // fast monitoring
  output logic                          fm_osy_o
);

  logic clk;
  assign clk = ccb_clk40;

  // ---------------- VME and CCB
  sp_cfg_t  cfg;
  sp_stat_t stat;
  logic     lut_load_req, osy_clr, ovf_clr;

  vme_regs u_vme (
    .clk, .rst, .vm_a(vm_a_i), .vm_d_i, .vm_d_o, .vm_d_oe,
    .vm_wr_n(vm_wr_n_i), .vm_ce_n(vm_ce_n_i), .cfg, .lut_load_req,
    .osy_clr, .ovf_clr, .stat
  );

  logic [BX_W-1:0] bx, evn;
  logic            bc0_err, bcr, l1a, test;

  ccb_fast_ctrl u_ccb (
    .clk, .rst, .ccb_clken(ccb_clken_i), .ccb_bc0(ccb_bc0_i),
    .ccb_bcr(ccb_bcr_i), .ccb_test(ccb_test_i), .ccb_l1a(ccb_l1a_i),
    .bx, .bc0(), .bc0_err, .bcr, .l1a, .test, .evn
  );
  assign bx_o = bx;

  // ---------------- CSC inputs (aligned upstream, registered once)
  logic [N_BC1-1:0] bc1_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      me234_o <= '0;
      me1_o   <= '0;
      bc1_q   <= '0;
    end else begin
      me234_o <= csc_me234_i;
      me1_o   <= csc_me1_i;
      bc1_q   <= csc_bc1_i;
    end
  end

  // ---------------- fast monitoring
  logic [N_BC1:0] osy_src;
  logic           osy;

  sync_monitor u_sync (
    .clk, .rst, .bx, .bc1(bc1_q), .bc1_bx(cfg.bc1_bx), .bc0_err,
    .clr(osy_clr || bcr), .osy, .osy_src
  );
  assign fm_osy_o = osy;

  // ---------------- DT alignment
  logic [N_DT-1:0] bxn_err, fifo_err;
  logic [15:0]     bxn_err_cnt;

  dt_align u_dt (
    .clk, .rst, .dt_clk(dt_clk40_i), .dt_seg_i, .dly(cfg.dt_dly), .bx_lsb(bx[1:0]),
    .dt_seg_o(dt_o), .bxn_err, .fifo_err
  );

  always_ff @(posedge clk) begin
    if (rst)           bxn_err_cnt <= '0;
    else if (|bxn_err) bxn_err_cnt <= bxn_err_cnt + 1'b1;
  end

  // ---------------- PT LUTs
  pt_addr_t [N_TRK-1:0] trk_pt;
  logic                 lut_busy;
  always_comb for (int t = 0; t < N_TRK; t++) trk_pt[t] = trk_i[t].pt;

  pt_lut_ctrl u_lut (
    .clk, .rst, .trk_pt, .load_mode(cfg.lut_load_mode), .load_req(lut_load_req),
    .load_sel(cfg.lut_sel), .load_addr(cfg.lut_addr), .load_data(cfg.lut_data),
    .pt_a(pt_a_o), .pt_ce_n(pt_ce_n_o), .pt_we_n(pt_we_n_o), .pt_oe_n(pt_oe_n_o),
    .buf_d(buf_d_o), .buf_oe_n(buf_oe_n_o), .buf_dir_n(buf_dir_n_o),
    .busy(lut_busy), .done()
  );

  // ---------------- Muon Sorter output
  logic ddu_ovf;

  ms_out_fmt u_ms (
    .clk, .rst, .trk(trk_i), .bx_lsb(bx[1:0]), .err(osy || ddu_ovf || (|fifo_err)),
    .sp_phi(sp_phi_o), .sp_eta(sp_eta_o), .sp_halo(sp_halo_o),
    .sp_charge(sp_charge_o), .sp_bxn(sp_bxn_o), .sp_error(sp_error_o),
    .sp_spare(sp_spare_o)
  );

  ms_clk_gen u_mxclk (.clk160, .rst, .mx_clk(mx_clk_o));

  // ---------------- DDU readout
  dt_seg_t [N_DT-1:0] dt_hist [TF_LAT+1];
  ro_rec_t            rec;
  logic [15:0]        ovf_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k <= TF_LAT; k++) dt_hist[k] <= '0;
    end else begin
      dt_hist[0] <= dt_o;
      for (int k = 1; k <= TF_LAT; k++) dt_hist[k] <= dt_hist[k-1];
    end
  end

  // dt_hist[k] holds dt_o of k+1 clocks ago; TF_LAT = 0 uses dt_o itself
  assign rec.dt  = (TF_LAT == 0) ? dt_o : dt_hist[(TF_LAT == 0) ? 0 : TF_LAT - 1];
  assign rec.trk = trk_i;

  ddu_readout u_ddu (
    .clk, .rst, .rec, .bx, .l1a, .test, .evn, .latency(cfg.l1a_lat),
    .ddu_rr(ddu_rr_i), .ddu_st(ddu_st_i), .ddu_ra(ddu_ra_o), .ddu_d(ddu_d_o),
    .ddu_vp(ddu_vp_o), .ovf_clr, .ovf(ddu_ovf), .ovf_cnt, .evt_count()
  );

  // ---------------- status read back over VME
  assign stat = '{lut_busy: lut_busy, osy: osy, osy_src: osy_src, ddu_ovf: ddu_ovf,
                  bx: bx, evn: evn, ovf_cnt: ovf_cnt, bxn_err_cnt: bxn_err_cnt};

endmodule
