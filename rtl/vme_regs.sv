// vme_regs -- VME slave port and register file of the Main FPGA.
//
// The board's VME interface presents a 16-bit data bus VM_D, a 12-bit word
// address VM_A and the active-low strobes /VM_WR and /VM_CE to the FPGA.
// /VM_CE low frames one access and /VM_WR low during it makes the access a
// write. Both strobes are asynchronous to CCB_CLK40 and are synchronised
// with two flip-flops; address and data are taken on the synchronised
// falling edge of /VM_CE, so they must be stable for three clock periods
// after /VM_CE falls. A write updates the addressed register at that edge;
// writing RA_LUT_DAT also issues a one-clock lut_load_req, and CSR bits 1
// and 2 issue osy_clr and ovf_clr pulses. During a read (/VM_CE low,
// /VM_WR high, after synchronisation) vm_d_oe is high and vm_d_o holds the
// addressed register, refreshed every clock. Unmapped addresses read 0.
// The pin set follows the board's VME interface; the cycle timing and the
// register map (sp_main_pkg::vme_reg_e) are this design's own.
module vme_regs
  import sp_main_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [VME_A_W-1:0] vm_a,
  input  logic [VME_D_W-1:0] vm_d_i,
  output logic [VME_D_W-1:0] vm_d_o,
  output logic               vm_d_oe,
  input  logic               vm_wr_n,
  input  logic               vm_ce_n,
  output sp_cfg_t            cfg,
  output logic               lut_load_req,
  output logic               osy_clr,
  output logic               ovf_clr,
  input  sp_stat_t           stat
);

  logic [2:0] ce_sync;   // [0],[1] synchroniser, [2] previous value
  logic [1:0] wr_sync;
  logic       ce_fall, rd_active;
  logic [VME_D_W-1:0] rd_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      ce_sync <= '1;
      wr_sync <= '1;
    end else begin
      ce_sync <= {ce_sync[1], ce_sync[0], vm_ce_n};
      wr_sync <= {wr_sync[0], vm_wr_n};
    end
  end

  assign ce_fall   = ce_sync[2] && !ce_sync[1];
  assign rd_active = !ce_sync[1] && wr_sync[1];

  // register writes
  always_ff @(posedge clk) begin
    lut_load_req <= 1'b0;
    osy_clr      <= 1'b0;
    ovf_clr      <= 1'b0;
    if (rst) begin
      cfg <= '0;
    end else if (ce_fall && !wr_sync[1]) begin
      unique case (vm_a)
        RA_CSR: begin
          cfg.lut_load_mode <= vm_d_i[0];
          osy_clr           <= vm_d_i[1];
          ovf_clr           <= vm_d_i[2];
        end
        RA_DT_DLY0: cfg.dt_dly[0] <= vm_d_i[3:0];
        RA_DT_DLY1: cfg.dt_dly[1] <= vm_d_i[3:0];
        RA_L1A_LAT: cfg.l1a_lat   <= vm_d_i[7:0];
        RA_BC1_BX:  cfg.bc1_bx    <= vm_d_i[BX_W-1:0];
        RA_LUT_ALO: cfg.lut_addr[15:0] <= vm_d_i;
        RA_LUT_AHI: begin
          cfg.lut_addr[PT_ADDR_W-1:16] <= vm_d_i[PT_ADDR_W-17:0];
          cfg.lut_sel                  <= vm_d_i[9:8];
        end
        RA_LUT_DAT: begin
          cfg.lut_data <= vm_d_i[PT_DATA_W-1:0];
          lut_load_req <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  // read multiplexer
  always_comb begin
    rd_data = '0;
    unique case (vm_a)
      RA_CSR:     rd_data[0]   = cfg.lut_load_mode;
      RA_DT_DLY0: rd_data[3:0] = cfg.dt_dly[0];
      RA_DT_DLY1: rd_data[3:0] = cfg.dt_dly[1];
      RA_L1A_LAT: rd_data[7:0] = cfg.l1a_lat;
      RA_BC1_BX:  rd_data[BX_W-1:0] = cfg.bc1_bx;
      RA_LUT_ALO: rd_data = cfg.lut_addr[15:0];
      RA_LUT_AHI: rd_data = {6'b0, cfg.lut_sel, 2'b0, cfg.lut_addr[PT_ADDR_W-1:16]};
      RA_LUT_DAT: rd_data[PT_DATA_W-1:0] = cfg.lut_data;
      RA_STATUS:  rd_data[N_BC1+3:0] = {stat.osy_src, stat.ddu_ovf, stat.osy, stat.lut_busy};
      RA_BX:      rd_data[BX_W-1:0] = stat.bx;
      RA_EVN:     rd_data[BX_W-1:0] = stat.evn;
      RA_OVF_CNT: rd_data = stat.ovf_cnt;
      RA_BXN_ERR: rd_data = stat.bxn_err_cnt;
      default:    rd_data = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vm_d_o  <= '0;
      vm_d_oe <= 1'b0;
    end else begin
      vm_d_o  <= rd_data;
      vm_d_oe <= rd_active;
    end
  end

endmodule
