// sp_main_pkg -- widths, record types and shared constants of the Sector
// Processor Main FPGA.
//
// The signal counts and widths (9 ME2-ME4 and 6 ME1 CSC segments, 2 DT
// segments, 3 PT LUTs of 4M x 8, a 16-bit VME port, a 16-bit DDU port and a
// 64-bit Muon Sorter word sent as two 32-bit frames) follow the Main FPGA
// pin budget. The bit order inside each record, the VME register map, the
// orbit length and the Muon Sorter frame layout are this design's choices.
package sp_main_pkg;

  // ---- counts of links and groups
  localparam int unsigned N_ME234 = 9;   // ME2, ME3, ME4 segments
  localparam int unsigned N_ME1   = 6;   // ME1 segments
  localparam int unsigned N_BC1   = 5;   // CSC_BC1 lines: 3 (ME2-ME4) + 2 (ME1)
  localparam int unsigned N_DT    = 2;   // DT links
  localparam int unsigned N_TRK   = 3;   // tracks / PT LUTs / muons to the MS

  // ---- bunch crossing counter
  localparam int unsigned BX_W         = 12;
  localparam int unsigned BX_PER_ORBIT = 3564;  // LHC orbit length in BX

  // ---- PT LUT: 13 + 1 + 4 + 4 = 22 address lines, 8 data lines
  localparam int unsigned PT_ADDR_W = 22;
  localparam int unsigned PT_DATA_W = 8;

  // ---- external buses
  localparam int unsigned VME_A_W  = 12;
  localparam int unsigned VME_D_W  = 16;
  localparam int unsigned DDU_D_W  = 16;
  localparam int unsigned DDU_VP_W = 4;
  localparam int unsigned MS_FRAME_W = 32;

  // ---- CSC segment (CSC_VP, CSC_Q, CSC_PHI, CSC_PHIB, CSC_ETA)
  typedef struct packed {
    logic        vp;
    logic [3:0]  q;
    logic [11:0] phi;
    logic [4:0]  phib;
    logic [6:0]  eta;
  } csc_seg_t;                        // 29 bits

  // ---- ME1 segment carries its chamber id as well
  typedef struct packed {
    csc_seg_t    seg;
    logic [3:0]  id;
  } me1_seg_t;                        // 33 bits

  // ---- DT segment (DT_Q, DT_PHI, DT_PHIB, DT_BXN, DT_Flag, DT_Synch)
  typedef struct packed {
    logic [2:0]  q;
    logic [11:0] phi;
    logic [4:0]  phib;
    logic [1:0]  bxn;
    logic        flag;
    logic        synch;
  } dt_seg_t;                         // 24 bits

  // ---- PT LUT address (PT_DPHI, PT_SIGN, PT_ETA, PT_MODE), MSB first
  typedef struct packed {
    logic [12:0] dphi;
    logic        sign;
    logic [3:0]  eta;
    logic [3:0]  mode;
  } pt_addr_t;                        // 22 bits

  // ---- one reconstructed track as delivered by the track finder
  typedef struct packed {
    pt_addr_t    pt;
    logic [4:0]  phi;
    logic [4:0]  eta;
    logic        halo;
    logic        charge;
  } track_t;                          // 34 bits

  // ---- the FPGA-driven part of the Muon Sorter word
  typedef struct packed {
    logic [N_TRK-1:0][4:0] phi;
    logic [N_TRK-1:0][4:0] eta;
    logic [N_TRK-1:0]      halo;
    logic [N_TRK-1:0]      charge;
    logic [1:0]            bxn;
    logic                  error;
    logic                  spare;
  } ms_fpga_t;                        // 40 bits

  // ---- readout record of one bunch crossing: DT segments and tracks
  localparam int unsigned REC_W = N_DT * $bits(dt_seg_t) + N_TRK * $bits(track_t);  // 150
  typedef struct packed {
    dt_seg_t [N_DT-1:0]  dt;
    track_t  [N_TRK-1:0] trk;
  } ro_rec_t;

  // ---- DDU event: 2 header words + REC_W bits in 16-bit words
  localparam int unsigned DDU_PAY_WORDS = (REC_W + DDU_D_W - 1) / DDU_D_W;  // 10
  localparam int unsigned DDU_EVT_WORDS = 2 + DDU_PAY_WORDS;                 // 12
  localparam logic [3:0]  DDU_HDR_TAG   = 4'hA;
  // DDU_VP bit meaning
  localparam int unsigned VP_VALID = 0;
  localparam int unsigned VP_FIRST = 1;
  localparam int unsigned VP_LAST  = 2;
  localparam int unsigned VP_TEST  = 3;

  // ---- VME register map (word addresses on VM_A)
  typedef enum logic [VME_A_W-1:0] {
    RA_CSR      = 12'h000,  // rw bit0 LUT load mode; w bit1 OSY clear, bit2 overflow clear
    RA_DT_DLY0  = 12'h001,  // rw DT link 0 delay in BX
    RA_DT_DLY1  = 12'h002,  // rw DT link 1 delay in BX
    RA_L1A_LAT  = 12'h003,  // rw L1A latency in BX
    RA_BC1_BX   = 12'h004,  // rw BX at which CSC_BC1 is expected
    RA_LUT_ALO  = 12'h005,  // rw LUT load address [15:0]
    RA_LUT_AHI  = 12'h006,  // rw [5:0] LUT load address [21:16], [9:8] LUT select
    RA_LUT_DAT  = 12'h007,  // rw [7:0] LUT load data; a write starts the SRAM write
    RA_STATUS   = 12'h008,  // r  bit0 LUT busy, bit1 OSY, bit2 DDU overflow, [8:3] OSY sources
    RA_BX       = 12'h009,  // r  BX counter
    RA_EVN      = 12'h00A,  // r  event counter
    RA_OVF_CNT  = 12'h00B,  // r  events lost to a full event buffer
    RA_BXN_ERR  = 12'h00C   // r  DT BXN mismatches
  } vme_reg_e;

  // configuration written over VME
  typedef struct packed {
    logic                     lut_load_mode;
    logic [N_DT-1:0][3:0]     dt_dly;
    logic [7:0]               l1a_lat;
    logic [BX_W-1:0]          bc1_bx;
    logic [PT_ADDR_W-1:0]     lut_addr;
    logic [1:0]               lut_sel;
    logic [PT_DATA_W-1:0]     lut_data;
  } sp_cfg_t;

  // status read back over VME
  typedef struct packed {
    logic                     lut_busy;
    logic                     osy;
    logic [N_BC1:0]           osy_src;
    logic                     ddu_ovf;
    logic [BX_W-1:0]          bx;
    logic [BX_W-1:0]          evn;
    logic [15:0]              ovf_cnt;
    logic [15:0]              bxn_err_cnt;
  } sp_stat_t;

  // ---- Muon Sorter frames as wired at the GTLP transceivers.
  // Frame 0 is sampled 12.5 ns into the crossing and carries only FPGA
  // register outputs; frame 1 is sampled at the end of the crossing and
  // carries the three PT LUT bytes, so the SRAM access may take most of
  // the crossing.
  // frame 0 [31:0]:  muon 1 {phi 5, eta 5, charge, halo},
  //                  muon 2 {phi 5, eta 5, charge, halo},
  //                  muon 3 {eta 5, charge, halo}, error
  // frame 1 [63:32]: pt 1, pt 2, pt 3 (8 each), muon 3 phi 5, BXN 2, spare
  function automatic logic [2*MS_FRAME_W-1:0] ms_frames(
      input ms_fpga_t f, input logic [N_TRK-1:0][PT_DATA_W-1:0] pt);
    return {pt[0], pt[1], pt[2], f.phi[2], f.bxn, f.spare,
            f.phi[0], f.eta[0], f.charge[0], f.halo[0],
            f.phi[1], f.eta[1], f.charge[1], f.halo[1],
            f.eta[2], f.charge[2], f.halo[2], f.error};
  endfunction

endpackage
