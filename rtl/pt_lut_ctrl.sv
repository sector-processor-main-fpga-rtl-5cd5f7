// pt_lut_ctrl -- address, control and loading of the three PT LUTs.
//
// Each PT LUT is a 4M x 8 SRAM built from two 4M x 4 chips that share
// address, /CE and /WE and have one /OE line each. The 22 address lines are
// the track finder's PT_DPHI (13), PT_SIGN (1), PT_ETA (4) and PT_MODE (4)
// fields of that track; the byte read out goes straight from the SRAM to the
// Muon Sorter transceivers, not back into the FPGA.
// Run mode (load_mode = 0): every clock the three track addresses are
// registered onto the address pins with /CE and /OE low and /WE high, so a
// new lookup starts every bunch crossing; the data are valid one SRAM access
// time (10-15 ns) after the address changes.
// Load mode (load_mode = 1): all /OE lines are high so the SRAMs release
// their data lines, and a load_req (from a VME write) runs one write cycle
// on LUT load_sel: SETUP (address, /CE, buffer /BUF_OE low with BUF_D
// driven), WRITE (/WE low), HOLD (/WE high, address and data held), one
// 25 ns clock each. The pins are registered and follow the state one clock
// later. busy is high from the clock after load_req until the pins leave
// HOLD (4 clocks); done pulses while the pins are in HOLD. /BUF_DIR low points the buffer from the FPGA to the LUT and is held
// low in load mode. A load_req while busy or outside load mode is ignored.
// The pins and the loading through a buffer follow the board description;
// the write cycle, the address bit order and the two-/OE use are this
// design's choices.
module pt_lut_ctrl
  import sp_main_pkg::*;
#(
  parameter int unsigned NT = N_TRK
) (
  input  logic                        clk,
  input  logic                        rst,
  input  pt_addr_t [NT-1:0]           trk_pt,
  input  logic                        load_mode,
  input  logic                        load_req,
  input  logic [1:0]                  load_sel,
  input  logic [PT_ADDR_W-1:0]        load_addr,
  input  logic [PT_DATA_W-1:0]        load_data,
  output logic [NT-1:0][PT_ADDR_W-1:0] pt_a,
  output logic [NT-1:0]               pt_ce_n,
  output logic [NT-1:0]               pt_we_n,
  output logic [NT-1:0][1:0]          pt_oe_n,
  output logic [PT_DATA_W-1:0]        buf_d,
  output logic [NT-1:0]               buf_oe_n,
  output logic                        buf_dir_n,
  output logic                        busy,
  output logic                        done
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_WRITE, S_HOLD} wstate_e;
  wstate_e                st;
  logic [1:0]             sel;
  logic [PT_ADDR_W-1:0]   waddr;
  logic [PT_DATA_W-1:0]   wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= S_IDLE;
      sel   <= '0;
      waddr <= '0;
      wdata <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (load_mode && load_req && (load_sel < 2'(NT))) begin
          st    <= S_SETUP;
          sel   <= load_sel;
          waddr <= load_addr;
          wdata <= load_data;
        end
        S_SETUP: st <= S_WRITE;
        S_WRITE: st <= S_HOLD;
        S_HOLD: begin
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Pin values follow from the state; they are registered once so every
  // pin changes on the clock edge, one clock after the state.
  logic [NT-1:0][PT_ADDR_W-1:0] a_d;
  logic [NT-1:0]                ce_n_d, we_n_d, boe_n_d;
  logic                         pins_busy;

  always_comb begin
    for (int t = 0; t < NT; t++) begin
      if (!load_mode) begin
        a_d[t]     = trk_pt[t];
        ce_n_d[t]  = 1'b0;
        we_n_d[t]  = 1'b1;
        boe_n_d[t] = 1'b1;
      end else begin
        a_d[t]     = waddr;
        ce_n_d[t]  = !((st != S_IDLE) && (sel == 2'(t)));
        we_n_d[t]  = !((st == S_WRITE) && (sel == 2'(t)));
        boe_n_d[t] = ce_n_d[t];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pt_a      <= '0;
      pt_ce_n   <= '1;
      pt_we_n   <= '1;
      pt_oe_n   <= '1;
      buf_d     <= '0;
      buf_oe_n  <= '1;
      buf_dir_n <= 1'b1;
      pins_busy <= 1'b0;
    end else begin
      pt_a      <= a_d;
      pt_ce_n   <= ce_n_d;
      pt_we_n   <= we_n_d;
      pt_oe_n   <= {NT{{2{load_mode}}}};
      buf_d     <= load_mode ? wdata : '0;
      buf_oe_n  <= boe_n_d;
      buf_dir_n <= !load_mode;
      pins_busy <= (st != S_IDLE);
    end
  end

  assign busy = (st != S_IDLE) || pins_busy;

  // bus rules: a LUT and its loading buffer never drive the data lines
  // together, and /WE is only low on a selected chip with the buffer on
  for (genvar t = 0; t < NT; t++) begin : g_rules
    a_no_contention: assert property (@(posedge clk) disable iff (rst)
      !(pt_oe_n[t] != 2'b11 && !buf_oe_n[t] && !buf_dir_n));
    a_we_with_ce: assert property (@(posedge clk) disable iff (rst)
      !pt_we_n[t] |-> (!pt_ce_n[t] && !buf_oe_n[t] && !buf_dir_n));
  end

endmodule
