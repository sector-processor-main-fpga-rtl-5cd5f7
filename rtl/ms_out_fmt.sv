// ms_out_fmt -- FPGA side of the Muon Sorter output.
//
// Every bunch crossing the Sector Processor sends the Muon Sorter a 64-bit
// word as two 32-bit frames at 80 MHz. Of the 64 bits, 24 are the three
// PT LUT bytes, which go from the SRAMs straight to the GTLP transceivers;
// the other 40 are driven here: per track SP_PHI (5), SP_ETA (5), SP_HALO
// and SP_CHARGE, plus SP_BXN (bx_lsb, the 2 LSBs of the BX counter), SP_ERROR and
// SP_SPARE (driven 0). They are registered on the same clock edge as
// pt_lut_ctrl registers the PT LUT addresses of the same tracks, so the
// FPGA bits and the LUT bytes of one crossing sit together on the
// transceiver inputs for the whole 25 ns. The split into frames is made by
// the board wiring; sp_main_pkg::ms_frames gives it.
// Timing: one clock from trk to the pins. The bit counts per field follow
// the pin list; the BXN source and the frame split are this design's own.
module ms_out_fmt
  import sp_main_pkg::*;
#(
  parameter int unsigned NT = N_TRK
) (
  input  logic            clk,
  input  logic            rst,
  input  track_t [NT-1:0] trk,
  input  logic [1:0]    bx_lsb,
  input  logic            err,
  output logic [NT-1:0][4:0] sp_phi,
  output logic [NT-1:0][4:0] sp_eta,
  output logic [NT-1:0]   sp_halo,
  output logic [NT-1:0]   sp_charge,
  output logic [1:0]      sp_bxn,
  output logic            sp_error,
  output logic            sp_spare
);

  always_ff @(posedge clk) begin
    if (rst) begin
      sp_phi    <= '0;
      sp_eta    <= '0;
      sp_halo   <= '0;
      sp_charge <= '0;
      sp_bxn    <= '0;
      sp_error  <= 1'b0;
      sp_spare  <= 1'b0;
    end else begin
      for (int t = 0; t < NT; t++) begin
        sp_phi[t]    <= trk[t].phi;
        sp_eta[t]    <= trk[t].eta;
        sp_halo[t]   <= trk[t].halo;
        sp_charge[t] <= trk[t].charge;
      end
      sp_bxn   <= bx_lsb;
      sp_error <= err;
      sp_spare <= 1'b0;
    end
  end

endmodule
