// sync_monitor -- fast monitoring: the out-of-synch flag FM_OSY.
//
// Each CSC link sends a BC1 marker ("bunch crossing one") once per orbit.
// The marker must arrive when the local BX counter equals bc1_bx, a value
// set over VME that absorbs the fixed latency of the links. A marker on any
// other crossing, or a BC0 from the CCB that disagrees with the BX counter
// (bc0_err), sets the sticky osy flag and the bit of its source in osy_src
// (bits 0..N_BC1-1: BC1 lines, bit N_BC1: BC0). clr (a VME write or a CCB
// bunch counter reset) clears both.
// Timing: bc1 and bx refer to the same crossing; osy rises one clock later.
// The flag itself is named in the pin list; how it is derived is this
// design's choice.
module sync_monitor
  import sp_main_pkg::*;
#(
  parameter int unsigned NB = N_BC1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [BX_W-1:0] bx,
  input  logic [NB-1:0]   bc1,
  input  logic [BX_W-1:0] bc1_bx,
  input  logic            bc0_err,
  input  logic            clr,
  output logic            osy,
  output logic [NB:0]     osy_src
);

  logic [NB:0] err_now;

  always_comb begin
    for (int i = 0; i < NB; i++) err_now[i] = bc1[i] && (bx != bc1_bx);
    err_now[NB] = bc0_err;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) osy_src <= '0;
    else            osy_src <= osy_src | err_now;
  end

  assign osy = |osy_src;

endmodule
