// ccb_fast_ctrl -- CCB fast control receiver and bunch crossing counter.
//
// The CCB lines (CCB_CLKEN, CCB_BC0, CCB_BCR, CCB_TEST, CCB_L1A) are
// registered once on CCB_CLK40. The BX counter counts 0 .. BX_PER_ORBIT-1
// and wraps; CCB_BCR loads it with 0 so that the next crossing is BX 1
// (the crossing of the BCR itself is BX 0). CCB_BC0 marks the first crossing
// of an orbit: if the counter is not 0 on that crossing, bc0_err pulses.
// CCB_L1A and CCB_TEST become one-cycle pulses (level inputs, one crossing
// each) together with the BX of the crossing they arrived on, and each L1A
// or test request increments the 12-bit event number.
// CCB_CLKEN gates the counter and the pulses: while it is low nothing moves.
// Timing: all outputs are registered; bx, l1a, test and bc0_err refer to the
// same crossing and appear one clock after the CCB lines.
// The line names follow the CCB pin list; the orbit length, the use of
// CLKEN and the BC0 check are this design's own choices.
module ccb_fast_ctrl
  import sp_main_pkg::*;
#(
  parameter int unsigned BX_ORBIT = BX_PER_ORBIT
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ccb_clken,
  input  logic            ccb_bc0,
  input  logic            ccb_bcr,
  input  logic            ccb_test,
  input  logic            ccb_l1a,
  output logic [BX_W-1:0] bx,        // BX number of the current crossing
  output logic            bc0,       // BC0 seen on this crossing
  output logic            bc0_err,   // BC0 seen while bx != 0
  output logic            bcr,       // BCR seen on this crossing
  output logic            l1a,       // L1A pulse
  output logic            test,      // test request pulse
  output logic [BX_W-1:0] evn        // number of L1A + test requests so far
);

  logic [BX_W-1:0] bx_next;

  always_comb begin
    if (ccb_bcr)                        bx_next = '0;
    else if (bx == BX_W'(BX_ORBIT - 1)) bx_next = '0;
    else                                bx_next = bx + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bx      <= '0;
      bc0     <= 1'b0;
      bc0_err <= 1'b0;
      bcr     <= 1'b0;
      l1a     <= 1'b0;
      test    <= 1'b0;
      evn     <= '0;
    end else if (ccb_clken) begin
      bx      <= bx_next;
      bc0     <= ccb_bc0;
      bc0_err <= ccb_bc0 && (bx_next != '0);
      bcr     <= ccb_bcr;
      l1a     <= ccb_l1a;
      test    <= ccb_test && !ccb_l1a;
      if (ccb_l1a || ccb_test) evn <= evn + 1'b1;
    end else begin
      bc0     <= 1'b0;
      bc0_err <= 1'b0;
      bcr     <= 1'b0;
      l1a     <= 1'b0;
      test    <= 1'b0;
    end
  end

endmodule
