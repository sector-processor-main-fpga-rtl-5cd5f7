// ms_clk_gen -- the three Muon Sorter mux clocks (MX_CLK).
//
// The GTLP16617 transceivers sample their A inputs at 80 MHz, and their
// /OEAB enables, driven by CLK40-90 and CLK40-270 (the 40 MHz clock shifted
// by 90 and 270 degrees), decide which of the two samples of a crossing
// each transceiver set puts on the wired-OR bus. From a clock four times
// CCB_CLK40 whose phase 0 is the rising edge of CCB_CLK40, a 2-bit phase
// counter gives (phase 0..3, one quarter of a crossing each):
//   mx_clk[2] CLK80      high in phases 0 and 2
//   mx_clk[1] CLK40-90   high in phases 1 and 2
//   mx_clk[0] CLK40-270  high in phases 3 and 0
// All three are flip-flop outputs, so they are free of glitches. While rst
// is high the outputs hold the phase-0 values; after the last clk160 edge
// with rst high, the n-th edge starts phase n mod 4. Releasing rst so that
// its last edge is a CCB_CLK40 rising edge aligns the phases to that clock.
// The clock names and their use follow the transceiver description; the
// bit order and the 4x clock source are this design's choices.
module ms_clk_gen (
  input  logic       clk160,
  input  logic       rst,
  output logic [2:0] mx_clk
);

  logic [1:0] ph;

  always_ff @(posedge clk160) begin
    if (rst) ph <= 2'd1;       // first phase after release is phase 1
    else     ph <= ph + 2'd1;
  end

  always_ff @(posedge clk160) begin
    if (rst) begin
      mx_clk <= 3'b101;        // values of phase 0
    end else begin
      // the counter's next phase is ph, registered outputs show ph
      mx_clk[2] <= (ph == 2'd0) || (ph == 2'd2);
      mx_clk[1] <= (ph == 2'd1) || (ph == 2'd2);
      mx_clk[0] <= (ph == 2'd3) || (ph == 2'd0);
    end
  end

endmodule
