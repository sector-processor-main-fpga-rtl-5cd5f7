// gtlp16617_model -- behavioural model of one LVTTL-to-GTLP registered
// transceiver, A-to-B direction only, for testbenches (not synthesizable).
//
// On each rising CLKAB edge the A inputs are sampled, and the active-low
// output enable /OEAB is sampled too (synchronous output enable). The
// sampled A word appears on B TPD after the edge if the sampled /OEAB was
// low; otherwise B is released (b_drv low). Two such parts with their B
// outputs tied together and their /OEAB driven by opposite-phase 40 MHz
// clocks form the wired 80 MHz multiplexer of the Muon Sorter link.
module gtlp16617_model #(
  parameter int unsigned W   = 17,
  parameter realtime     TPD = 6.7
) (
  input  logic [W-1:0] a,
  input  logic         clkab,
  input  logic         oeab_n,
  output logic [W-1:0] b,
  output logic         b_drv
);
  initial begin b = '0; b_drv = 1'b0; end
  always @(posedge clkab) begin
    b     <= #(TPD) a;
    b_drv <= #(TPD) !oeab_n;
  end
endmodule
