// dt_align -- time alignment of the DT track segments.
//
// The CSC segments reach the Main FPGA already aligned; the DT segments do
// not. Each DT link arrives with its own DT_CLK40. Per link, the segment
// word is written on DT_CLK40 into an 8-word dual-clock FIFO (dt_cdc_fifo)
// and read out on CCB_CLK40, then passes through a delay line whose length
// dly[i] (0..2**DLY_W-1 crossings, set over VME) brings it level with the
// CSC segments of the same crossing. At the output, a segment with nonzero
// quality whose DT_BXN differs from the 2 LSBs of the local BX counter
// raises bxn_err[i] for one clock; fifo_err[i] flags FIFO over/underflow.
// Timing: dt_seg_o changes on CCB_CLK40; total latency is the FIFO latency
// (about 5-6 clocks, fixed once running) plus dly[i] + 1 clocks.
// That DT segments need alignment is given; FIFO, delay line and the BXN
// check are this design's way of doing it.
module dt_align
  import sp_main_pkg::*;
#(
  parameter int unsigned NL    = N_DT,
  parameter int unsigned DLY_W = 4,
  parameter int unsigned AW    = 3
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [NL-1:0]         dt_clk,
  input  dt_seg_t [NL-1:0]      dt_seg_i,
  input  logic [NL-1:0][DLY_W-1:0] dly,
  input  logic [1:0]          bx_lsb,
  output dt_seg_t [NL-1:0]      dt_seg_o,
  output logic [NL-1:0]         bxn_err,
  output logic [NL-1:0]         fifo_err
);

  localparam int unsigned DEPTH = 2**DLY_W;

  for (genvar l = 0; l < NL; l++) begin : g_link
    logic       wrst_s1, wrst_s2;   // reset brought into the DT clock domain
    dt_seg_t    f_data;
    logic       f_valid, f_ovf, f_udf;
    dt_seg_t    line [DEPTH];
    dt_seg_t    picked;

    always_ff @(posedge dt_clk[l]) begin
      wrst_s1 <= rst;
      wrst_s2 <= wrst_s1;
    end

    dt_cdc_fifo #(.W($bits(dt_seg_t)), .AW(AW)) u_fifo (
      .wclk(dt_clk[l]), .wrst(wrst_s2), .wdata(dt_seg_i[l]),
      .rclk(clk), .rrst(rst), .rdata(f_data), .rd_valid(f_valid),
      .ovf(f_ovf), .udf(f_udf)
    );

    // delay line: line[0] is the newest word
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int k = 0; k < DEPTH; k++) line[k] <= '0;
      end else begin
        line[0] <= f_valid ? f_data : '0;
        for (int k = 1; k < DEPTH; k++) line[k] <= line[k-1];
      end
    end

    assign picked = line[dly[l]];

    always_ff @(posedge clk) begin
      if (rst) begin
        dt_seg_o[l] <= '0;
        bxn_err[l]  <= 1'b0;
        fifo_err[l] <= 1'b0;
      end else begin
        dt_seg_o[l] <= picked;
        bxn_err[l]  <= (picked.q != '0) && (picked.bxn != bx_lsb);
        fifo_err[l] <= f_ovf || f_udf;
      end
    end
  end

endmodule
