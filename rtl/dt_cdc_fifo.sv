// dt_cdc_fifo -- small dual-clock FIFO that carries one DT link's words
// from its own DT_CLK40 into the CCB_CLK40 domain.
//
// Both clocks run at the LHC bunch crossing rate with an unknown, fixed
// phase. The writer stores one word on every wclk edge; the reader starts
// once the FIFO holds two words and then takes one word every rclk edge, so
// the latency settles at a constant number of cycles. Pointers cross the
// domains in Gray code through two flip-flops. rd_valid is high while a word
// is delivered; overflow or underflow (clocks not locked) pulse ovf/udf.
// Depth 2**AW words (default 8: the pointers seen across the domains lag by two clocks, so four words would overflow). This is a helper of dt_align; its
// structure is this design's own.
module dt_cdc_fifo #(
  parameter int unsigned W  = 24,
  parameter int unsigned AW = 3
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic [W-1:0] wdata,
  input  logic         rclk,
  input  logic         rrst,
  output logic [W-1:0] rdata,
  output logic         rd_valid,
  output logic         ovf,
  output logic         udf
);

  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wptr_bin, wptr_gray, rptr_bin, rptr_gray;
  logic [AW:0]  wgray_r1, wgray_r2, rgray_w1, rgray_w2;
  logic [AW:0]  wbin_r, rbin_w, fill_r;
  logic         running;

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---- write side
  assign rbin_w = gray2bin(rgray_w2);
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wptr_bin  <= '0;
      wptr_gray <= '0;
      rgray_w1  <= '0;
      rgray_w2  <= '0;
      ovf       <= 1'b0;
    end else begin
      rgray_w1 <= rptr_gray;
      rgray_w2 <= rgray_w1;
      if ((wptr_bin - rbin_w) == (AW+1)'(2**AW)) begin
        ovf <= 1'b1;                      // full: drop the word
      end else begin
        ovf <= 1'b0;
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= (wptr_bin + 1'b1) ^ ((wptr_bin + 1'b1) >> 1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if ((wptr_bin - rbin_w) != (AW+1)'(2**AW)) mem[wptr_bin[AW-1:0]] <= wdata;
  end

  // ---- read side
  assign wbin_r = gray2bin(wgray_r2);
  assign fill_r = wbin_r - rptr_bin;
  always_ff @(posedge rclk) begin
    if (rrst) begin
      wgray_r1  <= '0;
      wgray_r2  <= '0;
      rptr_bin  <= '0;
      rptr_gray <= '0;
      running   <= 1'b0;
      rd_valid  <= 1'b0;
      udf       <= 1'b0;
      rdata     <= '0;
    end else begin
      wgray_r1 <= wptr_gray;
      wgray_r2 <= wgray_r1;
      udf      <= 1'b0;
      rd_valid <= 1'b0;
      if (!running && fill_r >= (AW+1)'(2)) running <= 1'b1;
      if (running || fill_r >= (AW+1)'(2)) begin
        if (fill_r != '0) begin
          rdata     <= mem[rptr_bin[AW-1:0]];
          rd_valid  <= 1'b1;
          rptr_bin  <= rptr_bin + 1'b1;
          rptr_gray <= (rptr_bin + 1'b1) ^ ((rptr_bin + 1'b1) >> 1);
        end else begin
          udf <= 1'b1;
        end
      end
    end
  end

endmodule
