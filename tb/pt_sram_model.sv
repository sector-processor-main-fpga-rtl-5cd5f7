// pt_sram_model -- behavioural model of one PT LUT and its loading buffer,
// for testbenches only (not synthesizable).
//
// One PT LUT is 4M x 8, made of two 4M x 4 asynchronous SRAMs that share
// the address, /CE and /WE lines; /OE[0] enables the low nibble chip and
// /OE[1] the high nibble chip. The loading buffer drives BUF_D onto the
// LUT data lines while its /BUF_OE is low and /BUF_DIR is low. A write
// takes the data lines at the rising edge of /WE while /CE is low. A read
// gives mem[a] TACC after the address or enables change. Unwritten words
// read as the low byte of the address, so reads are predictable.
// d is the data bus as the transceivers see it; d_drv says something
// drives it; contention counts clocks where SRAM and buffer drive at once.
module pt_sram_model #(
  parameter realtime TACC = 4.0
) (
  input  logic [21:0] a,
  input  logic        ce_n,
  input  logic        we_n,
  input  logic [1:0]  oe_n,
  input  logic [7:0]  buf_d,
  input  logic        buf_oe_n,
  input  logic        buf_dir_n,
  output logic [7:0]  d,
  output logic        d_drv,
  output int          contention,
  output int          writes
);
  logic [7:0] mem [int];
  logic [7:0] rd;
  logic       sram_drv, buf_drv;

  initial begin contention = 0; writes = 0; end

  function automatic logic [7:0] peek(input logic [21:0] addr);
    return mem.exists(int'(addr)) ? mem[int'(addr)] : addr[7:0];
  endfunction

  assign sram_drv = !ce_n && we_n && (oe_n != 2'b11);
  assign buf_drv  = !buf_oe_n && !buf_dir_n;

  always @(a, ce_n, we_n, oe_n) begin
    rd <= #(TACC) peek(a);
  end

  always_comb begin
    d = '0;
    if (buf_drv) d = buf_d;
    else if (sram_drv) begin
      if (!oe_n[0]) d[3:0] = rd[3:0];
      if (!oe_n[1]) d[7:4] = rd[7:4];
    end
    d_drv = buf_drv || sram_drv;
  end

  always @(posedge we_n) begin
    if (!ce_n && buf_drv) begin
      mem[int'(a)] = buf_d;
      writes++;
    end
  end

  always @(sram_drv, buf_drv) if (sram_drv && buf_drv) contention++;
endmodule
