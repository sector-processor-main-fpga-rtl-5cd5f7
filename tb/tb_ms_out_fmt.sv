// tb_ms_out_fmt -- self-checking testbench of ms_out_fmt.
// Random tracks, BX and error every clock; checks that each Muon Sorter
// field shows the value of the clock before (one-clock latency) and that
// the package's frame packing places the fields as documented (PT bytes
// all in frame 1).
module tb_ms_out_fmt;
  import sp_main_pkg::*;

  logic clk = 0, rst = 1;
  track_t [N_TRK-1:0] trk, trk_q;
  logic [1:0] bx_lsb, bx_q;
  logic err, err_q;
  logic [N_TRK-1:0][4:0] sp_phi, sp_eta;
  logic [N_TRK-1:0] sp_halo, sp_charge;
  logic [1:0] sp_bxn;
  logic sp_error, sp_spare;
  int checks = 0, failures = 0;

  ms_out_fmt dut (.clk, .rst, .trk, .bx_lsb, .err, .sp_phi, .sp_eta, .sp_halo,
    .sp_charge, .sp_bxn, .sp_error, .sp_spare);

  always #12.5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trk = '0; bx_lsb = 0; err = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      for (int t = 0; t < N_TRK; t++) trk[t] = track_t'({$urandom, $urandom});
      bx_lsb = 2'(cyc); err = ($urandom_range(0, 9) == 0);
      trk_q = trk; bx_q = bx_lsb; err_q = err;
      @(posedge clk); #1;
      for (int t = 0; t < N_TRK; t++) begin
        check("phi", sp_phi[t], trk_q[t].phi);
        check("eta", sp_eta[t], trk_q[t].eta);
        check("halo", sp_halo[t], trk_q[t].halo);
        check("charge", sp_charge[t], trk_q[t].charge);
      end
      check("bxn", sp_bxn, bx_q);
      check("error", sp_error, err_q);
      check("spare", sp_spare, 0);
      @(negedge clk);
    end
    // frame packing: field positions worked out by hand
    begin
      ms_fpga_t f;
      logic [N_TRK-1:0][7:0] pt;
      logic [63:0] w;
      f = '0; pt = '0;
      f.phi[0] = 5'h1F; pt[0] = 8'hA5; f.halo[1] = 1'b1; pt[1] = 8'h3C; f.bxn = 2'b10; f.eta[2] = 5'h11;
      w = ms_frames(f, pt);
      check("frame1 pt1", w[63:56], 8'hA5);
      check("frame1 pt2", w[55:48], 8'h3C);
      check("frame0 muon1 phi", w[31:27], 5'h1F);
      check("frame0 muon2 halo", w[8], 1);
      check("frame1 bxn", w[34:33], 2'b10);
      check("frame0 muon3 eta", w[7:3], 5'h11);
      check("other bits zero", w & ~64'hFFFF_0006_F800_01F8, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
