// tb_pt_lut_ctrl -- self-checking testbench of pt_lut_ctrl.
// Three PT LUT models (pt_sram_model) hang on the controller's pins.
// Run mode: random track addresses every clock; checks they reach the
// address pins one clock later with /CE, /OE low and /WE high, and that
// each LUT returns the word stored at that address. Load mode: writes
// random bytes to random addresses of random LUTs, checks the pin sequence
// of each write cycle clock by clock (SETUP, WRITE, HOLD), busy and done,
// then switches back to run mode and reads the written words through the
// lookup path. Also checks that SRAMs and buffer never drive together.
module tb_pt_lut_ctrl;
  import sp_main_pkg::*;

  logic clk = 0, rst = 1;
  pt_addr_t [N_TRK-1:0] trk_pt;
  logic load_mode, load_req;
  logic [1:0] load_sel;
  logic [PT_ADDR_W-1:0] load_addr;
  logic [PT_DATA_W-1:0] load_data;
  logic [N_TRK-1:0][PT_ADDR_W-1:0] pt_a;
  logic [N_TRK-1:0] pt_ce_n, pt_we_n, buf_oe_n;
  logic [N_TRK-1:0][1:0] pt_oe_n;
  logic [PT_DATA_W-1:0] buf_d;
  logic buf_dir_n, busy, done;
  logic [N_TRK-1:0][7:0] lut_d;
  logic [N_TRK-1:0] lut_drv;
  int contention [N_TRK];
  int writes [N_TRK];
  int checks = 0, failures = 0;

  pt_lut_ctrl dut (.clk, .rst, .trk_pt, .load_mode, .load_req, .load_sel, .load_addr,
    .load_data, .pt_a, .pt_ce_n, .pt_we_n, .pt_oe_n, .buf_d, .buf_oe_n, .buf_dir_n,
    .busy, .done);

  for (genvar t = 0; t < N_TRK; t++) begin : g_lut
    pt_sram_model u_sram (.a(pt_a[t]), .ce_n(pt_ce_n[t]), .we_n(pt_we_n[t]), .oe_n(pt_oe_n[t]),
      .buf_d, .buf_oe_n(buf_oe_n[t]), .buf_dir_n, .d(lut_d[t]), .d_drv(lut_drv[t]),
      .contention(contention[t]), .writes(writes[t]));
  end

  always #12.5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference contents
  logic [7:0] ref_mem [N_TRK][int];
  function automatic logic [7:0] ref_rd(int t, logic [21:0] a);
    return ref_mem[t].exists(int'(a)) ? ref_mem[t][int'(a)] : a[7:0];
  endfunction

  int          c0 [N_TRK];
  logic [21:0] wa [16];
  int          wl [16];

  task automatic run_lookups(int n);
    pt_addr_t [N_TRK-1:0] q;
    for (int i = 0; i < n; i++) begin
      for (int t = 0; t < N_TRK; t++) begin
        if (i % 2 == 0 && t == wl[i % 16]) trk_pt[t] = wa[i % 16];   // revisit written words
        else trk_pt[t] = pt_addr_t'($urandom);
      end
      q = trk_pt;
      @(posedge clk); #1;
      for (int t = 0; t < N_TRK; t++) begin
        check("run address", pt_a[t], q[t]);
        check("run ce_n", pt_ce_n[t], 0);
        check("run we_n", pt_we_n[t], 1);
        check("run oe_n", pt_oe_n[t], 0);
        check("run buf_oe_n", buf_oe_n[t], 1);
      end
      #10;   // within the crossing, after the SRAM access time
      for (int t = 0; t < N_TRK; t++) check("lookup data", lut_d[t], ref_rd(t, q[t]));
      @(negedge clk);
    end
  endtask

  initial begin
    trk_pt = '0; load_mode = 0; load_req = 0; load_sel = 0; load_addr = 0; load_data = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    c0 = contention;     // pins are random before the first reset clock
    for (int i = 0; i < 16; i++) begin wa[i] = 22'($urandom); wl[i] = $urandom_range(0, 2); end
    run_lookups(50);
    // ---- load mode
    load_mode = 1;
    repeat (2) @(negedge clk);
    check("load mode oe_n", pt_oe_n, 6'h3F);
    check("load mode buf_dir_n", buf_dir_n, 0);
    for (int i = 0; i < 16; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      load_sel = 2'(wl[i]); load_addr = wa[i]; load_data = v; load_req = 1;
      @(negedge clk); load_req = 0;
      load_data = 8'($urandom); load_addr = 22'($urandom);   // inputs may change now
      check("busy", busy, 1);
      // pins: SETUP, WRITE, HOLD on the next three clocks
      for (int ph = 0; ph < 3; ph++) begin
        @(posedge clk); #1;
        for (int t = 0; t < N_TRK; t++) begin
          bit me;
          me = (t == wl[i]);
          check("load ce_n", pt_ce_n[t], int'(!me));
          check("load buf_oe_n", buf_oe_n[t], int'(!me));
          check("load we_n", pt_we_n[t], int'(!(me && ph == 1)));
          if (me) check("load address", pt_a[t], wa[i]);
        end
        check("load buf_d", buf_d, v);
        check("done", done, int'(ph == 2));
      end
      @(posedge clk); #1;
      check("idle after write", busy, 0);
      check("idle ce_n", pt_ce_n, 3'h7);
      ref_mem[wl[i]][int'(wa[i])] = v;
      @(negedge clk);
    end
    // a request outside load mode is ignored
    load_mode = 0;
    @(negedge clk);
    load_req = 1; load_sel = 0; @(negedge clk); load_req = 0;
    check("no write in run mode", busy, 0);
    run_lookups(200);
    for (int t = 0; t < N_TRK; t++) check("no bus contention", contention[t] - c0[t], 0);
    check("writes done", writes[0] + writes[1] + writes[2], 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
