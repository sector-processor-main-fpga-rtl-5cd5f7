// tb_sp_main_fpga -- end-to-end testbench of the Main FPGA at its default
// parameters, with models of the board around it.
//
// Board models: three PT LUTs with loading buffer (pt_sram_model, 15 ns
// access, the slowest part allowed), four GTLP16617 transceivers (gtlp16617_model) wired as the
// 80 MHz Muon Sorter multiplexer, VME master tasks, a CCB driver, two DT
// links on their own clocks, CSC links, a DDU reader, and a stand-in for
// the track finder that sends random tracks (a third of them at PT LUT
// addresses loaded during the test). Board wires from the FPGA pins have
// 1 ns delay.
// Sequence: reset, BCR; VME setup; PT LUT loading in load mode; DT delay
// calibration (scan the delay until the DT BXN check stops counting);
// BC1 markers on the expected crossing and one on a wrong crossing
// (FM_OSY), clear over VME; run mode with L1As and test requests, the DDU
// first idle (event buffer overflow) and then reading. Checked: CSC
// segments reach the track finder one clock after the pins, every 64-bit
// Muon Sorter word rebuilt from the two 32-bit frames on the transceiver
// bus (PT bytes from the LUTs, other fields from the tracks), every DDU
// event word, the overflow count, VME read-back. Each mechanism is counted
// and one that never happened counts as a failure.
module tb_sp_main_fpga;
  import sp_main_pkg::*;

  // ---------------- clocks
  logic clk160 = 0, clk40 = 0, rst = 1;
  logic [N_DT-1:0] dt_clk = '0;
  always #3.125 clk160 = ~clk160;
  initial begin #3.125 clk40 = 1; forever #12.5 clk40 = ~clk40; end
  initial begin #7;  forever #12.5 dt_clk[0] = ~dt_clk[0]; end
  initial begin #19; forever #12.5 dt_clk[1] = ~dt_clk[1]; end

  // ---------------- DUT
  csc_seg_t [N_ME234-1:0] csc_me234_i, me234_o;
  me1_seg_t [N_ME1-1:0]   csc_me1_i, me1_o;
  logic [N_BC1-1:0]       csc_bc1_i;
  dt_seg_t [N_DT-1:0]     dt_seg_i, dt_o;
  logic [BX_W-1:0]        bx_o;
  track_t [N_TRK-1:0]     trk_i;
  logic [N_TRK-1:0][PT_ADDR_W-1:0] pt_a;
  logic [N_TRK-1:0]       pt_ce_n, pt_we_n, buf_oe_n;
  logic [N_TRK-1:0][1:0]  pt_oe_n;
  logic [PT_DATA_W-1:0]   buf_d;
  logic                   buf_dir_n;
  logic [N_TRK-1:0][4:0]  sp_phi, sp_eta;
  logic [N_TRK-1:0]       sp_halo, sp_charge;
  logic [1:0]             sp_bxn;
  logic                   sp_error, sp_spare;
  logic [2:0]             mx_clk;
  logic [VME_A_W-1:0]     vm_a;
  logic [VME_D_W-1:0]     vm_d_i, vm_d_o;
  logic                   vm_d_oe, vm_wr_n, vm_ce_n;
  logic ccb_clken, ccb_bc0, ccb_bcr, ccb_test, ccb_l1a;
  logic [DDU_D_W-1:0]     ddu_d;
  logic [DDU_VP_W-1:0]    ddu_vp;
  logic ddu_rr, ddu_ra, ddu_st, fm_osy;

  sp_main_fpga dut (
    .ccb_clk40(clk40), .clk160, .rst,
    .csc_me234_i, .csc_me1_i, .csc_bc1_i, .dt_clk40_i(dt_clk), .dt_seg_i,
    .me234_o, .me1_o, .dt_o, .bx_o, .trk_i,
    .pt_a_o(pt_a), .pt_ce_n_o(pt_ce_n), .pt_we_n_o(pt_we_n), .pt_oe_n_o(pt_oe_n),
    .buf_d_o(buf_d), .buf_oe_n_o(buf_oe_n), .buf_dir_n_o(buf_dir_n),
    .sp_phi_o(sp_phi), .sp_eta_o(sp_eta), .sp_halo_o(sp_halo), .sp_charge_o(sp_charge),
    .sp_bxn_o(sp_bxn), .sp_error_o(sp_error), .sp_spare_o(sp_spare), .mx_clk_o(mx_clk),
    .vm_a_i(vm_a), .vm_d_i, .vm_d_o, .vm_d_oe, .vm_wr_n_i(vm_wr_n), .vm_ce_n_i(vm_ce_n),
    .ccb_clken_i(ccb_clken), .ccb_bc0_i(ccb_bc0), .ccb_bcr_i(ccb_bcr),
    .ccb_test_i(ccb_test), .ccb_l1a_i(ccb_l1a),
    .ddu_d_o(ddu_d), .ddu_vp_o(ddu_vp), .ddu_rr_i(ddu_rr), .ddu_ra_o(ddu_ra),
    .ddu_st_i(ddu_st), .fm_osy_o(fm_osy)
  );

  // ---------------- bookkeeping
  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  typedef enum int {M_LUT_LOAD, M_LUT_HIT, M_MS_WORD, M_DT_ALIGN, M_BXN_MISMATCH,
                    M_OSY_SET, M_OSY_CLEAR, M_L1A_EVENT, M_TEST_EVENT, M_DDU_OVERFLOW,
                    M_VME_READ, M_MODE_SWITCH, M_NUM} mech_e;
  int mech [M_NUM];

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- board wiring delays
  logic [N_TRK-1:0][PT_ADDR_W-1:0] pt_a_w;
  logic [N_TRK-1:0] pt_ce_n_w, pt_we_n_w, buf_oe_n_w;
  logic [N_TRK-1:0][1:0] pt_oe_n_w;
  logic [PT_DATA_W-1:0] buf_d_w;
  logic buf_dir_n_w;
  ms_fpga_t fpga_bits, fpga_bits_w;
  logic clk80_w, oe90_w, oe270_w;

  always @* fpga_bits = '{phi: sp_phi, eta: sp_eta, halo: sp_halo, charge: sp_charge,
                          bxn: sp_bxn, error: sp_error, spare: sp_spare};
  always @(pt_a, pt_ce_n, pt_we_n, pt_oe_n, buf_d, buf_oe_n, buf_dir_n, fpga_bits) begin
    pt_a_w <= #1 pt_a; pt_ce_n_w <= #1 pt_ce_n; pt_we_n_w <= #1 pt_we_n;
    pt_oe_n_w <= #1 pt_oe_n; buf_d_w <= #1 buf_d; buf_oe_n_w <= #1 buf_oe_n;
    buf_dir_n_w <= #1 buf_dir_n; fpga_bits_w <= #1 fpga_bits;
  end
  always @(mx_clk) begin
    clk80_w <= #0.5 mx_clk[2];
    oe90_w  <= #1   mx_clk[1];
    oe270_w <= #1   mx_clk[0];
  end

  // ---------------- PT LUTs
  logic [N_TRK-1:0][7:0] lut_d;
  logic [N_TRK-1:0] lut_drv;
  int lut_cont [N_TRK];
  int lut_writes [N_TRK];
  for (genvar t = 0; t < N_TRK; t++) begin : g_lut
    pt_sram_model #(.TACC(15.0)) u_lut (.a(pt_a_w[t]), .ce_n(pt_ce_n_w[t]), .we_n(pt_we_n_w[t]),
      .oe_n(pt_oe_n_w[t]), .buf_d(buf_d_w), .buf_oe_n(buf_oe_n_w[t]), .buf_dir_n(buf_dir_n_w),
      .d(lut_d[t]), .d_drv(lut_drv[t]), .contention(lut_cont[t]), .writes(lut_writes[t]));
  end

  // ---------------- GTLP multiplexer: frame 0 set enabled by CLK40-270,
  // frame 1 set by CLK40-90; B outputs wired together
  logic [63:0] a_word;
  logic [3:0][16:0] gb;
  logic [3:0] gdrv;
  logic [31:0] ms_bus;
  logic ms_cont;
  assign a_word = ms_frames(fpga_bits_w, lut_d);
  gtlp16617_model u_g0 (.a(a_word[16:0]),  .clkab(clk80_w), .oeab_n(oe270_w), .b(gb[0]), .b_drv(gdrv[0]));
  gtlp16617_model u_g1 (.a({2'b0, a_word[31:17]}), .clkab(clk80_w), .oeab_n(oe270_w), .b(gb[1]), .b_drv(gdrv[1]));
  gtlp16617_model u_g2 (.a(a_word[48:32]), .clkab(clk80_w), .oeab_n(oe90_w), .b(gb[2]), .b_drv(gdrv[2]));
  gtlp16617_model u_g3 (.a({2'b0, a_word[63:49]}), .clkab(clk80_w), .oeab_n(oe90_w), .b(gb[3]), .b_drv(gdrv[3]));
  always_comb begin
    ms_bus = '0;
    if (gdrv[0]) ms_bus[16:0]  |= gb[0];
    if (gdrv[1]) ms_bus[31:17] |= gb[1][14:0];
    if (gdrv[2]) ms_bus[16:0]  |= gb[2];
    if (gdrv[3]) ms_bus[31:17] |= gb[3][14:0];
    ms_cont = (gdrv[0] || gdrv[1]) && (gdrv[2] || gdrv[3]);
  end

  // ---------------- reference PT LUT contents
  logic [7:0] ref_lut [N_TRK][int];
  function automatic logic [7:0] ref_rd(int t, logic [21:0] a);
    return ref_lut[t].exists(int'(a)) ? ref_lut[t][int'(a)] : a[7:0];
  endfunction
  logic [21:0] loaded_a [N_TRK][$];

  // ---------------- per-clock history (index = clock edge number)
  int edge_n = 0;
  logic [BX_W-1:0] h_bx [int];
  track_t [N_TRK-1:0] h_trk [int];
  dt_seg_t [N_DT-1:0] h_dt [int];
  csc_seg_t [N_ME234-1:0] h_me234 [int];
  me1_seg_t [N_ME1-1:0] h_me1 [int];
  bit run_checks = 0;

  // sample inputs of the coming edge on the falling edge
  always @(negedge clk40) begin
    h_bx[edge_n + 1]    = bx_o;      // BX register value seen at that edge
    h_trk[edge_n + 1]   = trk_i;
    h_dt[edge_n + 1]    = dt_o;
    h_me234[edge_n + 1] = csc_me234_i;
    h_me1[edge_n + 1]   = csc_me1_i;
  end
  always @(posedge clk40) edge_n++;

  // CSC segments reach the track finder one clock after the pins
  always @(negedge clk40) if (run_checks) begin
    check("me234 to track finder", me234_o, h_me234[edge_n]);
    check("me1 to track finder", me1_o, h_me1[edge_n]);
  end

  // ---------------- track finder stand-in (registered, random tracks)
  bit trk_use_loaded = 0;
  always @(posedge clk40) begin
    track_t [N_TRK-1:0] n;
    for (int t = 0; t < N_TRK; t++) begin
      n[t] = track_t'({$urandom, $urandom});
      if (trk_use_loaded && loaded_a[t].size() > 0 && $urandom_range(0, 2) == 0)
        n[t].pt = pt_addr_t'(loaded_a[t][$urandom_range(0, loaded_a[t].size() - 1)]);
    end
    trk_i <= n;
  end

  // ---------------- CSC and DT sources
  int dt_seq [N_DT];
  int dt_bxn_off = 0;
  for (genvar l = 0; l < N_DT; l++) begin : g_dt
    always @(posedge dt_clk[l]) begin
      #2;
      dt_seq[l]++;
      dt_seg_i[l].q     = 3'(1 + dt_seq[l] % 7);
      dt_seg_i[l].phi   = 12'(dt_seq[l]);
      dt_seg_i[l].phib  = 5'(dt_seq[l]);
      dt_seg_i[l].bxn   = 2'(dt_seq[l] + dt_bxn_off);
      dt_seg_i[l].flag  = 1'b0;
      dt_seg_i[l].synch = 1'b0;
    end
  end
  always @(negedge clk40) begin
    for (int i = 0; i < N_ME234; i++) csc_me234_i[i] = csc_seg_t'($urandom);
    for (int i = 0; i < N_ME1; i++)   csc_me1_i[i]   = me1_seg_t'({$urandom, $urandom});
  end

  // ---------------- Muon Sorter word check
  // Word launched at edge k: FPGA bits and LUT bytes of trk sampled at k.
  // Frame 0 is on the bus 19.2..31.7 ns after edge k, frame 1 31.7..44.2 ns.
  task automatic check_word();
    int k;
    track_t [N_TRK-1:0] tr;
    logic [1:0] bxn;
    logic [N_TRK-1:0][7:0] pt;
    ms_fpga_t f;
    logic [63:0] w;
    logic [31:0] fr0, fr1;
    bit hit;
    #2;
    k = edge_n;                       // this edge's number
    tr = h_trk[k];
    bxn = 2'(h_bx[k]);
    hit = 0;
    for (int t = 0; t < N_TRK; t++) begin
      pt[t] = ref_rd(t, tr[t].pt);
      if (ref_lut[t].exists(int'(tr[t].pt))) hit = 1;
      f.phi[t] = tr[t].phi; f.eta[t] = tr[t].eta; f.halo[t] = tr[t].halo; f.charge[t] = tr[t].charge;
    end
    f.bxn = bxn; f.error = sp_error; f.spare = 1'b0;
    w = ms_frames(f, pt);
    #19.875 fr0 = ms_bus;     // 21.875 ns after the edge
    check("ms frame 0", fr0, w[31:0]);
    #12.5 fr1 = ms_bus;       // 34.375 ns after the edge
    check("ms frame 1", fr1, w[63:32]);
    check("ms bus contention", ms_cont, 0);
    if (fr0 == w[31:0] && fr1 == w[63:32]) begin
      mech[M_MS_WORD]++;
      if (hit) mech[M_LUT_HIT]++;
    end
  endtask
  // in load mode the LUTs do not drive their outputs: no valid MS words
  bit lut_mode = 0;
  always @(posedge clk40) if (run_checks && !lut_mode && !dut.cfg.lut_load_mode) fork check_word(); join_none

  // ---------------- VME master
  task automatic vme_write(input logic [11:0] a, input logic [15:0] d);
    #($urandom_range(3, 17));
    vm_a = a; vm_d_i = d; vm_wr_n = 0;
    #7 vm_ce_n = 0;
    #150 vm_ce_n = 1;
    #5 vm_wr_n = 1;
    #100;
  endtask
  task automatic vme_read(input logic [11:0] a, output logic [15:0] d);
    #($urandom_range(3, 17));
    vm_a = a; vm_wr_n = 1;
    #7 vm_ce_n = 0;
    #150;
    check("vm_d_oe in read", vm_d_oe, 1);
    d = vm_d_o;
    vm_ce_n = 1;
    #100;
    mech[M_VME_READ]++;
  endtask

  // ---------------- DDU reader and expected events
  typedef logic [DDU_D_W-1:0] words_t [$];
  words_t exp_ev [$];
  int n_trig = 0;
  bit ddu_reading = 0;
  localparam int PAY_BITS = DDU_PAY_WORDS * DDU_D_W;
  int lat = 20;

  // An L1A driven before edge c is registered by the CCB block at edge c and
  // reaches the readout at edge c+1, which reads the record written at edge
  // c+1-latency: DT segments of TF_LAT (2) clocks earlier and that edge's tracks.
  function automatic void expect_event(int c, bit is_test);
    int e;
    ro_rec_t r;
    logic [PAY_BITS-1:0] pay;
    words_t w;
    e = c + 1 - lat;
    r.dt = h_dt[e - 2];
    r.trk = h_trk[e];
    pay = {r, (PAY_BITS - REC_W)'(0)};
    n_trig++;
    w.push_back({DDU_HDR_TAG, 12'(n_trig)});
    w.push_back({3'b000, is_test, h_bx[e]});
    for (int k = DDU_PAY_WORDS - 1; k >= 0; k--) w.push_back(pay[16*k +: 16]);
    exp_ev.push_back(w);
  endfunction

  task automatic ccb_trigger(bit is_test);
    @(negedge clk40);
    if (is_test) ccb_test = 1; else ccb_l1a = 1;
    @(negedge clk40);
    ccb_test = 0; ccb_l1a = 0;
    expect_event(edge_n, is_test);    // edge_n: the edge that registered it
  endtask

  task automatic ddu_read_one();
    words_t w;
    ddu_rr = 1;
    while (!ddu_ra) @(negedge clk40);
    ddu_st = 1;
    @(negedge clk40) ddu_st = 0;
    w = exp_ev.pop_front();
    for (int k = 0; k < DDU_EVT_WORDS; k++) begin
      @(posedge clk40); #2;
      check("ddu valid", ddu_vp[VP_VALID], 1);
      check("ddu first", ddu_vp[VP_FIRST], k == 0);
      check("ddu last", ddu_vp[VP_LAST], k == DDU_EVT_WORDS - 1);
      check("ddu word", ddu_d, w[k]);
      if (k == 1) begin
        if (w[1][12]) mech[M_TEST_EVENT]++; else mech[M_L1A_EVENT]++;
      end
    end
    @(negedge clk40);
  endtask

  // ---------------- main sequence
  logic [15:0] rd;
  int cont0 [N_TRK];
  int writes0;
  initial begin
    csc_bc1_i = '0; dt_seg_i = '0;
    vm_a = 0; vm_d_i = 0; vm_wr_n = 1; vm_ce_n = 1;
    ccb_clken = 1; ccb_bc0 = 0; ccb_bcr = 0; ccb_test = 0; ccb_l1a = 0;
    ddu_rr = 0; ddu_st = 0;
    dt_seq = '{100, 500};
    repeat (4) @(posedge clk40);
    #1 rst = 0;                      // last clk160 edge with rst high is a clk40 edge
    @(negedge clk40) begin           // pins are random before the first reset clock
      cont0 = lut_cont;
      writes0 = lut_writes[0] + lut_writes[1] + lut_writes[2];
    end
    // bunch counter reset
    @(negedge clk40) ccb_bcr = 1;
    @(negedge clk40) ccb_bcr = 0;
    run_checks = 1;
    begin : s_bcr
      int e0;
      e0 = edge_n;                   // BCR registered at edge e0: bx there is 0
      @(negedge clk40);
      check("bx after BCR", bx_o, edge_n - e0);
    end

    // ---- VME setup
    vme_write(RA_L1A_LAT, 16'(lat));
    vme_write(RA_BC1_BX, 16'd100);
    vme_read(RA_L1A_LAT, rd); check("rd latency", rd, lat);

    // ---- PT LUT loading
    lut_mode = 1;
    vme_write(RA_CSR, 16'h0001);
    mech[M_MODE_SWITCH]++;
    for (int i = 0; i < 12; i++) begin
      logic [21:0] a; logic [7:0] v; int t;
      t = i % N_TRK; a = 22'($urandom); v = 8'($urandom);
      vme_write(RA_LUT_ALO, a[15:0]);
      vme_write(RA_LUT_AHI, {6'b0, 2'(t), 2'b0, a[21:16]});
      vme_write(RA_LUT_DAT, {8'b0, v});
      ref_lut[t][int'(a)] = v;
      loaded_a[t].push_back(a);
      mech[M_LUT_LOAD]++;
    end
    vme_read(RA_STATUS, rd); check("lut idle", rd[0], 0);
    check("lut writes", lut_writes[0] + lut_writes[1] + lut_writes[2] - writes0, 12);
    vme_write(RA_CSR, 16'h0000);
    mech[M_MODE_SWITCH]++;
    repeat (3) @(negedge clk40);
    lut_mode = 0;
    trk_use_loaded = 1;

    // ---- DT calibration: find the delay at which DT_BXN matches the BX
    dt_bxn_off = $urandom_range(0, 3);
    begin : s_dt
      int found0, found1;
      found0 = -1; found1 = -1;
      for (int d = 0; d < 16 && found0 < 0; d++) begin
        logic [15:0] c0, c1;
        vme_write(RA_DT_DLY0, 16'(d % 4));
        vme_write(RA_DT_DLY1, 16'(d / 4));
        repeat (10) @(negedge clk40);
        vme_read(RA_BXN_ERR, c0);
        repeat (40) @(negedge clk40);
        vme_read(RA_BXN_ERR, c1);
        if (c1 == c0) begin found0 = d % 4; found1 = d / 4; end
        else mech[M_BXN_MISMATCH]++;
      end
      check("dt delays found", found0 >= 0, 1);
      if (found0 >= 0) mech[M_DT_ALIGN]++;
    end
    // DT sequence reaches the track finder in order
    begin
      int p;
      @(negedge clk40) p = dt_o[0].phi;
      @(negedge clk40) check("dt order", dt_o[0].phi, 12'(p + 1));
    end

    // ---- synchronisation: BC1 at BX 100 of the orbit is fine
    vme_write(RA_CSR, 16'h0002);    // clear OSY
    begin
      // wait for bx_o == 98 so the marker lines up with BX 100
      while (bx_o != 12'd98) @(negedge clk40);
      @(negedge clk40) csc_bc1_i = '1;   // sampled at the edge where bx becomes 100
      @(negedge clk40) csc_bc1_i = '0;
      repeat (3) @(negedge clk40);
      check("no OSY on good BC1", fm_osy, 0);
      @(negedge clk40) csc_bc1_i = 5'b00100;   // wrong crossing
      @(negedge clk40) csc_bc1_i = '0;
      repeat (2) @(negedge clk40);
      check("OSY on bad BC1", fm_osy, 1);
      if (fm_osy) mech[M_OSY_SET]++;
      vme_read(RA_STATUS, rd); check("OSY source", rd[8:3], 6'b000100);
      vme_write(RA_CSR, 16'h0002);
      check("OSY cleared", fm_osy, 0);
      if (!fm_osy) mech[M_OSY_CLEAR]++;
    end

    // ---- readout: DDU idle, 10 triggers -> 2 dropped
    for (int i = 0; i < 10; i++) begin
      ccb_trigger(i == 3);
      repeat ($urandom_range(1, 6)) @(negedge clk40);
    end
    repeat (4) @(negedge clk40);
    vme_read(RA_OVF_CNT, rd);
    check("overflow count", rd, 2);
    if (rd == 2) mech[M_DDU_OVERFLOW]++;
    check("error bit on overflow", sp_error, 1);
    // the 2 dropped events were the last two; drop them from the expectation
    void'(exp_ev.pop_back()); void'(exp_ev.pop_back());
    for (int i = 0; i < 8; i++) ddu_read_one();
    vme_write(RA_CSR, 16'h0004);      // clear overflow flag
    // ---- readout while triggering
    for (int i = 0; i < 30; i++) begin
      ccb_trigger(i % 7 == 6);
      repeat ($urandom_range(0, 20)) @(negedge clk40);
      ddu_read_one();
    end
    vme_read(RA_EVN, rd); check("event number", rd, n_trig);
    ddu_rr = 0;
    repeat (20) @(negedge clk40);
    run_checks = 0;
    #50;
    for (int t = 0; t < N_TRK; t++) check("lut bus contention", lut_cont[t] - cont0[t], 0);
    for (int m = 0; m < M_NUM; m++) begin
      check($sformatf("mechanism %s happened", mech_e'(m)), mech[m] > 0, 1);
      $display("mechanism %-16s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
