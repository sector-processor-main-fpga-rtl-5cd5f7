// tb_ddu_readout -- self-checking testbench of ddu_readout.
// Every clock the record input is a known function of the clock number, so
// the testbench can compute which record an L1A with the programmed latency
// must return. Random L1As and test requests are sent; at first the DDU
// does not ask for data, so the 8-event buffer fills and overflows (the
// dropped events are counted and the sticky flag is checked and cleared).
// Then the DDU side requests, waits for DDU_RA, raises DDU_ST and collects
// events; each event's 12 words, their DDU_VP flags and their timing (first
// word on the clock after DDU_ST, one word per clock) are checked against
// the expected event queue. The latency is changed half way.
module tb_ddu_readout;
  import sp_main_pkg::*;

  logic clk = 0, rst = 1;
  ro_rec_t rec;
  logic [BX_W-1:0] bx, evn;
  logic l1a, test, ddu_rr, ddu_st, ddu_ra, ovf_clr, ovf;
  logic [7:0] latency;
  logic [DDU_D_W-1:0] ddu_d;
  logic [DDU_VP_W-1:0] ddu_vp;
  logic [15:0] ovf_cnt;
  logic [3:0] evt_count;
  int checks = 0, failures = 0;

  ddu_readout dut (.clk, .rst, .rec, .bx, .l1a, .test, .evn, .latency, .ddu_rr, .ddu_st,
    .ddu_ra, .ddu_d, .ddu_vp, .ovf_clr, .ovf, .ovf_cnt, .evt_count);

  always #12.5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ro_rec_t rec_of(int n);
    logic [159:0] v;
    for (int k = 0; k < 5; k++) v[32*k +: 32] = 32'(n) * 32'h9E37_79B1 + 32'(k) * 32'h85EB_CA6B ^ 32'(n << k);
    return ro_rec_t'(v[REC_W-1:0]);
  endfunction

  typedef logic [DDU_D_W-1:0] word_q_t [$];
  word_q_t exp_q [$];
  bit      exp_test [$];
  int cyc = 0, m_count = 0, m_drop = 0, pend = 0, pend_test = 0, n_events = 0, n_test = 0;
  int words_in_event = 0;
  int m_evn = 0;
  logic [DDU_D_W-1:0] cur_words [$];

  function automatic void expect_event(int c, bit t);
    logic [PAY_BITS-1:0] pay;
    logic [DDU_D_W-1:0] w [$];
    pay = {rec_of(c - int'(latency)), (PAY_BITS - REC_W)'(0)};
    w.push_back({DDU_HDR_TAG, 12'(m_evn)});
    w.push_back({3'b000, t, 12'(c - int'(latency))});
    for (int k = DDU_PAY_WORDS - 1; k >= 0; k--) w.push_back(pay[16*k +: 16]);
    exp_q.push_back(w);
    exp_test.push_back(t);
  endfunction
  localparam int PAY_BITS = DDU_PAY_WORDS * DDU_D_W;

  // stimulus and model, one iteration per clock
  bit l1a_on = 1;
  initial begin
    rec = '0; bx = 0; evn = 0; l1a = 0; test = 0; latency = 8'd37;
    ddu_rr = 0; ddu_st = 0; ovf_clr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    forever begin
      int push_now;
      // inputs for clock cyc
      rec = rec_of(cyc); bx = 12'(cyc);
      l1a = 0; test = 0;
      if (cyc > 300 && l1a_on) begin
        l1a  = ($urandom_range(0, 24) == 0);
        test = !l1a && ($urandom_range(0, 149) == 0);
      end
      evn = 12'(m_evn);
      push_now = pend;
      @(posedge clk);
      // model of the event buffer at this edge
      if (push_now) begin
        if (m_count < 8) begin m_count++; end
        else begin m_drop++; void'(exp_q.pop_back()); void'(exp_test.pop_back()); end
      end
      pend = 0;
      if (l1a || test) begin
        expect_event(cyc, test);
        pend = 1;
        m_evn++;
        if (test) n_test++;
      end
      #1;
      if (ddu_vp[VP_LAST]) m_count--;
      check("event count", evt_count, m_count);
      check("ovf count", ovf_cnt, m_drop);
      @(negedge clk);
      cyc++;
    end
  end

  // DDU side
  initial begin
    wait (cyc == 2500);
    check("overflow happened", int'(m_drop > 0), 1);
    check("ovf flag", ovf, 1);
    @(negedge clk) ovf_clr = 1;
    @(negedge clk) ovf_clr = 0;
    #1 check("ovf cleared", ovf, 0);
    for (int round = 0; round < 2; round++) begin
      repeat (2000) begin
        @(negedge clk);
        ddu_rr = ($urandom_range(0, 3) != 0);
        ddu_st = 0;
        if (ddu_rr && ddu_ra) begin
          logic [DDU_D_W-1:0] w [$];
          bit t;
          repeat ($urandom_range(0, 3)) @(negedge clk);
          ddu_st = 1;
          @(negedge clk) ddu_st = 0;
          check("events expected", int'(exp_q.size() > 0), 1);
          w = exp_q.pop_front();
          t = exp_test.pop_front();
          for (int k = 0; k < DDU_EVT_WORDS; k++) begin
            @(posedge clk); #2;
            check("word valid", ddu_vp[VP_VALID], 1);
            check("word first", ddu_vp[VP_FIRST], int'(k == 0));
            check("word last", ddu_vp[VP_LAST], int'(k == DDU_EVT_WORDS - 1));
            check("word test", ddu_vp[VP_TEST], t);
            check("word data", ddu_d, w[k]);
          end
          n_events++;
          @(negedge clk);
          check("ra dropped", ddu_ra, 0);
        end
      end
      // second round with another latency; let the queue drain first
      if (round == 0) begin
        l1a_on = 0;
        ddu_rr = 1;
        while (exp_q.size() > 0) begin
          logic [DDU_D_W-1:0] w [$];
          @(negedge clk);
          if (ddu_ra) begin
            ddu_st = 1; @(negedge clk) ddu_st = 0;
            w = exp_q.pop_front(); void'(exp_test.pop_front());
            for (int k = 0; k < DDU_EVT_WORDS; k++) begin
              @(posedge clk); #2;
              check("drain word", ddu_d, w[k]);
            end
            n_events++;
            @(negedge clk);
          end
        end
        ddu_rr = 0;
        repeat (20) @(negedge clk);
        latency = 8'd201;
        repeat (260) @(negedge clk);
        l1a_on = 1;
      end
    end
    check("many events read", int'(n_events > 100), 1);
    check("test events seen", int'(n_test > 0), 1);
    $display("events read %0d, dropped %0d, test %0d", n_events, m_drop, n_test);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
