// ddu_readout -- readout of DT segments and tracks to the DDU on L1A.
//
// Every clock (bunch crossing) the record of that crossing -- the aligned
// DT segments and the three tracks, sp_main_pkg::ro_rec_t, 150 bits -- and
// its BX number are written into a ring buffer of 2**RB_AW crossings. An
// L1A (or a CCB test request) arriving `latency` clocks after a crossing
// was written (1 <= latency < 2**RB_AW) reads that crossing back and stores
// it, with the event number, the BX and a test flag, in an event buffer of
// 2**EVT_AW events. If the event buffer is full the event is dropped,
// ovf is set (sticky until ovf_clr) and ovf_cnt counts it.
// DDU handshake: while the DDU holds DDU_RR high and an event is stored,
// DDU_RA goes high. When the DDU then raises DDU_ST, the oldest event goes
// out as DDU_EVT_WORDS (12) 16-bit words, one per clock, starting the clock
// after DDU_ST is seen: {4'hA, event number}, {3'b0, test, BX}, then the
// record MSB first in 10 words (the last padded with zeros). DDU_VP marks
// the words: bit 0 valid, bit 1 first, bit 2 last, bit 3 test event.
// DDU_RA drops on the clock the last word appears; the event is removed.
// That the DDU interface collects DT segments and tracks into an event on
// L1A is given with its pin names; the buffering, event format and
// handshake are this design's own.
module ddu_readout
  import sp_main_pkg::*;
#(
  parameter int unsigned RB_AW  = 8,
  parameter int unsigned EVT_AW = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  ro_rec_t            rec,
  input  logic [BX_W-1:0]    bx,
  input  logic               l1a,
  input  logic               test,
  input  logic [BX_W-1:0]    evn,
  input  logic [RB_AW-1:0]   latency,
  input  logic               ddu_rr,
  input  logic               ddu_st,
  output logic               ddu_ra,
  output logic [DDU_D_W-1:0] ddu_d,
  output logic [DDU_VP_W-1:0] ddu_vp,
  input  logic               ovf_clr,
  output logic               ovf,
  output logic [15:0]        ovf_cnt,
  output logic [EVT_AW:0]    evt_count
);

  typedef struct packed {
    logic [BX_W-1:0] evn;
    logic            test;
    logic [BX_W-1:0] bx;
    ro_rec_t         rec;
  } evt_t;

  localparam int unsigned PAY_W = DDU_PAY_WORDS * DDU_D_W;   // 160

  // ---- ring buffer of recent crossings
  typedef struct packed {
    logic [BX_W-1:0] bx;
    ro_rec_t         rec;
  } rb_word_t;

  rb_word_t        rb [2**RB_AW];
  logic [RB_AW-1:0] wptr;
  rb_word_t        rb_q;
  logic            take_q;      // a read of rb is in rb_q this clock
  logic            test_q;
  logic [BX_W-1:0] evn_q;

  always_ff @(posedge clk) begin
    rb[wptr] <= '{bx: bx, rec: rec};
    if (l1a || test) rb_q <= rb[wptr - latency];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr   <= '0;
      take_q <= 1'b0;
      test_q <= 1'b0;
      evn_q  <= '0;
    end else begin
      wptr   <= wptr + 1'b1;
      take_q <= l1a || test;
      test_q <= test && !l1a;
      evn_q  <= evn;
    end
  end

  // ---- event buffer
  evt_t            ev [2**EVT_AW];
  logic [EVT_AW:0] ev_wp, ev_rp;
  logic            ev_full, ev_empty, pop;

  assign ev_full   = (ev_wp - ev_rp) == (EVT_AW+1)'(2**EVT_AW);
  assign ev_empty  = (ev_wp == ev_rp);
  assign evt_count = ev_wp - ev_rp;

  always_ff @(posedge clk) begin
    if (take_q && !ev_full)
      ev[ev_wp[EVT_AW-1:0]] <= '{evn: evn_q, test: test_q, bx: rb_q.bx, rec: rb_q.rec};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ev_wp   <= '0;
      ovf     <= 1'b0;
      ovf_cnt <= '0;
    end else begin
      if (take_q && !ev_full) ev_wp <= ev_wp + 1'b1;
      if (take_q && ev_full) begin
        ovf     <= 1'b1;
        ovf_cnt <= ovf_cnt + 1'b1;
      end else if (ovf_clr) begin
        ovf <= 1'b0;
      end
    end
  end

  // ---- DDU side
  typedef enum logic {R_IDLE, R_SEND} rstate_e;
  rstate_e          rst_st;
  logic [3:0]       widx;
  evt_t             cur;
  logic [PAY_W-1:0] pay;
  logic [DDU_D_W-1:0] word;

  assign cur = ev[ev_rp[EVT_AW-1:0]];
  assign pay = {cur.rec, (PAY_W - REC_W)'(0)};

  always_comb begin
    if (widx == 4'd0)      word = {DDU_HDR_TAG, cur.evn};
    else if (widx == 4'd1) word = {3'b000, cur.test, cur.bx};
    else                   word = pay[PAY_W - 1 - DDU_D_W * (int'(widx) - 2) -: DDU_D_W];
  end

  assign pop = (rst_st == R_SEND) && (widx == 4'(DDU_EVT_WORDS - 1));

  // handshake rules: words only go out under DDU_RA, an event is never
  // sent from an empty buffer, and first/last only mark valid words
  a_word_under_ra: assert property (@(posedge clk) disable iff (rst)
    ddu_vp[VP_VALID] |-> ddu_ra || ddu_vp[VP_LAST]);
  a_send_not_empty: assert property (@(posedge clk) disable iff (rst)
    (rst_st == R_SEND) |-> !ev_empty);
  a_flags_valid: assert property (@(posedge clk) disable iff (rst)
    (ddu_vp[VP_FIRST] || ddu_vp[VP_LAST]) |-> ddu_vp[VP_VALID]);

  always_ff @(posedge clk) begin
    if (rst) begin
      rst_st <= R_IDLE;
      widx   <= '0;
      ev_rp  <= '0;
      ddu_ra <= 1'b0;
      ddu_d  <= '0;
      ddu_vp <= '0;
    end else begin
      ddu_d  <= '0;
      ddu_vp <= '0;
      unique case (rst_st)
        R_IDLE: begin
          ddu_ra <= ddu_rr && !ev_empty;
          widx   <= '0;
          if (ddu_ra && ddu_rr && ddu_st && !ev_empty) rst_st <= R_SEND;
        end
        R_SEND: begin
          ddu_d              <= word;
          ddu_vp[VP_VALID]   <= 1'b1;
          ddu_vp[VP_FIRST]   <= (widx == 4'd0);
          ddu_vp[VP_LAST]    <= pop;
          ddu_vp[VP_TEST]    <= cur.test;
          widx               <= widx + 1'b1;
          if (pop) begin
            rst_st <= R_IDLE;
            ev_rp  <= ev_rp + 1'b1;
            ddu_ra <= 1'b0;
          end
        end
        default: rst_st <= R_IDLE;
      endcase
    end
  end

endmodule
