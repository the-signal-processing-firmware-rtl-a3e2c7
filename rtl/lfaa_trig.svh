// lfaa_trig.svh: integer sine for building coefficient and twiddle ROMs
// at elaboration.
//
// `LFAA_SIN30(res, num, den) sets the longint `res` to sin(2*pi*num/den)
// with 1.0 = 2^30. The phase is reduced to a quarter turn and a Taylor
// series to x^13 is summed in Q30 (error below 1e-7). It is a statement
// macro rather than a function so that the elaboration of the large ROM
// initialisations is not limited by a constant-function step budget.
// `LFAA_COS30 is the matching cosine.
`ifndef LFAA_TRIG_SVH
`define LFAA_TRIG_SVH

`define LFAA_SIN30(RES, NUM, DEN) \
  begin \
    longint tp_, tph_, tr_, tx_, tx2_, tt_, ts_; \
    tp_ = (NUM) % (DEN); \
    if (tp_ < 0) tp_ = tp_ + (DEN); \
    tph_ = (tp_ <<< 32) / (DEN); \
    tr_ = tph_ & 64'h3fff_ffff; \
    if (tph_[30]) tr_ = (64'sd1 <<< 30) - tr_; \
    tx_ = (tr_ * 64'sd1686629713) >>> 30; \
    tx2_ = (tx_ * tx_) >>> 30; \
    tt_ = tx_; \
    ts_ = tx_; \
    for (int tk_ = 1; tk_ < 7; tk_++) begin \
      tt_ = -((tt_ * tx2_) >>> 30) / longint'((2 * tk_) * (2 * tk_ + 1)); \
      ts_ = ts_ + tt_; \
    end \
    RES = tph_[31] ? -ts_ : ts_; \
  end

`define LFAA_COS30(RES, NUM, DEN) `LFAA_SIN30(RES, 4 * (NUM) + (DEN), 4 * (DEN))

`endif
