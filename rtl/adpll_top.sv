// adpll_top: all-digital phase-locked loop, top level.
//
// The loop follows the published block diagram: phase/frequency detector (PFD) ->
// time-to-digital converter (TDC) -> loop filter (pulse-forming network and up/down
// counter) -> digitally controlled oscillator (increment/decrement counter) ->
// first-order sigma-delta divider -> back to the PFD. The TDC digitises how long
// the reference leads or lags the feedback clock, the loop filter integrates that
// into carry/borrow pulses, each of which moves the DCO's next output edge one ID
// clock earlier or later, and the divider brings the DCO rate down to the
// reference rate with an average ratio div_int + div_frac/2^FRAC_W. In lock the
// divided DCO runs at the reference frequency with a small steady phase offset.
//
// Everything runs on one clock, clk, which is the DCO's ID clock; ref_in is
// sampled on it. The diagram shows a second PFD box between the loop filter and
// the DCO; in this design the loop filter's carry and borrow go straight to the
// DCO's INC and DEC inputs, as the DCO's own diagram shows.
//
// With the defaults (ID_DIV = 2) the free-running DCO pulse rate is clk/2 and the
// loop can pull each reference period by about (2^TDC_BITS - 1)/K_MOD clk cycles.
module adpll_top #(
  parameter int unsigned TDC_BITS = adpll_pkg::TDC_BITS_DEFAULT,
  parameter int unsigned K_MOD    = 8,
  parameter int unsigned ID_DIV   = 2,
  parameter int unsigned DIV_W    = 8,
  parameter int unsigned FRAC_W   = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ref_in,
  input  logic [DIV_W-1:0]         div_int,
  input  logic [FRAC_W-1:0]        div_frac,
  output logic                     dco_out,
  output logic                     fb_out,
  output logic                     up,
  output logic                     dn,
  output logic [TDC_BITS:0]        tdc_word,
  output logic                     tdc_valid,
  output logic [$clog2(K_MOD)-1:0] lf_count,
  output logic                     carry,
  output logic                     borrow,
  output logic                     lf_pulse,   // loop filter count pulse
  output logic                     lf_dir_up,  // loop filter count direction
  output logic                     div_extra   // divider period is div_int+1
);

  pfd u_pfd (
    .clk, .rst_n,
    .ref_in (ref_in),
    .fb_in  (fb_out),
    .up, .dn
  );

  tdc #(.TDC_BITS(TDC_BITS)) u_tdc (
    .clk, .rst_n, .up, .dn,
    .word  (tdc_word),
    .valid (tdc_valid)
  );

  loop_filter #(.TDC_BITS(TDC_BITS), .K_MOD(K_MOD)) u_lf (
    .clk, .rst_n,
    .word  (tdc_word),
    .valid (tdc_valid),
    .cnt_clk (lf_pulse),
    .cnt_up  (lf_dir_up),
    .count (lf_count),
    .carry, .borrow
  );

  dco #(.ID_DIV(ID_DIV)) u_dco (
    .clk, .rst_n,
    .inc    (carry),
    .dec    (borrow),
    .id_out (dco_out)
  );

  sdm_divider #(.DIV_W(DIV_W), .FRAC_W(FRAC_W)) u_div (
    .clk, .rst_n,
    .dco_in   (dco_out),
    .div_int, .div_frac,
    .fb_out,
    .extra    (div_extra)
  );

endmodule
