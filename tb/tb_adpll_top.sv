// tb_adpll_top: end-to-end testbench of the all-digital PLL at its default sizes.
// For several reference periods and divide ratios it resets the loop, lets it
// settle, then over a measurement window checks frequency lock: the number of
// feedback pulses equals the number of reference edges (within one), the average
// DCO period times the divide ratio matches the reference period, and every TDC
// word stays in range. It counts each mechanism of the loop (PFD up and down
// pulses, TDC conversions and full-scale words, words arriving while count pulses
// are still pending, loop-filter carries and borrows, DCO advanced and delayed
// periods, divider periods of div_int+1) and fails if one never happens.
module tb_adpll_top;
  import adpll_pkg::*;
  localparam int B = TDC_BITS_DEFAULT;
  localparam int MID = (1 << B) - 1;

  logic clk = 1'b0, rst_n = 1'b0, ref_in = 1'b0;
  logic [7:0] div_int = 8'd32;
  logic [7:0] div_frac = 8'd0;
  logic dco_out, fb_out, up, dn, tdc_valid, carry, borrow, lf_pulse, lf_dir_up, div_extra;
  logic [B:0] tdc_word;
  logic [2:0] lf_count;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_up = 0, n_dn = 0, n_conv = 0, n_carry = 0, n_borrow = 0;
  int n_adv = 0, n_del = 0, n_extra = 0, n_lock = 0, n_full = 0, n_overlap = 0;
  logic up_q = 1'b0, dn_q = 1'b0, fb_q = 1'b0;
  int cyc = 0, last_dco = -1;

  adpll_top dut (.clk, .rst_n, .ref_in, .div_int, .div_frac, .dco_out, .fb_out, .up, .dn,
    .tdc_word, .tdc_valid, .lf_count, .carry, .borrow, .lf_pulse, .lf_dir_up, .div_extra);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (up && !up_q) n_up++;
      if (dn && !dn_q) n_dn++;
      if (tdc_valid) n_conv++;
      if (tdc_valid && (tdc_word == 7'(2 * MID) || tdc_word == '0)) n_full++;
      if (tdc_valid && lf_pulse) n_overlap++;
      if (carry) n_carry++;
      if (borrow) n_borrow++;
      if (fb_out && !fb_q && div_extra) n_extra++;
      if (dco_out) begin
        if (last_dco >= 0 && cyc - last_dco < 2) n_adv++;
        if (last_dco >= 0 && cyc - last_dco > 2) n_del++;
        last_dco = cyc;
      end
    end
    up_q <= up; dn_q <= dn; fb_q <= fb_out;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Reference with period `per` clk cycles (high for half of it).
  int ref_per = 64;
  initial begin
    forever begin
      @(negedge clk);
      ref_in = 1'b1;
      repeat (ref_per / 2) @(negedge clk);
      ref_in = 1'b0;
      repeat (ref_per - ref_per / 2 - 1) @(negedge clk);
    end
  end

  // One experiment: ratio di + fr/256, reference period per; settle, then measure.
  task automatic lock_test(input int di, input int fr, input int per);
    int n_ref = 0, n_fb = 0, n_dco = 0, c0, max_err = 0, e;
    real ratio, dco_avg;
    rst_n = 1'b0;
    div_int = 8'(di); div_frac = 8'(fr); ref_per = per;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (400 * per) @(posedge clk);     // settle
    c0 = cyc;
    begin
      logic rq = ref_in, fq = 1'b0;
      repeat (300 * per) begin
        @(posedge clk);
        if (ref_in && !rq) n_ref++;
        if (fb_out && !fq) n_fb++;
        if (dco_out) n_dco++;
        if (tdc_valid) begin
          e = tdc_error(int'(tdc_word), B);
          if (e < 0) e = -e;
          if (e > max_err) max_err = e;
        end
        rq = ref_in; fq = fb_out;
      end
    end
    ratio = real'(di) + real'(fr) / 256.0;
    dco_avg = real'(cyc - c0) / real'(n_dco);
    $display("ratio %0.3f ref %0d: ref edges %0d fb %0d, DCO period %0.4f (ideal %0.4f), max |err| %0d",
             ratio, per, n_ref, n_fb, dco_avg, real'(per) / ratio, max_err);
    check(n_fb >= n_ref - 1 && n_fb <= n_ref + 1, "feedback not at the reference frequency");
    check(dco_avg * ratio > real'(per) - 0.05 && dco_avg * ratio < real'(per) + 0.05,
          "average DCO period times ratio is not the reference period");
    check(max_err <= MID, "TDC error out of range");
    if (n_fb >= n_ref - 1 && n_fb <= n_ref + 1) n_lock++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    lock_test(32, 0, 64);     // on the free-running frequency
    lock_test(32, 0, 60);     // DCO must run fast: carries
    lock_test(32, 0, 70);     // DCO must run slow: borrows
    lock_test(32, 128, 65);   // fractional ratio 32.5
    lock_test(32, 64, 62);    // fractional ratio 32.25, pulled fast
    lock_test(20, 192, 44);   // ratio 20.75, pulled slow
    $display("mechanisms: up %0d dn %0d conv %0d full-scale %0d overlap %0d carry %0d borrow %0d adv %0d del %0d extra %0d lock %0d",
             n_up, n_dn, n_conv, n_full, n_overlap, n_carry, n_borrow, n_adv, n_del, n_extra, n_lock);
    check(n_up > 0, "PFD up never happened");
    check(n_dn > 0, "PFD down never happened");
    check(n_conv > 0, "TDC never converted");
    check(n_full > 0, "TDC full-scale word never happened");
    check(n_overlap > 0, "TDC word never arrived while count pulses were pending");
    check(n_carry > 0, "loop filter carry never happened");
    check(n_borrow > 0, "loop filter borrow never happened");
    check(n_adv > 0, "DCO advance never happened");
    check(n_del > 0, "DCO delay never happened");
    check(n_extra > 0, "divider div_int+1 period never happened");
    check(n_lock == 6, "not every experiment locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
