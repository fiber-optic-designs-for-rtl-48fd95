// sdm_divider: feedback divider of the PLL with a first-order sigma-delta modulator.
//
// The published design replaces the fixed frequency divider by a first-order
// sigma-delta modulator between the DCO output and the PFD. Here that is a
// fractional-N divider: a counter counts DCO pulses and ends each output period
// after M of them, where M is div_int plus the overflow bit of a FRAC_W-bit
// accumulator to which div_frac is added once per output period. The average
// divide ratio is therefore div_int + div_frac / 2^FRAC_W, and the choice between
// div_int and div_int+1 is noise-shaped by the first-order loop. Widths, ports and
// the accumulator form are this design's choices; the published text gives only
// the modulator's order and place in the loop.
//
// Timing: fb_out is a one-clk pulse, registered, one cycle after the DCO pulse that
// completes the period. div_int must be at least 1; div_int and div_frac are read
// at the end of each period.
module sdm_divider #(
  parameter int unsigned DIV_W  = 8,
  parameter int unsigned FRAC_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dco_in,    // one pulse per DCO period
  input  logic [DIV_W-1:0]  div_int,
  input  logic [FRAC_W-1:0] div_frac,
  output logic              fb_out,
  output logic              extra      // the current period is div_int+1 long
);

  logic [DIV_W:0]    cnt;
  logic [DIV_W:0]    modulus;
  logic [FRAC_W-1:0] acc;
  logic [FRAC_W:0]   acc_sum;

  assign modulus = {1'b0, div_int} + {{DIV_W{1'b0}}, extra};
  assign acc_sum = {1'b0, acc} + {1'b0, div_frac};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      acc    <= '0;
      extra  <= 1'b0;
      fb_out <= 1'b0;
    end else begin
      fb_out <= 1'b0;
      if (dco_in) begin
        if (cnt + 1'b1 >= modulus) begin
          cnt    <= '0;
          fb_out <= 1'b1;
          acc    <= acc_sum[FRAC_W-1:0];
          extra  <= acc_sum[FRAC_W];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) div_int != '0)
    else $error("sdm_divider: div_int must be at least 1");

endmodule
