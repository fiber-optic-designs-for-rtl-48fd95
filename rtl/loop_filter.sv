// loop_filter: pulse-forming network and up/down ("K") counter of the PLL.
//
// The published loop filter is a pulse-forming network that turns the detector's
// phase information into a count clock and an UP/DN-bar direction, followed by an
// up/down counter whose content N is the filter state. The counter's carry and
// borrow drive the DCO's INC and DEC inputs. Here the phase information is the
// TDC word: each valid word adds its signed error (word minus the mid value) to a
// pending count, and the pulse-forming network issues one count pulse per clk,
// in the direction of the pending count's sign, until the pending count is zero.
// The counter runs modulo K_MOD: counting up from K_MOD-1 wraps to 0 and gives a
// one-cycle carry; counting down from 0 wraps to K_MOD-1 and gives a borrow. So on
// average one DCO correction is made per K_MOD clk cycles of net phase error, and
// K_MOD sets the loop gain. The predictive (model-based) optimisation named for
// this filter is not specified far enough to build and is not implemented; the
// pending count, K_MOD, the reset content K_MOD/2 and the saturation of the pending
// count are this design's choices.
//
// Timing: a count pulse starts the cycle after `valid`; carry/borrow are
// registered, one cycle after the count that wraps.
module loop_filter #(
  parameter int unsigned TDC_BITS = adpll_pkg::TDC_BITS_DEFAULT,
  parameter int unsigned K_MOD    = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [TDC_BITS:0]          word,
  input  logic                       valid,
  output logic                       cnt_clk,   // pulse-forming network: count pulse
  output logic                       cnt_up,    // pulse-forming network: UP/DN-bar
  output logic [$clog2(K_MOD)-1:0]   count,     // content N
  output logic                       carry,
  output logic                       borrow
);

  localparam int unsigned NW   = $clog2(K_MOD);
  localparam int          PW   = TDC_BITS + 4;            // pending-count width
  localparam int          PMAX = (1 << (PW - 1)) - 1;
  localparam logic signed [PW:0] SUM_MAX = (PW+1)'(PMAX);
  localparam logic signed [PW:0] SUM_MIN = (PW+1)'(-PMAX);
  localparam logic [NW-1:0] NTOP = NW'(K_MOD - 1);

  logic signed [PW-1:0] pend;
  logic signed [PW:0]   pend_sum;
  logic signed [PW-1:0] err;

  // Signed error of the incoming word against the mid value 2^TDC_BITS - 1.
  assign err = PW'(adpll_pkg::tdc_error(int'(word), TDC_BITS));

  assign cnt_clk = (pend != '0);
  assign cnt_up  = ~pend[PW-1];

  always_comb begin
    pend_sum = {pend[PW-1], pend};
    if (cnt_clk) pend_sum = cnt_up ? pend_sum - 1 : pend_sum + 1;
    if (valid)   pend_sum = pend_sum + {err[PW-1], err};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend   <= '0;
      count  <= NW'(K_MOD / 2);
      carry  <= 1'b0;
      borrow <= 1'b0;
    end else begin
      if (pend_sum > SUM_MAX)      pend <= SUM_MAX[PW-1:0];
      else if (pend_sum < SUM_MIN) pend <= SUM_MIN[PW-1:0];
      else                       pend <= pend_sum[PW-1:0];

      carry  <= 1'b0;
      borrow <= 1'b0;
      if (cnt_clk) begin
        if (cnt_up) begin
          if (count == NTOP) begin count <= '0; carry <= 1'b1; end
          else count <= count + 1'b1;
        end else begin
          if (count == '0) begin count <= NTOP; borrow <= 1'b1; end
          else count <= count - 1'b1;
        end
      end
    end
  end

  initial assert (K_MOD >= 2) else $error("loop_filter: K_MOD must be at least 2");

endmodule
