// tdc: counter-based time-to-digital converter between the PFD and the loop filter.
//
// It turns the width of the PFD's UP and DN pulses into a number. An up counter
// that starts at 0 counts clk cycles while UP is high, a down counter that starts
// at all ones counts down while DN is high, and an adder sums them. The adder's
// TDC_BITS sum bits and its carry form the (TDC_BITS+1)-bit control word, so a
// measurement gives word = (2^TDC_BITS - 1) + (UP cycles) - (DN cycles): the mid
// value for zero phase error, above it when the reference leads. The counters,
// their start values, the adder and the word width follow the published design,
// as does enabling the converter only while there is a phase mismatch (UP or DN
// high). This design's own choices: a measurement ends on the first cycle with both
// UP and DN low after some activity; the word is then registered, `valid` pulses
// for one cycle and both counters return to their start values. A pulse longer
// than full scale does not saturate or wrap: when a counter is at full scale (up
// counter all ones, down counter zero) and its input is still high, the
// full-scale word is handed over and counting goes on in a fresh measurement that
// already holds the current cycle. So the errors of all words of one pulse add up
// to its exact length. This matters when the PFD holds UP or DN high for whole
// reference periods during frequency acquisition.
//
// Timing: `word`/`valid` appear one clk after the PFD pulse ends, and every
// 2^TDC_BITS cycles during a longer pulse. Reset value of `word` is the mid value.
module tdc #(
  parameter int unsigned TDC_BITS = adpll_pkg::TDC_BITS_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                up,
  input  logic                dn,
  output logic [TDC_BITS:0]   word,
  output logic                valid
);

  localparam logic [TDC_BITS-1:0] ALL_ONES = '1;

  logic [TDC_BITS-1:0] up_cnt, dn_cnt;
  logic                active;
  logic                en;

  assign en = up | dn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_cnt <= '0;
      dn_cnt <= ALL_ONES;
      active <= 1'b0;
      word   <= {1'b0, ALL_ONES};
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (en) begin
        active <= 1'b1;
        if (up && up_cnt == ALL_ONES) begin
          // Up counter at full scale: hand over a full-scale word and go on
          // counting this cycle in a fresh measurement.
          word   <= {1'b0, up_cnt} + {1'b0, dn_cnt};
          valid  <= 1'b1;
          up_cnt <= {{(TDC_BITS-1){1'b0}}, 1'b1};
          dn_cnt <= ALL_ONES;
        end else if (dn && dn_cnt == '0) begin
          word   <= {1'b0, up_cnt} + {1'b0, dn_cnt};
          valid  <= 1'b1;
          up_cnt <= '0;
          dn_cnt <= ALL_ONES - 1'b1;
        end else begin
          if (up) up_cnt <= up_cnt + 1'b1;
          if (dn) dn_cnt <= dn_cnt - 1'b1;
        end
      end else if (active) begin
        // Ripple-carry adder of the two counters: 6 sum bits plus the carry.
        word   <= {1'b0, up_cnt} + {1'b0, dn_cnt};
        valid  <= 1'b1;
        active <= 1'b0;
        up_cnt <= '0;
        dn_cnt <= ALL_ONES;
      end
    end
  end

endmodule
