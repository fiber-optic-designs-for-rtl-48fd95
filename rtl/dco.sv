// dco: digitally controlled oscillator built as an increment/decrement (ID) counter.
//
// The published DCO has three inputs, the ID clock, INC (fed by the loop filter's
// carry) and DEC (fed by its borrow), and one output, ID out. With no carry or
// borrow it gives an output pulse at a fixed rate of the ID clock; a carry at INC
// makes the next output pulse come one ID clock period early, a borrow at DEC makes
// it come one period late. Here the free-running period is ID_DIV clk cycles
// (ID_DIV = 2, one pulse every other ID clock, is this design's choice: a period
// of one clock could not be advanced). Corrections that arrive faster than output
// periods are kept in a small signed pending count (saturating at +/-7) and applied
// one per period; a correction is used up only by a period it actually moved, and
// an INC and a DEC cancel.
//
// Interface: clk is the ID clock; inc/dec are one-cycle pulses; id_out is a
// one-cycle pulse, so its period is ID_DIV, ID_DIV-1 or ID_DIV+1 clk cycles.
module dco #(
  parameter int unsigned ID_DIV = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic inc,
  input  logic dec,
  output logic id_out
);

  localparam int unsigned PHW = $clog2(ID_DIV + 2);

  logic [PHW-1:0]    phase;
  logic signed [3:0] pend;
  logic signed [4:0] pend_n;
  logic [PHW-1:0]    last;   // phase value at which this period ends
  logic              fire;

  always_comb begin
    if (pend > 0)      last = PHW'(ID_DIV - 2);
    else if (pend < 0) last = PHW'(ID_DIV);
    else               last = PHW'(ID_DIV - 1);
  end

  assign fire = (phase >= last);

  always_comb begin
    pend_n = {pend[3], pend};
    if (inc) pend_n = pend_n + 1;
    if (dec) pend_n = pend_n - 1;
    // A correction is used up only by a period it actually shortened or lengthened.
    if (fire && phase < PHW'(ID_DIV - 1)) pend_n = pend_n - 1;
    if (fire && phase > PHW'(ID_DIV - 1)) pend_n = pend_n + 1;
    if (pend_n > 7)  pend_n = 5'sd7;
    if (pend_n < -7) pend_n = -5'sd7;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      pend   <= '0;
      id_out <= 1'b0;
    end else begin
      pend   <= pend_n[3:0];
      id_out <= fire;
      phase  <= fire ? '0 : phase + 1'b1;
    end
  end

  initial assert (ID_DIV >= 2) else $error("dco: ID_DIV must be at least 2");

endmodule
