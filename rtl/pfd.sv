// pfd: three-state phase/frequency detector of the PLL.
//
// Two "modified D flip-flops" with their D input tied high are set by the rising
// edge of the reference and of the divided DCO (feedback) clock. When both are
// set the reset gate clears them together, so UP stays high from a reference edge
// until the next feedback edge (DCO must speed up) and DN from a feedback edge until
// the next reference edge (DCO must slow down). That structure is the published
// one. In this design the detector is synchronous: both inputs are sampled on the
// fast system clock (the DCO's ID clock), rising edges are found by comparing with
// the previous sample, and the clear acts in the same cycle in which the second
// flip-flop would set, so UP or DN is high for exactly the number of clk cycles
// between the two edges. Edges that arrive in the same cycle produce no pulse.
//
// Interface: clk, rst_n (asynchronous, active low); ref_in and fb_in are levels or
// pulses; up and dn are registered, never high together.
module pfd (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_in,
  input  logic fb_in,
  output logic up,
  output logic dn
);

  logic ref_q, fb_q;
  logic ref_rise, fb_rise;
  logic up_set, dn_set, clear;

  assign ref_rise = ref_in & ~ref_q;
  assign fb_rise  = fb_in & ~fb_q;

  // D = 1 flip-flops: set on their clock edge, hold otherwise.
  assign up_set = up | ref_rise;
  assign dn_set = dn | fb_rise;
  // Reset gate: both flip-flops set means the comparison is complete.
  assign clear  = up_set & dn_set;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q <= 1'b0;
      fb_q  <= 1'b0;
      up    <= 1'b0;
      dn    <= 1'b0;
    end else begin
      ref_q <= ref_in;
      fb_q  <= fb_in;
      up    <= up_set & ~clear;
      dn    <= dn_set & ~clear;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(up && dn))
    else $error("pfd: up and dn high together");

endmodule
