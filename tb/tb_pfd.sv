// tb_pfd: self-checking testbench of the phase/frequency detector.
// Applies a reference edge and a feedback edge d cycles apart, in either order
// and with d random, and checks that only the right output goes high, for
// exactly d cycles, starting one cycle after the leading edge. Edges in the same
// cycle must give no pulse.
module tb_pfd;
  logic clk = 1'b0, rst_n = 1'b0, ref_in = 1'b0, fb_in = 1'b0;
  logic up, dn;
  int checks = 0, failures = 0;

  pfd dut (.clk, .rst_n, .ref_in, .fb_in, .up, .dn);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Leading input rises, then the lagging one d cycles later; both drop after.
  task automatic run(input bit ref_leads, input int d);
    int up_w = 0, dn_w = 0, first = -1;
    @(negedge clk);
    if (ref_leads) ref_in = 1'b1; else fb_in = 1'b1;
    if (d == 0) begin ref_in = 1'b1; fb_in = 1'b1; end
    for (int c = 0; c < d + 6; c++) begin
      @(negedge clk);
      if (c == d - 1) begin ref_in = 1'b1; fb_in = 1'b1; end
      if (c == d + 2) begin ref_in = 1'b0; fb_in = 1'b0; end
      if (up) begin up_w++; if (first < 0) first = c; end
      if (dn) begin dn_w++; if (first < 0) first = c; end
      check(!(up && dn), "up and dn together");
    end
    if (d == 0) check(up_w == 0 && dn_w == 0, "simultaneous edges gave a pulse");
    else if (ref_leads) begin
      check(up_w == d && dn_w == 0, $sformatf("ref leads by %0d: up %0d dn %0d", d, up_w, dn_w));
      check(first == 0, "up did not start one cycle after the reference edge");
    end else begin
      check(dn_w == d && up_w == 0, $sformatf("fb leads by %0d: up %0d dn %0d", d, up_w, dn_w));
      check(first == 0, "dn did not start one cycle after the feedback edge");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b1, 0);
    run(1'b1, 1);
    run(1'b0, 1);
    for (int i = 0; i < 60; i++) run(1'($urandom_range(0, 1)), int'($urandom_range(1, 40)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
