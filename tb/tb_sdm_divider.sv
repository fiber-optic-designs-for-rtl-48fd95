// tb_sdm_divider: self-checking testbench of the sigma-delta fractional divider.
// Counts DCO pulses between feedback pulses. For a ratio div_int + f/256 the
// first-order accumulator (starting at zero) must make period p (0-based) last
// div_int + floor(p*f/256) - floor((p-1)*f/256) DCO pulses, so after P periods the
// total is P*div_int + floor((P-1)*f/256) for P >= 1.
module tb_sdm_divider;
  localparam int DW = 8, FW = 8;
  logic clk = 1'b0, rst_n = 1'b0, dco_in = 1'b0;
  logic [DW-1:0] div_int = 8'd5;
  logic [FW-1:0] div_frac = '0;
  logic fb_out, extra;
  int checks = 0, failures = 0;

  sdm_divider #(.DIV_W(DW), .FRAC_W(FW)) dut (.clk, .rst_n, .dco_in, .div_int, .div_frac, .fb_out, .extra);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Run nper output periods with a DCO pulse every `gap` cycles from a fresh reset.
  task automatic run(input int di, input int fr, input int nper, input int gap);
    int pulses = 0, periods = 0, cyc = 0, last_fb = -1, fb_lat_bad = 0;
    rst_n = 1'b0;
    div_int = DW'(di); div_frac = FW'(fr);
    @(negedge clk); rst_n = 1'b1;
    while (periods < nper) begin
      @(negedge clk);
      cyc++;
      dco_in = (cyc % gap == 0);
      @(posedge clk);
      if (dco_in) pulses++;
      #1;
      if (fb_out) begin
        periods++;
        check(pulses == periods * di + ((periods - 1) * fr) / 256,
              $sformatf("int %0d frac %0d: after %0d periods %0d pulses, expected %0d",
                        di, fr, periods, pulses, periods * di + ((periods - 1) * fr) / 256));
        if (!dco_in) fb_lat_bad++;  // fb must come with the closing DCO pulse's cycle
      end
    end
    dco_in = 1'b0;
    check(fb_lat_bad == 0, "feedback pulse not one cycle after the closing DCO pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(5, 0, 20, 2);
    run(5, 64, 40, 2);
    run(32, 128, 30, 2);
    run(1, 0, 10, 3);
    run(3, 255, 40, 1);
    for (int i = 0; i < 10; i++) run(int'($urandom_range(1, 40)), int'($urandom_range(0, 255)), 30, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
