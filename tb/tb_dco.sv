// tb_dco: self-checking testbench of the increment/decrement-counter DCO.
// Measures the clk-cycle interval between output pulses: ID_DIV with no
// correction, ID_DIV-1 for the period after an INC, ID_DIV+1 after a DEC, one
// shortened period per INC of a burst, and no change for INC and DEC together.
// Corrections are applied at random points of the output period.
module tb_dco;
  localparam int D = 2;
  logic clk = 1'b0, rst_n = 1'b0, inc = 1'b0, dec = 1'b0;
  logic id_out;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1;
  int periods[$];

  dco #(.ID_DIV(D)) dut (.clk, .rst_n, .inc, .dec, .id_out);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (id_out) begin
      if (last >= 0) periods.push_back(cyc - last);
      last = cyc;
    end
  end

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

  // Apply n_inc INC pulses and n_dec DEC pulses on consecutive cycles (together
  // when both), then check the sum of the next periods.
  task automatic correct(input int n_inc, input int n_dec);
    int n, sum = 0, mn = 1000, mx = 0, m;
    repeat (1 + int'($urandom_range(0, 3))) @(negedge clk);   // random phase
    while (periods.size() > 0) void'(periods.pop_front());
    n = (n_inc > n_dec) ? n_inc : n_dec;
    for (int i = 0; i < n; i++) begin
      inc = (i < n_inc); dec = (i < n_dec);
      @(negedge clk);
    end
    inc = 1'b0; dec = 1'b0;
    m = n + 12;
    wait (periods.size() >= m);
    for (int i = 0; i < m; i++) begin
      sum += periods[i];
      if (periods[i] < mn) mn = periods[i];
      if (periods[i] > mx) mx = periods[i];
    end
    check(sum == m * D - n_inc + n_dec,
          $sformatf("inc %0d dec %0d: %0d periods sum %0d expected %0d", n_inc, n_dec, m, sum, m * D - n_inc + n_dec));
    check(mn >= D - 1 && mx <= D + 1, $sformatf("period out of range %0d..%0d", mn, mx));
    if (n_inc == 0 && n_dec == 0) check(mn == D && mx == D, "free-running period");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    correct(0, 0);
    for (int i = 0; i < 8; i++) correct(1, 0);
    for (int i = 0; i < 8; i++) correct(0, 1);
    correct(1, 0);
    correct(0, 1);
    correct(3, 0);
    correct(0, 4);
    correct(2, 2);
    for (int i = 0; i < 30; i++) begin
      if ($urandom_range(0, 1) == 1) correct(int'($urandom_range(1, 5)), 0);
      else correct(0, int'($urandom_range(1, 5)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
