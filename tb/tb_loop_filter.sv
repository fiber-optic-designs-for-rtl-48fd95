// tb_loop_filter: self-checking testbench of the pulse-forming network and K counter.
// Feeds TDC words, lets the pending count drain and checks: the number of count
// pulses equals the total error, the counter content N is (K/2 + net) mod K, and
// the number of carries / borrows equals the number of wraps of that sum. Also
// checks that a word arriving while pulses are still draining is not lost.
module tb_loop_filter;
  localparam int B = 6;
  localparam int K = 8;
  localparam int MID = (1 << B) - 1;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [B:0] word = 7'(MID);
  logic cnt_clk, cnt_up, carry, borrow;
  logic [$clog2(K)-1:0] count;
  int checks = 0, failures = 0;
  int n_pulse_up = 0, n_pulse_dn = 0, n_carry = 0, n_borrow = 0;
  int total = K / 2;      // reference model: unwrapped counter value

  loop_filter #(.TDC_BITS(B), .K_MOD(K)) dut (.clk, .rst_n, .word, .valid,
    .cnt_clk, .cnt_up, .count, .carry, .borrow);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (cnt_clk &&  cnt_up) n_pulse_up++;
    if (cnt_clk && !cnt_up) n_pulse_dn++;
    if (carry)  n_carry++;
    if (borrow) n_borrow++;
  end

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

  function automatic int floordiv(input int a, input int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  task automatic send(input int err);
    @(negedge clk);
    word = 7'(MID + err);
    valid = 1'b1;
    @(negedge clk);
    valid = 1'b0;
  endtask

  // Send a batch of errors (back to back), wait to drain, compare with the model.
  task automatic batch(input int n, input int lo, input int hi);
    int s = 0, e, up0, dn0, c0, b0, prev;
    up0 = n_pulse_up; dn0 = n_pulse_dn; c0 = n_carry; b0 = n_borrow; prev = total;
    for (int i = 0; i < n; i++) begin
      e = int'($urandom_range(0, hi - lo)) + lo;
      s += e;
      send(e);
    end
    repeat (n * 70 + 10) @(negedge clk);
    total += s;
    check(!cnt_clk, "pending count did not drain");
    check((n_pulse_up - up0) - (n_pulse_dn - dn0) == s,
          $sformatf("net pulses %0d expected %0d", (n_pulse_up - up0) - (n_pulse_dn - dn0), s));
    check(int'(count) == total - K * floordiv(total, K),
          $sformatf("content %0d expected %0d", count, total - K * floordiv(total, K)));
    check((n_carry - c0) - (n_borrow - b0) == floordiv(total, K) - floordiv(prev, K),
          $sformatf("carries-borrows %0d expected %0d", (n_carry - c0) - (n_borrow - b0),
                    floordiv(total, K) - floordiv(prev, K)));
    if (lo >= 0) check(n_borrow == b0, "borrow while counting up");
    if (hi <= 0) check(n_carry == c0, "carry while counting down");
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(int'(count) == K / 2, "reset content");
    // one word of +5: five pulses on consecutive cycles, starting the cycle after valid
    send(5);
    t0 = n_pulse_up;
    repeat (5) @(negedge clk);
    check(n_pulse_up - t0 == 5, "five count pulses within five cycles");
    total += 5;
    repeat (3) @(negedge clk);
    check(n_carry == 1 && int'(count) == 1, $sformatf("4+5 -> carry and N=1, got carries %0d N=%0d", n_carry, count));
    t1 = n_borrow;
    batch(1, -3, -3);
    check(n_borrow - t1 == 1, "1-3 must borrow once");
    batch(6, 0, 63);
    batch(6, -63, 0);
    batch(10, -63, 63);   // mixed, back to back: pending words overlap
    for (int i = 0; i < 20; i++) batch(3, -40, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
