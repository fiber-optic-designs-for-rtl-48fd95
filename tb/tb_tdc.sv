// tb_tdc: self-checking testbench of the counter-based time-to-digital converter.
// Drives UP for a cycles and/or DN for b cycles (contiguous, one measurement) and
// checks that the word is 63 + a - b, that valid comes exactly one cycle after the
// pulse ends, and that pulses longer than 63 cycles give full-scale words first.
module tb_tdc;
  localparam int B = 6;
  localparam int MID = (1 << B) - 1;
  logic clk = 1'b0, rst_n = 1'b0, up = 1'b0, dn = 1'b0;
  logic [B:0] word;
  logic valid;
  int checks = 0, failures = 0;

  tdc #(.TDC_BITS(B)) dut (.clk, .rst_n, .up, .dn, .word, .valid);

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

  // Long pulses are split into full-scale words: the errors of all words of a
  // measurement must add up to a - b, every word must lie in 0..2*MID, and the
  // last word must come exactly one cycle after the pulse ends.
  task automatic measure(input int a, input int b);
    int sum = 0, nwords = 0, lat = -1, exp_words;
    exp_words = 1 + ((a > 0) ? (a - 1) / MID : 0) + ((b > 0) ? (b - 1) / MID : 0);
    @(negedge clk);
    for (int c = 0; c < a + b; c++) begin
      up = (c < a); dn = (c >= a);
      @(negedge clk);
      if (valid) begin
        sum += int'(word) - MID; nwords++;
        check(int'(word) == ((c < a) ? 2 * MID : 0), $sformatf("full-scale word %0d", word));
      end
    end
    up = 1'b0; dn = 1'b0;
    for (int c = 0; c < 4; c++) begin
      @(negedge clk);
      if (valid) begin sum += int'(word) - MID; nwords++; if (lat < 0) lat = c; end
    end
    check(sum == a - b, $sformatf("a=%0d b=%0d: words add up to %0d", a, b, sum));
    check(nwords == exp_words, $sformatf("a=%0d b=%0d: %0d words, expected %0d", a, b, nwords, exp_words));
    check(lat == 0, $sformatf("a=%0d b=%0d: last word latency %0d", a, b, lat));
    check(int'(word) <= 2 * MID, "word out of range");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(int'(word) == MID, "reset word is not the mid value");
    measure(1, 0);
    measure(0, 1);
    measure(10, 0);
    measure(0, 25);
    measure(70, 0);   // longer than full scale
    measure(128, 0);
    measure(64, 0);
    measure(0, 80);
    measure(0, 200);
    measure(7, 3);
    for (int i = 0; i < 80; i++) begin
      if ($urandom_range(0, 1) == 1) measure(int'($urandom_range(1, 200)), 0);
      else measure(0, int'($urandom_range(1, 200)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
