// tb_sid_smoother: random estimates through every averaging weight, checked
// against y <- y + (x - y)/2**shift kept with four extra fraction bits, the
// first estimate loading the state; checks the one-cycle latency.
module tb_sid_smoother;
  import sid_pkg::*;

  logic clk = 0, rst_n = 0, he_valid = 0;
  logic [1:0] avg_shift = '0;
  he_t he = '0;
  logic avg_valid;
  he_t  he_avg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sid_smoother dut (.*);

  initial begin
    int state, x, expv;
    bit primed;
    for (int s = 0; s < 4; s++) begin
      rst_n <= 0; avg_shift <= 2'(s);
      repeat (2) @(posedge clk);
      rst_n <= 1;
      primed = 0; state = 0;
      for (int t = 0; t < 400; t++) begin
        x = (t % 50 < 25) ? int'($urandom_range(255)) - 128 : 40 + int'($urandom_range(8));
        if (!primed) state = x * 16;
        else         state = state + sid_ref_pkg::asr(x * 16 - state, s);
        primed = 1;
        expv = sid_ref_pkg::asr(state, 4);
        he_valid <= 1; he <= he_t'(x);
        @(posedge clk);
        he_valid <= 0;
        @(posedge clk);
        checks += 2;
        if (!avg_valid) begin failures++; $display("FAIL: avg_valid missing"); end
        if (int'(he_avg) != expv) begin
          failures++;
          $display("FAIL shift=%0d: x=%0d avg=%0d expected %0d", s, x, he_avg, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
