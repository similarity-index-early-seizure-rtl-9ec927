// tb_sid_diff_accum: checks the windowed second-difference sums against sums
// computed from the stored samples of each window, and the one-cycle latency
// of win_valid after a window's last sample. Samples arrive with random gaps;
// some windows use full-scale alternating samples to reach the largest terms.
module tb_sid_diff_accum;
  import sid_pkg::*;

  localparam int unsigned WIN_LOG2 = 8;
  localparam int unsigned N        = 2 ** WIN_LOG2;
  localparam int unsigned ACC_W    = SAMPLE_W + 1 + WIN_LOG2;
  localparam int          WINDOWS  = 24;

  logic clk = 0, rst_n = 0, sample_valid = 0;
  sample_t sample = '0;
  logic win_valid;
  logic [ACC_W-1:0] v_sum, w_sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sid_diff_accum #(.WIN_LOG2(WIN_LOG2)) dut (.*);

  int win_buf [N];
  int exp_v, exp_w;
  int seen = 0;
  logic last_sent;  // the previous cycle delivered a window's last sample

  function automatic void ref_sums(output int v, output int w);
    v = 0; w = 0;
    for (int i = 0; i + 2 < N; i++) v += sid_ref_pkg::iabs(win_buf[i+2] - 2*win_buf[i+1] + win_buf[i]);
    for (int i = 0; i + 4 < N; i++) w += sid_ref_pkg::iabs(win_buf[i+4] - 2*win_buf[i+2] + win_buf[i]);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (win_valid !== last_sent) begin
        failures++;
        $display("FAIL: win_valid=%0b, expected %0b", win_valid, last_sent);
      end
      if (win_valid) begin
        checks += 2;
        if (v_sum != ACC_W'(exp_v) || w_sum != ACC_W'(exp_w)) begin
          failures++;
          $display("FAIL window %0d: V=%0d/%0d W=%0d/%0d", seen, v_sum, exp_v, w_sum, exp_w);
        end
        seen++;
      end
    end
  end

  initial begin
    last_sent = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < WINDOWS; w++) begin
      for (int i = 0; i < N; i++) begin
        while ($urandom_range(3) == 0) begin
          sample_valid <= 0;
          @(posedge clk);
          last_sent <= 0;
        end
        case (w % 4)
          1:       win_buf[i] = (i % 2) ? 255 : 0;
          2:       win_buf[i] = 128 + int'(100.0 * $sin(6.2832 * real'(i) / 37.0));
          default: win_buf[i] = int'($urandom_range(255));
        endcase
        sample_valid <= 1;
        sample       <= sample_t'(win_buf[i]);
        if (i == N - 1) ref_sums(exp_v, exp_w);
        @(posedge clk);
        last_sent <= (i == N - 1);
      end
    end
    sample_valid <= 0;
    @(posedge clk);
    last_sent <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (seen != WINDOWS) begin
      failures++;
      $display("FAIL: %0d windows seen, expected %0d", seen, WINDOWS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
