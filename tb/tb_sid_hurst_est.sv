// tb_sid_hurst_est: drives random window sums (including zero and
// saturating ratios) and checks H_e = sat(log2 W - log2 V) and its two-cycle
// latency after win_valid.
module tb_sid_hurst_est;
  import sid_pkg::*;
  localparam int unsigned ACC_W = 17;

  logic clk = 0, rst_n = 0, win_valid = 0;
  logic [ACC_W-1:0] v_sum = '0, w_sum = '0;
  logic he_valid;
  he_t  he;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sid_hurst_est #(.ACC_W(ACC_W)) dut (.*);

  function automatic logic [ACC_W-1:0] rnd_sum();
    case ($urandom_range(5))
      0: return '0;
      1: return ACC_W'($urandom_range(15));
      2: return '1;
      default: return ACC_W'($urandom) >> $urandom_range(ACC_W - 1);
    endcase
  endfunction

  initial begin
    int exp_he;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      logic [ACC_W-1:0] v, w;
      v = rnd_sum();
      w = rnd_sum();
      exp_he = sid_ref_pkg::ref_he(longint'(v), longint'(w));
      win_valid <= 1; v_sum <= v; w_sum <= w;
      @(posedge clk);
      win_valid <= 0;
      // v_sum and w_sum change: the unit must have captured what it needs
      v_sum <= rnd_sum(); w_sum <= rnd_sum();
      @(posedge clk);
      checks++;
      if (he_valid) begin failures++; $display("FAIL: he_valid one cycle early"); end
      @(posedge clk);
      checks += 2;
      if (!he_valid) begin failures++; $display("FAIL: he_valid missing at k+2"); end
      if (int'(he) != exp_he) begin
        failures++;
        $display("FAIL: V=%0d W=%0d he=%0d expected %0d", v, w, he, exp_he);
      end
      repeat ($urandom_range(2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
