// tb_sid_stats: random estimates, block lengths shortened to 8 and 16, with
// the block-length select switched at a block boundary and inside a block.
// A reference keeps each block's values and checks mean, spread, the update
// pulses and the valid flag after every estimate.
module tb_sid_stats;
  import sid_pkg::*;
  localparam int unsigned M_LOG2_SHORT = 3;
  localparam int unsigned M_LOG2_LONG  = 4;

  logic clk = 0, rst_n = 0, m_sel = 0, he_valid = 0;
  he_t he = '0;
  he_t mean;
  udev_t var_abs;
  logic stats_valid, mean_upd, var_upd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sid_stats #(.M_LOG2_SHORT(M_LOG2_SHORT), .M_LOG2_LONG(M_LOG2_LONG)) dut (.*);

  int mvals[$], dvals[$];
  int r_mean = 0, r_var = 0;
  bit r_mvalid = 0, r_vvalid = 0;
  int n_mupd = 0, n_vupd = 0;

  task automatic check(input bit exp_mupd, input bit exp_vupd);
    checks += 5;
    if (int'(mean) != r_mean) begin failures++; $display("FAIL mean %0d expected %0d", mean, r_mean); end
    if (int'(var_abs) != r_var) begin failures++; $display("FAIL var %0d expected %0d", var_abs, r_var); end
    if (stats_valid != (r_mvalid && r_vvalid)) begin failures++; $display("FAIL stats_valid"); end
    if (mean_upd != exp_mupd) begin failures++; $display("FAIL mean_upd"); end
    if (var_upd != exp_vupd) begin failures++; $display("FAIL var_upd"); end
  endtask

  initial begin
    int x, m, s, mprev;
    bit mu, vu;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 600; t++) begin
      if (t == 200) m_sel <= 1;            // at a block boundary (25 blocks of 8)
      if (t == 203) m_sel <= 0;            // inside a block of 16
      if (t == 420) m_sel <= 1;
      @(negedge clk);
      m = 2 ** (m_sel ? M_LOG2_LONG : M_LOG2_SHORT);
      x = (t / 100 % 2) ? int'($urandom_range(60)) - 30 : int'($urandom_range(255)) - 128;
      mprev = r_mean;
      mu = 0; vu = 0;
      mvals.push_back(x);
      if (r_mvalid) dvals.push_back(sid_ref_pkg::iabs(x - mprev));
      if (mvals.size() >= m) begin
        s = 0; foreach (mvals[i]) s += mvals[i];
        r_mean = sid_ref_pkg::asr(s, $clog2(m));
        mvals.delete(); mu = 1;
        if (r_mvalid) begin
          s = 0; foreach (dvals[i]) s += dvals[i];
          r_var = sid_ref_pkg::asr(s, $clog2(m));
          dvals.delete(); vu = 1;
        end
      end
      he_valid <= 1; he <= he_t'(x);
      @(posedge clk);
      he_valid <= 0;
      @(negedge clk);
      if (mu) r_mvalid = 1;
      if (vu) r_vvalid = 1;
      n_mupd += mu; n_vupd += vu;
      check(mu, vu);
      repeat ($urandom_range(2)) begin @(posedge clk); #1 check(0, 0); end
    end
    checks++;
    if (n_vupd < 20) begin failures++; $display("FAIL: too few spread updates (%0d)", n_vupd); end
    $display("mean updates %0d, spread updates %0d", n_mupd, n_vupd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
