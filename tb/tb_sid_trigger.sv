// tb_sid_trigger: random estimate, mean, spread and configuration; checks
// the trigger against both threshold conditions, its suppression while the
// statistics are not valid, that it holds between windows, and the
// one-cycle latency. Counts the cases decided by each threshold.
module tb_sid_trigger;
  import sid_pkg::*;

  logic clk = 0, rst_n = 0, he_valid = 0, stats_valid = 0;
  udev_t ftp = '0, var_abs = '0;
  logic [2:0] vpp_log2 = '0;
  he_t he = '0, mean = '0;
  logic trigger, trig_valid;
  int checks = 0, failures = 0;
  int n_fire = 0, n_ftp_block = 0, n_var_block = 0, n_suppr = 0;

  always #5 clk = ~clk;

  sid_trigger dut (.*);

  initial begin
    int d, e, prev;
    bit exp_t;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    prev = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      he = he_t'($urandom_range(255));
      mean = he_t'($urandom_range(255));
      var_abs = udev_t'($urandom_range(40));
      ftp = udev_t'($urandom_range(120));
      vpp_log2 = 3'($urandom_range(7));
      stats_valid = ($urandom_range(7) != 0);
      d = sid_ref_pkg::iabs(int'(he) - int'(mean));
      e = int'(var_abs) * (2 ** int'(vpp_log2));
      exp_t = stats_valid && d > int'(ftp) && d > e;
      if (!stats_valid && d > int'(ftp) && d > e) n_suppr++;
      if (stats_valid && d <= int'(ftp) && d > e) n_ftp_block++;
      if (stats_valid && d > int'(ftp) && d <= e) n_var_block++;
      n_fire += exp_t;
      he_valid = 1;
      @(negedge clk);
      he_valid = 0;
      checks += 2;
      if (!trig_valid || trigger != exp_t) begin
        failures++;
        $display("FAIL: he=%0d mean=%0d var=%0d ftp=%0d vpp=%0d sv=%0b trig=%0b exp=%0b",
                 he, mean, var_abs, ftp, vpp_log2, stats_valid, trigger, exp_t);
      end
      // change inputs with no new window: the decision must hold
      he = he_t'($urandom_range(255));
      @(negedge clk);
      checks += 2;
      if (trig_valid || trigger != exp_t) begin failures++; $display("FAIL: trigger did not hold"); end
    end
    $display("fired %0d, held by ftp %0d, held by vpp*Var %0d, suppressed %0d",
             n_fire, n_ftp_block, n_var_block, n_suppr);
    checks++;
    if (n_fire == 0 || n_ftp_block == 0 || n_var_block == 0 || n_suppr == 0) begin
      failures++; $display("FAIL: a case was never exercised");
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
