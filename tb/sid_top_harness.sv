// sid_top_harness: stimulus and checker for the whole detector, shared by the
// reduced-size and full-size end-to-end testbenches (they instantiate the
// detector themselves and connect it here).
//
// The stimulus is a synthetic recording made of windows of three kinds:
//   background  uniform noise around mid-scale (H_e near 0)
//   seizure     a large slow oscillation plus noise, period 16 samples: the
//               lag-2 second differences grow about four-fold against the
//               lag-1 ones, so H_e jumps by about 2
//   silent      a constant level: both window sums are zero
// in two phases: M short with no averaging, then M long with averaging
// (weight 1/2). Phase A has one seizure episode, phase B has EPISODES_B
// episodes, each after BG_B background windows; every episode must trigger.
// A reference model computes every window's sums, H_e, averaged H_e, block mean and spread and the
// trigger from the stored samples, and each decision of the detector is
// compared with it. Counted mechanisms: warm-up suppression, mean and spread
// updates, triggers in each seizure episode, both block lengths, averaging
// on and off, silent windows, and sample gaps. The decision latency after a
// window's last sample must equal LATENCY cycles.
module sid_top_harness
  import sid_pkg::*;
#(
  parameter int unsigned WIN_LOG2     = 8,
  parameter int unsigned M_LOG2_SHORT = 7,
  parameter int unsigned M_LOG2_LONG  = 8,
  parameter int          BG_A         = 300,  // background windows, phase A
  parameter int          BG_B         = 300,  // background windows, phase B
  parameter int          SZ           = 10,   // seizure windows per episode
  parameter int          EPISODES_B   = 1,    // background + seizure repeats, phase B
  parameter int          LATENCY      = 5
) (
  input  logic       clk,
  output logic       rst_n,
  output logic       m_sel,
  output udev_t      ftp,
  output logic [2:0] vpp_log2,
  output logic [1:0] avg_shift,
  output logic       sample_valid,
  output sample_t    sample,
  input  logic       trigger,
  input  logic       trig_valid,
  input  logic       he_valid,
  input  he_t        he,
  input  he_t        mean,
  input  udev_t      var_abs,
  input  logic       stats_valid,
  input  logic       mean_upd,
  input  logic       var_upd
);
  localparam int N = 2 ** WIN_LOG2;

  typedef struct {
    int  he;
    int  mean;
    int  var_abs;
    bit  svalid;
    bit  trig;
    bit  mupd;
    bit  vupd;
    int  kind;
    int  phase;
    int  episode;
    longint last_cycle;
  } exp_t;

  exp_t   expq[$];
  int     checks = 0, failures = 0;
  longint cycle = 0;
  bit     done = 0;

  // mechanism counters
  int n_windows = 0, n_suppressed = 0, n_mupd = 0, n_vupd = 0;
  int n_trig_a = 0, n_trig_b = 0, n_silent = 0, n_gaps = 0;
  int n_short_blocks = 0, n_long_blocks = 0, n_avg_on = 0, n_avg_off = 0;
  int n_bg_trig = 0;
  int ep_trig[1 + EPISODES_B];
  int cur_episode = 0;

  // reference state
  int  win_buf[N];
  int  sm_state = 0;
  bit  sm_primed = 0;
  int  r_mean = 0, r_var = 0;
  bit  r_mvalid = 0, r_vvalid = 0;
  int  mvals[$], dvals[$];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic exp_t ref_window(input int kind, input int phase);
    exp_t e;
    int v = 0, w = 0, raw, x, s, m, prev_mean, dev;
    for (int i = 0; i + 2 < N; i++) v += sid_ref_pkg::iabs(win_buf[i+2] - 2*win_buf[i+1] + win_buf[i]);
    for (int i = 0; i + 4 < N; i++) w += sid_ref_pkg::iabs(win_buf[i+4] - 2*win_buf[i+2] + win_buf[i]);
    raw = sid_ref_pkg::ref_he(longint'(v), longint'(w));
    if (!sm_primed) sm_state = raw * 16;
    else            sm_state = sm_state + sid_ref_pkg::asr(raw * 16 - sm_state, int'(avg_shift));
    sm_primed = 1;
    x = sid_ref_pkg::asr(sm_state, 4);
    // decision against the statistics as they stand before this window
    dev = sid_ref_pkg::iabs(x - r_mean);
    e.trig = r_mvalid && r_vvalid && dev > int'(ftp) && dev > r_var * (2 ** int'(vpp_log2));
    // statistics
    m = 2 ** (m_sel ? M_LOG2_LONG : M_LOG2_SHORT);
    prev_mean = r_mean;
    e.mupd = 0; e.vupd = 0;
    mvals.push_back(x);
    if (r_mvalid) dvals.push_back(sid_ref_pkg::iabs(x - prev_mean));
    if (mvals.size() >= m) begin
      s = 0; foreach (mvals[i]) s += mvals[i];
      r_mean = sid_ref_pkg::asr(s, $clog2(m));
      mvals.delete(); e.mupd = 1;
      if (r_mvalid) begin
        s = 0; foreach (dvals[i]) s += dvals[i];
        r_var = sid_ref_pkg::asr(s, $clog2(m));
        dvals.delete(); e.vupd = 1;
        r_vvalid = 1;
      end
      r_mvalid = 1;
    end
    e.he = x; e.mean = r_mean; e.var_abs = r_var;
    e.svalid = r_mvalid && r_vvalid;
    e.kind = kind; e.phase = phase; e.episode = cur_episode;
    if (v == 0) n_silent++;
    return e;
  endfunction

  // kind: 0 background, 1 seizure, 2 silent
  task automatic send_window(input int kind, input int phase);
    exp_t e;
    for (int i = 0; i < N; i++) begin
      int s;
      if ($urandom_range(15) == 0) begin
        sample_valid <= 0;
        n_gaps++;
        @(posedge clk);
      end
      case (kind)
        1:       s = 128 + int'(90.0 * $sin(6.283185 * real'(i) / 16.0)) + int'($urandom_range(10)) - 5;
        2:       s = 128;
        default: s = 128 + int'($urandom_range(40)) - 20;
      endcase
      win_buf[i] = s;
      sample_valid <= 1;
      sample       <= sample_t'(s);
      @(posedge clk);
    end
    e = ref_window(kind, phase);
    e.last_cycle = cycle;
    if (m_sel) n_long_blocks += e.mupd; else n_short_blocks += e.mupd;
    if (avg_shift == 0) n_avg_off++; else n_avg_on++;
    expq.push_back(e);
  endtask

  always @(posedge clk) begin
    if (rst_n && trig_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: decision with no window outstanding");
      end else begin
        e = expq.pop_front();
        n_windows++;
        checks += 7;
        if (cycle - e.last_cycle != longint'(LATENCY)) begin
          failures++; $display("FAIL: latency %0d", cycle - e.last_cycle);
        end
        if (int'(he) != e.he || int'(mean) != e.mean || int'(var_abs) != e.var_abs) begin
          failures++;
          $display("FAIL window %0d: he=%0d/%0d mean=%0d/%0d var=%0d/%0d", n_windows,
                   he, e.he, mean, e.mean, var_abs, e.var_abs);
        end
        if (stats_valid != e.svalid) begin failures++; $display("FAIL: stats_valid"); end
        if (trigger != e.trig) begin
          failures++; $display("FAIL window %0d: trigger %0b expected %0b", n_windows, trigger, e.trig);
        end
        if (!e.svalid) n_suppressed++;
        if (trigger && e.kind == 1 && e.phase == 0) n_trig_a++;
        if (trigger && e.kind == 1 && e.phase == 1) n_trig_b++;
        if (trigger && e.kind != 1) n_bg_trig++;
        if (trigger && e.kind == 1) ep_trig[e.episode]++;
      end
    end
    if (rst_n && mean_upd) n_mupd++;
    if (rst_n && var_upd)  n_vupd++;
  end

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    foreach (ep_trig[i]) ep_trig[i] = 0;
    rst_n = 0; m_sel = 0; ftp = udev_t'(16); vpp_log2 = 3'd1; avg_shift = 2'd0;
    sample_valid = 0; sample = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // phase A: short blocks, no averaging
    for (int w = 0; w < BG_A; w++) send_window((w % 37 == 5) ? 2 : 0, 0);
    for (int w = 0; w < SZ; w++)   send_window(1, 0);
    for (int w = 0; w < 4; w++)    send_window(0, 0);
    // phase B: long blocks, averaging with weight 1/2; the configuration is
    // static, so let the last window's decision leave the pipeline first
    sample_valid <= 0;
    repeat (LATENCY + 2) @(posedge clk);
    m_sel <= 1; avg_shift <= 2'd1;
    for (int ep = 1; ep <= EPISODES_B; ep++) begin
      cur_episode = ep;
      for (int w = 0; w < BG_B; w++) send_window(0, 1);
      for (int w = 0; w < SZ; w++)   send_window(1, 1);
      for (int w = 0; w < 4; w++)    send_window(0, 1);
    end
    sample_valid <= 0;
    repeat (LATENCY + 4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d windows without decision", expq.size()); end
    need("warm-up suppression", n_suppressed);
    need("mean update", n_mupd);
    need("spread update", n_vupd);
    need("trigger in seizure episode A", n_trig_a);
    need("trigger in seizure episode B", n_trig_b);
    for (int ep = 0; ep <= EPISODES_B; ep++) begin
      checks++;
      if (ep_trig[ep] == 0) begin failures++; $display("FAIL: seizure episode %0d not detected", ep); end
    end
    need("silent window", n_silent);
    need("sample gap", n_gaps);
    need("short block", n_short_blocks);
    need("long block", n_long_blocks);
    need("averaging off", n_avg_off);
    need("averaging on", n_avg_on);
    $display("windows %0d, suppressed %0d, mean updates %0d, spread updates %0d",
             n_windows, n_suppressed, n_mupd, n_vupd);
    $display("triggers: seizure A %0d/%0d, seizure B %0d/%0d, outside seizures %0d",
             n_trig_a, SZ, n_trig_b, SZ * EPISODES_B, n_bg_trig);
    $display("seizure episodes %0d, detected %0d", 1 + EPISODES_B,
             ep_trig.sum() with (int'(item > 0)));
    $display("short blocks %0d, long blocks %0d, silent windows %0d, sample gaps %0d",
             n_short_blocks, n_long_blocks, n_silent, n_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1;
    $finish;
  end

  initial begin
    repeat ((BG_A + (BG_B + SZ + 4) * EPISODES_B + SZ + 8) * N * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
