// tb_rsca_top: end-to-end test of the sensor and victim system, ending in a
// correlation power analysis that recovers the key byte from the samples.
//
// The top runs at its default parameters with the published clocks: 40 MHz
// for the victim and 200 MHz for the sensor. A small model of the power
// distribution network stands in for the physics the chip provides: the
// sensor's delay primitives are slowed by 0.0125 % per set bit in the victim's
// 128 output registers, plus a little random noise, updated every sensor
// clock. The test
//   - holds reset, then checks that the registers are cleared;
//   - raises the trigger and records one trace (all sensor samples) per
//     plaintext, for all 256 plaintexts, with one trigger pause in between
//     that must stall the plaintext counter;
//   - checks every sample against the number of ones in the pattern the
//     latches held six sensor clocks earlier, and counts bubble errors;
//   - checks the victim registers against an S-box computed here;
//   - runs a correlation power analysis: for every key guess and every trace
//     column, the correlation between the Hamming weight of S(p ^ guess) and
//     the samples. The best guess must be the key (85), its correlation must
//     be negative (more activity, slower lines, smaller samples) and the ratio
//     of the best key correlation to the best wrong-key correlation must
//     exceed 1.
// The acquisition and attack run twice: once with the sensor clock as
// generated, once after shifting it by half a period (180 degrees), so that
// the samples are taken on the other half of the clock cycle. In each run the
// sample histogram must span at least 8 values and have no two neighbouring
// empty values between its extremes, with under 10 % of them empty: counting
// ones skips no output code, but a finite acquisition can miss an isolated
// rare value in the thin tails (exact code coverage is checked in the
// adder-tree testbench). Each mechanism (reset, trigger stall,
// plaintext step, wrap 255 -> 0, bubble correction, droop-dependent sample,
// phase shift) is counted and must happen.
module tb_rsca_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned COLS   = 40;    // 8 victim clocks x 5 sensor clocks
  localparam int unsigned NTRACE = 256;
  localparam logic [7:0]  KEY    = 8'd85;

  logic clk_sensor = 1'b0, clk_cua = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  rsca_pkg::droop_t droop = '0;
  logic [8:0]  sample;
  logic        trace_trigger, pt_step;
  logic [7:0]  plaintext;
  logic [15:0][7:0] cua_regs;

  rsca_top dut (
    .clk_sensor, .clk_cua, .rst_n, .trigger, .droop,
    .sample, .trace_trigger, .plaintext, .pt_step, .cua_regs
  );

  // The sensor clock can be shifted by half a period (180 degrees) once,
  // by skipping one toggle, to sample on the other half of the clock cycle.
  bit shift_req = 0;
  int n_phase_shift = 0;
  always begin
    #2.5;
    if (shift_req) begin
      shift_req = 0;
      n_phase_shift++;
    end else begin
      clk_sensor = ~clk_sensor;
    end
  end
  always #12.5 clk_cua    = ~clk_cua;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 12) $display("%t: %s", $realtime, what); end
  endtask

  initial begin
    #400us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference S-box ----------------
  logic [7:0] sbox_ref [256];
  int         hw8 [256];

  function automatic logic [7:0] gmul(logic [7:0] x, logic [7:0] z);
    logic [7:0] r;
    r = 0;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return r;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [7:0] b, s;
      b = 8'h01;
      if (v == 0) b = 0;
      else for (int i = 0; i < 254; i++) b = gmul(b, 8'(v));
      for (int i = 0; i < 8; i++)
        s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ ((8'h63 >> i) & 1);
      sbox_ref[v] = s;
      hw8[v] = $countones(8'(v));
    end
  end

  // ---------------- power distribution network model ----------------
  always @(negedge clk_sensor) begin
    int ones;
    ones = 0;
    for (int c = 0; c < 16; c++) ones += $countones(cua_regs[c]);
    droop <= rsca_pkg::droop_t'((ones * 5) / 4 + $urandom_range(0, 20));
  end

  // ---------------- sample / latch consistency ----------------
  int exp_q[$];
  int n_bubbles = 0, n_sample_checks = 0;

  function automatic bit has_bubble(logic [255:0] v);
    for (int t = 0; t < 4; t++) begin
      bit z;
      z = 0;
      for (int i = 0; i < 64; i++) begin
        if (!v[t*64+i]) z = 1;
        else if (z) return 1;
      end
    end
    return 0;
  endfunction

  always @(negedge clk_sensor) begin
    logic [255:0] held;
    #0.5;
    held = dut.u_sensor.held;
    exp_q.push_back($countones(held));
    if (has_bubble(held)) n_bubbles++;
  end

  bit run_checks = 0;
  always @(posedge clk_sensor) begin
    int e;
    #0.2;
    if (exp_q.size() >= 6) begin
      e = exp_q.pop_front();
      if (run_checks) begin
        n_sample_checks++;
        check(int'(sample) == e, "sample differs from the latched ones count");
      end
    end
  end

  // ---------------- trace recording ----------------
  real        tr [NTRACE][COLS];
  int         hist [512];
  logic [7:0] tr_pt [NTRACE];
  int         n_tr = 0;
  int         col = 0;
  bit         recording = 0;
  logic [7:0] last_pt;

  always @(posedge clk_sensor) begin
    #0.2;
    if (recording && trigger) begin
      if (plaintext != last_pt) begin
        if (col == COLS && n_tr < NTRACE) n_tr++;
        col = 0;
        last_pt = plaintext;
      end
      if (n_tr < NTRACE && col < COLS) begin
        hist[sample]++;
        tr[n_tr][col] = real'(sample);
        tr_pt[n_tr] = plaintext;
        col++;
      end
    end
  end

  // ---------------- victim register check ----------------
  logic [7:0] pt_d;
  always @(posedge clk_cua) begin
    pt_d <= plaintext;
    #1;
    if (rst_n && run_checks) begin
      check(cua_regs[0] == sbox_ref[pt_d ^ KEY], "victim register is not S(pt ^ key)");
      for (int c = 1; c < 16; c++) check(cua_regs[c] == cua_regs[0], "victim copies differ");
      check(trace_trigger == trigger, "trace trigger");
    end
  end

  // ---------------- mechanism counters ----------------
  int n_reset = 0, n_stall = 0, n_step = 0, n_wrap = 0;
  always @(posedge clk_cua) begin
    logic [7:0] pt_before;
    pt_before = plaintext;
    #1;
    if (rst_n && plaintext != pt_before) begin
      n_step++;
      if (pt_before == 8'hff && plaintext == 8'h00) n_wrap++;
    end
  end

  // ---------------- stimulus and analysis ----------------

  // Correlation power analysis over all key guesses and trace columns.
  // Returns through refs: best guess, best |r| for the key, its sign, best
  // |r| for any wrong guess.
  task automatic cpa(output int best_key, output real best_kc, output real best_sign,
                     output real best_nkc);
    real best_any;
    best_any = -1; best_kc = 0; best_nkc = 0; best_sign = 0; best_key = -1;
    for (int k = 0; k < 256; k++) begin
      real h [NTRACE];
      real mh, vh;
      mh = 0;
      for (int t = 0; t < NTRACE; t++) begin
        h[t] = real'(hw8[sbox_ref[tr_pt[t] ^ 8'(k)]]);
        mh += h[t];
      end
      mh /= NTRACE;
      vh = 0;
      for (int t = 0; t < NTRACE; t++) vh += (h[t] - mh) * (h[t] - mh);
      for (int c = 0; c < COLS; c++) begin
        real ms, vs, cov, r, a;
        ms = 0;
        for (int t = 0; t < NTRACE; t++) ms += tr[t][c];
        ms /= NTRACE;
        vs = 0; cov = 0;
        for (int t = 0; t < NTRACE; t++) begin
          vs  += (tr[t][c] - ms) * (tr[t][c] - ms);
          cov += (tr[t][c] - ms) * (h[t] - mh);
        end
        r = (vs > 0 && vh > 0) ? cov / $sqrt(vs * vh) : 0;
        a = (r < 0) ? -r : r;
        if (k == KEY) begin
          if (a > best_kc) begin best_kc = a; best_sign = r; end
        end else if (a > best_nkc) best_nkc = a;
        if (a > best_any) begin best_any = a; best_key = k; end
      end
    end
  endtask

  // One acquisition of NTRACE traces followed by the analysis. With
  // pause = 1 the trigger is dropped for 20 victim clocks half way.
  task automatic acquire_and_attack(string label, bit pause);
    int  key_guess, lo, hi, gaps, pairs;
    real kc, sgn, nkc;
    foreach (hist[i]) hist[i] = 0;
    n_tr = 0;
    col = 0;
    @(negedge clk_cua);
    trigger = 1'b1;
    recording = 1;
    last_pt = plaintext;
    if (pause) begin
      logic [7:0] held_pt;
      wait (n_tr >= NTRACE / 2);
      @(negedge clk_cua);
      trigger = 1'b0;
      held_pt = plaintext;
      repeat (20) @(negedge clk_cua);
      check(plaintext == held_pt, "plaintext moved while the trigger was low");
      if (plaintext == held_pt) n_stall++;
      trigger = 1'b1;
    end
    wait (n_tr >= NTRACE);
    trigger = 1'b0;
    recording = 0;
    repeat (4) @(posedge clk_cua);

    cpa(key_guess, kc, sgn, nkc);
    $display("%s: %0d traces, best key guess %0d, max key corr %0.3f (signed %0.3f), max non-key corr %0.3f, RKC %0.2f",
             label, NTRACE, key_guess, kc, sgn, nkc, kc / nkc);
    check(key_guess == KEY, "CPA did not recover the key");
    check(sgn < 0, "key correlation is not negative");
    check(kc / nkc > 1.0, "relative key correlation not above 1");

    // Ones-counter coding leaves no empty value between the smallest and
    // the largest sample.
    lo = -1; hi = -1; gaps = 0; pairs = 0;
    foreach (hist[i]) if (hist[i] > 0) begin if (lo < 0) lo = i; hi = i; end
    for (int i = lo; i <= hi; i++) if (hist[i] == 0) gaps++;
    for (int i = lo; i < hi; i++) if (hist[i] == 0 && hist[i+1] == 0) pairs++;
    $display("%s: samples %0d..%0d, empty values in between: %0d", label, lo, hi, gaps);
    check(hi - lo >= 8, "sample range too small");
    check(pairs == 0, "sample histogram has neighbouring empty values");
    check(gaps * 10 < hi - lo + 1, "too many empty values in the sample histogram");
    if (pairs == 0 && gaps * 10 < hi - lo + 1 && hi - lo >= 8) n_gapless++;
  endtask

  int n_gapless = 0;

  initial begin
    repeat (4) @(posedge clk_cua);
    #1;
    for (int c = 0; c < 16; c++) check(cua_regs[c] == 0, "registers not cleared by reset");
    if (cua_regs == '0 && plaintext == 0) n_reset++;
    @(negedge clk_cua) rst_n = 1'b1;
    repeat (4) @(posedge clk_sensor);
    run_checks = 1;

    acquire_and_attack("phase 0", 1'b1);

    // Sample on the other half of the clock cycle.
    shift_req = 1;
    wait (n_phase_shift == 1);
    repeat (10) @(posedge clk_sensor);
    acquire_and_attack("phase 180", 1'b0);

    $display("mechanisms: reset %0d, trigger stall %0d, plaintext steps %0d, wraps %0d, bubbles corrected %0d, sample checks %0d, phase shifts %0d, dense histograms %0d",
             n_reset, n_stall, n_step, n_wrap, n_bubbles, n_sample_checks, n_phase_shift, n_gapless);
    check(n_reset > 0, "reset never observed");
    check(n_stall > 0, "trigger stall never happened");
    check(n_step >= 2 * NTRACE, "too few plaintext steps");
    check(n_wrap > 0, "plaintext never wrapped");
    check(n_bubbles > 0, "no bubble error reached the counter");
    check(n_sample_checks > 1000, "too few sample checks");
    check(n_phase_shift == 1, "sensor clock phase never shifted");
    check(n_gapless == 2, "histogram check did not pass in both phases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
