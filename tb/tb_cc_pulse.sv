// tb_cc_pulse: runs one RF pulse of all eight cavities through the whole
// station datapath at its default parameters and checks that the
// cross-coupling is actually removed.
//
// How it works: for every cavity a true Forward and Reflected waveform is
// made up in the shape of a superconducting-cavity pulse (off, filling with
// the Reflected wave decaying from full scale, flat top, then decay with the
// drive off), each with its own amplitude and phase. The testbench mixes
// these true signals with a coupling matrix M built like the real
// situation: a -40 dB complex leakage between Forward and Reflected of the
// same cavity (finite coupler directivity) and -80 dB complex crosstalk
// between all other channel pairs (finite isolation of the digitizer). The
// mixed, rounded samples are fed to the design as the measured signals. The
// correction matrix loaded into the design is the series inverse
// C = I - E + E*E of M = I + E, worked out here; the error it leaves
// (of order E^3) is far below one sample step. The measured Probe is the
// true F + R, and the virtual-probe weights keep their reset value of 1.
//
// Checks: every corrected Forward/Reflected sample lies within 2 steps of
// the true one, while the measured samples are off by much more (the test
// fails if the correction does not improve the error by at least a factor
// of 20); every virtual probe equals the saturated sum of the corrected
// Forward and Reflected outputs; no anomaly is flagged; one sample is taken
// every 32 cycles. The pulse is compressed to 96 samples; its shape, not
// its length, is what matters here.
module tb_cc_pulse;
  import cc_pkg::*;
  localparam int NC = N_CAV;
  localparam int N  = VEC_LEN;
  localparam int S  = 96;          // samples in the pulse
  localparam int TOL = 2;          // allowed error of a corrected sample

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   mvx_coef_we;
  logic [$clog2(N)-1:0]   mvx_coef_row, mvx_coef_col;
  coef_t                  mvx_coef_wdata;
  logic                   vp_coef_we, vp_coef_sel;
  logic [$clog2(NC)-1:0]  vp_coef_cav;
  ciq_t                   vp_coef_wdata;
  logic [DATA_W+1:0]      threshold;
  logic                   alarm_clear;
  logic                   in_valid, in_ready;
  iq_t [NC-1:0]           fwd_m, refl_m, probe_m;
  logic                   corr_valid, probe_v_valid, mon_valid;
  iq_t [NC-1:0]           fwd_c, refl_c, probe_v;
  logic [DATA_W+1:0]      err [NC];
  logic [NC-1:0]          anomaly, alarm;
  logic [15:0]            anomaly_cnt;

  cc_monitor_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  real E  [N][N];                  // coupling minus identity
  real Ci [N][N];                  // correction matrix
  typedef int vec_t [N];
  vec_t true_q [$];
  int   max_meas_err = 0, max_corr_err = 0;
  int   n_corr = 0, n_mon = 0, n_anom = 0;
  int   last_corr = 0, min_ii = 1 << 30, max_ii = 0;

  function automatic int sat16(input int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic real rand_phase();
    int t;
    t = int'($urandom % 6283);
    return t / 1000.0;
  endfunction

  // A complex coupling c from signal pair m (I at 2m) to pair n.
  task automatic couple(input int n, input int m, input real mag);
    real ph, cr, ci;
    ph = rand_phase();
    cr = mag * $cos(ph);
    ci = mag * $sin(ph);
    E[2*n][2*m]     = cr;  E[2*n][2*m+1]   = -ci;
    E[2*n+1][2*m]   = ci;  E[2*n+1][2*m+1] = cr;
  endtask

  // Amplitudes of the true Forward and Reflected waves of one sample.
  task automatic pulse(input int s, input int k, output real af, output real ar);
    real a;
    a = 10000.0 + 600.0 * k;
    if (s < 8) begin
      af = 0.0;      ar = 0.0;
    end else if (s < 48) begin
      af = a;        ar = a * (2.0 * $exp(-(s - 8) / 15.0) - 1.0);
    end else if (s < 72) begin
      af = 0.5 * a;  ar = 0.45 * a;
    end else begin
      af = 0.02 * a; ar = -0.9 * a * $exp(-(s - 72) / 20.0);
    end
  endtask

  task automatic write_coef(input int r, input int c, input real v);
    @(negedge clk);
    mvx_coef_we    = 1'b1;
    mvx_coef_row   = r[$clog2(N)-1:0];
    mvx_coef_col   = c[$clog2(N)-1:0];
    mvx_coef_wdata = coef_t'(longint'(v * 1073741824.0));
    @(negedge clk);
    mvx_coef_we    = 1'b0;
  endtask

  // Corrected signals against the true ones; virtual probe against F + R.
  always @(posedge clk) begin
    if (rst_n && corr_valid) begin
      vec_t t;
      if (true_q.size() == 0) begin
        failures++;
        $display("unexpected corrected vector");
      end else begin
        t = true_q[0];
        true_q.delete(0);
        for (int k = 0; k < NC; k++) begin
          int g [4];
          g[0] = int'(fwd_c[k].i);  g[1] = int'(fwd_c[k].q);
          g[2] = int'(refl_c[k].i); g[3] = int'(refl_c[k].q);
          for (int j = 0; j < 4; j++) begin
            int d;
            d = g[j] - t[4*k+j];
            if (d < 0) d = -d;
            if (d > max_corr_err) max_corr_err = d;
            checks++;
            if (d > TOL) begin
              failures++;
              $display("sample %0d cavity %0d signal %0d: corrected %0d, true %0d",
                       n_corr, k, j, g[j], t[4*k+j]);
            end
          end
        end
      end
      if (n_corr > 0) begin
        if (cycle - last_corr < min_ii) min_ii = cycle - last_corr;
        if (cycle - last_corr > max_ii) max_ii = cycle - last_corr;
      end
      last_corr = cycle;
      n_corr++;
    end
  end

  // The virtual probe of a vector follows its corrected signals in order.
  iq_t [NC-1:0] fc_q [$], rc_q [$];
  always @(posedge clk) begin
    if (rst_n && corr_valid) begin
      fc_q.push_back(fwd_c);
      rc_q.push_back(refl_c);
    end
    if (rst_n && probe_v_valid) begin
      iq_t [NC-1:0] f, r;
      f = fc_q[0];
      r = rc_q[0];
      fc_q.delete(0);
      rc_q.delete(0);
      for (int k = 0; k < NC; k++) begin
        sample_t fi, fq, ri, rq, pi, pq;
        fi = f[k].i; fq = f[k].q; ri = r[k].i; rq = r[k].q;
        pi = probe_v[k].i; pq = probe_v[k].q;
        checks++;
        if (int'(pi) != sat16(int'(fi) + int'(ri)) || int'(pq) != sat16(int'(fq) + int'(rq))) begin
          failures++;
          $display("virtual probe cavity %0d: got (%0d,%0d), expected (%0d,%0d)", k, pi, pq,
                   sat16(int'(fi) + int'(ri)), sat16(int'(fq) + int'(rq)));
        end
      end
    end
    if (rst_n && mon_valid) begin
      n_mon++;
      if (anomaly != '0) n_anom++;
    end
  end

  initial begin
    mvx_coef_we = 1'b0; mvx_coef_row = '0; mvx_coef_col = '0; mvx_coef_wdata = '0;
    vp_coef_we = 1'b0; vp_coef_sel = 1'b0; vp_coef_cav = '0; vp_coef_wdata = '0;
    threshold = 18'd64; alarm_clear = 1'b0;
    in_valid = 1'b0; fwd_m = '0; refl_m = '0; probe_m = '0;

    // Coupling: pairs are F of cavity k at 2k, R of cavity k at 2k+1, which
    // is the packed order of the design's vector (4k+0..3 = F_I F_Q R_I R_Q).
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) E[r][c] = 0.0;
    for (int n = 0; n < 2*NC; n++)
      for (int m = 0; m < 2*NC; m++)
        if (n != m) couple(n, m, (n / 2 == m / 2) ? 1.0e-2 : 1.0e-4);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real sq;
        sq = 0.0;
        for (int j = 0; j < N; j++) sq += E[r][j] * E[j][c];
        Ci[r][c] = ((r == c) ? 1.0 : 0.0) - E[r][c] + sq;
      end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) write_coef(r, c, Ci[r][c]);

    for (int s = 0; s < S; s++) begin
      vec_t t;
      real  meas [N];
      for (int k = 0; k < NC; k++) begin
        real af, ar, phf, phr;
        pulse(s, k, af, ar);
        phf = 0.4 * k + 0.002 * s;
        phr = phf + 0.7;
        t[4*k+0] = int'(af * $cos(phf));
        t[4*k+1] = int'(af * $sin(phf));
        t[4*k+2] = int'(ar * $cos(phr));
        t[4*k+3] = int'(ar * $sin(phr));
      end
      for (int r = 0; r < N; r++) begin
        meas[r] = t[r];
        for (int c = 0; c < N; c++) meas[r] += E[r][c] * t[c];
      end
      @(negedge clk);
      for (int k = 0; k < NC; k++) begin
        int m [4];
        for (int j = 0; j < 4; j++) begin
          int d;
          m[j] = sat16(int'(meas[4*k+j]));
          d = m[j] - t[4*k+j];
          if (d < 0) d = -d;
          if (d > max_meas_err) max_meas_err = d;
        end
        fwd_m[k].i   = sample_t'(m[0]);
        fwd_m[k].q   = sample_t'(m[1]);
        refl_m[k].i  = sample_t'(m[2]);
        refl_m[k].q  = sample_t'(m[3]);
        probe_m[k].i = sample_t'(sat16(t[4*k+0] + t[4*k+2]));
        probe_m[k].q = sample_t'(sat16(t[4*k+1] + t[4*k+3]));
      end
      in_valid = 1'b1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      true_q.push_back(t);
      @(negedge clk);
      in_valid = 1'b0;
    end

    while (n_mon < S) @(posedge clk);
    repeat (4) @(posedge clk);

    checks++;
    if (max_corr_err * 20 > max_meas_err) begin
      failures++;
      $display("correction does not reduce the error enough");
    end
    checks++;
    if (n_anom != 0) begin
      failures++;
      $display("%0d samples flagged as anomalous in a healthy pulse", n_anom);
    end
    checks++;
    if (min_ii != 32 || max_ii != 32) begin
      failures++;
      $display("sample interval %0d..%0d cycles, expected 32", min_ii, max_ii);
    end
    $display("pulse of %0d samples: largest error measured %0d, corrected %0d; interval %0d cycles",
             S, max_meas_err, max_corr_err, min_ii);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
