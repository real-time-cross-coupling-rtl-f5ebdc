// tb_cc_monitor_top: end-to-end test of the whole station datapath at its
// default parameters (8 cavities, 32 x 32 matrix, unroll 1).
//
// A correction matrix shaped like a real one is loaded: diagonal gains near
// 1.0, Forward/Reflected leakage of about -40 dB inside each cavity (the
// directivity of a waveguide coupler) and channel crosstalk between -70 and
// -100 dB elsewhere. Virtual-probe weights near 1.0 with small phase terms
// are loaded as well. Vectors are then pushed back to back; the measured
// Probe of each is the reference virtual probe plus a little noise, except
// for injected faults on chosen cavities. Checked against a reference model
// computed here: the corrected Forward/Reflected outputs, the virtual probe,
// the anomaly flags, alarms and counter, the rate (one vector per 32 cycles)
// and the latency. Mechanisms counted, each of which must occur: input
// stall (in_valid while in_ready is low), detected anomaly, alarm clear,
// output saturation, and a matrix reload between vectors.
module tb_cc_monitor_top;
  import cc_pkg::*;
  localparam int NC = N_CAV;
  localparam int N  = VEC_LEN;

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

  // ------------------------------------------------------------- reference
  longint C [N][N];
  longint A_i [NC], A_q [NC], B_i [NC], B_q [NC];

  typedef sample_t vec_t [N];
  typedef sample_t pv_t  [2*NC];   // I, Q of each cavity
  vec_t           exp_c   [$];
  pv_t            exp_p   [$];
  logic [NC-1:0]  exp_an  [$];
  int             t_in    [$];

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_stall = 0, n_anom = 0, n_clear = 0, n_sat = 0, n_reload = 0;
  int n_corr = 0, last_corr = 0, min_ii = 1 << 30, max_ii = 0, lat_mon = -1;
  logic [NC-1:0] al_ref = '0;
  int cnt_ref = 0;

  always_ff @(posedge clk) cycle <= cycle + 1;

  function automatic sample_t ref_sat(input longint a);
    longint r;
    r = (a + (64'sd1 <<< 29)) >>> 30;
    if (r > 32767)  return 16'sh7fff;
    if (r < -32768) return 16'sh8000;
    return sample_t'(r);
  endfunction

  function automatic longint q30(input real x);
    return longint'(x * 1073741824.0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("top: %s", what);
    end
  endtask

  task automatic load_matrix();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real v;
        int  u;
        u = $urandom % 2001;
        u = u - 1000;
        if (r == c)
          v = 1.0 + u * 1.0e-4;           // gain error up to 10 %
        else if (r / 4 == c / 4 && (r % 4) / 2 != (c % 4) / 2 && r % 2 == c % 2)
          v = u * 1.0e-5;                 // F/R leakage, about -40 dB
        else
          v = u * 3.0e-7;                 // crosstalk, -70 dB and below
        @(negedge clk);
        mvx_coef_we    = 1'b1;
        mvx_coef_row   = r[$clog2(N)-1:0];
        mvx_coef_col   = c[$clog2(N)-1:0];
        C[r][c]        = q30(v);
        mvx_coef_wdata = coef_t'(C[r][c]);
      end
    @(negedge clk);
    mvx_coef_we = 1'b0;
  endtask

  task automatic load_vp();
    for (int k = 0; k < NC; k++)
      for (int s = 0; s < 2; s++) begin
        longint vi, vq;
        int     ui, uq;
        ui = $urandom % 201;
        uq = $urandom % 201;
        vi = q30(1.0 + (ui - 100) * 1.0e-3);
        vq = q30((uq - 100) * 1.0e-3);
        @(negedge clk);
        vp_coef_we    = 1'b1;
        vp_coef_cav   = k[$clog2(NC)-1:0];
        vp_coef_sel   = s[0];
        vp_coef_wdata = '{i: coef_t'(vi), q: coef_t'(vq)};
        if (s == 0) begin A_i[k] = vi; A_q[k] = vq; end
        else        begin B_i[k] = vi; B_q[k] = vq; end
      end
    @(negedge clk);
    vp_coef_we = 1'b0;
  endtask

  // One RF sample; amp sets the signal level, fault_mask the cavities whose
  // measured probe is made to disagree with the model.
  task automatic send(input int amp, input logic [NC-1:0] fault_mask);
    sample_t x [N];
    vec_t    y;
    pv_t     p;
    logic [NC-1:0] an;
    for (int i = 0; i < N; i++) x[i] = sample_t'(int'($urandom % (2 * amp + 1)) - amp);
    for (int r = 0; r < N; r++) begin
      longint a;
      a = 0;
      for (int c = 0; c < N; c++) a += C[r][c] * longint'(x[c]);
      y[r] = ref_sat(a);
      if (y[r] == 16'sh7fff || y[r] == 16'sh8000) n_sat++;
    end
    for (int k = 0; k < NC; k++) begin
      longint fi, fq, ri, rq;
      fi = y[idx_fi(k)]; fq = y[idx_fq(k)]; ri = y[idx_ri(k)]; rq = y[idx_rq(k)];
      p[2*k]   = ref_sat(A_i[k]*fi - A_q[k]*fq + B_i[k]*ri - B_q[k]*rq);
      p[2*k+1] = ref_sat(A_i[k]*fq + A_q[k]*fi + B_i[k]*rq + B_q[k]*ri);
    end
    an = '0;
    @(negedge clk);
    for (int k = 0; k < NC; k++) begin
      int ni, nq;
      longint e;
      ni = fault_mask[k] ? 3000 : int'($urandom % 21) - 10;
      nq = fault_mask[k] ? -1000 : int'($urandom % 21) - 10;
      fwd_m[k].i  = x[idx_fi(k)];
      fwd_m[k].q  = x[idx_fq(k)];
      refl_m[k].i = x[idx_ri(k)];
      refl_m[k].q = x[idx_rq(k)];
      probe_m[k].i = ref_sat((longint'(p[2*k]) + ni) <<< 30);
      probe_m[k].q = ref_sat((longint'(p[2*k+1]) + nq) <<< 30);
      e = (longint'(probe_m[k].i) > longint'(p[2*k]) ? longint'(probe_m[k].i) - p[2*k] : p[2*k] - longint'(probe_m[k].i))
        + (longint'(probe_m[k].q) > longint'(p[2*k+1]) ? longint'(probe_m[k].q) - p[2*k+1] : p[2*k+1] - longint'(probe_m[k].q));
      an[k] = e > longint'(threshold);
    end
    in_valid = 1'b1;
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
    end
    @(posedge clk);
    exp_c.push_back(y);
    exp_p.push_back(p);
    exp_an.push_back(an);
    t_in.push_back(cycle);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // ------------------------------------------------------------- monitors
  always @(posedge clk) begin
    if (rst_n && corr_valid) begin
      vec_t y;
      checks++;
      if (exp_c.size() == 0) begin
        failures++;
        $display("top: unexpected corrected vector");
      end else begin
        y = exp_c[0];
        exp_c.delete(0);
        for (int k = 0; k < NC; k++) begin
          sample_t g [4];
          g[0] = fwd_c[k].i; g[1] = fwd_c[k].q; g[2] = refl_c[k].i; g[3] = refl_c[k].q;
          if (g[0] !== y[idx_fi(k)] || g[1] !== y[idx_fq(k)] ||
              g[2] !== y[idx_ri(k)] || g[3] !== y[idx_rq(k)]) begin
            failures++;
            $display("top: corrected cavity %0d got (%0d,%0d,%0d,%0d) expected (%0d,%0d,%0d,%0d)",
                     k, g[0], g[1], g[2], g[3], y[idx_fi(k)], y[idx_fq(k)], y[idx_ri(k)], y[idx_rq(k)]);
            break;
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
    if (rst_n && probe_v_valid) begin
      pv_t p;
      checks++;
      if (exp_p.size() == 0) begin
        failures++;
        $display("top: unexpected virtual probe");
      end else begin
        p = exp_p[0];
        exp_p.delete(0);
        for (int k = 0; k < NC; k++) begin
          sample_t gi, gq;
          gi = probe_v[k].i;
          gq = probe_v[k].q;
          if (gi !== p[2*k] || gq !== p[2*k+1]) begin
            failures++;
            $display("top: virtual probe cavity %0d got (%0d,%0d) expected (%0d,%0d)",
                     k, gi, gq, p[2*k], p[2*k+1]);
            break;
          end
        end
      end
    end
    if (rst_n && alarm_clear) begin
      al_ref  = '0;
      cnt_ref = 0;
    end
    if (rst_n && mon_valid) begin
      logic [NC-1:0] an;
      checks++;
      if (exp_an.size() == 0) begin
        failures++;
        $display("top: unexpected monitor result");
      end else begin
        an = exp_an[0];
        exp_an.delete(0);
        if (lat_mon < 0) lat_mon = cycle - t_in[0];
        if (anomaly !== an) begin
          failures++;
          $display("top: anomaly %b expected %b", anomaly, an);
        end
        if (an != '0) n_anom++;
        if (!alarm_clear) begin
          al_ref |= an;
          if (an != '0) cnt_ref++;
        end
      end
    end
  end

  // ------------------------------------------------------------- sequence
  task automatic drain();
    while (exp_an.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    mvx_coef_we = 1'b0; mvx_coef_row = '0; mvx_coef_col = '0; mvx_coef_wdata = '0;
    vp_coef_we = 1'b0; vp_coef_sel = 1'b0; vp_coef_cav = '0; vp_coef_wdata = '0;
    threshold = 18'd200; alarm_clear = 1'b0; in_valid = 1'b0;
    fwd_m = '0; refl_m = '0; probe_m = '0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) C[r][c] = (r == c) ? (64'sd1 <<< 30) : 0;
    for (int k = 0; k < NC; k++) begin
      A_i[k] = 64'sd1 <<< 30; A_q[k] = 0; B_i[k] = 64'sd1 <<< 30; B_q[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // identity matrix and the reset weights of the virtual probe (P = F + R)
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        mvx_coef_we    = 1'b1;
        mvx_coef_row   = r[$clog2(N)-1:0];
        mvx_coef_col   = c[$clog2(N)-1:0];
        mvx_coef_wdata = (r == c) ? coef_t'(64'sd1 <<< 30) : '0;
      end
    @(negedge clk);
    mvx_coef_we = 1'b0;
    send(8000, '0);
    drain();
    check(lat_mon > 0 && lat_mon <= 59 + 22 + 2,
          $sformatf("monitor latency %0d cycles", lat_mon));

    load_matrix();
    load_vp();
    n_reload++;
    // back-to-back vectors, faults on two cavities in two of them
    min_ii = 1 << 30; max_ii = 0; n_corr = 0;
    for (int v = 0; v < 8; v++)
      send(12000, (v == 3) ? 8'b0010_0000 : (v == 5) ? 8'b0000_0011 : 8'b0);
    drain();
    check(min_ii == 32 && max_ii == 32, $sformatf("vector rate %0d..%0d cycles, expected 32", min_ii, max_ii));
    check(alarm == 8'b0010_0011, $sformatf("alarm %b expected 00100011", alarm));
    check(int'(anomaly_cnt) == cnt_ref, $sformatf("anomaly count %0d expected %0d", anomaly_cnt, cnt_ref));

    // clear the alarms
    @(negedge clk);
    alarm_clear = 1'b1;
    @(negedge clk);
    alarm_clear = 1'b0;
    n_clear++;
    check(alarm == '0 && anomaly_cnt == 0, "alarm clear");

    // reload part of the matrix and drive full-scale samples (saturation)
    load_matrix();
    n_reload++;
    for (int v = 0; v < 3; v++) send(32767, (v == 1) ? 8'b1000_0000 : 8'b0);
    drain();
    check(alarm == al_ref, $sformatf("alarm %b expected %b", alarm, al_ref));

    check(n_stall > 0, "input stall never happened");
    check(n_anom > 0,  "anomaly never detected");
    check(n_clear > 0, "alarm clear never exercised");
    check(n_sat > 0,   "saturation never happened");
    check(n_reload > 1, "matrix reload never exercised");
    $display("top: monitor latency %0d cycles, vector rate %0d cycles, %0d stalls, %0d anomalies, %0d saturated samples",
             lat_mon, min_ii, n_stall, n_anom, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
