// vp_tb_unit: drives and checks one virtual_probe instance with a given
// unroll factor.
//
// Sequence: (1) one vector right after reset, where the probe must equal
// F + R (unit weights); (2) random complex weights a[k], b[k] near the unit
// circle and back-to-back vectors with the output always ready, measuring
// latency and initiation interval; (3) full-range weights with random
// output back-pressure (saturation and the stall path). The reference,
// P = a*F + b*R rounded at 30 fractional bits and saturated, is computed
// here in 64-bit integers. Drives change at the falling clock edge.
module vp_tb_unit #(
  parameter int unsigned UNROLL = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done,
  output int   first_lat
);
  import cc_pkg::*;

  localparam int NC   = N_CAV;
  localparam int ITER = 2 * NC / UNROLL;

  logic                  coef_we, coef_sel;
  logic [$clog2(NC)-1:0] coef_cav;
  ciq_t                  coef_wdata;
  logic                  in_valid, in_ready, out_valid, out_ready;
  iq_t [NC-1:0]          in_fwd, in_refl, out_probe;

  virtual_probe #(.NC(NC), .UNROLL(UNROLL)) dut (.*);

  longint A_i [NC], A_q [NC], B_i [NC], B_q [NC];
  sample_t exp_i [$][NC];
  sample_t exp_q [$][NC];
  int      stalls, sats, cycle = 0, n_out, last_out, min_ii, max_ii;
  int      t_in [$];
  logic    measure_ii;

  always_ff @(posedge clk) cycle <= cycle + 1;

  function automatic sample_t ref_sat(input longint a);
    longint r;
    r = (a + (64'sd1 <<< 29)) >>> 30;
    if (r > 32767)  return 16'sh7fff;
    if (r < -32768) return 16'sh8000;
    return sample_t'(r);
  endfunction

  task automatic write_coef(input int k, input logic sel, input longint vi, input longint vq);
    @(negedge clk);
    coef_we    = 1'b1;
    coef_cav   = k[$clog2(NC)-1:0];
    coef_sel   = sel;
    coef_wdata = '{i: coef_t'(vi), q: coef_t'(vq)};
    if (sel) begin B_i[k] = vi; B_q[k] = vq; end
    else     begin A_i[k] = vi; A_q[k] = vq; end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  task automatic send_rand();
    iq_t [NC-1:0] f, r;
    sample_t pi [NC], pq [NC];
    for (int k = 0; k < NC; k++) begin
      f[k] = iq_t'($urandom);
      r[k] = iq_t'($urandom);
    end
    @(negedge clk);
    in_valid = 1'b1;
    in_fwd   = f;
    in_refl  = r;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    for (int k = 0; k < NC; k++) begin
      longint fi, fq, ri, rq;
      sample_t t;
      t = f[k].i; fi = t;
      t = f[k].q; fq = t;
      t = r[k].i; ri = t;
      t = r[k].q; rq = t;
      pi[k] = ref_sat(A_i[k]*fi - A_q[k]*fq + B_i[k]*ri - B_q[k]*rq);
      pq[k] = ref_sat(A_i[k]*fq + A_q[k]*fi + B_i[k]*rq + B_q[k]*ri);
      if (pi[k] == 16'sh7fff || pi[k] == 16'sh8000) sats++;
    end
    exp_i.push_back(pi);
    exp_q.push_back(pq);
    t_in.push_back(cycle);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      sample_t yi [NC], yq [NC];
      checks++;
      if (exp_i.size() == 0) begin
        failures++;
        $display("vp U=%0d: unexpected output", UNROLL);
      end else begin
        yi = exp_i[0]; exp_i.delete(0);
        yq = exp_q[0]; exp_q.delete(0);
        for (int k = 0; k < NC; k++) begin
          sample_t gi, gq;
          gi = out_probe[k].i;
          gq = out_probe[k].q;
          if (gi !== yi[k] || gq !== yq[k]) begin
            failures++;
            $display("vp U=%0d: cavity %0d got (%0d,%0d) expected (%0d,%0d)",
                     UNROLL, k, gi, gq, yi[k], yq[k]);
            break;
          end
        end
        if (n_out == 0) first_lat = cycle - t_in[0];
        if (measure_ii && n_out > 1) begin
          if (cycle - last_out < min_ii) min_ii = cycle - last_out;
          if (cycle - last_out > max_ii) max_ii = cycle - last_out;
        end
      end
      last_out = cycle;
      n_out++;
    end
    if (rst_n && out_valid && !out_ready) stalls++;
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0; stalls = 0; sats = 0; n_out = 0;
    min_ii = 1 << 30; max_ii = 0; measure_ii = 1'b0; first_lat = 0;
    coef_we = 1'b0; coef_sel = 1'b0; coef_cav = '0; coef_wdata = '0;
    in_valid = 1'b0; in_fwd = '0; in_refl = '0; out_ready = 1'b1;
    for (int k = 0; k < NC; k++) begin
      A_i[k] = 64'sd1 <<< 30; A_q[k] = 0; B_i[k] = 64'sd1 <<< 30; B_q[k] = 0;
    end
    @(posedge clk iff rst_n);

    // (1) P = F + R after reset
    send_rand();
    while (exp_i.size() != 0) @(posedge clk);
    checks++;
    if (first_lat != ITER + 3) begin
      failures++;
      $display("vp U=%0d: latency %0d, expected %0d", UNROLL, first_lat, ITER + 3);
    end

    // (2) calibration-like weights, back-to-back vectors
    for (int k = 0; k < NC; k++) begin
      write_coef(k, 1'b0, (64'sd1 <<< 29) + (longint'($signed($urandom)) >>> 3),
                          longint'($signed($urandom)) >>> 3);
      write_coef(k, 1'b1, (64'sd1 <<< 29) + (longint'($signed($urandom)) >>> 3),
                          longint'($signed($urandom)) >>> 3);
    end
    measure_ii = 1'b1;
    n_out = 1;
    for (int v = 0; v < 8; v++) send_rand();
    while (exp_i.size() != 0) @(posedge clk);
    measure_ii = 1'b0;
    checks++;
    if (min_ii != ITER || max_ii != ITER) begin
      failures++;
      $display("vp U=%0d: initiation interval %0d..%0d, expected %0d", UNROLL, min_ii, max_ii, ITER);
    end

    // (3) full-range weights, random back-pressure
    for (int k = 0; k < NC; k++) begin
      write_coef(k, 1'b0, longint'($signed($urandom)), longint'($signed($urandom)));
      write_coef(k, 1'b1, longint'($signed($urandom)), longint'($signed($urandom)));
    end
    fork
      for (int v = 0; v < 12; v++) send_rand();
      begin
        repeat (ITER * 16) begin
          @(negedge clk);
          out_ready = ($urandom % 4) != 0;
        end
        @(negedge clk);
        out_ready = 1'b1;
      end
    join
    while (exp_i.size() != 0) @(posedge clk);
    checks += 2;
    if (stalls == 0) begin
      failures++;
      $display("vp U=%0d: output stall never happened", UNROLL);
    end
    if (sats == 0) begin
      failures++;
      $display("vp U=%0d: saturation never happened", UNROLL);
    end
    $display("vp U=%0d: latency %0d cycles, II %0d cycles, %0d stalls, %0d saturated outputs",
             UNROLL, first_lat, min_ii, stalls, sats);
    done = 1'b1;
  end

endmodule
