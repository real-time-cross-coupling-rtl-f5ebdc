// virtual_probe: computes a virtual Probe signal for every cavity from its
// corrected Forward and Reflected signals.
//
// Function: for cavity k, with complex coefficients a[k] and b[k],
//     P[k] = a[k] * F[k] + b[k] * R[k]          (complex arithmetic)
//     P_I  = aI*FI - aQ*FQ + bI*RI - bQ*RQ
//     P_Q  = aI*FQ + aQ*FI + bI*RQ + bQ*RI
// The cavity field seen by the probe is the sum of the calibrated Forward
// and Reflected waves; a[k] and b[k] carry the remaining calibration (gain
// and phase of the probe channel). Reset loads a = b = 1, i.e. P = F + R.
// The document states only that the probe is calculated from the corrected
// Forward and Reflected signals; the complex weighted sum is this design's
// reading of that.
//
// How it works: the 2*N_CAV real outputs (I and Q of each cavity) are
// produced UNROLL per cycle, each from four multiplications, so a vector
// takes 2*N_CAV/UNROLL cycles (16, 8 and 4 for unroll 1, 2 and 4, the
// initiation intervals given for this unit). Products are registered, then
// summed, rounded and saturated into a result register. A one-vector input
// buffer keeps back-to-back vectors at the full rate.
//
// Interface:
//   coef_we/coef_cav/coef_sel/coef_wdata  write a[cav] (sel=0) or b[cav]
//       (sel=1) as a complex coefficient in cc_pkg format.
//   in_valid/in_ready/in_fwd/in_refl  corrected signals, valid/ready.
//   out_valid/out_ready/out_probe     virtual probe, held until accepted.
// Timing: out_valid rises 2*N_CAV/UNROLL + 2 cycles after an input is
// accepted by an idle unit.
module virtual_probe
  import cc_pkg::*;
#(
  parameter int unsigned NC     = N_CAV,  // cavities (8)
  parameter int unsigned UNROLL = 1       // output components per cycle
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    coef_we,
  input  logic [$clog2(NC)-1:0]   coef_cav,
  input  logic                    coef_sel,
  input  ciq_t                    coef_wdata,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  iq_t  [NC-1:0]           in_fwd,
  input  iq_t  [NC-1:0]           in_refl,
  output logic                    out_valid,
  input  logic                    out_ready,
  output iq_t  [NC-1:0]           out_probe
);

  localparam int unsigned NOUT   = 2 * NC;          // real outputs per vector
  localparam int unsigned ITER   = NOUT / UNROLL;
  localparam int unsigned IW     = (ITER > 1) ? $clog2(ITER) : 1;
  localparam int unsigned PROD_W = DATA_W + COEF_W + 1;
  localparam int unsigned SUM_W  = PROD_W + 2;

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [SUM_W-1:0]  sum_t;

  // ---------------------------------------------------------------- coefficients
  ciq_t coef_a [NC];
  ciq_t coef_b [NC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NC); k++) begin
        coef_a[k] <= '{i: COEF_ONE, q: '0};
        coef_b[k] <= '{i: COEF_ONE, q: '0};
      end
    end else if (coef_we) begin
      if (coef_sel) coef_b[coef_cav] <= coef_wdata;
      else          coef_a[coef_cav] <= coef_wdata;
    end
  end

  // ---------------------------------------------------------------- input buffer
  logic            pend_vld;
  iq_t [NC-1:0]    pend_fwd, pend_refl;
  logic            take;

  assign in_ready = !pend_vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      pend_vld <= 1'b0;
    else if (in_valid && in_ready)   pend_vld <= 1'b1;
    else if (take)                   pend_vld <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      pend_fwd  <= in_fwd;
      pend_refl <= in_refl;
    end
  end

  // ---------------------------------------------------------------- engine
  logic            run;
  logic [IW-1:0]   step;
  iq_t [NC-1:0]    x_fwd, x_refl;
  logic            p_vld, p_last;
  logic [IW-1:0]   p_step;
  prod_t           prod [UNROLL][4];
  sample_t         res  [NOUT];     // results being assembled
  logic            adv, step_last;

  assign adv       = !(p_vld && p_last && out_valid && !out_ready);
  assign step_last = (step == IW'(ITER - 1));
  assign take      = adv && pend_vld && (!run || step_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      step   <= '0;
      p_vld  <= 1'b0;
      p_last <= 1'b0;
      p_step <= '0;
    end else if (adv) begin
      p_vld  <= run;
      p_last <= run && step_last;
      p_step <= step;
      if (take) begin
        run  <= 1'b1;
        step <= '0;
      end else if (run) begin
        if (step_last) run <= 1'b0;
        step <= step_last ? '0 : step + 1'b1;
      end
    end
  end

  // Stage 1: four products for each of the UNROLL output components.
  always_ff @(posedge clk) begin
    if (adv) begin
      if (take) begin
        x_fwd  <= pend_fwd;
        x_refl <= pend_refl;
      end
      for (int u = 0; u < int'(UNROLL); u++) begin
        int unsigned m, k;
        m = int'(step) * UNROLL + u;
        k = m / 2;
        if (m % 2 == 0) begin   // I component
          prod[u][0] <=  prod_t'($signed(coef_a[k].i)) * prod_t'($signed(x_fwd[k].i));
          prod[u][1] <= -(prod_t'($signed(coef_a[k].q)) * prod_t'($signed(x_fwd[k].q)));
          prod[u][2] <=  prod_t'($signed(coef_b[k].i)) * prod_t'($signed(x_refl[k].i));
          prod[u][3] <= -(prod_t'($signed(coef_b[k].q)) * prod_t'($signed(x_refl[k].q)));
        end else begin          // Q component
          prod[u][0] <=  prod_t'($signed(coef_a[k].i)) * prod_t'($signed(x_fwd[k].q));
          prod[u][1] <=  prod_t'($signed(coef_a[k].q)) * prod_t'($signed(x_fwd[k].i));
          prod[u][2] <=  prod_t'($signed(coef_b[k].i)) * prod_t'($signed(x_refl[k].q));
          prod[u][3] <=  prod_t'($signed(coef_b[k].q)) * prod_t'($signed(x_refl[k].i));
        end
      end
    end
  end

  // Stage 2: sum, round, saturate and place each component.
  sample_t comp [UNROLL];

  always_comb begin
    for (int u = 0; u < int'(UNROLL); u++) begin
      sum_t s;
      s = sum_t'(prod[u][0]) + sum_t'(prod[u][1])
        + sum_t'(prod[u][2]) + sum_t'(prod[u][3]);
      comp[u] = round_sat(64'(s));
    end
  end

  always_ff @(posedge clk) begin
    if (adv && p_vld)
      for (int u = 0; u < int'(UNROLL); u++)
        res[int'(p_step) * UNROLL + u] <= comp[u];
  end

  // ---------------------------------------------------------------- output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          out_valid <= 1'b0;
    else if (adv && p_vld && p_last)     out_valid <= 1'b1;
    else if (out_ready)                  out_valid <= 1'b0;
  end

  // The last group of components goes straight from the adders to the
  // output register; the earlier ones come from the assembly registers.
  always_ff @(posedge clk) begin
    if (adv && p_vld && p_last) begin
      for (int m = 0; m < int'(NOUT); m++) begin
        sample_t v;
        v = res[m];
        for (int u = 0; u < int'(UNROLL); u++)
          if (m == int'(p_step) * UNROLL + u) v = comp[u];
        if (m % 2 == 0) out_probe[m/2].i <= v;
        else            out_probe[m/2].q <= v;
      end
    end
  end

  initial begin
    assert (NOUT % UNROLL == 0)
      else $fatal(1, "virtual_probe: UNROLL must divide 2*NC");
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_probe));

endmodule
