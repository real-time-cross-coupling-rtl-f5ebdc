// cc_monitor_top: real-time cross-coupling removal and probe monitoring for
// one multi-cavity RF station (eight cavities).
//
// Data flow (as in the block design of the two units):
//   measured Forward/Reflected I/Q --> mvx (32 x 32 correction matrix)
//       --> corrected Forward/Reflected I/Q, brought out for the controller
//       --> virtual_probe --> virtual Probe I/Q per cavity
//   anomaly_det compares the virtual Probe with the measured Probe of the
//   same RF sample and raises per-cavity anomaly and alarm flags.
// The measured Probe samples wait in a small FIFO (sync_fifo) while their
// Forward/Reflected samples are in the two arithmetic units; both units
// keep vectors in order, so the FIFO head always matches the virtual probe
// leaving virtual_probe. Placing the comparison after the virtual probe and
// the FIFO alignment are this design's choices.
//
// Interface:
//   in_valid/in_ready with fwd_m, refl_m, probe_m: one RF sample of all
//       cavities (measured Forward, Reflected and Probe, I/Q each).
//   mvx_coef_*: write one entry of the correction matrix (row, col) in the
//       vector order of cc_pkg (4k+0 F_I, 4k+1 F_Q, 4k+2 R_I, 4k+3 R_Q).
//   vp_coef_*: write the complex weight a (sel=0, Forward) or b (sel=1,
//       Reflected) of one cavity's virtual probe.
//   corr_valid with fwd_c/refl_c: corrected signals, one-cycle strobe.
//   probe_v_valid with probe_v: virtual probe, one-cycle strobe.
//   mon_valid with err/anomaly/alarm/anomaly_cnt: monitoring results.
// Timing at UNROLL = 1: a sample is accepted every 32 cycles (the matrix
// unit's initiation interval); the corrected signals appear 35 cycles and
// the monitoring result 56 cycles after the sample is accepted. The
// correction matrix is not reset and must be loaded after power-up.
module cc_monitor_top
  import cc_pkg::*;
#(
  parameter int unsigned UNROLL_MVX = 1,   // matrix columns per cycle (1, 2, 4)
  parameter int unsigned UNROLL_VP  = 1,   // probe components per cycle (1, 2, 4)
  parameter int unsigned FIFO_DEPTH = 8    // measured-probe alignment buffer
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration
  input  logic                     mvx_coef_we,
  input  logic [$clog2(VEC_LEN)-1:0] mvx_coef_row,
  input  logic [$clog2(VEC_LEN)-1:0] mvx_coef_col,
  input  coef_t                    mvx_coef_wdata,
  input  logic                     vp_coef_we,
  input  logic [$clog2(N_CAV)-1:0] vp_coef_cav,
  input  logic                     vp_coef_sel,
  input  ciq_t                     vp_coef_wdata,
  input  logic [DATA_W+1:0]        threshold,
  input  logic                     alarm_clear,
  // measured signals
  input  logic                     in_valid,
  output logic                     in_ready,
  input  iq_t [N_CAV-1:0]          fwd_m,
  input  iq_t [N_CAV-1:0]          refl_m,
  input  iq_t [N_CAV-1:0]          probe_m,
  // corrected signals
  output logic                     corr_valid,
  output iq_t [N_CAV-1:0]          fwd_c,
  output iq_t [N_CAV-1:0]          refl_c,
  // virtual probe
  output logic                     probe_v_valid,
  output iq_t [N_CAV-1:0]          probe_v,
  // monitoring
  output logic                     mon_valid,
  output logic [DATA_W+1:0]        err [N_CAV],
  output logic [N_CAV-1:0]         anomaly,
  output logic [N_CAV-1:0]         alarm,
  output logic [15:0]              anomaly_cnt
);

  // ---------------------------------------------------------------- packing
  sample_t [VEC_LEN-1:0] vec_m, vec_c;

  always_comb begin
    for (int k = 0; k < int'(N_CAV); k++) begin
      vec_m[idx_fi(k)] = fwd_m[k].i;
      vec_m[idx_fq(k)] = fwd_m[k].q;
      vec_m[idx_ri(k)] = refl_m[k].i;
      vec_m[idx_rq(k)] = refl_m[k].q;
      fwd_c[k].i  = vec_c[idx_fi(k)];
      fwd_c[k].q  = vec_c[idx_fq(k)];
      refl_c[k].i = vec_c[idx_ri(k)];
      refl_c[k].q = vec_c[idx_rq(k)];
    end
  end

  // ---------------------------------------------------------------- datapath
  logic mvx_in_ready, mvx_out_valid, vp_in_ready;
  logic fifo_full, fifo_empty;
  logic accept;

  assign in_ready = mvx_in_ready && !fifo_full;
  assign accept   = in_valid && in_ready;

  mvx #(.N(VEC_LEN), .UNROLL(UNROLL_MVX)) u_mvx (
    .clk        (clk),
    .rst_n      (rst_n),
    .coef_we    (mvx_coef_we),
    .coef_row   (mvx_coef_row),
    .coef_col   (mvx_coef_col),
    .coef_wdata (mvx_coef_wdata),
    .in_valid   (in_valid && !fifo_full),
    .in_ready   (mvx_in_ready),
    .in_vec     (vec_m),
    .out_valid  (mvx_out_valid),
    .out_ready  (vp_in_ready),
    .out_vec    (vec_c)
  );

  assign corr_valid = mvx_out_valid && vp_in_ready;

  virtual_probe #(.NC(N_CAV), .UNROLL(UNROLL_VP)) u_vp (
    .clk        (clk),
    .rst_n      (rst_n),
    .coef_we    (vp_coef_we),
    .coef_cav   (vp_coef_cav),
    .coef_sel   (vp_coef_sel),
    .coef_wdata (vp_coef_wdata),
    .in_valid   (mvx_out_valid),
    .in_ready   (vp_in_ready),
    .in_fwd     (fwd_c),
    .in_refl    (refl_c),
    .out_valid  (probe_v_valid),
    .out_ready  (1'b1),
    .out_probe  (probe_v)
  );

  iq_t [N_CAV-1:0] probe_m_q;

  sync_fifo #(.WIDTH($bits(probe_m)), .DEPTH(FIFO_DEPTH)) u_probe_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (accept),
    .wr_data (probe_m),
    .pop     (probe_v_valid),
    .rd_data (probe_m_q),
    .full    (fifo_full),
    .empty   (fifo_empty)
  );

  anomaly_det #(.NC(N_CAV), .CNT_W(16)) u_det (
    .clk         (clk),
    .rst_n       (rst_n),
    .threshold   (threshold),
    .alarm_clear (alarm_clear),
    .in_valid    (probe_v_valid),
    .p_virt      (probe_v),
    .p_meas      (probe_m_q),
    .out_valid   (mon_valid),
    .err         (err),
    .anomaly     (anomaly),
    .alarm       (alarm),
    .anomaly_cnt (anomaly_cnt)
  );

  // Every virtual probe must find its measured probe waiting.
  a_fifo_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    probe_v_valid |-> !fifo_empty);

endmodule
