// anomaly_det: compares the measured Probe signal of every cavity with the
// virtual Probe computed from the corrected Forward and Reflected signals,
// and flags cavities where the two disagree.
//
// Function: for cavity k the error is the L1 distance of the two complex
// samples, err[k] = |Pm_I - Pv_I| + |Pm_Q - Pv_Q|. A cavity whose error
// exceeds the programmable threshold is flagged for that sample (anomaly)
// and in a sticky alarm bit that stays set until alarm_clear. A running
// count of anomalous samples is kept as well (saturating, cleared with the
// alarms).
// The document names the comparison of actual and virtual probe as the
// anomaly detector but gives no metric or decision rule; the L1 distance
// (no multipliers), the fixed threshold and the sticky flags are this
// design's choices.
//
// Interface: in_valid qualifies p_virt and p_meas (the measured probe of the
// same RF sample). Results appear one cycle later with out_valid; the unit
// accepts a sample in every cycle and never stalls.
module anomaly_det
  import cc_pkg::*;
#(
  parameter int unsigned NC    = N_CAV,   // cavities (8)
  parameter int unsigned CNT_W = 16       // width of the anomaly counter
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [DATA_W+1:0]     threshold,
  input  logic                  alarm_clear,
  input  logic                  in_valid,
  input  iq_t [NC-1:0]          p_virt,
  input  iq_t [NC-1:0]          p_meas,
  output logic                  out_valid,
  output logic [DATA_W+1:0]     err     [NC],
  output logic [NC-1:0]         anomaly,
  output logic [NC-1:0]         alarm,
  output logic [CNT_W-1:0]      anomaly_cnt
);

  typedef logic signed [DATA_W:0] diff_t;
  typedef logic [DATA_W+1:0]      dist_t;

  function automatic dist_t absdiff(input sample_t a, input sample_t b);
    diff_t d;
    d = diff_t'(a) - diff_t'(b);
    return (d < 0) ? dist_t'(-d) : dist_t'(d);
  endfunction

  dist_t        l1 [NC];
  logic [NC-1:0] over;

  always_comb begin
    for (int k = 0; k < int'(NC); k++) begin
      l1[k] = absdiff(p_meas[k].i, p_virt[k].i) + absdiff(p_meas[k].q, p_virt[k].q);
      over[k] = l1[k] > threshold;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      anomaly     <= '0;
      alarm       <= '0;
      anomaly_cnt <= '0;
      for (int k = 0; k < int'(NC); k++) err[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        anomaly <= over;
        for (int k = 0; k < int'(NC); k++) err[k] <= l1[k];
      end
      if (alarm_clear) begin
        alarm       <= '0;
        anomaly_cnt <= '0;
      end else if (in_valid) begin
        alarm <= alarm | over;
        if (|over && anomaly_cnt != '1) anomaly_cnt <= anomaly_cnt + 1'b1;
      end
    end
  end

endmodule
