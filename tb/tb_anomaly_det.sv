// tb_anomaly_det: self-checking test of the probe anomaly detector.
// Random measured/virtual probe pairs are applied, some identical, some
// close and some far apart, against changing thresholds, including values
// at the extremes of the sample range. Each result (per-cavity error,
// anomaly flag, sticky alarm, anomaly counter) is compared with a reference
// computed here; the one-cycle latency, idle cycles, alarm clearing and
// saturation of the anomaly counter are checked too. Drives change at the falling clock edge.
module tb_anomaly_det;
  import cc_pkg::*;
  localparam int NC = N_CAV;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [DATA_W+1:0] threshold;
  logic              alarm_clear, in_valid, out_valid;
  iq_t [NC-1:0]      p_virt, p_meas;
  logic [DATA_W+1:0] err [NC];
  logic [NC-1:0]     anomaly, alarm;
  logic [15:0]       anomaly_cnt;

  anomaly_det dut (.*);

  int checks = 0, failures = 0;
  int n_anom = 0, n_clear = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("anomaly_det: %s", what);
    end
  endtask

  function automatic sample_t rnd_sample(input int mode);
    case (mode)
      0: return sample_t'(16'sh7fff);
      1: return sample_t'(16'sh8000);
      default: return sample_t'($urandom);
    endcase
  endfunction

  initial begin
    longint         e_ref [NC];
    logic [NC-1:0]  an_ref, al_ref;
    int             cnt_ref;
    threshold = '0; alarm_clear = 1'b0; in_valid = 1'b0; p_virt = '0; p_meas = '0;
    al_ref = '0; cnt_ref = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(alarm == '0 && anomaly_cnt == 0 && !out_valid, "not idle after reset");

    for (int n = 0; n < 400; n++) begin
      // stimulus
      threshold = (n % 50 == 0) ? '0 : 18'($urandom % 20000);
      for (int k = 0; k < NC; k++) begin
        int mode;
        mode = $urandom % 8;
        p_virt[k].i = rnd_sample(mode);
        p_virt[k].q = rnd_sample(7 - mode);
        case ($urandom % 3)
          0: p_meas[k] = p_virt[k];
          1: begin
               p_meas[k].i = p_virt[k].i + sample_t'(($urandom % 64) - 32);
               p_meas[k].q = p_virt[k].q + sample_t'(($urandom % 64) - 32);
             end
          default: begin
               p_meas[k].i = rnd_sample(mode + 1);
               p_meas[k].q = rnd_sample(mode);
             end
        endcase
      end
      in_valid    = (n % 7) != 3;
      alarm_clear = (n % 97) == 96;
      // reference
      an_ref = '0;
      for (int k = 0; k < NC; k++) begin
        sample_t a, b;
        longint di, dq;
        a = p_meas[k].i; b = p_virt[k].i; di = longint'(a) - longint'(b);
        a = p_meas[k].q; b = p_virt[k].q; dq = longint'(a) - longint'(b);
        e_ref[k] = (di < 0 ? -di : di) + (dq < 0 ? -dq : dq);
        an_ref[k] = e_ref[k] > longint'(threshold);
      end
      @(negedge clk);
      check(out_valid == in_valid, "out_valid does not follow in_valid by one cycle");
      if (alarm_clear) begin
        al_ref = '0;
        cnt_ref = 0;
        n_clear++;
      end else if (in_valid) begin
        al_ref |= an_ref;
        if (an_ref != '0) cnt_ref++;
      end
      if (in_valid) begin
        check(anomaly == an_ref, $sformatf("anomaly %b expected %b", anomaly, an_ref));
        for (int k = 0; k < NC; k++)
          check(longint'(err[k]) == e_ref[k],
                $sformatf("err[%0d] %0d expected %0d", k, err[k], e_ref[k]));
        if (an_ref != '0) n_anom++;
      end
      check(alarm == al_ref, $sformatf("alarm %b expected %b", alarm, al_ref));
      check(int'(anomaly_cnt) == cnt_ref, $sformatf("count %0d expected %0d", anomaly_cnt, cnt_ref));
    end
    check(n_anom > 0 && n_clear > 0, "anomaly or alarm clear never exercised");

    // counter saturation: a fault held for more than 2^16 samples
    alarm_clear = 1'b1;
    @(negedge clk);
    alarm_clear = 1'b0;
    in_valid    = 1'b1;
    threshold   = 18'd10;
    p_virt      = '0;
    p_meas      = '0;
    p_meas[2].i = 16'sd100;
    repeat (65540) @(negedge clk);
    check(anomaly_cnt == 16'hffff, $sformatf("counter %0d did not saturate", anomaly_cnt));
    check(alarm == 8'b0000_0100, $sformatf("alarm %b expected 00000100", alarm));
    in_valid = 1'b0;
    $display("anomaly_det: %0d anomalous samples, %0d clears", n_anom, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
