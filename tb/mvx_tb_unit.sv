// mvx_tb_unit: drives and checks one mvx instance with a given unroll factor.
//
// Sequence: (1) the identity matrix is loaded and one vector must come back
// unchanged; (2) a crosstalk-like matrix (diagonal near 1.0, small
// off-diagonal terms) and a burst of back-to-back vectors with the output
// always ready, measuring latency and initiation interval; (3) a matrix of
// full-range random coefficients with random output back-pressure, which
// exercises saturation and the stall path. Every output is compared with a
// reference y[r] = sat(round(sum_c C[r][c] * x[c] / 2^30)) computed here in
// 64-bit integers.
module mvx_tb_unit #(
  parameter int unsigned UNROLL = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import cc_pkg::*;

  localparam int N    = VEC_LEN;
  localparam int ITER = N / UNROLL;

  logic                 coef_we;
  logic [$clog2(N)-1:0] coef_row, coef_col;
  coef_t                coef_wdata;
  logic                 in_valid, in_ready, out_valid, out_ready;
  sample_t [N-1:0]      in_vec, out_vec;

  mvx #(.N(N), .UNROLL(UNROLL)) dut (.*);

  longint C [N][N];
  sample_t exp_q [$][N];
  int      stalls, sats;
  int      cycle = 0;
  int      t_in [$];
  int      last_out;

  always_ff @(posedge clk) cycle <= cycle + 1;

  function automatic sample_t ref_sat(input longint a);
    longint r;
    r = (a + (64'sd1 <<< 29)) >>> 30;
    if (r > 32767)  return 16'sh7fff;
    if (r < -32768) return 16'sh8000;
    return sample_t'(r);
  endfunction

  task automatic push_expected(input sample_t [N-1:0] x);
    sample_t y [N];
    for (int r = 0; r < N; r++) begin
      longint a;
      a = 0;
      for (int c = 0; c < N; c++) begin
        sample_t xc;
        xc = x[c];
        a += C[r][c] * longint'(xc);
      end
      y[r] = ref_sat(a);
      if (y[r] == 16'sh7fff || y[r] == 16'sh8000) sats++;
    end
    exp_q.push_back(y);
  endtask

  // Drives change at the falling edge, so they are stable at the rising edge.
  task automatic write_coef(input int r, input int c, input longint v);
    @(negedge clk);
    coef_we    = 1'b1;
    coef_row   = r[$clog2(N)-1:0];
    coef_col   = c[$clog2(N)-1:0];
    coef_wdata = coef_t'(v);
    C[r][c]    = v;
    @(negedge clk);
    coef_we    = 1'b0;
  endtask

  task automatic send_rand();
    sample_t [N-1:0] x;
    for (int c = 0; c < N; c++) x[c] = sample_t'($urandom);
    @(negedge clk);
    in_valid = 1'b1;
    in_vec   = x;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    push_expected(x);
    t_in.push_back(cycle);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // Output checker.
  int n_out;
  int first_lat;
  int min_ii, max_ii;
  logic measure_ii;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      sample_t y [N];
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("mvx U=%0d: unexpected output", UNROLL);
      end else begin
        y = exp_q[0];
        exp_q.delete(0);
        for (int r = 0; r < N; r++) begin
          sample_t g;
          g = out_vec[r];
          if (g !== y[r]) begin
            failures++;
            $display("mvx U=%0d: row %0d got %0d expected %0d", UNROLL, r, g, y[r]);
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
    min_ii = 1 << 30; max_ii = 0; measure_ii = 1'b0;
    coef_we = 1'b0; coef_row = '0; coef_col = '0; coef_wdata = '0;
    in_valid = 1'b0; in_vec = '0; out_ready = 1'b1;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) C[r][c] = (r == c) ? (64'sd1 <<< 30) : 0;
    @(posedge clk iff rst_n);
    @(posedge clk);

    // (1) identity matrix
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) write_coef(r, c, (r == c) ? (64'sd1 <<< 30) : 0);
    @(negedge clk);
    send_rand();
    while (exp_q.size() != 0) @(posedge clk);
    @(posedge clk);
    checks++;
    if (first_lat != ITER + 4) begin
      failures++;
      $display("mvx U=%0d: latency %0d, expected %0d", UNROLL, first_lat, ITER + 4);
    end

    // (2) crosstalk-like matrix, back-to-back vectors
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (r == c) write_coef(r, c, (64'sd1 <<< 30) + (longint'($signed($urandom)) >>> 4));
        else        write_coef(r, c, (longint'($signed($urandom)) >>> 14));
    @(posedge clk);
    measure_ii = 1'b1;
    n_out = 1;
    for (int v = 0; v < 8; v++) send_rand();
    while (exp_q.size() != 0) @(posedge clk);
    @(posedge clk);
    measure_ii = 1'b0;
    checks++;
    if (min_ii != ITER || max_ii != ITER) begin
      failures++;
      $display("mvx U=%0d: initiation interval %0d..%0d, expected %0d", UNROLL, min_ii, max_ii, ITER);
    end

    // (3) full-range coefficients, random back-pressure
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        write_coef(r, c, longint'($signed($urandom)));
    @(posedge clk);
    fork
      begin
        for (int v = 0; v < 10; v++) send_rand();
      end
      begin
        repeat (ITER * 14) begin
          @(negedge clk);
          out_ready = ($urandom % 4) != 0;
        end
        @(negedge clk);
        out_ready = 1'b1;
      end
    join
    while (exp_q.size() != 0) @(posedge clk);
    @(posedge clk);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("mvx U=%0d: output stall never happened", UNROLL);
    end
    checks++;
    if (sats == 0) begin
      failures++;
      $display("mvx U=%0d: saturation never happened", UNROLL);
    end
    $display("mvx U=%0d: latency %0d cycles, II %0d cycles, %0d stalls, %0d saturated outputs",
             UNROLL, first_lat, min_ii, stalls, sats);
    done = 1'b1;
  end

endmodule
