// mvx: matrix-vector multiplication that removes cross-coupling from the
// measured Forward and Reflected I/Q samples of a multi-cavity RF station.
//
// Function: y = C * x, where x is the vector of N measured samples (N = 32:
// eight cavities x Forward/Reflected x I/Q, ordered as in cc_pkg), C is a
// user-loaded N x N coefficient matrix found by system identification, and y
// holds the corrected samples. Each y[r] is rounded and saturated to a sample.
//
// How it works: the matrix is walked column group by column group. In every
// cycle UNROLL columns are processed for all N rows at once (N * UNROLL
// multipliers), so one vector takes N / UNROLL cycles, the initiation
// interval given for the unroll factors 1, 2 and 4 (32, 16 and 8 cycles).
// The coefficients sit in a memory of N/UNROLL words, one per column group,
// so a single wide read per cycle feeds all multipliers; the input vector
// shifts by UNROLL samples per cycle instead of being indexed. A pipeline
// registers the coefficient word, then the products, then adds them to N
// row accumulators. A one-vector input buffer lets the next vector be accepted
// while the current one is computed, so back-to-back vectors leave at the
// full rate. The partitioning into column groups, the buffers and the
// pipeline depth are this design's choices; the document only gives the
// operation, the matrix size, the unroll factors and the resulting rates.
//
// Interface:
//   coef_we/coef_row/coef_col/coef_wdata  write one coefficient C[row][col];
//       a write takes effect on the next cycle, so the matrix should be
//       changed while no vector is in flight. The memory is not reset: the
//       matrix must be loaded after power-up.
//   in_valid/in_ready/in_vec   input vector, valid/ready handshake.
//   out_valid/out_ready/out_vec  corrected vector, held until accepted.
// Timing: out_valid rises N/UNROLL + 3 cycles after an input is accepted
// when the engine is idle (the output handshake can then happen N/UNROLL+4
// clock edges after the input handshake); a new vector starts every N/UNROLL
// cycles.
module mvx
  import cc_pkg::*;
#(
  parameter int unsigned N      = VEC_LEN,  // vector length (32)
  parameter int unsigned UNROLL = 1         // columns per cycle (1, 2 or 4)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // coefficient write port
  input  logic                   coef_we,
  input  logic [$clog2(N)-1:0]   coef_row,
  input  logic [$clog2(N)-1:0]   coef_col,
  input  coef_t                  coef_wdata,
  // measured vector in
  input  logic                   in_valid,
  output logic                   in_ready,
  input  sample_t [N-1:0]        in_vec,
  // corrected vector out
  output logic                   out_valid,
  input  logic                   out_ready,
  output sample_t [N-1:0]        out_vec
);

  localparam int unsigned ITER   = N / UNROLL;
  localparam int unsigned IW     = (ITER > 1) ? $clog2(ITER) : 1;
  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(N) + 1;

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // ---------------------------------------------------------------- coefficients
  // One memory word per column group: word g holds, for every row r and
  // lane u, C[r][g*UNROLL + u] at position r*UNROLL + u. A coefficient write
  // updates one position of one word; the engine reads one word per cycle.
  localparam int unsigned LANES = N * UNROLL;

  coef_t [LANES-1:0] coef_mem [ITER];
  coef_t [LANES-1:0] coef_rd;          // word of the group being multiplied

  logic [IW-1:0]              wr_grp;
  logic [$clog2(LANES)-1:0]   wr_lane;

  assign wr_grp  = IW'(int'(coef_col) / UNROLL);
  assign wr_lane = ($clog2(LANES))'(int'(coef_row) * UNROLL + int'(coef_col) % UNROLL);

  always_ff @(posedge clk) begin
    if (coef_we) coef_mem[wr_grp][wr_lane] <= coef_wdata;
  end

  // ---------------------------------------------------------------- input buffer
  logic             pend_vld;
  sample_t [N-1:0]  pend_vec;
  logic             take;      // engine takes the buffered vector this cycle

  assign in_ready = !pend_vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_vld <= 1'b0;
    end else if (in_valid && in_ready) begin
      pend_vld <= 1'b1;
    end else if (take) begin
      pend_vld <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) pend_vec <= in_vec;
  end

  // ---------------------------------------------------------------- engine
  // Stage 0: the group counter addresses the coefficient memory and the
  //          input vector shifts its next UNROLL samples to the front.
  // Stage 1: coefficient word and samples of one group are registered.
  // Stage 2: N x UNROLL products are registered.
  // Stage 3: products are added to the row accumulators.
  logic                 run;       // a vector is being walked
  logic [IW-1:0]        col_grp;   // current column group
  sample_t [N-1:0]      x_sh;      // vector under computation, shifting
  sample_t [UNROLL-1:0] x_grp;     // samples of the group in stage 1
  logic                 s_vld, s_first, s_last;
  logic                 p_vld, p_first, p_last;
  prod_t                prod [N][UNROLL];
  acc_t                 acc  [N];
  acc_t                 acc_next [N];
  logic                 adv;       // pipeline advances
  logic                 grp_last;

  // The only stall: the last partial sums are ready but the output register
  // still holds an unaccepted vector.
  assign adv      = !(p_vld && p_last && out_valid && !out_ready);
  assign grp_last = (col_grp == IW'(ITER - 1));
  assign take     = adv && pend_vld && (!run || grp_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      col_grp <= '0;
      s_vld   <= 1'b0;
      s_first <= 1'b0;
      s_last  <= 1'b0;
      p_vld   <= 1'b0;
      p_first <= 1'b0;
      p_last  <= 1'b0;
    end else if (adv) begin
      s_vld   <= run;
      s_first <= run && (col_grp == '0);
      s_last  <= run && grp_last;
      p_vld   <= s_vld;
      p_first <= s_first;
      p_last  <= s_last;
      if (take) begin
        run     <= 1'b1;
        col_grp <= '0;
      end else if (run) begin
        if (grp_last) run <= 1'b0;
        col_grp <= grp_last ? '0 : col_grp + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      coef_rd <= coef_mem[col_grp];
      x_grp   <= x_sh[UNROLL-1:0];
      if (take) x_sh <= pend_vec;
      else      x_sh <= x_sh >> (UNROLL * DATA_W);
      for (int r = 0; r < int'(N); r++)
        for (int u = 0; u < int'(UNROLL); u++)
          prod[r][u] <= prod_t'($signed(coef_rd[r * UNROLL + u])) * prod_t'($signed(x_grp[u]));
    end
  end

  always_comb begin
    for (int r = 0; r < int'(N); r++) begin
      acc_next[r] = p_first ? '0 : acc[r];
      for (int u = 0; u < int'(UNROLL); u++)
        acc_next[r] = acc_next[r] + acc_t'(prod[r][u]);
    end
  end

  always_ff @(posedge clk) begin
    if (adv && p_vld)
      for (int r = 0; r < int'(N); r++) acc[r] <= acc_next[r];
  end

  // ---------------------------------------------------------------- output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (adv && p_vld && p_last) begin
      out_valid <= 1'b1;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (adv && p_vld && p_last)
      for (int r = 0; r < int'(N); r++)
        out_vec[r] <= round_sat(64'(acc_next[r]));
  end

  // ---------------------------------------------------------------- checks
  initial begin
    assert (N % UNROLL == 0)
      else $fatal(1, "mvx: UNROLL must divide N");
  end

  // Handshake rules: an offered output stays put until it is accepted.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_vec));

endmodule
