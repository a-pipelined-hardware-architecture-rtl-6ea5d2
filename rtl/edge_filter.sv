// edge_filter: four-stage pipelined H.264 edge filter.
//
// One filter line (p3..p0 | q0..q3, eight samples across a block edge) enters every cycle and
// leaves four cycles later, so the pipeline processes the four lines of a 4x4 block edge in
// four consecutive cycles and can take the next edge right behind it. The architecture
// splits the work in four stages and consumes the boundary strength only in the third, so
// that Bs can be computed in parallel by a two-cycle analyser. The arithmetic is the
// normative H.264 filter (clause 8.7.2): the sample-activity test against alpha/beta, the
// normal filter for Bs 1..3 with tC0 clipping and the strong filter for Bs 4, with the
// chroma variants (only p0/q0 change, tC = tC0 + 1, 3-tap Bs-4 filter).
// How the work is split between the stages is this design's choice:
//   stage 1  table lookup of alpha, beta, tC0 from indexA/indexB; absolute differences
//   stage 2  threshold compares; unclipped normal-filter delta and p1/q1 deltas;
//            strong and weak Bs-4 results
//   stage 3  Bs arrives (bs_s3); tC, clipping, choice of the filtered values
//   stage 4  clip to 0..255, register outputs
//
// Interface
//   in_valid, in_p, in_q, in_chroma, in_index_a, in_index_b : line presented in cycle t
//   bs_s3 : boundary strength of that same line, presented in cycle t+2
//   out_valid, out_p, out_q : filtered line, valid in cycle t+4 (registered)
module edge_filter
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  quad_t      in_p,        // [0] = p0 ... [3] = p3
  input  quad_t      in_q,        // [0] = q0 ... [3] = q3
  input  logic       in_chroma,
  input  logic [5:0] in_index_a,
  input  logic [5:0] in_index_b,
  input  bs_t        bs_s3,
  output logic       out_valid,
  output quad_t      out_p,
  output quad_t      out_q
);

  // ------------------------------------------------------------------ stage 1
  typedef struct packed {
    logic        valid;
    quad_t       p, q;
    logic        chroma;
    logic [7:0]  alpha;
    logic [4:0]  beta;
    logic [14:0] tc0;
    logic [7:0]  d_p0q0, d_p1p0, d_q1q0, ap, aq;
  } s1_t;

  function automatic logic [7:0] absdiff(input pix_t a, input pix_t b);
    return (a > b) ? (a - b) : (b - a);
  endfunction

  s1_t s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1 <= '0;
    else begin
      s1.valid  <= in_valid;
      s1.p      <= in_p;
      s1.q      <= in_q;
      s1.chroma <= in_chroma;
      s1.alpha  <= alpha_tab(in_index_a);
      s1.beta   <= beta_tab(in_index_b);
      s1.tc0    <= tc0_tab(in_index_a);
      s1.d_p0q0 <= absdiff(in_p[0], in_q[0]);
      s1.d_p1p0 <= absdiff(in_p[1], in_p[0]);
      s1.d_q1q0 <= absdiff(in_q[1], in_q[0]);
      s1.ap     <= absdiff(in_p[2], in_p[0]);
      s1.aq     <= absdiff(in_q[2], in_q[0]);
    end
  end

  // ------------------------------------------------------------------ stage 2
  typedef struct packed {
    logic        valid;
    quad_t       p, q;
    logic        chroma;
    logic [14:0] tc0;
    logic        act;        // |p0-q0| < alpha && |p1-p0| < beta && |q1-q0| < beta
    logic        ap_lt, aq_lt;
    logic        strong_p, strong_q;
    logic signed [9:0] delta0;   // ((q0-p0)*4 + (p1-q1) + 4) >> 3
    logic signed [9:0] dp1, dq1; // (p2 + ((p0+q0+1)>>1) - 2*p1) >> 1, same for q
    pix_t        sp0, sp1, sp2, sq0, sq1, sq2;  // strong filter
    pix_t        wp0, wq0;                      // 3-tap Bs-4 filter
  } s2_t;

  s2_t s2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2 <= '0;
    else begin
      automatic int p0 = int'(s1.p[0]), p1 = int'(s1.p[1]), p2 = int'(s1.p[2]), p3 = int'(s1.p[3]);
      automatic int q0 = int'(s1.q[0]), q1 = int'(s1.q[1]), q2 = int'(s1.q[2]), q3 = int'(s1.q[3]);
      automatic logic small_gap = (s1.d_p0q0 < ((s1.alpha >> 2) + 8'd2));
      s2.valid  <= s1.valid;
      s2.p      <= s1.p;
      s2.q      <= s1.q;
      s2.chroma <= s1.chroma;
      s2.tc0    <= s1.tc0;
      s2.act    <= (s1.d_p0q0 < s1.alpha) && (s1.d_p1p0 < 8'(s1.beta)) && (s1.d_q1q0 < 8'(s1.beta));
      s2.ap_lt  <= (s1.ap < 8'(s1.beta));
      s2.aq_lt  <= (s1.aq < 8'(s1.beta));
      s2.strong_p <= !s1.chroma && (s1.ap < 8'(s1.beta)) && small_gap;
      s2.strong_q <= !s1.chroma && (s1.aq < 8'(s1.beta)) && small_gap;
      s2.delta0 <= 10'((((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
      s2.dp1    <= 10'((p2 + ((p0 + q0 + 1) >> 1) - 2 * p1) >>> 1);
      s2.dq1    <= 10'((q2 + ((p0 + q0 + 1) >> 1) - 2 * q1) >>> 1);
      s2.sp0    <= 8'((p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >> 3);
      s2.sp1    <= 8'((p2 + p1 + p0 + q0 + 2) >> 2);
      s2.sp2    <= 8'((2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >> 3);
      s2.sq0    <= 8'((p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >> 3);
      s2.sq1    <= 8'((p0 + q0 + q1 + q2 + 2) >> 2);
      s2.sq2    <= 8'((2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) >> 3);
      s2.wp0    <= 8'((2 * p1 + p0 + q1 + 2) >> 2);
      s2.wq0    <= 8'((2 * q1 + q0 + p1 + 2) >> 2);
    end
  end

  // ------------------------------------------------------------------ stage 3 (Bs used here)
  typedef struct packed {
    logic        valid;
    quad_t       p, q;       // values that pass unchanged
    logic signed [10:0] np0, nq0, np1, nq1; // candidate new values before 0..255 clipping
    logic        wr_p0, wr_q0, wr_p1, wr_q1;
    logic        use_strong_p, use_strong_q;
    pix_t        sp1, sp2, sq1, sq2;
  } s3_t;

  function automatic logic signed [10:0] clip3(input int lo, input int hi, input int v);
    if (v < lo) return 11'(lo);
    if (v > hi) return 11'(hi);
    return 11'(v);
  endfunction

  s3_t s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3 <= '0;
    else begin
      automatic logic filt = s2.act && (bs_s3 != 3'd0);
      automatic int tc0 = 0;
      automatic int tc;
      automatic int d;
      case (bs_s3)
        3'd1: tc0 = int'(s2.tc0[4:0]);
        3'd2: tc0 = int'(s2.tc0[9:5]);
        3'd3: tc0 = int'(s2.tc0[14:10]);
        default: tc0 = 0;
      endcase
      tc = s2.chroma ? tc0 + 1 : tc0 + int'(s2.ap_lt) + int'(s2.aq_lt);
      d  = int'(clip3(-tc, tc, int'(s2.delta0)));
      s3.valid <= s2.valid;
      s3.p     <= s2.p;
      s3.q     <= s2.q;
      s3.sp1   <= s2.sp1;  s3.sp2 <= s2.sp2;
      s3.sq1   <= s2.sq1;  s3.sq2 <= s2.sq2;
      s3.use_strong_p <= 1'b0;
      s3.use_strong_q <= 1'b0;
      s3.wr_p0 <= filt;
      s3.wr_q0 <= filt;
      s3.wr_p1 <= 1'b0;
      s3.wr_q1 <= 1'b0;
      if (bs_s3 >= 3'd4) begin
        s3.use_strong_p <= filt && s2.strong_p;
        s3.use_strong_q <= filt && s2.strong_q;
        s3.np0 <= s2.strong_p ? 11'(s2.sp0) : 11'(s2.wp0);
        s3.nq0 <= s2.strong_q ? 11'(s2.sq0) : 11'(s2.wq0);
        s3.np1 <= 11'(s2.p[1]);
        s3.nq1 <= 11'(s2.q[1]);
      end else begin
        s3.np0 <= 11'(int'(s2.p[0]) + d);
        s3.nq0 <= 11'(int'(s2.q[0]) - d);
        s3.np1 <= 11'(int'(s2.p[1]) + int'(clip3(-tc0, tc0, int'(s2.dp1))));
        s3.nq1 <= 11'(int'(s2.q[1]) + int'(clip3(-tc0, tc0, int'(s2.dq1))));
        s3.wr_p1 <= filt && !s2.chroma && s2.ap_lt;
        s3.wr_q1 <= filt && !s2.chroma && s2.aq_lt;
      end
    end
  end

  // ------------------------------------------------------------------ stage 4
  function automatic pix_t clip1(input logic signed [10:0] v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_p     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= s3.valid;
      out_p <= s3.p;
      out_q <= s3.q;
      if (s3.wr_p0) out_p[0] <= clip1(s3.np0);
      if (s3.wr_q0) out_q[0] <= clip1(s3.nq0);
      if (s3.wr_p1) out_p[1] <= clip1(s3.np1);
      if (s3.wr_q1) out_q[1] <= clip1(s3.nq1);
      if (s3.use_strong_p) begin
        out_p[1] <= s3.sp1;
        out_p[2] <= s3.sp2;
      end
      if (s3.use_strong_q) begin
        out_q[1] <= s3.sq1;
        out_q[2] <= s3.sq2;
      end
    end
  end

endmodule
