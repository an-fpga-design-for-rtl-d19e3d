// Angular distance unit: A(xi, xj) = arccos(xi.xj / (||xi|| ||xj||)), the
// angle between two RGB vectors (Eq. 2, the right datapath of the filter).
//
// The block diagram of the filter forms the dot product and the product of
// the two norms, divides, and takes the arc cosine. This unit computes the
// same angle without a divider: for vectors a and b,
//     arccos(a.b / (|a||b|)) = atan2(|a x b|, a.b),
// so two stages form the dot product and the squared length of the cross
// product, a pipelined square root gives |a x b| (with 8 fraction bits), and
// after a normalising shift, a vectoring CORDIC of CORDIC_ITERS stages turns the pair (a.b, |a x b|)
// into the angle, in radians with ANG_FRAC fraction bits. Since RGB
// components are never negative, the dot product is never negative and the
// angle lies in [0, pi/2]; no quadrant correction is needed.
// A black pixel (0,0,0) has no direction; the angle to or from it is taken
// as pi/2, the value arccos gives when the zero product of the norms is
// guarded against division by zero. This is this design's choice: with an
// angle of 0 instead, a black impulse would have the smallest combined
// distance in its window and would spread instead of being removed.
// Throughput one pair per cycle, latency ANG_LAT cycles; the tag rides along.
module avddf_ang_dist
  import avddf_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  rgb_t             xi,
  input  rgb_t             xj,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output ang_t             angle,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned G     = 8;             // fraction bits of x, y
  localparam int unsigned RAD_W = 52;            // (|a x b|^2 < 2^36) << 2G
  localparam int unsigned CW    = 29;            // CORDIC x/y width, signed
  localparam int unsigned ZW    = ANG_W + 2;     // CORDIC angle, signed

  // round(atan(2^-k) * 2^ANG_FRAC), k = 0 .. CORDIC_ITERS-1
  localparam logic [ZW-1:0] ATAN [CORDIC_ITERS] = '{
    ZW'(12868), ZW'(7596), ZW'(4014), ZW'(2037), ZW'(1023), ZW'(512),
    ZW'(256), ZW'(128), ZW'(64), ZW'(32), ZW'(16), ZW'(8), ZW'(4), ZW'(2),
    ZW'(1)
  };

  // ---------------- stage 1: products ---------------------------------
  // Stage 1a forms the dot product and the three cross-product components;
  // stage 1b squares the components and adds them, so no stage chains two
  // multipliers.
  logic               p_valid;
  logic [17:0]        p_dot;
  logic signed [17:0] p_cx, p_cy, p_cz;
  logic               p_zero;
  logic [TAG_W-1:0]   p_tag;

  logic             s1_valid;
  logic [17:0]      s1_dot;
  logic [35:0]      s1_cross2;
  logic             s1_zero;
  logic [TAG_W-1:0] s1_tag;

  function automatic logic signed [17:0] cross_c(input chan_t a1, input chan_t b2,
                                                 input chan_t a2, input chan_t b1);
    return 18'(signed'({2'b0, 16'(a1) * 16'(b2)})) - 18'(signed'({2'b0, 16'(a2) * 16'(b1)}));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid   <= 1'b0;
      p_dot     <= '0;
      p_cx      <= '0;
      p_cy      <= '0;
      p_cz      <= '0;
      p_zero    <= 1'b0;
      p_tag     <= '0;
      s1_valid  <= 1'b0;
      s1_dot    <= '0;
      s1_cross2 <= '0;
      s1_zero   <= 1'b0;
      s1_tag    <= '0;
    end else begin
      p_valid   <= in_valid;
      p_dot     <= 18'(16'(xi.r) * 16'(xj.r)) + 18'(16'(xi.g) * 16'(xj.g))
                 + 18'(16'(xi.b) * 16'(xj.b));
      p_cx      <= cross_c(xi.g, xj.b, xi.b, xj.g);
      p_cy      <= cross_c(xi.b, xj.r, xi.r, xj.b);
      p_cz      <= cross_c(xi.r, xj.g, xi.g, xj.r);
      p_zero    <= (xi == '0) || (xj == '0);
      p_tag     <= in_tag;
      s1_valid  <= p_valid;
      s1_dot    <= p_dot;
      s1_cross2 <= 36'(p_cx * p_cx) + 36'(p_cy * p_cy) + 36'(p_cz * p_cz);
      s1_zero   <= p_zero;
      s1_tag    <= p_tag;
    end
  end

  // ---------------- square root of |a x b|^2 ---------------------------
  // The dot product and the zero flag travel in the square root's tag.
  localparam int unsigned ST_W = TAG_W + 18 + 1;
  logic             s2_valid;
  logic [25:0]      s2_cross;
  logic [ST_W-1:0]  s2_st;

  avddf_isqrt #(.RAD_W(RAD_W), .TAG_W(ST_W)) u_sqrt (
    .clk, .rst_n,
    .in_valid (s1_valid),
    .in_rad   (RAD_W'(s1_cross2) << (2 * G)),
    .in_tag   ({s1_tag, s1_dot, s1_zero}),
    .out_valid(s2_valid),
    .out_root (s2_cross),
    .out_tag  (s2_st)
  );

  // ---------------- normalisation -------------------------------------
  // Both operands are shifted left by the same amount until the larger one
  // fills 26 bits, so that the CORDIC keeps its resolution for dark pixels.
  logic             n_valid;
  logic [25:0]      n_x, n_y;
  logic             n_zero;
  logic [TAG_W-1:0] n_tag;
  logic [25:0]      x_raw, y_raw, xy_or;
  logic [4:0]       lz;

  always_comb begin
    x_raw = 26'(s2_st[18:1]) << G;
    y_raw = s2_cross;
    xy_or = x_raw | y_raw;
    lz    = '0;
    for (int b = 0; b < 26; b++) if (xy_or[b]) lz = 5'(25 - b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_valid <= 1'b0;
      n_x     <= '0;
      n_y     <= '0;
      n_zero  <= 1'b0;
      n_tag   <= '0;
    end else begin
      n_valid <= s2_valid;
      n_x     <= x_raw << lz;
      n_y     <= y_raw << lz;
      n_zero  <= s2_st[0] || (xy_or == '0);
      n_tag   <= s2_st[ST_W-1 -: TAG_W];
    end
  end

  // ---------------- vectoring CORDIC ------------------------------------
  logic                 cv [CORDIC_ITERS+1];
  logic signed [CW-1:0] cxr[CORDIC_ITERS+1];
  logic signed [CW-1:0] cyr[CORDIC_ITERS+1];
  logic signed [ZW-1:0] czr[CORDIC_ITERS+1];
  logic                 czero[CORDIC_ITERS+1];
  logic [TAG_W-1:0]     ctag[CORDIC_ITERS+1];

  assign cv[0]    = n_valid;
  assign cxr[0]   = CW'(n_x);
  assign cyr[0]   = CW'(n_y);
  assign czr[0]   = '0;
  assign czero[0] = n_zero;
  assign ctag[0]  = n_tag;

  for (genvar k = 0; k < CORDIC_ITERS; k++) begin : g_cordic
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cv[k+1]    <= 1'b0;
        cxr[k+1]   <= '0;
        cyr[k+1]   <= '0;
        czr[k+1]   <= '0;
        czero[k+1] <= 1'b0;
        ctag[k+1]  <= '0;
      end else begin
        cv[k+1]    <= cv[k];
        czero[k+1] <= czero[k];
        ctag[k+1]  <= ctag[k];
        if (cyr[k] > 0) begin
          cxr[k+1] <= cxr[k] + (cyr[k] >>> k);
          cyr[k+1] <= cyr[k] - (cxr[k] >>> k);
          czr[k+1] <= czr[k] + signed'(ATAN[k]);
        end else begin
          cxr[k+1] <= cxr[k] - (cyr[k] >>> k);
          cyr[k+1] <= cyr[k] + (cxr[k] >>> k);
          czr[k+1] <= czr[k] - signed'(ATAN[k]);
        end
      end
    end
  end

  logic signed [ZW-1:0] zf;
  assign zf        = czr[CORDIC_ITERS];
  assign out_valid = cv[CORDIC_ITERS];
  assign out_tag   = ctag[CORDIC_ITERS];
  localparam ang_t HALF_PI = ANG_W'(25736);     // round(pi/2 * 2^ANG_FRAC)
  assign angle     = czero[CORDIC_ITERS] ? HALF_PI :
                     (zf < 0)            ? '0      : ANG_W'(zf);
endmodule
