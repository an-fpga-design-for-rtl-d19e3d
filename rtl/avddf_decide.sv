// AVDDF decision: weighted combination, argmin, threshold and output pixel.
//
// For each window pixel i the combined distance of Eq. (1) is
//     gamma_i = Asum_i^(1-l) * Dsum_i^l ,
// with l = L_QUARTERS/4 (the filter is built with l = 0.75, weights 0.75 on
// the magnitude sum and 0.25 on the angular sum). The pixel with the
// smallest gamma, x(1), replaces the centre pixel when the centre is judged
// noisy, that is when gamma_centre >= xi, with
//     Psi = gamma(1) / (N-1),  xi = gamma(1) + lambda * Psi
//         = gamma(1) * (N-1+lambda)/(N-1)          (N = 9 window pixels).
// Fractional powers are avoided by comparing fourth powers instead, which
// keeps every ordering and the threshold test exact, since all gammas are
// non-negative:
//     g_i = gamma_i^4 = Dsum_i^L_QUARTERS * Asum_i^(4-L_QUARTERS),
//     centre noisy  <=>  g_c * (4(N-1))^4 >= g(1) * (4(N-1) + LAMBDA_X4)^4,
// where LAMBDA_X4 = 4*lambda. Psi and xi thus become two constant factors.
// Timing: the sums are loaded in one cycle, then one pixel index per cycle
// enters a three-stage weighted multiplier (one product per stage, so no
// stage chains two multipliers), whose results go one per cycle into a
// single comparator, as in the block diagram. After the last index the two
// threshold products are registered, and the cycle after that gives the
// 24-bit RGB result (channels concatenated): out_valid pulses DEC_LAT =
// WIN+6 cycles after the cycle in which in_valid is high. busy covers the
// whole window; in_valid must not arrive while busy. Ties in the argmin go
// to the lowest index.
// Fourth-power comparison, the tie rule, the pipelining and lambda's default
// are this design's choices; the document does not give lambda.
module avddf_decide
  import avddf_pkg::*;
#(
  parameter int unsigned L_QUARTERS = 3,  // l = 0.75
  parameter int unsigned LAMBDA_X4  = 4   // lambda = 1.0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  dsum_t dsum [WIN],
  input  asum_t asum [WIN],
  input  rgb_t  pix  [WIN],
  output logic  busy,
  output logic  out_valid,
  output rgb_t  out_pix,
  output logic  out_replaced   // centre was judged noisy and replaced
);
  localparam int unsigned GW  = 4 * ((DSUM_W > ASUM_W) ? DSUM_W : ASUM_W);
  localparam int unsigned KW  = 24;                      // threshold factors
  localparam int unsigned DEN = 4 * (WIN - 1);           // 4(N-1)
  localparam int unsigned NUM = DEN + LAMBDA_X4;         // 4(N-1) + 4 lambda
  localparam logic [KW-1:0] DEN4 = KW'(DEN * DEN * DEN * DEN);
  localparam logic [KW-1:0] NUM4 = KW'(NUM * NUM * NUM * NUM);

  dsum_t      d_r [WIN];
  asum_t      a_r [WIN];
  rgb_t       p_r [WIN];
  logic       issuing;
  logic [3:0] k;                 // index entering the multiplier

  // Factor q (0..3) of g_i: the magnitude sum for the first L_QUARTERS
  // factors, the angular sum for the rest.
  function automatic logic [GW-1:0] factor(int q, dsum_t d, asum_t a);
    return (q < int'(L_QUARTERS)) ? GW'(d) : GW'(a);
  endfunction

  // Weighted multiplier, three stages: f0*f1, *f2, *f3.
  logic          v1, v2, v3;
  idx_t          i1, i2, i3;
  logic [GW-1:0] m1, m2, m3;
  dsum_t         d1, d2;
  asum_t         a1, a2;

  // Comparator and threshold.
  logic [GW-1:0]    g_min, g_ctr;
  idx_t             i_min;
  logic             thr_go, fin;
  logic [GW+KW-1:0] lhs, rhs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      issuing      <= 1'b0;
      k            <= '0;
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      i1 <= '0;   i2 <= '0;   i3 <= '0;
      m1 <= '0;   m2 <= '0;   m3 <= '0;
      d1 <= '0;   d2 <= '0;   a1 <= '0;   a2 <= '0;
      g_min        <= '0;
      g_ctr        <= '0;
      i_min        <= '0;
      thr_go       <= 1'b0;
      fin          <= 1'b0;
      lhs          <= '0;
      rhs          <= '0;
      out_valid    <= 1'b0;
      out_pix      <= '0;
      out_replaced <= 1'b0;
      for (int n = 0; n < WIN; n++) begin
        d_r[n] <= '0;
        a_r[n] <= '0;
        p_r[n] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      thr_go    <= 1'b0;
      fin       <= 1'b0;

      // Load and index issue.
      if (!busy && in_valid) begin
        busy    <= 1'b1;
        issuing <= 1'b1;
        k       <= '0;
        d_r     <= dsum;
        a_r     <= asum;
        p_r     <= pix;
      end else if (issuing) begin
        if (k == 4'(WIN - 1)) issuing <= 1'b0;
        else                  k       <= k + 1'b1;
      end

      // Multiplier stages.
      v1 <= issuing;
      i1 <= idx_t'(k);
      m1 <= factor(0, d_r[k], a_r[k]) * factor(1, d_r[k], a_r[k]);
      d1 <= d_r[k];
      a1 <= a_r[k];
      v2 <= v1;
      i2 <= i1;
      m2 <= m1 * factor(2, d1, a1);
      d2 <= d1;
      a2 <= a1;
      v3 <= v2;
      i3 <= i2;
      m3 <= m2 * factor(3, d2, a2);

      // Comparator: keep the running minimum, first index on ties.
      if (v3) begin
        if (i3 == '0 || m3 < g_min) begin
          g_min <= m3;
          i_min <= i3;
        end
        if (i3 == idx_t'(CENTER)) g_ctr <= m3;
        if (i3 == idx_t'(WIN - 1)) thr_go <= 1'b1;
      end

      // Threshold products, then the output.
      if (thr_go) begin
        lhs <= g_ctr * (GW+KW)'(DEN4);
        rhs <= g_min * (GW+KW)'(NUM4);
        fin <= 1'b1;
      end
      if (fin) begin
        busy         <= 1'b0;
        out_valid    <= 1'b1;
        out_replaced <= (lhs >= rhs);
        out_pix      <= (lhs >= rhs) ? p_r[i_min] : p_r[CENTER];
      end
    end
  end

  // A window may only be handed over while the unit is idle.
  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && busy))
    else $error("avddf_decide: window arrived while busy");
endmodule
