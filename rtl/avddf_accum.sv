// Distance accumulators (Accu_d(i) and Accu_alpha(i) of the filter).
//
// For every window pixel i the filter needs the sums over all j of the
// magnitude distance ||xi - xj|| and of the angular distance A(xi, xj).
// Both distances are symmetric and zero for j = i, so the window is fed as
// its 36 unordered pairs (i < j); each pair result is added to the sums of
// both i and j. The pixel values travelling with the pairs are kept as well,
// so that the decision stage sees the window the sums belong to, even while
// the next window is already entering the distance units.
// When the pair marked last arrives, the completed sums (including that
// pair) and the nine pixels are copied to the outputs, out_valid pulses for
// one cycle, and the accumulators restart from zero in the same cycle, so a
// new window may follow with no gap.
// The pairing by symmetry and the snapshot are this design's choices; the
// published loops visit all 81 ordered pairs.
module avddf_accum
  import avddf_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  pair_tag_t in_tag,
  input  dist_t     in_dist,
  input  ang_t      in_ang,
  output logic      out_valid,
  output dsum_t     dsum [WIN],
  output asum_t     asum [WIN],
  output rgb_t      pix  [WIN]
);
  dsum_t acc_d [WIN];
  asum_t acc_a [WIN];
  rgb_t  shadow[WIN];

  // Sums and pixels as they stand after this cycle's pair.
  dsum_t nxt_d [WIN];
  asum_t nxt_a [WIN];
  rgb_t  nxt_p [WIN];

  always_comb begin
    for (int k = 0; k < WIN; k++) begin
      nxt_d[k] = acc_d[k];
      nxt_a[k] = acc_a[k];
      nxt_p[k] = shadow[k];
      if (in_valid && (idx_t'(k) == in_tag.i || idx_t'(k) == in_tag.j)) begin
        nxt_d[k] = acc_d[k] + DSUM_W'(in_dist);
        nxt_a[k] = acc_a[k] + ASUM_W'(in_ang);
        nxt_p[k] = (idx_t'(k) == in_tag.i) ? in_tag.xi : in_tag.xj;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < WIN; k++) begin
        acc_d[k]  <= '0;
        acc_a[k]  <= '0;
        shadow[k] <= '0;
        dsum[k]   <= '0;
        asum[k]   <= '0;
        pix[k]    <= '0;
      end
    end else begin
      out_valid <= in_valid && in_tag.last;
      for (int k = 0; k < WIN; k++) begin
        shadow[k] <= nxt_p[k];
        if (in_valid && in_tag.last) begin
          dsum[k]  <= nxt_d[k];
          asum[k]  <= nxt_a[k];
          pix[k]   <= nxt_p[k];
          acc_d[k] <= '0;
          acc_a[k] <= '0;
        end else begin
          acc_d[k] <= nxt_d[k];
          acc_a[k] <= nxt_a[k];
        end
      end
    end
  end
endmodule
