// Magnitude distance unit: ||xi - xj||, the Euclidean distance between two
// RGB vectors (Eq. 1's second factor, the left datapath of the filter).
//
// Stage 1 forms the three channel differences, squares them and adds them,
// as the filter's block diagram draws it (three subtractors, three squarers,
// an adder tree). The sum, scaled by 2^(2*DIST_FRAC), then goes through the
// pipelined square root, which yields the distance with DIST_FRAC fraction
// bits, truncated. Throughput is one pair per cycle; latency is MAG_LAT
// cycles from in_valid to out_valid. The tag rides along unchanged.
// The fixed-point format and the pipelining are this design's own choices;
// the published filter computes the same quantity in floating point.
module avddf_mag_dist
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
  output dist_t            distance,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned RAD_W   = 2 * DIST_W;

  logic             s1_valid;
  logic [17:0]      s1_sumsq;    // at most 3*255^2 = 195075
  logic [TAG_W-1:0] s1_tag;

  function automatic logic [15:0] sq_diff(input chan_t a, input chan_t b);
    logic [7:0] d;
    d = (a > b) ? a - b : b - a;
    return 16'(d) * 16'(d);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_sumsq <= '0;
      s1_tag   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_sumsq <= 18'(sq_diff(xi.r, xj.r)) + 18'(sq_diff(xi.g, xj.g))
                + 18'(sq_diff(xi.b, xj.b));
      s1_tag   <= in_tag;
    end
  end

  avddf_isqrt #(.RAD_W(RAD_W), .TAG_W(TAG_W)) u_sqrt (
    .clk, .rst_n,
    .in_valid (s1_valid),
    .in_rad   (RAD_W'(s1_sumsq) << (2 * DIST_FRAC)),
    .in_tag   (s1_tag),
    .out_valid(out_valid),
    .out_root (distance),
    .out_tag  (out_tag)
  );
endmodule
