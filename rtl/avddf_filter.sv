// AVDDF filter: turns one 3x3 RGB window into one filtered RGB pixel.
//
// Structure (the filter's block diagram, with its three loops unrolled into
// a pipeline):
//   pair issue  ->  magnitude distance unit  --\
//               ->  angular distance unit    ----> accumulators -> decision
// A window is taken when win_valid and win_ready are both high; the issue
// stage copies it and sends its 36 unordered pixel pairs (i < j, in the
// order (0,1),(0,2)..(0,8),(1,2)..(7,8)) into both distance units, one pair
// per cycle. win_ready is high while idle and during the cycle the last
// pair is sent, so successive windows stream back to back: one filtered pixel every
// NPAIRS = 36 cycles. The magnitude result is delayed to meet the slower
// angular one, the accumulators close a window when its last pair arrives,
// and the decision stage produces the output pixel DEC_LAT cycles later.
// Latency from the cycle a window is accepted to out_valid is
// NPAIRS + ANG_LAT + 1 + DEC_LAT = 36 + 44 + 1 + 15 = 96 cycles. Results
// leave in the order the windows arrived; there is no output backpressure.
// The window order, pair order and pipelining are this design's choices.
module avddf_filter
  import avddf_pkg::*;
#(
  parameter int unsigned L_QUARTERS = 3,
  parameter int unsigned LAMBDA_X4  = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic win_valid,
  output logic win_ready,
  input  rgb_t win [WIN],
  output logic out_valid,
  output rgb_t out_pix,
  output logic out_replaced
);
  localparam int unsigned TAG_W = $bits(pair_tag_t);
  localparam int unsigned DLY   = ANG_LAT - MAG_LAT;

  // ---------------- pair issue (Loop1 / Loop2) -------------------------
  rgb_t cur [WIN];
  logic issuing;
  idx_t pi, pj;

  logic last_pair;
  assign last_pair = issuing && (pi == 4'(WIN - 2)) && (pj == 4'(WIN - 1));
  // A new window is taken while idle or while the last pair of the
  // previous one is being sent.
  assign win_ready = !issuing || last_pair;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      pi      <= '0;
      pj      <= '0;
      for (int n = 0; n < WIN; n++) cur[n] <= '0;
    end else if (win_ready) begin
      issuing <= win_valid;
      if (win_valid) begin
        cur <= win;
        pi  <= 4'd0;
        pj  <= 4'd1;
      end
    end else if (pj == 4'(WIN - 1)) begin
      pi <= pi + 1'b1;
      pj <= pi + 4'd2;
    end else begin
      pj <= pj + 1'b1;
    end
  end

  pair_tag_t issue_tag;
  always_comb begin
    issue_tag.i    = pi;
    issue_tag.j    = pj;
    issue_tag.last = last_pair;
    issue_tag.xi   = cur[pi];
    issue_tag.xj   = cur[pj];
  end

  // ---------------- distance units --------------------------------------
  logic  mag_valid, ang_valid;
  dist_t mag_d;
  ang_t  ang_a;
  logic  mag_unused_tag;
  logic [TAG_W-1:0] ang_tag;

  avddf_mag_dist #(.TAG_W(1)) u_mag (
    .clk, .rst_n,
    .in_valid (issuing),
    .xi       (issue_tag.xi),
    .xj       (issue_tag.xj),
    .in_tag   (1'b0),
    .out_valid(mag_valid),
    .distance (mag_d),
    .out_tag  (mag_unused_tag)
  );

  avddf_ang_dist #(.TAG_W(TAG_W)) u_ang (
    .clk, .rst_n,
    .in_valid (issuing),
    .xi       (issue_tag.xi),
    .xj       (issue_tag.xj),
    .in_tag   (issue_tag),
    .out_valid(ang_valid),
    .angle    (ang_a),
    .out_tag  (ang_tag)
  );

  // Delay line bringing the magnitude result level with the angle.
  dist_t mag_dly [DLY+1];
  assign mag_dly[0] = mag_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int n = 1; n <= DLY; n++) mag_dly[n] <= '0;
    else        for (int n = 1; n <= DLY; n++) mag_dly[n] <= mag_dly[n-1];
  end

  // ---------------- accumulators and decision --------------------------
  logic  acc_valid;
  logic  dec_busy;
  dsum_t dsum [WIN];
  asum_t asum [WIN];
  rgb_t  wpix [WIN];

  avddf_accum u_acc (
    .clk, .rst_n,
    .in_valid (ang_valid),
    .in_tag   (pair_tag_t'(ang_tag)),
    .in_dist  (mag_dly[DLY]),
    .in_ang   (ang_a),
    .out_valid(acc_valid),
    .dsum, .asum,
    .pix      (wpix)
  );

  avddf_decide #(.L_QUARTERS(L_QUARTERS), .LAMBDA_X4(LAMBDA_X4)) u_dec (
    .clk, .rst_n,
    .in_valid    (acc_valid),
    .dsum, .asum,
    .pix         (wpix),
    .busy        (dec_busy),
    .out_valid,
    .out_pix,
    .out_replaced
  );

  logic mag_valid_d [DLY+1];
  logic mag_dly_valid_ok;
  assign mag_valid_d[0] = mag_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int n = 1; n <= DLY; n++) mag_valid_d[n] <= 1'b0;
    else        for (int n = 1; n <= DLY; n++) mag_valid_d[n] <= mag_valid_d[n-1];
  end
  assign mag_dly_valid_ok = (mag_valid_d[DLY] == ang_valid);

  // The decision stage is free long before the next window closes.
  assert property (@(posedge clk) disable iff (!rst_n) !(acc_valid && dec_busy))
    else $error("avddf_filter: decision stage overrun");

  // Both distance units see the same pairs, so their outputs stay aligned.
  assert property (@(posedge clk) disable iff (!rst_n) mag_dly_valid_ok)
    else $error("avddf_filter: distance units out of step");
endmodule
