// Testbench of the distance accumulators: sends several windows' worth of
// pair results (36 unordered pairs each, random distances and angles,
// random gaps, and back-to-back windows), then checks that each window's
// nine magnitude sums, nine angle sums and nine pixels equal the sums
// worked out here, and that out_valid comes one cycle after the last pair.
module tb_avddf_accum;
  import avddf_pkg::*;

  localparam int NWIN = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      in_valid;
  pair_tag_t in_tag;
  dist_t     in_dist;
  ang_t      in_ang;
  logic      out_valid;
  dsum_t     dsum [WIN];
  asum_t     asum [WIN];
  rgb_t      pix  [WIN];

  avddf_accum dut (.*);

  int checks = 0, failures = 0;
  int exp_d [NWIN][WIN];
  int exp_a [NWIN][WIN];
  rgb_t exp_p [NWIN][WIN];
  int t_last [NWIN];
  int cyc = 0, n_out = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 0; in_tag = '0; in_dist = '0; in_ang = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NWIN; w++) begin
      rgb_t px [WIN];
      for (int k = 0; k < WIN; k++) begin
        px[k] = rgb_t'($urandom);
        exp_d[w][k] = 0; exp_a[w][k] = 0; exp_p[w][k] = px[k];
      end
      for (int i = 0; i < WIN - 1; i++)
        for (int j = i + 1; j < WIN; j++) begin
          int d, a;
          d = $urandom_range((1 << DIST_W) - 1);
          a = $urandom_range(25736);
          exp_d[w][i] += d; exp_d[w][j] += d;
          exp_a[w][i] += a; exp_a[w][j] += a;
          // random gaps, except in every third window
          if (w % 3 != 0) while ($urandom_range(3) == 0) begin
            @(negedge clk) in_valid = 1'b0;
            @(posedge clk);
          end
          @(negedge clk);
          in_valid = 1'b1;
          in_tag.i = idx_t'(i); in_tag.j = idx_t'(j);
          in_tag.last = (i == WIN - 2) && (j == WIN - 1);
          in_tag.xi = px[i]; in_tag.xj = px[j];
          in_dist = dist_t'(d); in_ang = ang_t'(a);
          if (in_tag.last) t_last[w] = cyc;
          @(posedge clk);
        end
    end
    @(negedge clk) in_valid = 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      bit bad;
      bad = 0;
      for (int k = 0; k < WIN; k++) begin
        checks += 3;
        if (int'(dsum[k]) != exp_d[n_out][k]) bad = 1;
        if (int'(asum[k]) != exp_a[n_out][k]) bad = 1;
        if (pix[k] != exp_p[n_out][k]) bad = 1;
      end
      checks++;
      if (cyc - t_last[n_out] != 1) bad = 1;
      if (bad) begin
        failures++;
        $display("window %0d wrong: dsum0=%0d exp %0d", n_out, dsum[0], exp_d[n_out][0]);
      end
      n_out++;
      if (n_out == NWIN) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog: only %0d windows", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
