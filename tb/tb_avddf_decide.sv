// Testbench of the decision stage: drives windows of accumulated distances
// (random, the centre's sums scaled to fall on either side of the
// threshold, plus directed cases: all zero, centre minimal, equal sums),
// computes gamma_i = Asum^0.25 * Dsum^0.75, the argmin and the threshold
// gamma(1) * (8 + lambda)/8 in floating point with lambda = 1, and checks the
// output pixel, the replaced flag and the latency of DEC_LAT = WIN+6 cycles from
// in_valid to out_valid. Cases closer to a tie than 1e-9 are not counted.
// A second instance, built with l = 0.5 and lambda = 0.5, sees the same
// windows and is checked the same way, so the two parameters are exercised.
module tb_avddf_decide;
  import avddf_pkg::*;

  localparam int  NCASE  = 3000;
  localparam real LAMBDA = 1.0;
  localparam int  LAT    = DEC_LAT;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid;
  dsum_t dsum [WIN];
  asum_t asum [WIN];
  rgb_t  pix  [WIN];
  logic  busy, out_valid, out_replaced;
  rgb_t  out_pix;

  avddf_decide dut (.*);

  logic busy2, out_valid2, out_replaced2;
  rgb_t out_pix2;
  avddf_decide #(.L_QUARTERS(2), .LAMBDA_X4(2)) dut2 (
    .clk, .rst_n, .in_valid, .dsum, .asum, .pix,
    .busy(busy2), .out_valid(out_valid2), .out_pix(out_pix2), .out_replaced(out_replaced2));

  int checks = 0, failures = 0, skipped = 0;
  int n_repl = 0, n_kept = 0, n_repl2 = 0, n_kept2 = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real gam(input int d, input int a, input real l = 0.75);
    if (d == 0 || a == 0) return 0.0;
    return (real'(d) ** l) * (real'(a) ** (1.0 - l));
  endfunction

  // Expected output for weight l and lambda; ambiguous near ties.
  function automatic void expect_out(input int d [WIN], input int a [WIN], input rgb_t p [WIN],
                                     input real l, input real lambda,
                                     output rgb_t e_pix, output bit e_repl, output bit amb);
    real g [WIN];
    real gmin, margin, thr;
    int  imin;
    for (int k = 0; k < WIN; k++) g[k] = gam(d[k], a[k], l);
    imin = 0; gmin = g[0]; margin = 1e300;
    for (int k = 1; k < WIN; k++) if (g[k] < gmin) begin imin = k; gmin = g[k]; end
    for (int k = 0; k < WIN; k++)
      if (k != imin && g[k] != gmin && g[k] - gmin < margin) margin = g[k] - gmin;
    thr = gmin * (8.0 + lambda) / 8.0;
    e_repl = g[CENTER] >= thr;
    e_pix  = e_repl ? p[imin] : p[CENTER];
    amb = (margin < 1e-9 * (gmin + 1.0)) ||
          ((g[CENTER] - thr) ** 2 < (1e-9 * (thr + 1.0)) ** 2 && g[CENTER] != thr);
  endfunction

  initial begin
    in_valid = 0;
    for (int k = 0; k < WIN; k++) begin dsum[k] = '0; asum[k] = '0; pix[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCASE; n++) begin
      int  d [WIN];
      int  a [WIN];
      real g [WIN];
      real gmin, margin_arg, thr;
      int  imin, t0;
      rgb_t exp_pix;
      bit   exp_repl, ambiguous;
      for (int k = 0; k < WIN; k++) begin
        d[k] = $urandom_range(1 << 18);
        a[k] = $urandom_range(1 << 16);
        pix[k] = rgb_t'($urandom);
      end
      case (n % 5)
        0: for (int k = 0; k < WIN; k++) begin d[k] = 0; a[k] = 0; end
        1: begin d[CENTER] = 1; a[CENTER] = 1; end                    // centre minimal
        2: begin d[CENTER] = (1 << DSUM_W) - 1; a[CENTER] = (1 << ASUM_W) - 1; end
        default: begin                                                  // near threshold
          int m;
          m = 0;
          for (int k = 1; k < WIN; k++) if (gam(d[k], a[k]) < gam(d[m], a[m])) m = k;
          if (m != CENTER) begin
            real f;
            f = 0.9 + 0.0005 * $urandom_range(500);  // 0.90 .. 1.15 of gamma(1)
            d[CENTER] = int'(real'(d[m]) * f); a[CENTER] = int'(real'(a[m]) * f);
          end
        end
      endcase
      for (int k = 0; k < WIN; k++) begin g[k] = gam(d[k], a[k]); dsum[k] = dsum_t'(d[k]); asum[k] = asum_t'(a[k]); end
      imin = 0; gmin = g[0]; margin_arg = 1e300;
      for (int k = 1; k < WIN; k++) if (g[k] < gmin) begin imin = k; gmin = g[k]; end
      for (int k = 0; k < WIN; k++)
        if (k != imin && g[k] - gmin < margin_arg && g[k] != gmin) margin_arg = g[k] - gmin;
      thr = gmin * (8.0 + LAMBDA) / 8.0;
      exp_repl = g[CENTER] >= thr;
      exp_pix  = exp_repl ? pix[imin] : pix[CENTER];
      ambiguous = (margin_arg < 1e-9 * (gmin + 1.0)) ||
                  ((g[CENTER] - thr) ** 2 < (1e-9 * (thr + 1.0)) ** 2 && g[CENTER] != thr);
      @(negedge clk) in_valid = 1'b1;
      t0 = cyc;
      @(negedge clk) in_valid = 1'b0;
      while (!out_valid) @(negedge clk);
      begin
        rgb_t e2; bit r2, amb2;
        rgb_t pcopy [WIN];
        pcopy = pix;
        expect_out(d, a, pcopy, 0.5, 0.5, e2, r2, amb2);
        if (!amb2) begin
          checks += 2;
          if (!out_valid2 || out_pix2 != e2 || out_replaced2 != r2) begin
            failures++;
            if (failures < 10) $display("case %0d (l=0.5): pix %h exp %h", n, out_pix2, e2);
          end
          if (r2) n_repl2++; else n_kept2++;
        end
      end
      if (ambiguous) skipped++;
      else begin
        checks += 3;
        if (out_pix != exp_pix || out_replaced != exp_repl || cyc - t0 != LAT) begin
          failures++;
          if (failures < 10)
            $display("case %0d: pix %h exp %h repl %0d exp %0d lat %0d", n, out_pix, exp_pix,
                     out_replaced, exp_repl, cyc - t0);
        end
        if (exp_repl) n_repl++; else n_kept++;
      end
    end
    checks++;
    if (n_repl < 100 || n_kept < 100 || n_repl2 < 100 || n_kept2 < 100) failures++;
    $display("replaced %0d kept %0d skipped %0d; l=0.5: replaced %0d kept %0d",
             n_repl, n_kept, skipped, n_repl2, n_kept2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
