// Host model and checker for end-to-end tests of the AVDDF coprocessor.
//
// It plays the part of the three DMA channels and of the software: for each
// of FRAMES images of IMG_N x IMG_N pixels (a smooth colour field with
// NOISE_PCT percent salt-and-pepper and random-colour impulses) it sends
// IMG_N bands, band r holding lines r-1, r, r+1 (the edge lines repeated), one
// line per channel, each channel with its own random gaps. The next image
// is offered as soon as the previous one is sent, so the coprocessor's
// hold-off while it sends is exercised. It receives the filtered image on
// the output stream under random TREADY and checks every pixel against the
// floating-point reference of the filter (with the edge columns and lines
// replicated), TLAST, the band and pixel counts, and the cycles one image
// takes against MAX_CYCLES, and that the filtered image is closer to the
// clean one than the noisy input was (PSNR at least 3 dB higher, and a
// lower normalised colour difference NCD in CIE L*u*v*). It counts how often each mechanism happened:
// centre replaced, centre kept, input stall, output backpressure, input
// held off during sending, band end; one that never happened is a failure.
// done rises when all images are checked; checks and failures count up.
module avddf_frame_bench
  import avddf_pkg::*;
  import avddf_ref_pkg::*;
#(
  parameter int IMG_N      = 8,
  parameter int FRAMES     = 2,
  parameter int NOISE_PCT  = 10,
  parameter int MAX_CYCLES = 100000
) (
  input  logic clk,
  output logic rst_n,
  output logic s1_tvalid, s2_tvalid, s3_tvalid,
  input  logic s1_tready, s2_tready, s3_tready,
  output rgb_t s1_tdata,  s2_tdata,  s3_tdata,
  input  logic m1_tvalid,
  output logic m1_tready,
  input  rgb_t m1_tdata,
  input  logic m1_tlast,
  input  logic sending, pix_valid, pix_replaced, band_end,
  output bit   done,
  output int   checks,
  output int   failures
);
  pix24_t img   [FRAMES][IMG_N][IMG_N];   // noisy image sent
  pix24_t clean [FRAMES][IMG_N][IMG_N];   // image before the noise
  real    se_noisy = 0.0, se_filt = 0.0;  // squared errors against clean
  real    cd_noisy = 0.0, cd_filt = 0.0, cd_norm = 0.0;  // for NCD

  function automatic int clampi(input int v);
    return (v < 0) ? 0 : (v > IMG_N - 1) ? IMG_N - 1 : v;
  endfunction

  // ---------------- counters of mechanisms ------------------------------
  int n_repl = 0, n_kept = 0, n_in_stall = 0, n_out_bp = 0, n_holdoff = 0;
  int n_band = 0, n_pix = 0;
  always @(posedge clk) if (rst_n) begin
    if (pix_valid) begin n_pix++; if (pix_replaced) n_repl++; else n_kept++; end
    if ((s1_tvalid && !s1_tready) || (s2_tvalid && !s2_tready) || (s3_tvalid && !s3_tready))
      n_in_stall++;
    if (m1_tvalid && !m1_tready) n_out_bp++;
    if (sending && (s1_tvalid || s2_tvalid || s3_tvalid)) n_holdoff++;
    if (band_end) n_band++;
  end

  // ---------------- three input channels --------------------------------
  // Channel c (0..2) sends, for each frame and band r, line r + c - 1.
  task automatic drive_channel(input int c);
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < IMG_N; r++)
        for (int x = 0; x < IMG_N; x++) begin
          pix24_t p;
          p = img[f][clampi(r + c - 1)][x];
          @(negedge clk);
          while ($urandom_range(4) == 0) begin
            set_ch(c, 1'b0, p);
            @(negedge clk);
          end
          set_ch(c, 1'b1, p);
          @(posedge clk);
          while (!get_ready(c)) @(posedge clk);
        end
    @(negedge clk) set_ch(c, 1'b0, '0);
  endtask

  task automatic set_ch(input int c, input logic v, input pix24_t p);
    case (c)
      0: begin s1_tvalid = v; s1_tdata = p; end
      1: begin s2_tvalid = v; s2_tdata = p; end
      default: begin s3_tvalid = v; s3_tdata = p; end
    endcase
  endtask

  function automatic logic get_ready(input int c);
    return (c == 0) ? s1_tready : (c == 1) ? s2_tready : s3_tready;
  endfunction

  // ---------------- output checking -------------------------------------
  int n_beat = 0, frame_out = 0, cyc = 0, t_frame = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) m1_tready <= ($urandom_range(3) != 0);

  always @(posedge clk) begin
    if (rst_n && m1_tvalid && m1_tready) begin
      int y, x;
      pix24_t w [9];
      logic [8:0] mask;
      bit forced, noisy;
      y = n_beat / IMG_N; x = n_beat % IMG_N;
      for (int k = 0; k < 9; k++)
        w[k] = img[frame_out][clampi(y + k / 3 - 1)][clampi(x + k % 3 - 1)];
      mask = ref_mask(w, 0.75, 1.0, forced, noisy);
      checks++;
      if (!admissible(m1_tdata, w, mask)) begin
        failures++;
        if (failures < 10)
          $display("frame %0d pixel (%0d,%0d): %h not admitted (mask %b, centre %h)",
                   frame_out, y, x, m1_tdata, mask, w[4]);
      end
      se_noisy += sq_err(img[frame_out][y][x], clean[frame_out][y][x]);
      se_filt  += sq_err(m1_tdata, clean[frame_out][y][x]);
      begin
        real dn, df, nn;
        luv_err(clean[frame_out][y][x], img[frame_out][y][x], dn, nn);
        luv_err(clean[frame_out][y][x], m1_tdata, df, nn);
        cd_noisy += dn; cd_filt += df; cd_norm += nn;
      end
      checks++;
      if (m1_tlast != (n_beat == IMG_N * IMG_N - 1)) failures++;
      n_beat++;
      if (n_beat == IMG_N * IMG_N) begin
        $display("image %0d: %0d cycles", frame_out, cyc - t_frame);
        checks++;
        if (cyc - t_frame > MAX_CYCLES) begin
          failures++;
          $display("image %0d took %0d cycles, limit %0d", frame_out, cyc - t_frame, MAX_CYCLES);
        end
        t_frame = cyc;
        n_beat = 0;
        frame_out++;
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    rst_n = 1'b0;
    s1_tvalid = 0; s2_tvalid = 0; s3_tvalid = 0;
    s1_tdata = '0; s2_tdata = '0; s3_tdata = '0;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < IMG_N; y++)
        for (int x = 0; x < IMG_N; x++) begin
          clean[f][y][x] = clean_pixel(x, y, IMG_N);
          img[f][y][x]   = add_noise(clean[f][y][x], NOISE_PCT);
        end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    t_frame = cyc;
    fork
      drive_channel(0);
      drive_channel(1);
      drive_channel(2);
    join_none
    wait (frame_out == FRAMES);
    repeat (5) @(posedge clk);
    checks += 2;
    if (n_band != IMG_N * FRAMES) begin failures++; $display("bands %0d", n_band); end
    if (n_pix != IMG_N * IMG_N * FRAMES) begin failures++; $display("pixels %0d", n_pix); end
    $display("mechanisms: replaced %0d kept %0d input_stall %0d output_backpressure %0d holdoff %0d bands %0d",
             n_repl, n_kept, n_in_stall, n_out_bp, n_holdoff, n_band);
    begin
      real npix, psnr_in, psnr_out;
      npix = real'(IMG_N * IMG_N * FRAMES);
      psnr_in  = 10.0 * $log10(3.0 * 255.0 * 255.0 / (se_noisy / npix + 1e-12));
      psnr_out = 10.0 * $log10(3.0 * 255.0 * 255.0 / (se_filt / npix + 1e-12));
      $display("PSNR noisy %0.2f dB, filtered %0.2f dB", psnr_in, psnr_out);
      $display("NCD noisy %0.4f, filtered %0.4f", cd_noisy / cd_norm, cd_filt / cd_norm);
      checks++;
      if (cd_filt >= cd_noisy) failures++;
      // the filter must clean the image up by a clear margin (3 dB)
      checks++;
      if (psnr_out < psnr_in + 3.0) failures++;
    end
    checks += 6;
    if (n_repl == 0) failures++;
    if (n_kept == 0) failures++;
    if (n_in_stall == 0) failures++;
    if (n_out_bp == 0) failures++;
    if (FRAMES > 1 && n_holdoff == 0) failures++;
    if (n_band == 0) failures++;
    done = 1;
  end
endmodule
