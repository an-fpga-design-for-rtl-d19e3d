// Testbench of the AVDDF filter: offers a stream of 3x3 windows (a smooth
// colour field with salt-and-pepper and random-colour impulses, plus
// directed windows: uniform, one impulse in the centre, all black, grey
// only) and checks every output pixel against the floating-point reference
// of the filter equations (any pixel the reference admits given the
// hardware's rounding). Also checks the rate, one window accepted every 36
// cycles while windows are always offered, and the pipeline latency, and
// that both the "centre replaced" and the "centre kept" outcomes occur.
module tb_avddf_filter;
  import avddf_pkg::*;
  import avddf_ref_pkg::*;

  localparam int NWIN = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic win_valid, win_ready, out_valid, out_replaced;
  rgb_t win [WIN];
  rgb_t out_pix;

  avddf_filter dut (.*);

  int checks = 0, failures = 0, n_out = 0, n_in = 0, cyc = 0;
  int n_repl = 0, n_kept = 0, n_forced = 0;
  pix24_t wins [NWIN][9];
  int t_acc [NWIN];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int n = 0; n < NWIN; n++) begin
      int bx, by;
      bx = $urandom_range(40); by = $urandom_range(40);
      for (int k = 0; k < 9; k++) wins[n][k] = test_pixel(bx + k % 3, by + k / 3, 12);
      case (n)
        0: for (int k = 0; k < 9; k++) wins[n][k] = 24'h406080;
        1: begin for (int k = 0; k < 9; k++) wins[n][k] = 24'h406080; wins[n][4] = 24'hFFFFFF; end
        2: for (int k = 0; k < 9; k++) wins[n][k] = 24'h000000;
        3: for (int k = 0; k < 9; k++) wins[n][k] = {3{8'(20 * k + 5)}};
        4: begin for (int k = 0; k < 9; k++) wins[n][k] = 24'h804020 + 24'(k); wins[n][4] = 24'h000000; end
        default: if (n % 7 == 0) wins[n][4] = ($urandom_range(1) != 0) ? 24'hFFFFFF : 24'h000000;
      endcase
    end
    win_valid = 0;
    for (int k = 0; k < 9; k++) win[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NWIN; n++) begin
      @(negedge clk);
      win_valid = 1'b1;
      for (int k = 0; k < 9; k++) win[k] = wins[n][k];
      @(posedge clk);
      while (!win_ready) @(posedge clk);
      t_acc[n] = cyc;
      n_in++;
    end
    @(negedge clk) win_valid = 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [8:0] mask;
      bit forced, noisy;
      pix24_t w [9];
      w = wins[n_out];
      mask = ref_mask(w, 0.75, 1.0, forced, noisy);
      checks++;
      if (!admissible(out_pix, w, mask)) begin
        failures++;
        if (failures < 10) $display("window %0d: out %h mask %b centre %h", n_out, out_pix, mask, w[4]);
      end
      if (forced) begin
        n_forced++;
        checks++;
        if (out_replaced != noisy) failures++;
      end
      if (out_replaced) n_repl++; else n_kept++;
      // latency: 36 issue cycles, ANG_LAT, the accumulator and decision
      checks++;
      if (cyc - t_acc[n_out] != NPAIRS + ANG_LAT + 1 + DEC_LAT) begin
        failures++;
        if (failures < 10) $display("latency %0d", cyc - t_acc[n_out]);
      end
      // rate: windows are offered all the time, so one per NPAIRS cycles
      if (n_out > 0) begin
        checks++;
        if (t_acc[n_out] - t_acc[n_out-1] != NPAIRS) failures++;
      end
      n_out++;
      if (n_out == NWIN) begin
        checks++;
        if (n_repl == 0 || n_kept == 0) failures++;
        $display("replaced %0d kept %0d forced %0d", n_repl, n_kept, n_forced);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #((NWIN * NPAIRS + 500) * 10);
    failures++;
    $display("watchdog: %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
