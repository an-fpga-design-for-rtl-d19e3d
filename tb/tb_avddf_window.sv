// Testbench of the 3x3 window: sends several bands of IMG_N random columns
// with random gaps on the column stream and random stalls on the window
// stream, and checks every window against the expected 3x3 neighbourhood
// (first and last columns replicated), the number of windows per band
// (IMG_N) and the band_done pulse after each band.
module tb_avddf_window;
  import avddf_pkg::*;

  localparam int N     = 7;
  localparam int BANDS = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic col_valid, col_ready, win_valid, win_ready, band_done;
  rgb_t col [3];
  rgb_t win [WIN];

  avddf_window #(.IMG_N(N)) dut (.*);

  int checks = 0, failures = 0;
  rgb_t band [BANDS][3][N];
  int n_win = 0, n_bands = 0;

  initial begin
    col_valid = 0;
    for (int l = 0; l < 3; l++) col[l] = '0;
    for (int b = 0; b < BANDS; b++)
      for (int l = 0; l < 3; l++)
        for (int x = 0; x < N; x++) band[b][l][x] = rgb_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < BANDS; b++)
      for (int x = 0; x < N; x++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) begin col_valid = 0; @(negedge clk); end
        col_valid = 1'b1;
        for (int l = 0; l < 3; l++) col[l] = band[b][l][x];
        @(posedge clk);
        while (!col_ready) @(posedge clk);
      end
    @(negedge clk) col_valid = 1'b0;
  end

  always @(negedge clk) win_ready <= ($urandom_range(2) != 0);

  always @(posedge clk) begin
    if (rst_n && win_valid && win_ready) begin
      int b, x;
      bit bad;
      b = n_win / N; x = n_win % N;
      bad = 0;
      for (int l = 0; l < 3; l++)
        for (int c = 0; c < 3; c++) begin
          int xs;
          xs = x + c - 1;
          if (xs < 0) xs = 0;
          if (xs > N - 1) xs = N - 1;
          checks++;
          if (win[3*l + c] != band[b][l][xs]) bad = 1;
        end
      if (bad) begin
        failures++;
        $display("window band %0d col %0d wrong", b, x);
      end
      n_win++;
    end
    if (rst_n && band_done) begin
      checks++;
      n_bands++;
      if (n_win != n_bands * N) begin
        failures++;
        $display("band_done after %0d windows", n_win);
      end
      if (n_bands == BANDS) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog: %0d windows", n_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
