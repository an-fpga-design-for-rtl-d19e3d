// End-to-end test of the AVDDF coprocessor on small images: two 8x8
// images sent back to back as bands over the three input streams, with
// the filtered images received and checked pixel by pixel against the
// floating-point filter reference (see avddf_frame_bench).
module tb_avddf_coprocessor;
  import avddf_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic s1_tvalid, s2_tvalid, s3_tvalid, s1_tready, s2_tready, s3_tready;
  rgb_t s1_tdata, s2_tdata, s3_tdata, m1_tdata;
  logic m1_tvalid, m1_tready, m1_tlast;
  logic sending, pix_valid, pix_replaced, band_end;
  bit   done;
  int   checks, failures;

  avddf_coprocessor #(.IMG_N(N)) dut (.*);

  // one image: N*N windows of 36 cycles, the read-back, and slack
  avddf_frame_bench #(.IMG_N(N), .FRAMES(2), .NOISE_PCT(15),
                      .MAX_CYCLES(N * N * (NPAIRS + 2) + 400)) bench (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * N * N * 60 + 5000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
