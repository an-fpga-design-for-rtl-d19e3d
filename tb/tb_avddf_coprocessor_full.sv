// Full-size end-to-end test: one 256x256 image through the coprocessor at
// its default parameters, every pixel checked against the floating-point
// filter reference (see avddf_frame_bench). The image must be filtered and
// sent back within 3,575,962 clock cycles, the cycle count reported for the
// published accelerator on this image size.
module tb_avddf_coprocessor_full;
  import avddf_pkg::*;

  localparam int N = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic s1_tvalid, s2_tvalid, s3_tvalid, s1_tready, s2_tready, s3_tready;
  rgb_t s1_tdata, s2_tdata, s3_tdata, m1_tdata;
  logic m1_tvalid, m1_tready, m1_tlast;
  logic sending, pix_valid, pix_replaced, band_end;
  bit   done;
  int   checks, failures;

  avddf_coprocessor dut (.*);

  avddf_frame_bench #(.IMG_N(N), .FRAMES(1), .NOISE_PCT(3),
                      .MAX_CYCLES(3575962)) bench (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
