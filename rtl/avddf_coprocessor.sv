// AVDDF coprocessor: real-time removal of impulsive noise from RGB images
// with the adaptive vector directional distance filter.
//
// The host streams the image to the coprocessor as bands of three lines
// over three AXI4-Stream inputs, one line per DMA channel (s1 = line i,
// s2 = line i+1, s3 = line i+2). Each band produces the filtered pixels of
// its middle line, left to right, which are written in raster order into the
// on-chip image memory of IMG_N x IMG_N pixels. When all IMG_N*IMG_N pixels
// are written, the whole filtered image is sent back over the m1 output
// stream (to the first DMA channel), TLAST marking its last pixel; input is
// held off meanwhile, and afterwards the next image may start.
//
//   s1/s2/s3 --> AXI4-Stream join --> 3x3 window --> AVDDF filter
//                                                       |
//   m1 <-- AXI4-Stream out <-- image memory <-----------+
//
// The host sends IMG_N bands per image, band r holding lines r-1, r, r+1,
// with line -1 and line IMG_N taken as copies of lines 0 and IMG_N-1 (the
// coprocessor replicates the first and last columns itself). How borders
// are handled is not given by the document and is this design's choice, as
// are the band order and the send-after-full-image handshake; the block
// structure, the three-line input over three streams, the 3x3 sliding
// window, the NxN image memory and the single output stream follow it.
// Throughput: one pixel per 36 clock cycles once the pipeline is full.
module avddf_coprocessor
  import avddf_pkg::*;
#(
  parameter int unsigned IMG_N      = 256, // image is IMG_N x IMG_N pixels
  parameter int unsigned L_QUARTERS = 3,   // l = L_QUARTERS / 4
  parameter int unsigned LAMBDA_X4  = 4    // lambda = LAMBDA_X4 / 4
) (
  input  logic clk,
  input  logic rst_n,
  // line i (DMA channel 1, read direction)
  input  logic s1_tvalid,
  output logic s1_tready,
  input  rgb_t s1_tdata,
  // line i+1 (DMA channel 2)
  input  logic s2_tvalid,
  output logic s2_tready,
  input  rgb_t s2_tdata,
  // line i+2 (DMA channel 3)
  input  logic s3_tvalid,
  output logic s3_tready,
  input  rgb_t s3_tdata,
  // filtered image (DMA channel 1, write direction)
  output logic m1_tvalid,
  input  logic m1_tready,
  output rgb_t m1_tdata,
  output logic m1_tlast,
  // status
  output logic sending,        // the filtered image is being sent
  output logic pix_valid,      // a filtered pixel is written this cycle
  output logic pix_replaced,   // ... and its centre was judged noisy
  output logic band_end        // the last window of a band was taken
);
  localparam int unsigned DEPTH = IMG_N * IMG_N;
  localparam int unsigned AW    = $clog2(DEPTH);

  // ---------------- stream interface ---------------------------------
  logic          col_valid, col_ready, col_ready_if, col_open;
  rgb_t          col [3];
  rgb_t          s_tdata [3];
  logic [2:0]    s_tready;
  logic          start_send, send_done;
  logic          mem_re;
  logic [AW-1:0] mem_raddr;
  rgb_t          mem_rdata;

  assign s_tdata = '{s1_tdata, s2_tdata, s3_tdata};
  assign {s3_tready, s2_tready, s1_tready} = s_tready;

  avddf_axis_if #(.DEPTH(DEPTH), .AW(AW)) u_axis (
    .clk, .rst_n,
    .s_tvalid ({s3_tvalid, s2_tvalid, s1_tvalid}),
    .s_tready,
    .s_tdata,
    .col_valid,
    .col_ready(col_ready),
    .col,
    .start    (start_send),
    .mem_re,
    .mem_raddr,
    .mem_rdata,
    .done     (send_done),
    .sending,
    .m_tvalid (m1_tvalid),
    .m_tready (m1_tready),
    .m_tdata  (m1_tdata),
    .m_tlast  (m1_tlast)
  );

  // ---------------- window ------------------------------------------
  logic win_valid, win_ready, win_take, f_win_valid, f_win_ready;
  rgb_t win [WIN];
  logic [AW:0] n_taken;          // windows of this image handed to the filter
  logic        frame_in;         // all windows of the image taken

  assign frame_in  = (n_taken == (AW+1)'(DEPTH));
  // Columns are let in only while the current image still needs them.
  assign col_open  = !frame_in && !sending;
  assign col_ready = col_ready_if && col_open;
  // Windows of the next image wait until this image has been sent.
  assign f_win_valid = win_valid && !frame_in;
  assign win_ready   = f_win_ready && !frame_in;
  assign win_take    = win_valid && win_ready;

  avddf_window #(.IMG_N(IMG_N)) u_win (
    .clk, .rst_n,
    .col_valid(col_valid && col_open),
    .col_ready(col_ready_if),
    .col,
    .win_valid,
    .win_ready,
    .win,
    .band_done(band_end)
  );

  // ---------------- filter ------------------------------------------
  logic f_valid, f_replaced;
  rgb_t f_pix;

  avddf_filter #(.L_QUARTERS(L_QUARTERS), .LAMBDA_X4(LAMBDA_X4)) u_filt (
    .clk, .rst_n,
    .win_valid   (f_win_valid),
    .win_ready   (f_win_ready),
    .win,
    .out_valid   (f_valid),
    .out_pix     (f_pix),
    .out_replaced(f_replaced)
  );

  assign pix_valid    = f_valid;
  assign pix_replaced = f_valid && f_replaced;

  // ---------------- image memory -----------------------------------
  logic [AW:0] wr_addr;

  avddf_image_mem #(.DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk,
    .we   (f_valid),
    .waddr(wr_addr[AW-1:0]),
    .wdata(f_pix),
    .re   (mem_re),
    .raddr(mem_raddr),
    .rdata(mem_rdata)
  );

  // ---------------- frame control ----------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr    <= '0;
      n_taken    <= '0;
      start_send <= 1'b0;
    end else begin
      start_send <= f_valid && (wr_addr == (AW+1)'(DEPTH - 1));
      if (f_valid) wr_addr <= wr_addr + 1'b1;
      if (win_take) n_taken <= n_taken + 1'b1;
      if (send_done) begin
        wr_addr <= '0;
        n_taken <= '0;
      end
    end
  end

  // The filter never produces more pixels than the memory holds.
  assert property (@(posedge clk) disable iff (!rst_n)
                   f_valid |-> wr_addr < (AW+1)'(DEPTH))
    else $error("avddf_coprocessor: image memory overrun");
endmodule
