// Image memory for the NxN filtered pixels ("Memory for NxN pixels").
//
// A simple dual-port RAM of DEPTH words of 24-bit RGB: one write port, used
// by the filter as each pixel is finished, and one read port, used to send
// the finished image back out. Reads are synchronous: rdata holds the word
// at raddr one cycle after re. Contents are not reset. The RAM is written
// as an array so that FPGA tools map it to block RAM.
// The port arrangement and read latency are this design's choices.
module avddf_image_mem
  import avddf_pkg::*;
#(
  parameter int unsigned DEPTH = 256 * 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  rgb_t          wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output rgb_t          rdata
);
  rgb_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
