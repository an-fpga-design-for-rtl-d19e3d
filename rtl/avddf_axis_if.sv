// AXI4-Stream interface of the coprocessor.
//
// Input side: three AXI4-Stream slaves, one per DMA channel, each carrying
// one image line as 24-bit RGB beats (TVALID, TREADY, TDATA; no TLAST is
// used). The three streams are joined into one column of the band: a column
// is valid when all three have a beat, and all three are acknowledged in the
// same cycle when the column is taken. TREADY of each slave therefore waits
// for the other two channels' TVALID, which AXI4-Stream permits.
// Output side: one AXI4-Stream master (TVALID, TREADY, TDATA, TLAST) back to
// the first DMA channel. A start pulse makes it read the image memory from
// address 0 to DEPTH-1 and send the words in that order, TLAST marking the
// last one; done pulses after that beat is taken. Memory reads take one
// cycle, so a two-entry buffer keeps the stream at one beat per cycle while
// TREADY stays high and holds TDATA steady while it is low.
// Joining rule, buffer and start/done signals are this design's choices.
module avddf_axis_if
  import avddf_pkg::*;
#(
  parameter int unsigned DEPTH = 256 * 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // three line streams in
  input  logic [2:0]    s_tvalid,
  output logic [2:0]    s_tready,
  input  rgb_t          s_tdata [3],
  // joined column towards the window
  output logic          col_valid,
  input  logic          col_ready,
  output rgb_t          col [3],
  // image read-back
  input  logic          start,
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  rgb_t          mem_rdata,
  output logic          done,
  output logic          sending,
  // filtered image stream out
  output logic          m_tvalid,
  input  logic          m_tready,
  output rgb_t          m_tdata,
  output logic          m_tlast
);
  // ---------------- input join ----------------------------------------
  assign col_valid = &s_tvalid;
  assign s_tready  = {3{col_valid && col_ready}};
  assign col       = s_tdata;

  // ---------------- output streamer -----------------------------------
  typedef struct packed {
    rgb_t data;
    logic last;
  } beat_t;

  beat_t         buf_q [2];
  logic          head;            // index of the oldest entry
  logic          tail;            // index the next word is written to
  logic [1:0]    count;           // entries held
  logic          inflight;        // read issued last cycle
  logic          inflight_last;
  logic [AW:0]   next_addr;       // next address to read
  logic          pop, issue;

  assign m_tvalid = (count != 0);
  assign m_tdata  = buf_q[head].data;
  assign m_tlast  = buf_q[head].last;
  assign pop      = m_tvalid && m_tready;
  assign issue    = sending && (next_addr < (AW+1)'(DEPTH))
                 && ((2'(count) + 2'(inflight) - 2'(pop)) < 2'd2);
  assign mem_re    = issue;
  assign mem_raddr = next_addr[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending       <= 1'b0;
      next_addr     <= '0;
      head          <= 1'b0;
      tail          <= 1'b0;
      count         <= '0;
      inflight      <= 1'b0;
      inflight_last <= 1'b0;
      done          <= 1'b0;
      buf_q[0]      <= '0;
      buf_q[1]      <= '0;
    end else begin
      done <= 1'b0;
      if (start && !sending) begin
        sending   <= 1'b1;
        next_addr <= '0;
      end
      inflight      <= issue;
      inflight_last <= issue && (next_addr == (AW+1)'(DEPTH - 1));
      if (issue) next_addr <= next_addr + 1'b1;
      // write the word returning from memory behind the held entries
      if (inflight) begin
        buf_q[tail] <= '{data: mem_rdata, last: inflight_last};
        tail        <= ~tail;
      end
      if (pop) head <= ~head;
      count <= count + 2'(inflight) - 2'(pop);
      if (pop && m_tlast) begin
        sending <= 1'b0;
        done    <= 1'b1;
      end
    end
  end
endmodule
