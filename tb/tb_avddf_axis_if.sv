// Testbench of the AXI4-Stream interface. Input side: three channels with
// independent random TVALID patterns; checks that a column is formed only
// when all three have a beat, that all three TREADYs rise together, and
// that the columns arrive in order. Output side: a memory model with one
// cycle read latency; after start, checks that DEPTH words come out in
// address order under random TREADY, that TDATA holds while stalled, that
// TLAST marks only the last word and that done pulses once. The stream is
// run twice to check restart, and the gapless rate (DEPTH beats in DEPTH+2
// cycles with TREADY high) is checked on the second run.
module tb_avddf_axis_if;
  import avddf_pkg::*;

  localparam int DEPTH = 50;
  localparam int AW    = $clog2(DEPTH);
  localparam int NCOL  = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]    s_tvalid, s_tready;
  rgb_t          s_tdata [3];
  logic          col_valid, col_ready;
  rgb_t          col [3];
  logic          start, mem_re, done, sending;
  logic [AW-1:0] mem_raddr;
  rgb_t          mem_rdata;
  logic          m_tvalid, m_tready, m_tlast;
  rgb_t          m_tdata;

  avddf_axis_if #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  rgb_t mem [DEPTH];
  always @(posedge clk) if (mem_re) mem_rdata <= mem[mem_raddr];

  // ---------------- input channels ------------------------------------
  int sent [3];
  int n_col = 0;
  rgb_t chan_val [3][NCOL];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 3; c++)
        if (s_tvalid[c] && s_tready[c]) sent[c]++;
      if (col_valid && col_ready) begin
        checks++;
        if (col[0] != chan_val[0][n_col] || col[1] != chan_val[1][n_col] ||
            col[2] != chan_val[2][n_col]) failures++;
        n_col++;
      end
      checks++;
      if (s_tready != 3'b000 && (s_tready != 3'b111 || s_tvalid != 3'b111)) failures++;
    end
  end
  always @(negedge clk) begin
    for (int c = 0; c < 3; c++) begin
      // hold a beat until it is taken; then offer the next one at random
      if (sent[c] < NCOL) begin
        if (!s_tvalid[c] || (s_tvalid[c] && sent_changed(c))) s_tvalid[c] <= ($urandom_range(2) != 0);
        s_tdata[c] <= chan_val[c][sent[c]];
      end else s_tvalid[c] <= 1'b0;
    end
    col_ready <= ($urandom_range(3) != 0);
  end
  int last_sent [3];
  function automatic bit sent_changed(input int c);
    sent_changed = (sent[c] != last_sent[c]);
    last_sent[c] = sent[c];
  endfunction

  // ---------------- output stream -------------------------------------
  int n_beat = 0, n_done = 0, t_start = 0, cyc = 0;
  bit random_ready = 1;
  rgb_t hold_d; bit hold_v = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) m_tready <= random_ready ? ($urandom_range(2) != 0) : 1'b1;
  always @(posedge clk) begin
    if (rst_n) begin
      if (hold_v) begin
        checks++;
        if (!m_tvalid || m_tdata != hold_d) failures++;
      end
      hold_v <= m_tvalid && !m_tready;
      hold_d <= m_tdata;
      if (m_tvalid && m_tready) begin
        checks += 2;
        if (m_tdata != mem[n_beat % DEPTH]) failures++;
        if (m_tlast != ((n_beat % DEPTH) == DEPTH - 1)) failures++;
        n_beat++;
      end
      if (done) begin
        n_done++;
        checks++;
        if (n_beat != n_done * DEPTH) failures++;
        if (!random_ready) begin
          checks++;
          if (cyc - t_start > DEPTH + 3) begin
            failures++;
            $display("stream took %0d cycles", cyc - t_start);
          end
        end
      end
    end
  end

  initial begin
    s_tvalid = '0; start = 0; col_ready = 0;
    for (int c = 0; c < 3; c++) begin
      sent[c] = 0; last_sent[c] = 0;
      for (int n = 0; n < NCOL; n++) chan_val[c][n] = rgb_t'($urandom);
    end
    for (int a = 0; a < DEPTH; a++) mem[a] = rgb_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_col == NCOL);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (n_done == 1);
    random_ready = 0;
    @(negedge clk) start = 1; t_start = cyc;
    @(negedge clk) start = 0;
    wait (n_done == 2);
    repeat (5) @(posedge clk);
    checks++;
    if (n_beat != 2 * DEPTH || sending) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog: %0d columns, %0d beats", n_col, n_beat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
