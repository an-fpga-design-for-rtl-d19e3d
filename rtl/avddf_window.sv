// 3x3 RGB filtering window, sliding along a band of three image lines.
//
// A band is three consecutive lines (line i, i+1, i+2) of IMG_N pixels each.
// The window takes one column of the band per step, that is one new pixel
// from each line, shifts the older columns left and drops the oldest, so
// consecutive windows share six pixels (three new pixels per window).
// Window pixel k = 3*line + column: pixels 0..2 come from line i, 3..5 from
// line i+1, 6..8 from line i+2, column 0 being the oldest; pixel 4 is the
// centre.
// Every pixel of the centre line gets a window. At the left edge the first
// column is replicated (the window for column 0 is (c0, c0, c1)); after the
// last column the window shifts once more with the last column replicated
// (c(N-2), c(N-1), c(N-1)). A band of IMG_N columns thus yields IMG_N
// windows, in column order.
// Handshakes: a column is taken when col_valid && col_ready; a window is
// offered with win_valid and taken when win_ready is also high. col_ready is
// low while a window waits to be taken, so a column is accepted at most one
// cycle after the previous window leaves.
// The sliding update follows the document; the edge replication is this
// design's own choice (the document does not say how borders are treated).
module avddf_window
  import avddf_pkg::*;
#(
  parameter int unsigned IMG_N = 256  // pixels per line
) (
  input  logic clk,
  input  logic rst_n,
  input  logic col_valid,
  output logic col_ready,
  input  rgb_t col [3],          // pixel of line i, i+1, i+2
  output logic win_valid,
  input  logic win_ready,
  output rgb_t win [WIN],
  output logic band_done         // pulses when the band's last window leaves
);
  localparam int unsigned CW = $clog2(IMG_N + 1);

  rgb_t            w [3][3];     // w[line][column]
  logic [CW-1:0]   ncol;         // columns of the band taken so far
  logic            fresh;        // current contents form an untaken window
  logic            pad_pending;  // right-edge replicated shift still due

  assign col_ready = !fresh && !pad_pending && (ncol < CW'(IMG_N));
  assign win_valid = fresh;

  always_comb begin
    for (int l = 0; l < 3; l++)
      for (int c = 0; c < 3; c++)
        win[3*l + c] = w[l][c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncol        <= '0;
      fresh       <= 1'b0;
      pad_pending <= 1'b0;
      band_done   <= 1'b0;
      for (int l = 0; l < 3; l++)
        for (int c = 0; c < 3; c++) w[l][c] <= '0;
    end else begin
      band_done <= 1'b0;
      if (fresh) begin
        if (win_ready) begin
          fresh <= 1'b0;
          if (!pad_pending && ncol == CW'(IMG_N)) begin
            band_done <= 1'b1;
            ncol      <= '0;
          end
        end
      end else if (pad_pending) begin
        for (int l = 0; l < 3; l++) begin
          w[l][0] <= w[l][1];
          w[l][1] <= w[l][2];
        end
        fresh       <= 1'b1;
        pad_pending <= 1'b0;
      end else if (col_valid && col_ready) begin
        ncol <= ncol + 1'b1;
        if (ncol == '0) begin
          for (int l = 0; l < 3; l++)
            for (int c = 0; c < 3; c++) w[l][c] <= col[l];
        end else begin
          for (int l = 0; l < 3; l++) begin
            w[l][0] <= w[l][1];
            w[l][1] <= w[l][2];
            w[l][2] <= col[l];
          end
          fresh       <= 1'b1;
          pad_pending <= (ncol == CW'(IMG_N - 1));
        end
      end
    end
  end
endmodule
