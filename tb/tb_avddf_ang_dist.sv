// Testbench of the angular distance unit: feeds random and extreme RGB
// pairs (black, white, collinear, orthogonal, small and dark vectors), one
// per cycle, and checks each angle against arccos of the normalised dot
// product computed in floating point, its order (the tag) and its latency
// of ANG_LAT cycles. Tolerance: 1e-3 rad plus the effect of the 2^-8
// resolution of |a x b| on small vectors.
module tb_avddf_ang_dist;
  import avddf_pkg::*;
  import avddf_ref_pkg::*;

  localparam int NPAIR = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid;
  rgb_t        xi, xj;
  logic [15:0] in_tag, out_tag;
  logic        out_valid;
  ang_t        angle;

  avddf_ang_dist #(.TAG_W(16)) dut (.*);

  int checks = 0, failures = 0;
  rgb_t qa [NPAIR], qb [NPAIR];
  int   t_in [NPAIR];
  int   cyc = 0;
  int   n_out = 0;

  function automatic int dot_ab(input rgb_t a, input rgb_t b);
    return int'(a.r) * int'(b.r) + int'(a.g) * int'(b.g) + int'(a.b) * int'(b.b);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 0; xi = '0; xj = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NPAIR; n++) begin
      logic [23:0] a, b;
      a = 24'($urandom); b = 24'($urandom);
      case (n)
        0: begin a = 24'h000000; b = 24'hFFFFFF; end
        1: begin a = 24'hFFFFFF; b = 24'hFFFFFF; end
        2: begin a = 24'h010000; b = 24'h000000; end
        3: begin a = 24'h102030; b = 24'h112131; end
        4: begin a = 24'h010000; b = 24'h000100; end
        5: begin a = 24'h010100; b = 24'h010001; end
        6: begin a = 24'h204060; b = 24'h102030; end
        7: begin a = 24'h0000FF; b = 24'hFF0000; end
        8: begin a = 24'h000000; b = 24'h000000; end
        9: begin a = 24'h030201; b = 24'h010203; end
        default: if (n % 4 == 1) begin a = a & 24'h070707; b = b & 24'h070707; end
      endcase
      qa[n] = a; qb[n] = b;
      @(negedge clk);
      in_valid = 1'b1; xi = a; xj = b; in_tag = 16'(n);
      t_in[n] = cyc;
      @(posedge clk);
    end
    @(negedge clk) in_valid = 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real r, h, tol;
      int  n;
      n = int'(out_tag);
      r = ref_angle(qa[n], qb[n]);
      h = real'(angle) / 16384.0;
      tol = 1e-3 + (2.0 ** -8) / (1.0 + $sqrt(real'(dot_ab(qa[n], qa[n])) * real'(dot_ab(qb[n], qb[n]))));
      checks++;
      if (n != n_out || h > r + tol || h < r - tol) begin
        failures++;
        if (failures < 10) $display("ang_dist mismatch #%0d: %h %h hw=%f ref=%f", n, qa[n], qb[n], h, r);
      end
      checks++;
      if (cyc - t_in[n] != int'(ANG_LAT)) begin
        failures++;
        if (failures < 10) $display("latency %0d, expected %0d", cyc - t_in[n], ANG_LAT);
      end
      n_out++;
      if (n_out == NPAIR) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog: only %0d results", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
