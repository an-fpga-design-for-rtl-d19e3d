// Testbench of the magnitude distance unit: feeds random and extreme RGB
// pairs, one per cycle, and checks each result against the Euclidean
// distance computed in floating point (the unit truncates to 2^-8), its
// order (the tag) and its latency of MAG_LAT cycles.
module tb_avddf_mag_dist;
  import avddf_pkg::*;
  import avddf_ref_pkg::*;

  localparam int NPAIR = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid;
  rgb_t        xi, xj;
  logic [15:0] in_tag, out_tag;
  logic        out_valid;
  dist_t       distance;

  avddf_mag_dist #(.TAG_W(16)) dut (.*);

  int checks = 0, failures = 0;
  rgb_t qa [NPAIR], qb [NPAIR];
  int   t_in [NPAIR];
  int   cyc = 0;
  int   n_out = 0;

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
        default: ;
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
      real r, h;
      int  n;
      n = int'(out_tag);
      r = ref_dist(qa[n], qb[n]);
      h = real'(distance) / 256.0;
      checks++;
      if (n != n_out || h > r + 1e-9 || h < r - 1.0/256.0 - 1e-9) begin
        failures++;
        if (failures < 10) $display("mag_dist mismatch #%0d: %h %h hw=%f ref=%f", n, qa[n], qb[n], h, r);
      end
      checks++;
      if (cyc - t_in[n] != int'(MAG_LAT)) begin
        failures++;
        if (failures < 10) $display("latency %0d, expected %0d", cyc - t_in[n], MAG_LAT);
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
