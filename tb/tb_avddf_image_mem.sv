// Testbench of the image memory: writes random pixels to random addresses
// while reading others, then reads the whole memory back and checks each
// word against a copy kept here, including the one-cycle read latency and
// that a write without we changes nothing.
module tb_avddf_image_mem;
  import avddf_pkg::*;

  localparam int DEPTH = 64 * 64;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we, re;
  logic [AW-1:0] waddr, raddr;
  rgb_t          wdata, rdata;

  avddf_image_mem #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  rgb_t model [DEPTH];

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = rgb_t'($urandom); model[a] = wdata;
    end
    // random writes, some with we low, interleaved with reads
    for (int n = 0; n < 4000; n++) begin
      int ra;
      @(negedge clk);
      we = ($urandom_range(3) != 0); waddr = AW'($urandom); wdata = rgb_t'($urandom);
      ra = $urandom_range(DEPTH - 1);
      re = 1; raddr = AW'(ra);
      if (we && waddr != raddr) model[waddr] = wdata;
      else if (we) begin we = 0; end
      @(negedge clk);
      we = 0; re = 0;
      checks++;
      if (rdata != model[ra]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h exp %h", ra, rdata, model[ra]);
      end
    end
    // read everything back, one read per cycle
    for (int a = 0; a <= DEPTH; a++) begin
      @(negedge clk);
      if (a > 0) begin
        checks++;
        if (rdata != model[a-1]) failures++;
      end
      re = (a < DEPTH); raddr = AW'(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
