// Pipelined integer square root.
//
// root = floor(sqrt(rad)) for an unsigned RAD_W-bit radicand (RAD_W even).
// The classic digit-by-digit method is used: each stage brings down the next
// two radicand bits, tries to subtract (4*root + 1) from the partial
// remainder and shifts one result bit in. One stage per result bit, each
// registered, so a new radicand is accepted every cycle and the result
// appears RAD_W/2 cycles later. A tag of TAG_W bits and a valid bit travel
// alongside so that callers can keep data attached to each operand.
// This unit is the square-root block of the filter datapath; its method and
// pipelining are choices of this implementation.
module avddf_isqrt #(
  parameter int unsigned RAD_W = 34,
  parameter int unsigned TAG_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [RAD_W-1:0]     in_rad,
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output logic [RAD_W/2-1:0]   out_root,
  output logic [TAG_W-1:0]     out_tag
);
  localparam int unsigned ROOT_W = RAD_W / 2;
  localparam int unsigned REM_W  = ROOT_W + 2;

  // Stage s holds the state after s result bits have been produced.
  logic              v   [ROOT_W+1];
  logic [RAD_W-1:0]  rad [ROOT_W+1];
  logic [REM_W-1:0]  rem [ROOT_W+1];
  logic [ROOT_W-1:0] root[ROOT_W+1];
  logic [TAG_W-1:0]  tag [ROOT_W+1];

  assign v[0]    = in_valid;
  assign rad[0]  = in_rad;
  assign rem[0]  = '0;
  assign root[0] = '0;
  assign tag[0]  = in_tag;

  for (genvar s = 0; s < ROOT_W; s++) begin : g_stage
    logic [REM_W-1:0]  rem_sh;
    logic [REM_W-1:0]  trial;
    logic              fits;

    always_comb begin
      rem_sh = {rem[s][REM_W-3:0], rad[s][RAD_W-1 -: 2]};
      trial  = {root[s], 2'b01};
      fits   = rem_sh >= trial;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[s+1]    <= 1'b0;
        rad[s+1]  <= '0;
        rem[s+1]  <= '0;
        root[s+1] <= '0;
        tag[s+1]  <= '0;
      end else begin
        v[s+1]    <= v[s];
        rad[s+1]  <= rad[s] << 2;
        rem[s+1]  <= fits ? rem_sh - trial : rem_sh;
        root[s+1] <= {root[s][ROOT_W-2:0], fits};
        tag[s+1]  <= tag[s];
      end
    end
  end

  assign out_valid = v[ROOT_W];
  assign out_root  = root[ROOT_W];
  assign out_tag   = tag[ROOT_W];
endmodule
