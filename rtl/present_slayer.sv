// present_slayer: the protected PRESENT substitution layer.
//
// Sixteen S-box positions, each made of two reconfigurable function tables
// (rft) with a register in between: x_i -> R1'_i -> mid_i -> R2'_i -> y_i.
// The register stores only the randomized value R1'_i(x_i), never a plain
// S-box input or output. It is loaded when mid_load is high, either with
// R1'(x) or, when mid_pre is also high, with the random precharge value
// mid_rnd, so that its next real value is written over random data instead
// of over a value that shares the same mask. y = R2'(mid) is combinational.
// Tables are (re)loaded through cfg_en / cfg_r1 / cfg_r2 (16 cycles, see rft
// and present_rft_cfg); nibble i of each bus belongs to S-box i.
module present_slayer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_en,
  input  logic [63:0] cfg_r1,
  input  logic [63:0] cfg_r2,
  input  logic [63:0] x,
  input  logic        mid_load,
  input  logic        mid_pre,
  input  logic [63:0] mid_rnd,
  output logic [63:0] mid,
  output logic [63:0] y
);
  logic [63:0] r1_out;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    rft #(.OUT_W(4)) u_r1 (
      .clk(clk), .cfg_en(cfg_en), .cfg_din(cfg_r1[4*i +: 4]),
      .x(x[4*i +: 4]), .y(r1_out[4*i +: 4])
    );
    rft #(.OUT_W(4)) u_r2 (
      .clk(clk), .cfg_en(cfg_en), .cfg_din(cfg_r2[4*i +: 4]),
      .x(mid[4*i +: 4]), .y(y[4*i +: 4])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        mid <= '0;
    else if (mid_load) mid <= mid_pre ? mid_rnd : r1_out;
  end
endmodule
