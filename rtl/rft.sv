// rft: reconfigurable function table (RFT), an IN_W-input, OUT_W-output
// look-up table built from CFGLUT5 cells whose contents can be exchanged at
// run time while the routing stays fixed.
//
// IN_W = 4 (the PRESENT S-box case): one CFGLUT5 per output bit, all with the
// same four inputs, read through O5 (lower 16 table bits). A new function is
// loaded in 16 cycles: with cfg_en high, cfg_din[j] carries bit j of the
// table entries in the order 15, 14, ..., 0, one entry per cycle, so that
// after the 16th shift entry a sits at table bit a.
// IN_W >= 5: each output bit uses NL = 2^(IN_W-5) CFGLUT5 cells as 5-input
// tables (O6), and the upper IN_W-5 inputs select one of them through a
// multiplexer tree. Every cell has its own serial input,
// cfg_din[j*NL + l] for output j and cell l (table entries 32*l .. 32*l+31),
// so all cells load in parallel in 32 cycles, entries 31 down to 0 of their
// slice.
// The read path x -> y is combinational; while loading, y mixes old and new
// contents and must not be used. Loading only the lower 16 bits in the
// 4-input case is this design's reading of the 16-cycle reconfiguration
// quoted for the dual 4x1 mode of the cell.
module rft #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 4,
  parameter int unsigned NL    = (IN_W <= 5) ? 1 : (1 << (IN_W - 5))
) (
  input  logic                clk,
  input  logic                cfg_en,
  input  logic [OUT_W*NL-1:0] cfg_din,
  input  logic [IN_W-1:0]     x,
  output logic [OUT_W-1:0]    y
);
  logic [4:0] xl;

  if (IN_W >= 5) begin : g_low5
    assign xl = x[4:0];
  end else begin : g_lowpad
    assign xl = 5'(x);
  end

  for (genvar j = 0; j < OUT_W; j++) begin : g_out
    logic [NL-1:0] o6, o5, cdo;
    for (genvar l = 0; l < NL; l++) begin : g_lut
      cfglut5 u_lut (
        .CLK(clk), .CE(cfg_en), .CDI(cfg_din[j*NL + l]),
        .I0(xl[0]), .I1(xl[1]), .I2(xl[2]), .I3(xl[3]),
        .I4(IN_W >= 5 ? xl[4] : 1'b0),
        .O6(o6[l]), .O5(o5[l]), .CDO(cdo[l])
      );
    end
    if (IN_W <= 4) begin : g_o5
      assign y[j] = o5[0];
    end else if (NL == 1) begin : g_o6
      assign y[j] = o6[0];
    end else begin : g_mux
      assign y[j] = o6[x[IN_W-1:5]];
    end
  end
endmodule
