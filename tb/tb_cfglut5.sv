// tb_cfglut5: loads random 32-bit truth tables through CDI and checks O6 for
// all 32 addresses, O5 for the lower half, CDO, and that CE low holds the table.
module tb_cfglut5;
  logic clk = 0, ce = 0, cdi = 0;
  logic [4:0] i;
  logic o6, o5, cdo;
  int checks = 0, failures = 0;

  cfglut5 #(.INIT(32'hDEAD_BEEF)) dut (
    .CLK(clk), .CE(ce), .CDI(cdi), .I0(i[0]), .I1(i[1]), .I2(i[2]), .I3(i[3]),
    .I4(i[4]), .O6(o6), .O5(o5), .CDO(cdo)
  );

  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] t;
    i = 5'd3;
    #1 check(o6 == 1'b1 && cdo == 1'b1, "INIT value");
    for (int n = 0; n < 4; n++) begin
      t = $urandom;
      for (int b = 31; b >= 0; b--) begin
        @(negedge clk); ce = 1; cdi = t[b];
      end
      @(negedge clk); ce = 0;
      for (int a = 0; a < 32; a++) begin
        i = 5'(a); #1;
        check(o6 == t[a], "O6");
        check(o5 == t[a % 16], "O5");
      end
      check(cdo == t[31], "CDO");
      cdi = ~cdi;
      repeat (3) @(negedge clk);
      i = 5'd17; #1 check(o6 == t[17], "hold with CE low");
    end
    // shifting 16 more bits replaces only the lower half
    for (int b = 15; b >= 0; b--) begin
      @(negedge clk); ce = 1; cdi = b[0];
    end
    @(negedge clk); ce = 0;
    for (int a = 0; a < 16; a++) begin
      i = 5'(a); #1 check(o5 == a[0], "16-bit reload, lower half");
      i = 5'(a + 16); #1 check(o6 == t[a], "16-bit reload, old lower half moved up");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
