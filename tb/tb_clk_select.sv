// tb_clk_select: runs a fast chip clock and a slow user clock, and counts the
// rising edges of the selected clock in windows with each selection. The
// selection is changed only while both clocks are low.
module tb_clk_select;
  logic chip_clk = 0, user_clk = 0, sel = 0, clk;
  int checks = 0, failures = 0;
  int edges = 0;

  clk_select dut (.chip_clk_i(chip_clk), .user_clk_i(user_clk), .sel_i(sel), .clk_o(clk));

  always #5  chip_clk = ~chip_clk;   // period 10
  always #35 user_clk = ~user_clk;   // period 70
  always @(posedge clk) edges++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // both clocks low at t = 0 and at multiples of 70
    #1 edges = 0;
    #699;                 // t = 700: 70 chip edges (at 5, 15, ... 695)
    checks++;
    if (edges != 70) begin failures++; $display("FAIL chip clock edges %0d", edges); end
    sel = 1;
    edges = 0;
    #700;                 // t = 1400: 10 user edges
    checks++;
    if (edges != 10) begin failures++; $display("FAIL user clock edges %0d", edges); end
    // sample away from any clock edge (edges fall at times 0 or 5 mod 10)
    #2;
    for (int i = 0; i < 50; i++) begin
      #10;
      checks++;
      if (clk !== user_clk) begin failures++; $display("FAIL clk not user clock"); end
    end
    @(negedge user_clk);
    #2;
    sel = 0;
    for (int i = 0; i < 50; i++) begin
      #10;
      checks++;
      if (clk !== chip_clk) begin failures++; $display("FAIL clk not chip clock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
