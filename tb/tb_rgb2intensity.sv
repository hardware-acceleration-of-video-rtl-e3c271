// Testbench of rgb2intensity: corner colours and 5000 random pixels against
// the reference luma, plus a bound check against the real-valued BT.601
// formula (the result may differ from it by at most one grey level).
module tb_rgb2intensity;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  logic clk = 0;
  rgb_t p;
  logic [7:0] y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rgb2intensity dut (.pixel_i(p), .intensity_o(y));

  task automatic try(input int r, input int g, input int b);
    real exact;
    p = '{r: 8'(r), g: 8'(g), b: 8'(b)};
    @(negedge clk);
    checks++;
    if (y != 8'(luma(r, g, b))) begin
      failures++;
      $display("FAIL rgb %0d %0d %0d -> %0d exp %0d", r, g, b, y, luma(r, g, b));
    end
    exact = 0.299 * r + 0.587 * g + 0.114 * b;
    checks++;
    if (real'(y) - exact > 1.0 || exact - real'(y) > 1.0) begin
      failures++;
      $display("FAIL bound rgb %0d %0d %0d -> %0d (%f)", r, g, b, y, exact);
    end
  endtask

  initial begin
    try(0, 0, 0);
    try(255, 255, 255);
    try(255, 0, 0);
    try(0, 255, 0);
    try(0, 0, 255);
    try(128, 64, 32);
    repeat (5000) try($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
