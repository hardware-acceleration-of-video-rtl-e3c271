// Testbench of output_control: every combination of edge, background and
// show-gradient flags with random and extreme gradients, against the
// reference rule (background level, inverted background on an edge, or
// (|Gh| + |Gv|) / 8 on an edge when the gradient is shown).
module tb_output_control;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  logic clk = 0;
  logic e, bg, sg;
  grad_t gv, gh;
  logic [7:0] y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  output_control dut (.sobel_edge_i(e), .sobel_gradient_v_i(gv), .sobel_gradient_h_i(gh),
                      .background_color_i(bg), .show_gradient_i(sg), .intensity_o(y));

  task automatic try(input bit ei, input int gvi, input int ghi, input bit bgi, input bit sgi);
    int exp_y;
    e = ei; gv = grad_t'(gvi); gh = grad_t'(ghi); bg = bgi; sg = sgi;
    @(negedge clk);
    exp_y = out_level(ei, ghi, gvi, bgi, sgi);
    checks++;
    if (y != 8'(exp_y)) begin
      failures++;
      $display("FAIL e=%0d gv=%0d gh=%0d bg=%0d sg=%0d -> %0d exp %0d", ei, gvi, ghi, bgi, sgi, y, exp_y);
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin
      try(k[0], 1020, -1020, k[1], k[2]);
      try(k[0], -1020, -1020, k[1], k[2]);
      try(k[0], 0, 0, k[1], k[2]);
      try(k[0], 7, -9, k[1], k[2]);
    end
    repeat (3000) try($urandom_range(0, 1), $urandom_range(0, 2040) - 1020, $urandom_range(0, 2040) - 1020,
                      $urandom_range(0, 1), $urandom_range(0, 1));
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
