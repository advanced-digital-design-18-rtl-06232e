// tb_vga_timing: measures a whole frame: 800 pixel enables per line, 525
// lines per frame, hsync 96 and vsync 2 lines wide at the standard offsets,
// 640x480 visible pixels, and a pixel enable on every other clock.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  logic pix_ce, hsync, vsync, blank;
  logic [9:0] row, col;
  int checks = 0, failures = 0;

  vga_timing dut (.clk, .rst, .pix_ce, .row, .col, .hsync, .vsync, .blank);

  always #10 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int ce_cnt = 0, hs_low = 0, vs_lines = 0, visible = 0, lines = 0, last_ce = 0, ce_gap_bad = 0;
    int hs_fall_col = -1, vs_fall_row = -1;
    logic hs_prev = 1, vs_prev = 1;
    repeat (4) @(posedge clk);
    rst <= 0;
    // wait for the start of a frame
    do @(posedge clk); while (!(pix_ce && row == 0 && col == 0));
    for (int c = 0; c < 2 * 800 * 525; c++) begin
      @(negedge clk);
      if (c > 0 && pix_ce == last_ce) ce_gap_bad++;
      last_ce = pix_ce;
      if (pix_ce) begin
        ce_cnt++;
        if (!hsync && row == 0) hs_low++;
        if (!blank) visible++;
        if (!hsync && hs_prev) begin if (hs_fall_col < 0) hs_fall_col = col; end
        if (col == 0) begin
          lines++;
          if (!vsync) vs_lines++;
          if (!vsync && vs_prev && vs_fall_row < 0) vs_fall_row = row;
          vs_prev = vsync;
        end
        hs_prev = hsync;
      end
      @(posedge clk);
    end
    expect_eq("pixel enables per frame", ce_cnt, 800 * 525);
    expect_eq("pix_ce alternates", ce_gap_bad, 0);
    expect_eq("hsync width", hs_low, 96);
    expect_eq("hsync start column", hs_fall_col, 656);
    expect_eq("lines per frame", lines, 525);
    expect_eq("vsync lines", vs_lines, 2);
    expect_eq("vsync start row", vs_fall_row, 490);
    expect_eq("visible pixels", visible, 640 * 480);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 800 * 525 + 4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
