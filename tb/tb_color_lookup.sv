// tb_color_lookup: fills the palette with random RGB 3-3-2 bytes, then
// checks the 4-bit channels for every colour code and that blanking gives
// black.
module tb_color_lookup;
  logic clk = 0, rst = 1, cpu_we = 0, ce = 0, blank = 0;
  logic [3:0] cpu_addr = 0, color = 0, vga_r, vga_g, vga_b;
  logic [7:0] cpu_wdata = 0;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  color_lookup dut (.clk, .rst, .cpu_we, .cpu_addr, .cpu_wdata, .ce, .color, .blank, .vga_r, .vga_g, .vga_b);

  always #10 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin cpu_we = 1; cpu_addr = 4'(i); cpu_wdata = 8'($urandom); model[i] = cpu_wdata; end
    end
    @(negedge clk) cpu_we = 0;
    for (int k = 0; k < 200; k++) begin
      int r, g, b;
      @(negedge clk) begin color = 4'($urandom); blank = ($urandom_range(0, 9) == 0); ce = 1; end
      r = model[color] >> 5; g = (model[color] >> 2) & 7; b = model[color] & 3;
      @(posedge clk); #1 ce = 0;
      checks++;
      if (blank) begin
        if (vga_r != 0 || vga_g != 0 || vga_b != 0) failures++;
      end else if (vga_r != 4'(r * 2 + r / 4) || vga_g != 4'(g * 2 + g / 4) || vga_b != 4'(b * 5)) begin
        failures++;
        $display("code %0d: %h%h%h pal %h", color, vga_r, vga_g, vga_b, model[color]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
