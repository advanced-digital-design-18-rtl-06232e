// vga_timing: raster counters and sync pulses for a 640x480 60 Hz display.
//
// The renderer draws in raster order straight to VGA rather than through a
// frame buffer. A 25 MHz pixel enable is made by halving the 50 MHz clock;
// on each enable the column counts 0..799 and the row 0..524. Visible area
// is 640x480; hsync (active low) covers columns 656..751, vsync (active low)
// rows 490..491. These are the standard VGA numbers, not taken from the
// document. `row`, `col`, `hsync`, `vsync` and `blank` all change on the
// clock where `pix_ce` is high.
module vga_timing (
  input  logic       clk,
  input  logic       rst,
  output logic       pix_ce,
  output logic [9:0] row,
  output logic [9:0] col,
  output logic       hsync,
  output logic       vsync,
  output logic       blank
);
  localparam int H_VIS = 640, H_FP = 16, H_SYNC = 96, H_TOT = 800;
  localparam int V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_TOT = 525;

  logic half;

  always_ff @(posedge clk) begin
    if (rst) half <= 1'b0;
    else     half <= ~half;
  end
  assign pix_ce = half;

  always_ff @(posedge clk) begin
    if (rst) begin
      row <= '0;
      col <= '0;
    end else if (pix_ce) begin
      if (col == 10'(H_TOT - 1)) begin
        col <= '0;
        row <= (row == 10'(V_TOT - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  assign hsync = ~((col >= 10'(H_VIS + H_FP)) && (col < 10'(H_VIS + H_FP + H_SYNC)));
  assign vsync = ~((row >= 10'(V_VIS + V_FP)) && (row < 10'(V_VIS + V_FP + V_SYNC)));
  assign blank = (col >= 10'(H_VIS)) || (row >= 10'(V_VIS));
endmodule
