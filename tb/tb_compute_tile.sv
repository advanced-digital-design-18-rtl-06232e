// tb_compute_tile: sweeps every VGA row and column and checks the tile
// address and in-tile pixel against integer arithmetic on the 2x-scaled,
// 64-column-offset game picture.
module tb_compute_tile;
  logic [9:0] vga_row, vga_col, tile_addr;
  logic active;
  logic [7:0] game_x, game_y;
  logic [2:0] tile_row, tile_col;
  int checks = 0, failures = 0;

  compute_tile dut (.vga_row, .vga_col, .active, .game_x, .game_y, .tile_addr, .tile_row, .tile_col);

  initial begin
    for (int r = 0; r < 525; r++)
      for (int c = 0; c < 800; c++) begin
        int gx, gy;
        logic act;
        vga_row = 10'(r); vga_col = 10'(c);
        #1;
        act = (c >= 64) && (c < 576) && (r < 480);
        checks++;
        if (active !== act) failures++;
        if (act) begin
          gx = (c - 64) / 2;
          gy = r / 2;
          checks++;
          if (tile_addr !== 10'((gy / 8) * 32 + gx / 8) || tile_row !== 3'(gy % 8) || tile_col !== 3'(gx % 8)
              || game_x !== 8'(gx) || game_y !== 8'(gy)) begin
            failures++;
            if (failures < 10) $display("r%0d c%0d addr %0d", r, c, tile_addr);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
