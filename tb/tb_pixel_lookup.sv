// tb_pixel_lookup: drives random tile and motion-object requests and checks
// the 4-bit colour one enable later against the fill formula
// (id + row + col) mod 4, tile codes 0-3 and motion-object codes 8-15.
module tb_pixel_lookup;
  logic clk = 0, ce = 0;
  logic [7:0] tile_id, mo_id;
  logic [2:0] tile_row, tile_col, mo_row, mo_col;
  logic mo_hit, mo_color_sel;
  logic [3:0] color;
  int checks = 0, failures = 0;

  pixel_lookup dut (.clk, .ce, .tile_id, .tile_row, .tile_col, .mo_hit, .mo_id,
                    .mo_row, .mo_col, .mo_color_sel, .color);

  always #10 clk = ~clk;

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int p;
      logic [3:0] exp;
      @(negedge clk);
      tile_id = 8'($urandom); tile_row = 3'($urandom); tile_col = 3'($urandom);
      mo_id = 8'($urandom); mo_row = 3'($urandom); mo_col = 3'($urandom);
      mo_hit = 1'($urandom); mo_color_sel = 1'($urandom); ce = 1;
      if (mo_hit) begin
        p = (int'(mo_id) + int'(mo_row) + int'(mo_col)) % 4;
        exp = 4'(8 + (mo_color_sel ? 4 : 0) + p);
      end else begin
        p = (int'(tile_id) + int'(tile_row) + int'(tile_col)) % 4;
        exp = 4'(p);
      end
      @(posedge clk); #1 ce = 0;
      checks++;
      if (color !== exp) begin failures++; if (failures < 10) $display("color %h exp %h", color, exp); end
      // no ce: output must hold
      @(negedge clk) tile_id = ~tile_id;
      @(posedge clk); #1 checks++;
      if (color !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
