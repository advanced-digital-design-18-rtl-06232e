// tb_graphics_pipeline: renders one whole frame and checks every pixel and
// both syncs against a reference model. The CPU port fills all 960 tiles
// with random sprite IDs, a 16-entry palette, and places three motion
// objects (two overlapping, to exercise priority) with the other thirteen
// parked below the picture. Expected colour of VGA pixel (row, col): black
// outside the 512x480 window at column 64; otherwise the game pixel
// gx = (col-64)/2, gy = row/2 takes the lowest-numbered motion object that
// covers it (8x16, sprite {pic[6:0], dy/8}, palette 8 + 4*colour[0] + p) or
// else its tile (palette p), with p = (id + row + col) mod 4. The output of a
// pixel is expected three pixel enables after the raster counters show it.
module tb_graphics_pipeline;
  logic clk = 0, rst = 1;
  logic pf_en = 0, pf_we = 0, pal_we = 0;
  logic [9:0] pf_addr = 0;
  logic [7:0] pf_wdata = 0, pf_rdata, pal_wdata = 0;
  logic [3:0] pal_addr = 0, vga_r, vga_g, vga_b;
  logic hsync, vsync, vblank;
  logic [9:0] vga_row;
  logic [7:0] tiles [960];
  logic [7:0] pal [16];
  logic [7:0] mpic [16], mx [16], my [16], mcol [16];
  int checks = 0, failures = 0, mo_pixels = 0, tile_pixels = 0, overlap_pixels = 0;

  graphics_pipeline dut (.clk, .rst, .pf_en, .pf_we, .pf_addr, .pf_wdata, .pf_rdata,
                         .pal_we, .pal_addr, .pal_wdata, .vga_r, .vga_g, .vga_b,
                         .hsync, .vsync, .vga_row, .vblank);

  always #10 clk = ~clk;

  // reference raster position: a pixel enable on every other clock after
  // reset, 800 columns by 525 rows
  logic ref_ce;
  int ref_col, ref_row;
  always @(posedge clk) begin
    if (rst) begin
      ref_ce <= 0; ref_col <= 0; ref_row <= 0;
    end else begin
      ref_ce <= !ref_ce;
      if (ref_ce) begin
        if (ref_col == 799) begin
          ref_col <= 0;
          ref_row <= (ref_row == 524) ? 0 : ref_row + 1;
        end else ref_col <= ref_col + 1;
      end
    end
  end

  task automatic pf_write(input int a, input logic [7:0] d);
    @(negedge clk) begin pf_en = 1; pf_we = 1; pf_addr = 10'(a); pf_wdata = d; end
    @(negedge clk) begin pf_en = 0; pf_we = 0; end
  endtask

  function automatic logic [11:0] expected(input int r, input int c, output int kind);
    int gx, gy, id, pr, pc, code, hitobj, nhit;
    logic [7:0] e;
    kind = 0;
    if (c < 64 || c >= 576 || r >= 480) return 12'h000;
    gx = (c - 64) / 2; gy = r / 2;
    hitobj = -1; nhit = 0;
    for (int i = 0; i < 16; i++)
      if (((gx - mx[i]) & 255) < 8 && ((gy - my[i]) & 255) < 16) begin
        nhit++;
        if (hitobj < 0) hitobj = i;
      end
    if (hitobj >= 0) begin
      int dy;
      dy = (gy - my[hitobj]) & 255;
      id = (mpic[hitobj] & 127) * 2 + dy / 8;
      pr = dy % 8; pc = (gx - mx[hitobj]) & 255;
      code = 8 + 4 * (mcol[hitobj] & 1) + (id + pr + pc) % 4;
      kind = nhit > 1 ? 3 : 2;
    end else begin
      id = tiles[(gy / 8) * 32 + gx / 8];
      code = (id + gy % 8 + gx % 8) % 4;
      kind = 1;
    end
    e = pal[code];
    return {e[7:5], e[7], e[4:2], e[4], e[1:0], e[1:0]};
  endfunction

  initial begin
    int q_r [$], q_c [$];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 16; i++) begin
      pal[i] = 8'($urandom);
      @(negedge clk) begin pal_we = 1; pal_addr = 4'(i); pal_wdata = pal[i]; end
    end
    @(negedge clk) pal_we = 0;
    for (int a = 0; a < 960; a++) begin tiles[a] = 8'($urandom); pf_write(a, tiles[a]); end
    for (int i = 0; i < 16; i++) begin
      mpic[i] = 8'($urandom); mcol[i] = 8'($urandom); mx[i] = 8'($urandom); my[i] = 8'd240;
    end
    mx[0] = 20;  my[0] = 30;
    mx[1] = 100; my[1] = 100;
    mx[2] = 104; my[2] = 108;
    for (int i = 0; i < 16; i++) begin
      pf_write('h3C0 + i, mpic[i]); pf_write('h3D0 + i, mx[i]);
      pf_write('h3E0 + i, my[i]);   pf_write('h3F0 + i, mcol[i]);
    end
    // read back one tile and one motion-object byte through the CPU port
    @(negedge clk) begin pf_en = 1; pf_addr = 10'd77; end
    @(negedge clk) begin checks++; if (pf_rdata !== tiles[77]) failures++; pf_addr = 10'h3D1; end
    @(negedge clk) begin checks++; if (pf_rdata !== mx[1]) failures++; pf_en = 0; end
    // start of a frame
    while (!(ref_ce && ref_row == 0 && ref_col == 0)) @(negedge clk);
    for (int n = 0; n < 800 * 525 + 3; n++) begin
      while (!ref_ce) @(negedge clk);
      checks++;
      if (vga_row !== 10'(ref_row)) failures++;
      if (q_r.size() == 3) begin
        int r, c, kind;
        logic [11:0] e;
        r = q_r.pop_front(); c = q_c.pop_front();
        e = expected(r, c, kind);
        checks++;
        if ({vga_r, vga_g, vga_b} !== e || hsync !== !(c >= 656 && c < 752) || vsync !== !(r >= 490 && r < 492)) begin
          failures++;
          if (failures < 10) $display("r%0d c%0d rgb %h exp %h hs %0d vs %0d", r, c, {vga_r, vga_g, vga_b}, e, hsync, vsync);
        end
        if (kind == 1) tile_pixels++;
        if (kind >= 2) mo_pixels++;
        if (kind == 3) overlap_pixels++;
      end
      q_r.push_back(ref_row); q_c.push_back(ref_col);
      @(negedge clk);
    end
    $display("tile pixels %0d, motion-object pixels %0d, overlap pixels %0d", tile_pixels, mo_pixels, overlap_pixels);
    checks++;
    if (mo_pixels == 0 || overlap_pixels == 0 || tile_pixels == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 800 * 525 * 2 + 200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
