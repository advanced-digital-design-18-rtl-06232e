// tb_motion_object: places the 16 objects at random and checks hit, sprite
// ID, in-object pixel and colour bit at random pixels against a reference
// search that scans the objects from 0 upward and stops at the first hit.
module tb_motion_object;
  import centipede_pkg::*;
  logic [7:0] game_x, game_y;
  logic [7:0] mo_pic [NUM_MO], mo_x [NUM_MO], mo_y [NUM_MO], mo_color [NUM_MO];
  logic hit, color_sel;
  logic [7:0] sprite_id;
  logic [2:0] obj_row, obj_col;
  int checks = 0, failures = 0, hits = 0, overlaps = 0;

  motion_object dut (.game_x, .game_y, .mo_pic, .mo_x, .mo_y, .mo_color,
                     .hit, .sprite_id, .obj_row, .obj_col, .color_sel);

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NUM_MO; i++) begin
        mo_pic[i] = 8'($urandom); mo_x[i] = 8'($urandom_range(0, 60));
        mo_y[i] = 8'($urandom_range(0, 60)); mo_color[i] = 8'($urandom);
      end
      for (int k = 0; k < 200; k++) begin
        int found, nfound, ex, ey;
        found = -1; nfound = 0;
        game_x = 8'($urandom_range(0, 80)); game_y = 8'($urandom_range(0, 90));
        #1;
        for (int i = 0; i < NUM_MO; i++) begin
          ex = int'(game_x) - int'(mo_x[i]);
          ey = int'(game_y) - int'(mo_y[i]);
          if (ex >= 0 && ex < 8 && ey >= 0 && ey < 16) begin
            nfound++;
            if (found < 0) found = i;
          end
        end
        checks++;
        if (found < 0) begin
          if (hit) failures++;
        end else begin
          hits++;
          if (nfound > 1) overlaps++;
          ex = int'(game_x) - int'(mo_x[found]);
          ey = int'(game_y) - int'(mo_y[found]);
          if (!hit || sprite_id !== 8'(mo_pic[found][6:0] * 2 + ey / 8) || obj_row !== 3'(ey % 8)
              || obj_col !== 3'(ex) || color_sel !== mo_color[found][0]) begin
            failures++;
            if (failures < 10) $display("obj %0d at (%0d,%0d): id %h row %0d col %0d", found, game_x, game_y, sprite_id, obj_row, obj_col);
          end
        end
      end
    end
    checks++;
    if (hits == 0 || overlaps == 0) failures++;
    $display("hits %0d overlaps %0d", hits, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
