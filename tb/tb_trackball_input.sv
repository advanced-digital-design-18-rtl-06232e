// tb_trackball_input: rolls player 1's and player 2's trackballs on both
// axes by different amounts and checks that `flip` selects which ball the
// counters follow, that each axis reaches its own counter, and that clr_a /
// clr_b clear only their own counter.
module tb_trackball_input;
  logic clk = 0, rst = 1, flip = 0, clr_a = 0, clr_b = 0;
  logic [1:0] horiz_clk = 0, horiz_dir = 0, vert_clk = 0, vert_dir = 0;
  logic [3:0] tra, trb;
  logic dir1, dir2;
  int checks = 0, failures = 0;
  int ph [4] = '{0, 0, 0, 0};   // phases: p1 horiz, p2 horiz, p1 vert, p2 vert
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  trackball_input dut (.clk, .rst, .flip, .horiz_clk, .horiz_dir, .vert_clk, .vert_dir,
                       .clr_a, .clr_b, .tra, .trb, .dir1, .dir2);

  always #10 clk = ~clk;

  // move one line pair by n edges (negative: the other way)
  task automatic roll(input int which, input int n);
    for (int i = 0; i < (n < 0 ? -n : n); i++) begin
      ph[which] = (n > 0) ? (ph[which] + 1) % 4 : (ph[which] + 3) % 4;
      case (which)
        0: {horiz_clk[0], horiz_dir[0]} = seq[ph[0]];
        1: {horiz_clk[1], horiz_dir[1]} = seq[ph[1]];
        2: {vert_clk[0],  vert_dir[0]}  = seq[ph[2]];
        3: {vert_clk[1],  vert_dir[1]}  = seq[ph[3]];
      endcase
      repeat (4) @(posedge clk);
    end
  endtask

  task automatic clear_both();
    @(negedge clk) begin clr_a = 1; clr_b = 1; end
    @(negedge clk) begin clr_a = 0; clr_b = 0; end
  endtask

  task automatic expect_counts(input int a, input int b, input string what);
    checks++;
    if (tra !== 4'(a) || trb !== 4'(b)) begin
      failures++;
      $display("%s: tra=%0d trb=%0d exp %0d %0d", what, tra, trb, a, b);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    // player 1 selected: only p1 lines count
    flip = 0;
    clear_both();
    roll(0, 12); roll(2, -8); roll(1, 20); roll(3, 24);
    expect_counts(3, -2, "player 1");
    checks++; if (dir1 !== 0 || dir2 !== 1) failures++;
    // player 2 selected
    flip = 1;
    repeat (4) @(posedge clk);
    clear_both();
    roll(1, 20); roll(3, 8); roll(0, 40); roll(2, 40);
    expect_counts(5, 2, "player 2");
    // clr_a clears only counter A
    @(negedge clk) clr_a = 1;
    @(negedge clk) clr_a = 0;
    expect_counts(0, 2, "clear A");
    @(negedge clk) clr_b = 1;
    @(negedge clk) clr_b = 0;
    expect_counts(0, 0, "clear B");
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
