// tb_trackball_counter: rolls the ball by random numbers of quadrature edges
// in both directions and checks the 4-bit delta (edges / 4, rounded down,
// modulo 16), the direction bit, clearing by a read, and that a two-state
// jump is ignored. The edge order (clk rises, dir rises, clk falls, dir falls
// counts up) is the one of the document's timing figure.
module tb_trackball_counter;
  logic clk = 0, rst = 1, tb_clk = 0, tb_dir = 0, clr = 0;
  logic [3:0] count;
  logic dir;
  int checks = 0, failures = 0;
  int phase = 0;   // position in the up sequence 00,10,11,01
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  trackball_counter #(.EDGES_PER_COUNT(4)) dut (.clk, .rst, .tb_clk, .tb_dir, .clr, .count, .dir);

  always #10 clk = ~clk;

  task automatic step(input bit up);
    phase = up ? (phase + 1) % 4 : (phase + 3) % 4;
    {tb_clk, tb_dir} = seq[phase];
    repeat (5) @(posedge clk);
  endtask

  task automatic clear();
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      int n, delta;
      bit up;
      n  = $urandom_range(1, 70);
      up = $urandom_range(0, 1);
      clear();
      for (int i = 0; i < n; i++) step(up);
      delta = up ? n : -n;
      checks++;
      if (count !== 4'(delta >>> 2) || dir !== !up) begin
        failures++;
        $display("n=%0d up=%0d count=%0d dir=%0d", n, up, count, dir);
      end
    end
    // a jump of two states (both lines changing at once) is not counted
    clear();
    for (int i = 0; i < 4; i++) step(1);
    phase = (phase + 2) % 4;
    {tb_clk, tb_dir} = seq[phase];
    repeat (5) @(posedge clk);
    for (int i = 0; i < 3; i++) step(1);
    checks++;
    if (count !== 4'd1) begin failures++; $display("glitch counted: %0d", count); end
    // reset clears the count
    rst = 1; @(posedge clk); @(posedge clk); #1 rst = 0;
    checks++;
    if (count !== 4'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
