// tb_irq_timer: steps the VGA row through two frames and checks that IRQ
// rises at game lines 48, 112, 176 and 240 (VGA rows 96, 224, 352, 480),
// falls by itself at the next 16V edge, 32 lines later, when not acknowledged, and falls at once on
// an acknowledge.
module tb_irq_timer;
  logic clk = 0, rst = 1, irq_res = 0, irq_n;
  logic [9:0] vga_row = 0;
  int checks = 0, failures = 0, rises = 0, acks = 0;
  int rise_rows [$];

  irq_timer dut (.clk, .rst, .vga_row, .irq_res, .irq_n);

  always #10 clk = ~clk;

  initial begin
    logic prev;
    repeat (3) @(posedge clk);
    rst = 0;
    prev = 1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < 525; r++) begin
        @(negedge clk) vga_row = 10'(r);
        repeat (3) @(posedge clk);
        #1;
        if (!irq_n && prev) begin rises++; if (f == 0) rise_rows.push_back(r); end
        // fall without acknowledge: at the next 16V rise, 32 game lines = 64 rows later
        if (f == 0 && (r == 96 + 64 || r == 224 + 64 || r == 352 + 64)) begin
          checks++; if (!irq_n) failures++;
        end
        if (f == 0 && (r == 96 + 63)) begin checks++; if (irq_n) failures++; end
        // second frame: acknowledge two rows after each rise
        if (f == 1 && !irq_n && (r % 128) == 98) begin
          @(negedge clk) irq_res = 1;
          @(negedge clk) irq_res = 0;
          #1 checks++;
          if (!irq_n) failures++;
          acks++;
        end
        prev = irq_n;
      end
    end
    checks++;
    if (rise_rows.size() != 4 || rise_rows[0] != 96 || rise_rows[1] != 224 || rise_rows[2] != 352 || rise_rows[3] != 480) begin
      failures++; $display("rise rows %p", rise_rows);
    end
    checks++;
    if (rises != 8 || acks != 4) begin failures++; $display("rises %0d acks %0d", rises, acks); end
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
