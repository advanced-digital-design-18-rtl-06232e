// tb_clock_enable: checks that the enable pulse comes exactly every DIV clocks
// and is one clock wide.
module tb_clock_enable;
  logic clk = 0, rst = 1, ce;
  int checks = 0, failures = 0;
  int last, cyc = 0, pulses = 0;

  clock_enable #(.DIV(33)) dut (.clk, .rst, .ce);

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    last = -1;
    while (pulses < 20) begin
      @(posedge clk);
      if (ce) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != 33) begin failures++; $display("period %0d", cyc - last); end
        end
        last = cyc; pulses++;
        @(posedge clk);
        checks++;
        if (ce) failures++;
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
