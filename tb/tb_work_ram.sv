// tb_work_ram: random reads and writes against a reference array; also checks
// that nothing is written or read while the enable is low.
module tb_work_ram;
  logic clk = 0, en = 0, we = 0;
  logic [9:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [1024];
  int checks = 0, failures = 0;

  work_ram dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #10 clk = ~clk;

  task automatic wr(input logic [9:0] a, input logic [7:0] d);
    @(negedge clk) begin en = 1; we = 1; addr = a; wdata = d; end
    @(posedge clk); #1 en = 0; we = 0;
    model[a] = d;
  endtask

  task automatic rd(input logic [9:0] a);
    @(negedge clk) begin en = 1; we = 0; addr = a; end
    @(posedge clk); #1 en = 0;
    checks++;
    if (rdata !== model[a]) begin failures++; $display("ram[%h]=%h exp %h", a, rdata, model[a]); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) wr(10'(i), 8'($urandom));
    for (int i = 0; i < 2000; i++) begin
      logic [9:0] a;
      a = 10'($urandom);
      if ($urandom_range(0, 1)) wr(a, 8'($urandom)); else rd(a);
    end
    // enable low: a write must not land, the read data must hold
    rd(10'd5);
    @(negedge clk) begin en = 0; we = 1; addr = 10'd5; wdata = ~model[5]; end
    @(posedge clk); #1 we = 0;
    checks++;
    if (rdata !== model[5]) failures++;
    rd(10'd5);
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
