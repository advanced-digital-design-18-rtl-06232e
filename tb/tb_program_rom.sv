// tb_program_rom: loads a small image and checks the loaded bytes, the
// default filler byte elsewhere, and the one-clock read latency.
module tb_program_rom;
  logic clk = 0;
  logic [12:0] addr;
  logic [7:0] rdata;
  int checks = 0, failures = 0;
  logic [7:0] exp [int];

  program_rom #(.INIT_FILE("tb/rom_test.hex")) dut (.clk, .addr, .rdata);

  always #10 clk = ~clk;

  task automatic chk(input logic [12:0] a, input logic [7:0] e);
    @(negedge clk) addr = a;
    @(posedge clk); #1;
    checks++;
    if (rdata !== e) begin failures++; $display("rom[%h]=%h exp %h", a, rdata, e); end
  endtask

  initial begin
    exp[0]='hA9; exp[1]='h01; exp[2]='h8D; exp[3]='h00; exp[4]='h04; exp[5]='h4C; exp[6]='h00; exp[7]='h20;
    exp['h1FFA]='h00; exp['h1FFB]='h20; exp['h1FFC]='h00; exp['h1FFD]='h20; exp['h1FFE]='h00; exp['h1FFF]='h20;
    foreach (exp[a]) chk(13'(a), exp[a]);
    for (int i = 0; i < 50; i++) begin
      int a;
      a = 8 + $urandom_range(0, 'h1FF0);
      chk(13'(a), 8'hEA);
    end
    // latency: data must not change before the clock edge
    @(negedge clk) addr = 13'h0000;
    @(posedge clk); #1;
    @(negedge clk) addr = 13'h0001;
    #2; checks++;
    if (rdata !== 8'hA9) failures++;
    @(posedge clk); #1; checks++;
    if (rdata !== 8'h01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
