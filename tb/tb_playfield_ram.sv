// tb_playfield_ram: writes every tile and motion-object byte through the CPU
// port, reads them back through the CPU port, reads tiles through the video
// port and checks the motion-object table outputs.
module tb_playfield_ram;
  import centipede_pkg::*;
  logic clk = 0, cpu_en = 0, cpu_we = 0, vid_ce = 0;
  logic [9:0] cpu_addr = 0, vid_addr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata, vid_tile;
  logic [7:0] mo_pic [NUM_MO], mo_x [NUM_MO], mo_y [NUM_MO], mo_color [NUM_MO];
  logic [7:0] model [1024];
  int checks = 0, failures = 0;

  playfield_ram dut (.clk, .cpu_en, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
                     .vid_ce, .vid_addr, .vid_tile, .mo_pic, .mo_x, .mo_y, .mo_color);

  always #10 clk = ~clk;

  task automatic wr(input int a, input logic [7:0] d);
    @(negedge clk) begin cpu_en = 1; cpu_we = 1; cpu_addr = 10'(a); cpu_wdata = d; end
    @(posedge clk); #1 begin cpu_en = 0; cpu_we = 0; end
    model[a] = d;
  endtask

  task automatic rd(input int a);
    @(negedge clk) begin cpu_en = 1; cpu_addr = 10'(a); end
    @(posedge clk); #1 cpu_en = 0;
    checks++;
    if (cpu_rdata !== model[a]) begin failures++; $display("cpu rd %h = %h exp %h", a, cpu_rdata, model[a]); end
  endtask

  initial begin
    for (int a = 0; a < 1024; a++) wr(a, 8'($urandom));
    for (int a = 0; a < 1024; a++) rd(a);
    for (int a = 0; a < 960; a++) begin
      @(negedge clk) begin vid_ce = 1; vid_addr = 10'(a); end
      @(posedge clk); #1 vid_ce = 0;
      checks++;
      if (vid_tile !== model[a]) failures++;
    end
    for (int i = 0; i < NUM_MO; i++) begin
      checks++;
      if (mo_pic[i] !== model['h3C0 + i] || mo_x[i] !== model['h3D0 + i] ||
          mo_y[i] !== model['h3E0 + i] || mo_color[i] !== model['h3F0 + i]) begin
        failures++; $display("mo %0d mismatch", i);
      end
    end
    // video port holds its value without vid_ce
    @(negedge clk) vid_addr = 10'd1;
    @(posedge clk); #1 checks++;
    if (vid_tile !== model[959]) failures++;
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
