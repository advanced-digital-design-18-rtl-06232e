// tb_address_decoder: sweeps all 65536 CPU addresses and compares the select
// lines with the board's memory map written out as plain address ranges.
module tb_address_decoder;
  import centipede_pkg::*;
  logic [15:0] addr;
  bus_sel_t sel;
  int checks = 0, failures = 0;

  address_decoder dut (.addr, .sel);

  initial begin
    for (int a = 0; a < 65536; a++) begin
      int m;
      bus_sel_t exp;
      addr = 16'(a);
      #1;
      m = a % 16384;             // A15/A14 ignored
      exp = '0;
      if (m >= 'h2000)      exp.rom = 1;
      else if (m < 'h0400)  exp.ram = 1;
      else if (m < 'h0800)  exp.playfield = 1;
      else if (m < 'h0C00)  exp.dsw = 1;
      else if (m < 'h1000)  exp.inputs = 1;
      else if (m < 'h1400)  exp.pokey = 1;
      else if (m < 'h1800)  exp.palette = 1;
      else if (m < 'h1C00)  exp.irq_ack = 1;
      else                  exp.unmapped = 1;
      checks++;
      if (sel !== exp) begin
        failures++;
        if (failures < 10) $display("addr %h sel %b exp %b", addr, sel, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
