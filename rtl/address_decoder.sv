// address_decoder: turns the 6502 address into one-hot device selects.
//
// Purely combinational. Only A13..A0 are decoded, so the 16 KB map is
// mirrored through the 64 KB space (the reset vector 0xFFFC reads ROM). The
// document fixes the ROM at the low 13 address bits, the work RAM at 10 bits,
// the POKEY at 4 bits and the trackball at 0x0C00/0x0C02; the other device
// addresses follow the original board and are this design's choice:
//   0x0000-0x03FF RAM      0x0400-0x07FF playfield   0x0800-0x0BFF switches
//   0x0C00-0x0FFF inputs   0x1000-0x13FF POKEY       0x1400-0x17FF palette
//   0x1800-0x1BFF IRQ ack  0x1C00-0x1FFF unmapped    0x2000-0x3FFF ROM
// Devices use only their own low address bits, so each repeats in its block.
module address_decoder
  import centipede_pkg::*;
(
  input  logic [15:0] addr,
  output bus_sel_t    sel
);
  always_comb begin
    sel = '0;
    if (addr[13]) sel.rom = 1'b1;  // program ROM: the upper 8 KB
    else begin
      unique case (addr[12:10])
        RAM_BASE[12:10]:     sel.ram       = 1'b1;
        PF_BASE[12:10]:      sel.playfield = 1'b1;
        DSW_BASE[12:10]:     sel.dsw       = 1'b1;
        IN_BASE[12:10]:      sel.inputs    = 1'b1;
        POKEY_BASE[12:10]:   sel.pokey     = 1'b1;
        PALETTE_BASE[12:10]: sel.palette   = 1'b1;
        IRQACK_BASE[12:10]:  sel.irq_ack   = 1'b1;
        default:             sel.unmapped  = 1'b1;
      endcase
    end
  end
endmodule
