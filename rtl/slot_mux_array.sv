// slot_mux_array: the eight 2:1 analog multiplexers between the level generator and the
// column multiplexers.
//
// At any moment only eight of the sixteen column levels are needed: one set in the first
// slot of a row-select time and the other in the second. Output Xi (i = gray code seen by a
// column multiplexer) passes level SLOT1_SEL[i] while slot = 0 and SLOT2_SEL[i] while
// slot = 1. The input pairs are those of the multiplexer array drawing; the assignment of the
// inputs to the slots is derived from the scheme-3/scheme-4 voltage table. Analog voltages
// are carried as volt_t codes (see am_lcd_pkg). Purely combinational.
module slot_mux_array
  import am_lcd_pkg::*;
(
  input  volt_t level [NUM_LEVELS],  // V0..V15 from the level generator
  input  logic  slot,                // 0: first slot, 1: second slot
  output volt_t x     [NUM_GRAY]     // X0..X7 to the column multiplexers
);

  always_comb begin
    for (int i = 0; i < NUM_GRAY; i++) begin
      x[i] = slot ? level[SLOT2_SEL[i]] : level[SLOT1_SEL[i]];
    end
  end

endmodule
