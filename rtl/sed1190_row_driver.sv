// sed1190_row_driver: logic of the 64-output row (common) driver.
//
// The serial input di passes a transparent latch (open while lat is high, holding while lat
// is low) and is shifted into a 64-bit shift register on each falling edge of yscl. Output
// com_sel[i] is stage i: the single 1 that the controller puts on di once per frame walks down
// the rows, one row per yscl, so exactly one row is selected at a time. do_out is the last
// stage, for cascading. The data sheet builds the register from two 32-bit halves in series,
// which is the same as one 64-bit register.
//
// com_level is the supply level each output switches to, from the stage bit, fr and the
// active-low blanking input inh_n:
//   inh_n 1, fr 1: selected -> VSSH, unselected -> VDD
//   inh_n 1, fr 0: selected -> V1,   unselected -> V4
//   inh_n 0      : selected -> V1,   unselected -> V4
// In the display system fr is the controller's ROWINV, which sets the polarity of the row
// select pulse. The DI latch is a real level-sensitive latch, as the chip defines it. The
// chip has no reset; the register is undefined until a frame marker has passed through.
module sed1190_row_driver
  import am_lcd_pkg::*;
#(
  parameter int STAGES = 64
) (
  input  logic              yscl,    // shift clock, falling edge
  input  logic              di,      // serial data input
  input  logic              lat,     // DI latch: 1 transparent, 0 hold
  input  logic              fr,      // AC-drive (polarity) input
  input  logic              inh_n,   // blanking, active low
  output logic [STAGES-1:0] com_sel, // shift register stages
  output logic              do_out,  // serial data output
  output row_lvl_e          com_level [STAGES]
);

  logic di_l;

  always_latch begin
    if (lat) di_l = di;
  end

  always_ff @(negedge yscl) begin
    com_sel <= {com_sel[STAGES-2:0], di_l};
  end

  assign do_out = com_sel[STAGES-1];

  always_comb begin
    for (int i = 0; i < STAGES; i++) begin
      if (inh_n && fr) com_level[i] = com_sel[i] ? ROW_VSSH : ROW_VDD;
      else             com_level[i] = com_sel[i] ? ROW_V1   : ROW_V4;
    end
  end

endmodule
