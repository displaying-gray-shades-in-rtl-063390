// column_mux_bank: one 8:1 analog multiplexer per display column.
//
// All multiplexers share the eight levels X0..X7 from the 2:1 multiplexer array. The three
// column-driver output bits that belong to a column (driver segments 4c, 4c+1, 4c+2, holding
// data bits D0, D1, D2 of that column) form its select; the selected level is the column
// voltage. D0 is taken as the least significant select bit, this design's reading of the
// drawing, which shows the three bits feeding the select inputs without naming them. Analog
// voltages are carried as volt_t codes (see am_lcd_pkg). Purely combinational.
module column_mux_bank
  import am_lcd_pkg::*;
#(
  parameter int N_COLS = 16
) (
  input  volt_t            x   [NUM_GRAY],   // X0..X7
  input  logic [4*N_COLS-1:0] seg,           // column driver segment outputs (logic level)
  output volt_t            col [N_COLS]      // voltage applied to each column electrode
);

  always_comb begin
    for (int c = 0; c < N_COLS; c++) begin
      col[c] = x[seg[4*c +: 3]];
    end
  end

endmodule
