// am_lcd_pkg: types and constants shared by the amplitude-modulation LCD drive path.
//
// Column voltages in this design are analog. So that their routing can be simulated and
// checked, every analog level is carried as a signed fixed-point code, volt_t, in units of
// 1/10000 of the column voltage Vc (10000 = +1.0 Vc). The sixteen levels V0..V15 of the
// resistive level generator are named by their index; LEVEL_CODE gives the value each one
// must have so that the 2:1 level multiplexers produce the column voltages of the combined
// scheme-3/scheme-4 table (gray codes 000-011 follow scheme 3, 100-111 follow scheme 4).
// Levels V7 and V15 are not routed to any multiplexer; they are set to 0 here.
//
// SLOT1_SEL / SLOT2_SEL give, for each multiplexer output X0..X7, the index of the level it
// passes during the first and the second half (slot) of a row-select time. The pairs are those
// of the multiplexer array drawing; which input belongs to which slot follows from the table
// of column voltages (gray code 000 needs -1 Vc in slot 1, +1 Vc in slot 2).
//
// The driver output levels are the supply pins of the two driver chips; their encodings
// are enumerated here.
package am_lcd_pkg;

  typedef logic signed [15:0] volt_t;  // analog level, units of Vc/10000
  typedef logic [3:0]         lvl_idx_t;
  typedef logic [2:0]         gray_t;  // 3-bit gray code, 000 = fully on, 111 = fully off

  localparam int NUM_LEVELS = 16;
  localparam int NUM_GRAY   = 8;

  // Value of level Vi, normalised to Vc = 1.0 -> 10000.
  localparam volt_t LEVEL_CODE [NUM_LEVELS] = '{
    16'sd14141, 16'sd13320, 16'sd11326, 16'sd10000,    // V0..V3
    16'sd8470,  16'sd4750,  16'sd144,   16'sd0,        // V4..V7
    -16'sd144,  -16'sd4750, -16'sd8470, -16'sd10000,   // V8..V11
    -16'sd11326, -16'sd13320, -16'sd14141, 16'sd0      // V12..V15
  };

  // Level index passed by multiplexer Xi in slot 1 and in slot 2.
  localparam lvl_idx_t SLOT1_SEL [NUM_GRAY] = '{4'd11, 4'd8, 4'd5, 4'd4, 4'd10, 4'd9, 4'd6, 4'd3};
  localparam lvl_idx_t SLOT2_SEL [NUM_GRAY] = '{4'd3, 4'd0, 4'd1, 4'd2, 4'd12, 4'd13, 4'd14, 4'd11};

  // Column driver (SED1180) output level: one of its four LCD supply inputs.
  typedef enum logic [1:0] {
    COL_VDD  = 2'd0,
    COL_V2   = 2'd1,
    COL_V3   = 2'd2,
    COL_VSSH = 2'd3
  } col_lvl_e;

  // Row driver (SED1190) output level: one of its four LCD supply inputs.
  typedef enum logic [1:0] {
    ROW_VDD  = 2'd0,
    ROW_V1   = 2'd1,
    ROW_V4   = 2'd2,
    ROW_VSSH = 2'd3
  } row_lvl_e;

  // Gray fraction k of a code, times 7: code 000 -> k = -1, code 111 -> k = +1.
  function automatic int k_times7(input gray_t g);
    return 2 * int'(g) - 7;
  endfunction

endpackage
