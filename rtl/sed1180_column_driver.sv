// sed1180_column_driver: logic of the 64-output column (segment) driver.
//
// Display data arrives four bits at a time on d. On each falling edge of xscl, while the
// enable input ei is high, the nibble enters a 16-stage, 4-bit-wide shift register. After 16
// shifts the register holds 64 bits; the falling edge of the latch pulse lp copies them into
// the 64-bit output latch. The nibble shifted in first ends up on segments 0-3, the next on
// 4-7, and so on (this design's choice of order; the data sheet does not give it). In the
// display system a column uses three segments (4c .. 4c+2, from d[0] .. d[2]) as the select
// of its 8:1 level multiplexer, and d[3] is unused.
//
// seg is the latched data. seg_level is the supply level each output would switch to, set by
// the latched bit and the AC-drive input fr:
//   data 1, fr 0 -> VDD   data 1, fr 1 -> VSSH   data 0, fr 0 -> V2   data 0, fr 1 -> V3.
// The display system holds fr high and uses the outputs as logic levels.
// The daisy-chain enable output (EO) and its clock (ECL) are not modelled: the design uses a
// single driver with ECL grounded. The chip has no reset; the registers are undefined until
// 16 shifts and one latch pulse have passed.
module sed1180_column_driver
  import am_lcd_pkg::*;
#(
  parameter int STAGES = 16   // shift stages, 4 bits each
) (
  input  logic                xscl,   // data shift clock, falling edge
  input  logic                lp,     // latch pulse, falling edge
  input  logic                ei,     // shift enable, active high
  input  logic                fr,     // AC-drive (polarity) input
  input  logic [3:0]          d,      // display data
  output logic [4*STAGES-1:0] seg,    // latched segment data
  output col_lvl_e            seg_level [4*STAGES]
);

  logic [3:0] sr [STAGES];

  // sr[STAGES-1] receives the newest nibble; sr[0] holds the oldest.
  always_ff @(negedge xscl) begin
    if (ei) begin
      for (int i = 0; i < STAGES - 1; i++) sr[i] <= sr[i+1];
      sr[STAGES-1] <= d;
    end
  end

  always_ff @(negedge lp) begin
    for (int i = 0; i < STAGES; i++) seg[4*i +: 4] <= sr[i];
  end

  always_comb begin
    for (int s = 0; s < 4 * STAGES; s++) begin
      unique case ({seg[s], fr})
        2'b10:   seg_level[s] = COL_VDD;
        2'b11:   seg_level[s] = COL_VSSH;
        2'b00:   seg_level[s] = COL_V2;
        default: seg_level[s] = COL_V3;
      endcase
    end
  end

endmodule
