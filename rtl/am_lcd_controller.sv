// am_lcd_controller: scan controller for line-by-line (Alt-Pleshko) addressing of a passive
// matrix LCD with amplitude-modulated gray shades.
//
// One clock cycle of clk (the shift clock, XSCL) presents one pixel address to the image
// memory; the column driver shifts the resulting code on the falling edge of the same clock.
// A row time is NCOL cycles: the codes of one row are shifted in, then the strobe STR falls,
// which latches them into the column driver and advances the row driver by one row. While row
// r is shown, row r+1 is being shifted in. Each row time is split into two slots of NCOL/2
// cycles (slot = 0, then 1): the slot signal switches the 2:1 level multiplexers and, through
// ROWINV, reverses the row-select polarity between the two slots. Every second frame the gray
// codes are complemented (EXR = 1) and the row polarity is inverted, which makes the drive
// free of DC; a complete cycle is two frames.
//
// Modes (OPT, MODE), following the controller's mode table:
//   OPT=0      : NROW x NCOL display given by mrow/mcol (0 means 256); linear addresses
//                0 .. NROW*NCOL-1 each frame; frame_pulse marks the end of every frame for
//                external address circuitry.
//   OPT=1,MODE=0: dedicated 16x16; address = {4'b0, preset, row[3:0], col[3:0]}, so preset
//                chooses which of sixteen 256-byte images is shown.
//   OPT=1,MODE=1: dedicated 16x16; the image number (address bits 11:8) starts at 0 and steps
//                after every complete two-frame cycle, showing up to 16 images in turn.
//
// Timing (outputs are registers clocked on the rising edge of clk, except eprom_addr):
//   eprom_addr : address of the pixel shifted in during this cycle, decoded from the scan
//                counters (and from preset in mode OPT=1, MODE=0).
//   str        : high during the cycle of the last column of a row; its falling edge (the
//                rising clk edge that starts the next row) is the column latch pulse LP and
//                the row shift clock YSCL.
//   rinz       : row-driver serial input DI; high across the STR fall that follows row 0's
//                data, so it selects the first row once per frame.
//   exr        : complements the codes being shifted in (frame parity on the shift side).
//   slot       : 2:1 multiplexer select for the row being displayed.
//   rowinv     : row driver FR = display-side frame parity XOR slot.
//   frame_pulse: high during the last cycle of every frame.
// A row time therefore lasts NCOL clk cycles and a frame NROW*NCOL cycles; with the 16x16
// panel and a 25.6 kHz shift clock that is a 1.6 kHz strobe and 50 two-frame cycles per
// second, the rates the design is built for.
//
// The mode table, the pin set, the 8-bit size inputs and the use of STR, RINZ, EXR and ROWINV
// follow the description of the programmed controller. The exact edge placement of STR and
// RINZ, the slot split at NCOL/2, the separate slot output, the preset input for address bits
// 11:8, stepping images once per two-frame cycle and an active-low asynchronous reset are this
// design's choices. The slot split needs NCOL >= 2; an assertion flags smaller sizes, and a
// second one checks that STR stays a single-cycle pulse.
module am_lcd_controller
  import am_lcd_pkg::*;
(
  input  logic        clk,          // CLKA, the shift clock
  input  logic        rst_n,        // RESET, asynchronous, active low
  input  logic [7:0]  mrow,         // number of rows in variable mode (0 = 256)
  input  logic [7:0]  mcol,         // number of columns in variable mode (0 = 256)
  input  logic        opt,
  input  logic        mode,
  input  logic [3:0]  preset,       // address bits 11:8 in mode OPT=1, MODE=0
  output logic [15:0] eprom_addr,
  output logic        str,
  output logic        rinz,
  output logic        exr,
  output logic        rowinv,
  output logic        slot,
  output logic        frame_pulse
);

  localparam int FIXED_SIZE = 16;

  logic [8:0] ncol, nrow;           // 1..256
  logic [7:0] col, row;
  logic [7:0] col_n, row_n;
  logic       exr_n;
  logic [3:0] img, img_n;
  logic [15:0] lin, lin_n;
  logic       disp_par;             // frame parity of the row being displayed
  logic       row_last, col_last;

  always_comb begin
    if (opt) begin
      ncol = 9'(FIXED_SIZE);
      nrow = 9'(FIXED_SIZE);
    end else begin
      ncol = (mcol == 8'd0) ? 9'd256 : {1'b0, mcol};
      nrow = (mrow == 8'd0) ? 9'd256 : {1'b0, mrow};
    end
  end

  assign col_last = ({1'b0, col} == ncol - 9'd1);
  assign row_last = ({1'b0, row} == nrow - 9'd1);

  // Next-state of the scan counters.
  always_comb begin
    col_n = col + 8'd1;
    row_n = row;
    exr_n = exr;
    img_n = img;
    lin_n = lin + 16'd1;
    if (col_last) begin
      col_n = 8'd0;
      row_n = row + 8'd1;
      if (row_last) begin
        row_n = 8'd0;
        lin_n = 16'd0;
        exr_n = ~exr;
        // One complete cycle (normal + complemented frame) ends: next image.
        if (exr) img_n = img + 4'd1;
      end
    end
  end

  // Address of the pixel being shifted in this cycle, decoded from the scan counters.
  always_comb begin
    if (!opt)
      eprom_addr = lin;
    else if (!mode)
      eprom_addr = {4'b0, preset, row[3:0], col[3:0]};
    else
      eprom_addr = {4'b0, img, row[3:0], col[3:0]};
  end

  // Half of the row time, where slot 2 begins.
  logic [8:0] half;
  assign half = ncol >> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col         <= '0;
      row         <= '0;
      exr         <= 1'b0;
      img         <= '0;
      lin         <= '0;
      str         <= 1'b0;
      rinz        <= 1'b0;
      slot        <= 1'b0;
      disp_par    <= 1'b0;
      rowinv      <= 1'b0;
      frame_pulse <= 1'b0;
    end else begin
      col         <= col_n;
      row         <= row_n;
      exr         <= exr_n;
      img         <= img_n;
      lin         <= lin_n;
      str         <= ({1'b0, col_n} == ncol - 9'd1);
      // One cycle behind "row 0 is being shifted", so it is stable across both STR falls.
      rinz        <= (row == 8'd0);
      frame_pulse <= ({1'b0, col_n} == ncol - 9'd1) && ({1'b0, row_n} == nrow - 9'd1);
      // The row whose data has just been latched starts being displayed at the STR fall,
      // which is the clock edge that starts column 0. Its frame parity is the parity of the
      // row that was shifted in the row time now ending.
      if (col_n == 8'd0) disp_par <= exr;
      slot        <= ({1'b0, col_n} >= half);
      rowinv      <= (col_n == 8'd0 ? exr : disp_par) ^ ({1'b0, col_n} >= half);
    end
  end

  // The two slots need at least two shift clocks per row time.
  a_min_cols: assert property (@(posedge clk) disable iff (!rst_n) ncol >= 9'd2)
    else $error("row time shorter than two shift clocks: no room for two slots");
  // STR is a single-cycle pulse, once per row time.
  a_str_pulse: assert property (@(posedge clk) disable iff (!rst_n) str |=> !str)
    else $error("STR high for more than one cycle");

endmodule
