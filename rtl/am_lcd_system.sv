// am_lcd_system: digital drive path of a 16x16 passive matrix LCD that shows eight gray
// shades by amplitude modulation of the column voltage.
//
// Every row-select time is split into two slots. In each slot a column gets one of two
// voltages (k +/- sqrt(1-k^2))Vc, and the row polarity is reversed between the slots; the sum
// of the squares of the two column voltages is the same for every gray fraction k, so the RMS
// voltage of the pixels in unselected rows does not depend on the data, while the selected
// pixel receives (Vr^2 - 2 k Vr Vc + N Vc^2)/(2N) in the mean square. Alternate frames use the
// complemented code and the inverted row polarity, so a two-frame cycle carries no DC.
//
// Data path: the controller addresses the image memory once per shift clock; the 3-bit code
// is complemented in odd frames and shifted into the column driver; STR latches a complete row
// and advances the row driver. The eight 2:1 multiplexers pick the eight column levels of the
// current slot from the sixteen levels of the (external, analog) level generator, and the 8:1
// multiplexer of each column picks the level its latched code selects.
//
// Interface: clk is the shift clock (XSCL), also the controller clock; rst_n resets the
// controller. level[] are the sixteen generator voltages as volt_t codes. col_v[] is the
// voltage on each column electrode and row_level[] the supply level chosen for each row
// electrode; the row supply voltages themselves come from the generator. The controller's
// outputs are brought out for observation and for external address circuitry (variable-size
// mode). Timing: one pixel per clk, a row time of N_COLS clks in the dedicated 16x16 mode,
// and the displayed row lags the shifted row by one row time.
//
// The drivers are wired as the display system does it: column driver FR and EI held high,
// fourth data input unused; row driver DI latch transparent and blanking off.
module am_lcd_system
  import am_lcd_pkg::*;
#(
  parameter int    N_ROWS    = 16,
  parameter int    N_COLS    = 16,
  parameter string INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  mrow,
  input  logic [7:0]  mcol,
  input  logic        opt,
  input  logic        mode,
  input  logic [3:0]  preset,
  input  volt_t       level     [NUM_LEVELS],
  output volt_t       col_v     [N_COLS],
  output row_lvl_e    row_level [N_ROWS],
  output logic [15:0] eprom_addr,
  output logic        str,
  output logic        rinz,
  output logic        exr,
  output logic        rowinv,
  output logic        slot,
  output logic        frame_pulse
);

  localparam int COL_STAGES = 16;   // one SED1180: 16 x 4 bits
  localparam int ROW_STAGES = 64;   // one SED1190

  logic [7:0]  rom_data;
  gray_t       code;
  logic [4*COL_STAGES-1:0] seg;
  col_lvl_e    seg_level [4*COL_STAGES];
  logic [ROW_STAGES-1:0]   com_sel;
  row_lvl_e    com_level [ROW_STAGES];
  logic        row_do;
  volt_t       x [NUM_GRAY];

  am_lcd_controller u_ctrl (
    .clk, .rst_n, .mrow, .mcol, .opt, .mode, .preset,
    .eprom_addr, .str, .rinz, .exr, .rowinv, .slot, .frame_pulse
  );

  image_eprom #(.ADDR_W(13), .DATA_W(8), .INIT_FILE(INIT_FILE)) u_eprom (
    .addr (eprom_addr[12:0]),
    .data (rom_data)
  );

  data_complement #(.GRAY_W(3)) u_xor (
    .din  (rom_data[2:0]),
    .exr  (exr),
    .dout (code)
  );

  sed1180_column_driver #(.STAGES(COL_STAGES)) u_coldrv (
    .xscl      (clk),
    .lp        (str),
    .ei        (1'b1),
    .fr        (1'b1),
    .d         ({1'b0, code}),
    .seg       (seg),
    .seg_level (seg_level)
  );

  sed1190_row_driver #(.STAGES(ROW_STAGES)) u_rowdrv (
    .yscl      (str),
    .di        (rinz),
    .lat       (1'b1),
    .fr        (rowinv),
    .inh_n     (1'b1),
    .com_sel   (com_sel),
    .do_out    (row_do),
    .com_level (com_level)
  );

  slot_mux_array u_slotmux (
    .level (level),
    .slot  (slot),
    .x     (x)
  );

  column_mux_bank #(.N_COLS(N_COLS)) u_colmux (
    .x   (x),
    .seg (seg[4*N_COLS-1:0]),
    .col (col_v)
  );

  always_comb begin
    for (int r = 0; r < N_ROWS; r++) row_level[r] = com_level[r];
  end

endmodule
