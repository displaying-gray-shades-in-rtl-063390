// tb_am_lcd_controller: checks the scan controller cycle by cycle against a reference worked
// out from the cycle number t since reset alone:
//   col = t mod C, row = (t div C) mod R, frame = t div (R*C), exr = frame mod 2,
//   str = (col = C-1), frame_pulse = str and (row = R-1), rinz(t) = (row(t-1) = 0),
//   slot = (col >= C/2), rowinv = parity of the frame of cycle t-C, XOR slot,
//   address = {preset, row, col} (OPT=1, MODE=0), {image, row, col} with
//   image = (t div 2RC) mod 16 (OPT=1, MODE=1), or t mod RC (OPT=0).
// Runs each mode, including variable sizes 5x7, 3x4 and 2x256 (mcol = 0), and checks the
// document's rates for the 16x16 panel: a strobe every 16 shift clocks and a two-frame
// cycle every 512 (25.6 kHz / 512 = 50 per second).
module tb_am_lcd_controller;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] mrow, mcol;
  logic opt, mode;
  logic [3:0] preset;
  logic [15:0] eprom_addr;
  logic str, rinz, exr, rowinv, slot, frame_pulse;
  int checks = 0, failures = 0;
  int str_rises, last_str_t, str_period_bad, exr_toggles, last_exr_t, exr_period;

  am_lcd_controller dut (.*);

  always #5 clk = ~clk;

  task automatic run(input int o, input int m, input int r, input int c, input int pre,
                     input int cycles);
    int R, C;
    logic prev_row0;
    logic prev_exr, prev_str;
    R = (r == 0) ? 256 : r;
    C = (c == 0) ? 256 : c;
    if (o != 0) begin
      R = 16;
      C = 16;
    end
    opt = o[0]; mode = m[0]; mrow = 8'(r); mcol = 8'(c); preset = 4'(pre);
    rst_n = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    prev_row0 = 1'b0;
    prev_exr = 1'b0;
    prev_str = 1'b0;
    str_rises = 0; str_period_bad = 0; exr_toggles = 0; last_str_t = -1; last_exr_t = 0;
    exr_period = 0;
    for (int t = 0; t < cycles; t++) begin
      int col, row, frame, img, want_addr, dframe;
      logic want_str, want_fp, want_rinz, want_slot, want_rowinv;
      col   = t % C;
      row   = (t / C) % R;
      frame = t / (R * C);
      img   = (t / (2 * R * C)) % 16;
      want_str  = (col == C - 1);
      want_fp   = want_str && (row == R - 1);
      want_rinz = (t == 0) ? 1'b0 : prev_row0;
      want_slot = (col >= C / 2);
      dframe    = (t < C) ? 0 : (t - C) / (R * C);
      want_rowinv = 1'(dframe % 2) ^ want_slot;
      if (!o[0])      want_addr = t % (R * C);
      else if (!m[0]) want_addr = pre * 256 + row * 16 + col;
      else            want_addr = img * 256 + row * 16 + col;
      checks++;
      if (int'(eprom_addr) != want_addr || str != want_str || frame_pulse != want_fp ||
          rinz != want_rinz || exr != 1'(frame % 2) || slot != want_slot ||
          rowinv != want_rowinv) begin
        failures++;
        if (failures < 20)
          $display("FAIL opt=%0d mode=%0d %0dx%0d t=%0d addr=%0h/%0h str=%b/%b fp=%b/%b rinz=%b/%b exr=%b/%b slot=%b/%b rowinv=%b/%b",
                   o, m, R, C, t, eprom_addr, want_addr, str, want_str, frame_pulse, want_fp,
                   rinz, want_rinz, exr, 1'(frame % 2), slot, want_slot, rowinv, want_rowinv);
      end
      // Rate bookkeeping.
      if (str && !prev_str) begin
        if (last_str_t >= 0 && t - last_str_t != C) str_period_bad++;
        last_str_t = t;
        str_rises++;
      end
      if (exr && !prev_exr) begin
        if (exr_toggles > 0) exr_period = t - last_exr_t;
        last_exr_t = t;
        exr_toggles++;
      end
      prev_str  = str;
      prev_exr  = exr;
      prev_row0 = (row == 0);
      @(negedge clk);
    end
  endtask

  initial begin
    // Dedicated 16x16 with a preset image number.
    run(1, 0, 0, 0, 5, 2048);
    checks++;
    if (str_period_bad != 0 || str_rises < 100) begin
      failures++;
      $display("FAIL strobe period (bad=%0d rises=%0d)", str_period_bad, str_rises);
    end
    checks++;
    if (exr_period != 512) begin
      failures++;
      $display("FAIL two-frame cycle is %0d shift clocks, want 512", exr_period);
    end
    // Dedicated 16x16 stepping through images.
    run(1, 1, 0, 0, 9, 512 * 18);
    // Variable sizes.
    run(0, 0, 5, 7, 0, 600);
    run(0, 1, 3, 4, 0, 200);
    run(0, 0, 2, 0, 0, 2100);
    run(0, 0, 16, 16, 0, 1100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
