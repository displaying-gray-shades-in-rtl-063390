// tb_am_lcd_system: end-to-end test of the whole drive path at its default size (16x16
// panel, one column driver, one row driver, built-in test images).
//
// The testbench plays the level generator (it drives the sixteen levels of am_lcd_pkg) and
// the panel: every shift-clock cycle it takes each row electrode voltage (+Vr for a row
// driver output at V1, -Vr at VSSH, 0 otherwise, with Vr = sqrt(N) Vc = 4 Vc) minus each
// column voltage as the pixel voltage, and accumulates its sum and its square over one
// complete two-frame cycle (512 cycles), starting where row 0 of a normal frame begins to be
// shown. For every pixel it then checks:
//   - DC balance: the sum over the cycle is zero;
//   - amplitude modulation: the mean square equals (Vr^2 - 2 k Vr Vc + N Vc^2) / N for the
//     gray fraction k = (2g - 7)/7 of the pixel's code g, within 0.2 %;
//   - and, per code, the RMS relative to the darkest shade against the theoretical RMS table
//     for a 10 V supply (gray shade n corresponds to code 8 - n), within 0.2 %.
// It also checks, every cycle, that exactly the expected row is selected with the expected
// polarity, and the rates: a strobe every 16 cycles, a two-frame cycle of 512 cycles.
// Mechanisms counted and required at least once: slot switch, frame polarity reversal,
// frame marker (row scan restart), image step (OPT=1, MODE=1), preset image (OPT=1,
// MODE=0, preset 3), variable-size mode with its frame pulse (OPT=0, 16x16).
module tb_am_lcd_system;
  import am_lcd_pkg::*;

  localparam int N = 16;
  localparam int CYCLE = 2 * N * N;
  localparam real VR = 4.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] mrow = 8'd16, mcol = 8'd16;
  logic opt = 1'b1, mode = 1'b0;
  logic [3:0] preset = 4'd0;
  volt_t level [NUM_LEVELS];
  volt_t col_v [N];
  row_lvl_e row_level [N];
  logic [15:0] eprom_addr;
  logic str, rinz, exr, rowinv, slot, frame_pulse;

  am_lcd_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_slot_sw = 0, n_polrev = 0, n_marker = 0, n_img_step = 0, n_preset = 0;
  int n_var = 0, n_fpulse = 0, n_measure = 0;
  logic prev_str = 1'b0, prev_slot = 1'b0, prev_exr = 1'b0;
  int   str_t = 0, last_str_t = -1, t_now = 0;

  // Theoretical RMS at a 10 V supply for gray shades 1..8.
  real doc_rms [8] = '{1.5309, 1.6022, 1.6704, 1.7359, 1.7991, 1.8601, 1.9191, 1.9764};

  // Running bookkeeping of mechanisms and strobe rate, sampled mid-cycle.
  always @(negedge clk) begin
    if (rst_n) begin
      t_now++;
      if (slot != prev_slot) n_slot_sw++;
      if (exr != prev_exr) n_polrev++;
      if (frame_pulse) n_fpulse++;
      if (prev_str && !str) begin
        if (rinz) n_marker++;
        if (last_str_t >= 0) begin
          checks++;
          if (t_now - last_str_t != N) begin
            failures++;
            $display("FAIL strobe interval %0d", t_now - last_str_t);
          end
        end
        last_str_t = t_now;
      end
      prev_slot = slot;
      prev_exr  = exr;
      prev_str  = str;
    end
  end

  function automatic real row_volts(row_lvl_e l);
    case (l)
      ROW_V1:   return VR;
      ROW_VSSH: return -VR;
      default:  return 0.0;
    endcase
  endfunction

  // Waits for the start of a normal frame's display and measures one two-frame cycle.
  // img is the image whose codes are expected; -1 takes it from address bits 11:8 at the
  // start of the display, which is when that image's first row has just been latched.
  task automatic measure(input int img_in, output int img);
    real    sq  [N][N];
    longint sum [N][N];
    int     disp_row, start_t;
    logic   p_str;
    real    ms_code [8];
    int     n_code  [8];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        sq[r][c] = 0.0;
        sum[r][c] = 0;
      end
    // Align: the first cycle after an STR fall with RINZ high in a frame with EXR = 0.
    p_str = 1'b0;
    forever begin
      @(negedge clk);
      if (p_str && !str && rinz && !exr) break;
      p_str = str;
    end
    img = (img_in < 0) ? int'(eprom_addr[11:8]) : img_in;
    disp_row = 0;
    p_str = 1'b0;
    start_t = t_now;
    for (int s = 0; s < CYCLE; s++) begin
      logic parity;
      if (s > 0 && p_str && !str) disp_row = (disp_row + 1) % N;
      p_str = str;
      // Frame parity of the displayed row: normal for the first N row times.
      parity = (s >= N * N);
      // Row selection and polarity.
      for (int r = 0; r < N; r++) begin
        row_lvl_e want;
        if (r == disp_row) want = (parity ^ slot) ? ROW_VSSH : ROW_V1;
        else               want = (parity ^ slot) ? ROW_VDD : ROW_V4;
        checks++;
        if (row_level[r] != want) begin
          failures++;
          if (failures < 20) $display("FAIL s=%0d row %0d level %0d want %0d", s, r,
                                      row_level[r], want);
        end
      end
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          real v;
          v = row_volts(row_level[r]) - real'(col_v[c]) / 10000.0;
          sq[r][c] += v * v;
          sum[r][c] += longint'(row_volts(row_level[r]) * 10000.0) - longint'(col_v[c]);
        end
      @(negedge clk);
    end
    checks++;
    if (t_now - start_t != CYCLE) begin
      failures++;
      $display("FAIL two-frame cycle took %0d cycles", t_now - start_t);
    end
    for (int g = 0; g < 8; g++) begin
      ms_code[g] = 0.0;
      n_code[g] = 0;
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int  g;
        real k, ms, want;
        g = (r + c + img) % 8;
        k = real'(2 * g - 7) / 7.0;
        ms = sq[r][c] / real'(CYCLE);
        want = (VR * VR - 2.0 * k * VR + real'(N)) / real'(N);
        checks++;
        if (ms > want * 1.002 || ms < want * 0.998) begin
          failures++;
          if (failures < 20) $display("FAIL pixel %0d,%0d code %0d ms %f want %f", r, c, g,
                                      ms, want);
        end
        checks++;
        if (sum[r][c] != 0) begin
          failures++;
          if (failures < 20) $display("FAIL pixel %0d,%0d DC sum %0d", r, c, sum[r][c]);
        end
        ms_code[g] += ms;
        n_code[g]++;
      end
    for (int g = 0; g < 8; g++) begin
      if (n_code[g] > 0) begin
        real ratio, doc_ratio;
        ratio = $sqrt((ms_code[g] / n_code[g]) / (ms_code[0] / n_code[0]));
        doc_ratio = doc_rms[7 - g] / doc_rms[7];
        checks++;
        if (ratio > doc_ratio * 1.002 || ratio < doc_ratio * 0.998) begin
          failures++;
          $display("FAIL code %0d rms ratio %f, table %f", g, ratio, doc_ratio);
        end
      end
    end
    n_measure++;
  endtask

  int img_a, img_b;

  initial begin
    for (int i = 0; i < NUM_LEVELS; i++) level[i] = LEVEL_CODE[i];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Dedicated 16x16, image 0.
    repeat (CYCLE) @(negedge clk);
    measure(0, img_a);
    measure(0, img_a);
    // Preset image 3.
    preset = 4'd3;
    repeat (CYCLE) @(negedge clk);
    measure(3, img_a);
    checks++;
    if (eprom_addr[11:8] != 4'd3) begin
      failures++;
      $display("FAIL preset not on address bits 11:8");
    end else n_preset++;
    // Stepping through images.
    mode = 1'b1;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    // The row driver has no reset: let the old scan token leave the panel rows first.
    repeat (CYCLE) @(negedge clk);
    measure(-1, img_a);
    measure(-1, img_b);
    // Consecutive measurements are two two-frame cycles apart.
    checks++;
    if (img_b != (img_a + 2) % 16 || img_a == 0) begin
      failures++;
      $display("FAIL image did not step: %0d -> %0d", img_a, img_b);
    end else n_img_step++;
    // Variable-size mode, 16 x 16: linear addresses give the same picture as image 0.
    opt = 1'b0;
    mode = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    n_fpulse = 0;
    repeat (CYCLE) @(negedge clk);
    measure(0, img_a);
    n_var++;
    checks++;
    if (n_fpulse < 2) begin
      failures++;
      $display("FAIL no frame pulse in variable mode");
    end

    // Every mechanism must have happened.
    $display("slot switches %0d, polarity reversals %0d, frame markers %0d, image steps %0d, preset %0d, variable-mode frames %0d, cycles measured %0d",
             n_slot_sw, n_polrev, n_marker, n_img_step, n_preset, n_fpulse, n_measure);
    checks++; if (n_slot_sw == 0)  begin failures++; $display("FAIL no slot switch"); end
    checks++; if (n_polrev == 0)   begin failures++; $display("FAIL no polarity reversal"); end
    checks++; if (n_marker == 0)   begin failures++; $display("FAIL no frame marker"); end
    checks++; if (n_img_step == 0) begin failures++; $display("FAIL no image step"); end
    checks++; if (n_preset == 0)   begin failures++; $display("FAIL no preset image"); end
    checks++; if (n_var == 0)      begin failures++; $display("FAIL no variable mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
