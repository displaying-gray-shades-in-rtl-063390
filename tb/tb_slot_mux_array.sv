// tb_slot_mux_array: checks the eight 2:1 level multiplexers in two ways.
// 1. Routing: with every level set to a distinct marker, each output must carry the level
//    printed beside it in the multiplexer drawing (X0: V11/V3, X1: V8/V0, X2: V5/V1,
//    X3: V4/V2, X4: V10/V12, X5: V9/V13, X6: V6/V14, X7: V3/V11), the first in slot 1.
// 2. Voltages: with the generator levels applied, each output in each slot must equal the
//    column voltage of the scheme-3 table (codes 000-011) or scheme-4 table (codes 100-111),
//    frame 1, in units of Vc/10000, within 10 units.
module tb_slot_mux_array;
  import am_lcd_pkg::*;
  volt_t level [NUM_LEVELS];
  volt_t x     [NUM_GRAY];
  logic  slot;
  int checks = 0, failures = 0;

  slot_mux_array dut (.level, .slot, .x);

  int pair1 [8] = '{11, 8, 5, 4, 10, 9, 6, 3};
  int pair2 [8] = '{3, 0, 1, 2, 12, 13, 14, 11};
  // Frame-1 column voltages, slot 1 and slot 2, from the two scheme tables.
  int tab1 [8] = '{-10000, -144, 4750, 8470, -8470, -4750, 144, 10000};
  int tab2 [8] = '{10000, 14141, 13320, 11326, -11326, -13320, -14141, -10000};

  initial begin
    for (int i = 0; i < NUM_LEVELS; i++) level[i] = volt_t'(1000 + 37 * i);
    for (int s = 0; s < 2; s++) begin
      slot = s[0];
      #1;
      for (int g = 0; g < 8; g++) begin
        checks++;
        if (int'(x[g]) != 1000 + 37 * (s ? pair2[g] : pair1[g])) begin
          failures++;
          $display("FAIL routing slot=%0d X%0d=%0d", s, g, x[g]);
        end
      end
    end
    for (int i = 0; i < NUM_LEVELS; i++) level[i] = LEVEL_CODE[i];
    for (int s = 0; s < 2; s++) begin
      slot = s[0];
      #1;
      for (int g = 0; g < 8; g++) begin
        int want;
        want = s ? tab2[g] : tab1[g];
        checks++;
        if (int'(x[g]) - want > 10 || want - int'(x[g]) > 10) begin
          failures++;
          $display("FAIL voltage slot=%0d X%0d=%0d want %0d", s, g, x[g], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
