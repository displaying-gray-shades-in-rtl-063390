// tb_sed1180_column_driver: shifts rows of 16 random nibbles into the column driver on the
// falling edge of XSCL and latches them with LP. Checks that the outputs do not change while
// a new row is shifted, that after LP the first nibble sits on segments 0-3 and the last on
// 60-63, that shifting stops while EI is low, and that each output level follows the
// data/FR table (1/0 -> VDD, 1/1 -> VSSH, 0/0 -> V2, 0/1 -> V3).
module tb_sed1180_column_driver;
  import am_lcd_pkg::*;
  logic xscl = 1'b1, lp = 1'b0, ei = 1'b1, fr = 1'b1;
  logic [3:0] d = '0;
  logic [63:0] seg;
  col_lvl_e seg_level [64];
  int checks = 0, failures = 0;

  sed1180_column_driver dut (.xscl, .lp, .ei, .fr, .d, .seg, .seg_level);

  task automatic shift(input logic [3:0] v);
    d = v;
    #5 xscl = 1'b0;
    #5 xscl = 1'b1;
  endtask

  task automatic latch();
    #2 lp = 1'b1;
    #5 lp = 1'b0;
    #2;
  endtask

  task automatic check_levels();
    for (int s = 0; s < 64; s++) begin
      col_lvl_e want;
      case ({seg[s], fr})
        2'b10: want = COL_VDD;
        2'b11: want = COL_VSSH;
        2'b00: want = COL_V2;
        default: want = COL_V3;
      endcase
      checks++;
      if (seg_level[s] != want) begin
        failures++;
        $display("FAIL level seg%0d", s);
      end
    end
  endtask

  logic [63:0] expect_seg, held;

  initial begin
    for (int row = 0; row < 6; row++) begin
      held = seg;
      for (int i = 0; i < 16; i++) begin
        logic [3:0] v;
        v = 4'($urandom);
        expect_seg[4*i +: 4] = v;
        shift(v);
      end
      if (row > 0) begin
        checks++;
        if (seg != held) begin
          failures++;
          $display("FAIL outputs changed before LP");
        end
      end
      latch();
      checks++;
      if (seg != expect_seg) begin
        failures++;
        $display("FAIL row %0d seg=%h want %h", row, seg, expect_seg);
      end
      fr = row[0];
      #1 check_levels();
    end
    // EI low: clocks are ignored.
    ei = 1'b0;
    for (int i = 0; i < 16; i++) shift(4'($urandom));
    latch();
    checks++;
    if (seg != expect_seg) begin
      failures++;
      $display("FAIL shifted while EI low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
