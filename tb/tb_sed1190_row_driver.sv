// tb_sed1190_row_driver: puts a single 1 on DI for one YSCL period out of every 16 and checks
// that it walks down the outputs one row per falling YSCL edge, that DO shows the 64th
// stage, that the DI latch holds while LAT is low, and that every output level follows the
// INH/FR/data table.
module tb_sed1190_row_driver;
  import am_lcd_pkg::*;
  logic yscl = 1'b1, di = 1'b0, lat = 1'b1, fr = 1'b0, inh_n = 1'b1;
  logic [63:0] com_sel;
  logic do_out;
  row_lvl_e com_level [64];
  int checks = 0, failures = 0;
  logic [63:0] model = '0;

  sed1190_row_driver dut (.yscl, .di, .lat, .fr, .inh_n, .com_sel, .do_out, .com_level);

  task automatic clock(input logic v);
    di = v;
    #5 yscl = 1'b0;
    model = {model[62:0], v};
    #5 yscl = 1'b1;
  endtask

  task automatic check_levels();
    for (int i = 0; i < 64; i++) begin
      row_lvl_e want;
      if (inh_n && fr) want = com_sel[i] ? ROW_VSSH : ROW_VDD;
      else             want = com_sel[i] ? ROW_V1 : ROW_V4;
      checks++;
      if (com_level[i] != want) begin
        failures++;
        $display("FAIL level com%0d", i);
      end
    end
  endtask

  initial begin
    // Flush the undefined power-up contents.
    for (int i = 0; i < 64; i++) clock(1'b0);
    for (int t = 0; t < 160; t++) begin
      clock(t % 16 == 0);
      fr    = 1'($urandom);
      inh_n = 1'($urandom);
      #1;
      checks++;
      if (com_sel != model || do_out != model[63]) begin
        failures++;
        $display("FAIL t=%0d com_sel=%h want %h", t, com_sel, model);
      end
      check_levels();
    end
    // With LAT low the latched DI (0) is shifted whatever DI does.
    clock(1'b0);
    lat = 1'b0;
    for (int t = 0; t < 4; t++) begin
      di = 1'b1;
      #5 yscl = 1'b0;
      model = {model[62:0], 1'b0};
      #5 yscl = 1'b1;
    end
    checks++;
    if (com_sel != model) begin
      failures++;
      $display("FAIL DI latch did not hold");
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
