// tb_column_mux_bank: drives random levels X0..X7 and random segment data and checks that
// each column carries X[code], where code is that column's segments 4c+2..4c (4c = LSB) and
// segment 4c+3 is ignored.
module tb_column_mux_bank;
  import am_lcd_pkg::*;
  localparam int N = 16;
  volt_t x [NUM_GRAY];
  volt_t col [N];
  logic [4*N-1:0] seg;
  int checks = 0, failures = 0;

  column_mux_bank #(.N_COLS(N)) dut (.x, .seg, .col);

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int g = 0; g < NUM_GRAY; g++) x[g] = volt_t'($urandom);
      seg = {$urandom, $urandom};
      #1;
      for (int c = 0; c < N; c++) begin
        int code;
        code = seg[4*c] + 2 * seg[4*c+1] + 4 * seg[4*c+2];
        checks++;
        if (col[c] != x[code]) begin
          failures++;
          $display("FAIL it=%0d col%0d", it, c);
        end
      end
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
