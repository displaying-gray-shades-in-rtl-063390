// tb_data_complement: exhaustive check of the alternate-frame complement gates. For every
// 3-bit gray code and both values of EXR, the output must be the code itself (EXR = 0) or
// 7 minus the code (EXR = 1).
module tb_data_complement;
  logic [2:0] din, dout;
  logic       exr;
  int checks = 0, failures = 0;

  data_complement #(.GRAY_W(3)) dut (.din, .exr, .dout);

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int g = 0; g < 8; g++) begin
        din = 3'(g);
        exr = e[0];
        #1;
        checks++;
        if (int'(dout) != (e ? 7 - g : g)) begin
          failures++;
          $display("FAIL din=%0d exr=%0d dout=%0d", g, e, dout);
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
