// tb_image_eprom: reads every address of the 8k x 8 image memory with its built-in test
// picture and compares with the picture's definition: byte {image, row, col} holds
// (row + col + image) mod 8, computed here from the address fields. A second instance loads
// tb/test_image.hex, one 16x16 image whose byte {row, col} is A0h + (3 row + 5 col) mod 8
// (upper bits set to show they are stored too); its 256 bytes are checked against that rule.
module tb_image_eprom;
  logic [12:0] addr;
  logic [7:0]  data, fdata;
  int checks = 0, failures = 0;

  image_eprom dut (.addr, .data);
  image_eprom #(.ADDR_W(13), .DATA_W(8), .INIT_FILE("tb/test_image.hex")) dut_file (
    .addr (addr),
    .data (fdata)
  );

  initial begin
    for (int a = 0; a < 8192; a++) begin
      int row, col, img;
      img  = a / 256;
      row  = (a / 16) % 16;
      col  = a % 16;
      addr = 13'(a);
      #1;
      checks++;
      if (int'(data) != (row + col + img) % 8) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0h data=%0h", a, data);
      end
    end
    for (int a = 0; a < 256; a++) begin
      addr = 13'(a);
      #1;
      checks++;
      if (int'(fdata) != 'hA0 + (3 * (a / 16) + 5 * (a % 16)) % 8) begin
        failures++;
        if (failures < 10) $display("FAIL file addr=%0h data=%0h", a, fdata);
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
