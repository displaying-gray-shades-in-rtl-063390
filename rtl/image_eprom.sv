// image_eprom: the 8k x 8 image memory read by the controller (a 2764A-style EPROM).
//
// One byte per pixel; its low three bits are the gray code (000 = darkest shade, fully on;
// 111 = fully off). A 16x16 image occupies 256 bytes at address {image, row, column}. Reads
// are asynchronous: data follows addr after the access time, which in simulation is zero.
// The memory is initialised from INIT_FILE (hex, one byte per line) when one is given.
// Otherwise it holds a built-in test picture: in each 256-byte image, byte {row, col} has
// the gray code (row + col + image) mod 8, a diagonal ramp through all eight shades. The
// built-in picture is this design's choice; the document does not give the stored images.
module image_eprom #(
  parameter int    ADDR_W    = 13,
  parameter int    DATA_W    = 8,
  parameter string INIT_FILE = ""
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int a = 0; a < DEPTH; a++) begin
        mem[a] = DATA_W'(((a >> 4) + a + (a >> 8)) & 7);
      end
    end
  end

  assign data = mem[addr];

endmodule
