// data_complement: complements the gray code read from the image memory in alternate frames.
//
// The gray code of a pixel is exclusive-ORed bit by bit with EXR from the controller. In a
// frame with EXR = 1 code g becomes 7 - g, whose column voltages are the negatives of those of
// g; together with the inverted row polarity this makes a two-frame cycle free of DC. Only the
// low GRAY_W bits of the memory byte carry the code, and only they are connected here.
// Purely combinational.
module data_complement #(
  parameter int GRAY_W = 3
) (
  input  logic [GRAY_W-1:0] din,   // gray code bits of the image memory byte
  input  logic              exr,   // complement control
  output logic [GRAY_W-1:0] dout   // code to the column driver data inputs
);

  assign dout = din ^ {GRAY_W{exr}};

endmodule
