// barrel_shifter_left: rotate a WIDTH-bit word left by 0 .. WIDTH-1 positions.
//
// A logarithmic barrel: $clog2(WIDTH) stages in cascade, where stage k either
// passes its input through or rotates it left by 2**k positions, chosen by
// bit k of amt. At the default WIDTH of 8 this is the classic three-stage
// rotator (1, 2 and 4 positions). Bits leaving at the top re-enter at the
// bottom; nothing is lost.
//
// Interface: a (word), amt (amount), y (a rotated left by amt).
// Timing: purely combinational, a chain of $clog2(WIDTH) 2-to-1 selections.
//
// The 8-bit, three-stage structure is that of the original design; the WIDTH
// parameter is this implementation's generalisation (amt wraps modulo WIDTH
// when WIDTH is not a power of two).
module barrel_shifter_left #(
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [AW-1:0]    amt,
  output logic [WIDTH-1:0] y
);

  // stage[0] is the input, stage[AW] the result
  logic [WIDTH-1:0] stage [AW+1];

  assign stage[0] = a;

  for (genvar k = 0; k < AW; k++) begin : g_stage
    // 2**k < WIDTH for every stage, so each stage is a true rotation
    localparam int unsigned SH = 2 ** k;
    logic [WIDTH-1:0] rotated;
    assign rotated = {stage[k][WIDTH-SH-1:0], stage[k][WIDTH-1:WIDTH-SH]};
    assign stage[k+1] = amt[k] ? rotated : stage[k];
  end

  assign y = stage[AW];

  if (WIDTH < 2) begin : g_bad_width
    $error("barrel_shifter_left: WIDTH must be at least 2");
  end

endmodule : barrel_shifter_left
