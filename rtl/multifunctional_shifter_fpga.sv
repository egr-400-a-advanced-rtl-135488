// multifunctional_shifter_fpga: multifunction (left/right) barrel shifter for
// an FPGA board with 4 slide switches, 3 push buttons and 8 LEDs.
//
// The word to rotate is the switches, zero-extended to DATA_W bits. It feeds a
// rotate-left and a rotate-right barrel shifter side by side, both driven by
// the same amount from the push buttons (btn[0] = 1 position, btn[1] = 2,
// btn[2] = 4), and a 2-to-1 multiplexer picks one result for the LEDs:
// lr = 1 shows the right rotation, lr = 0 the left rotation. Because the top
// DATA_W-SW_W bits are zero, the LEDs show the switch pattern travelling
// around the ring of DATA_W positions and wrapping from one end to the other.
//
// Interface: btn (amount), sw (data), lr (direction), led (result).
// Timing: purely combinational, no clock and no reset; led settles one
// rotator delay plus one multiplexer delay after any input changes.
//
// The structure (two rotators and a multiplexer), the switch/button/LED
// mapping and the direction sense follow the original board design. Making
// the word and switch widths parameters is this implementation's choice.
module multifunctional_shifter_fpga #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned SW_W   = 4,
  localparam int unsigned AW    = $clog2(DATA_W)
) (
  input  logic [AW-1:0]     btn,
  input  logic [SW_W-1:0]   sw,
  input  logic              lr,
  output logic [DATA_W-1:0] led
);

  if (SW_W > DATA_W) begin : g_bad_width
    $error("multifunctional_shifter_fpga: SW_W must not exceed DATA_W");
  end

  logic [DATA_W-1:0] word;   // zero-extended switch value
  logic [DATA_W-1:0] rot_l;  // rotated left by btn
  logic [DATA_W-1:0] rot_r;  // rotated right by btn
  barrel_pkg::dir_e  dir;

  assign word = DATA_W'(sw);
  assign dir  = barrel_pkg::dir_e'(lr);

  barrel_shifter_left #(.WIDTH(DATA_W)) u_left (
    .a   (word),
    .amt (btn),
    .y   (rot_l)
  );

  barrel_shifter_right #(.WIDTH(DATA_W)) u_right (
    .a   (word),
    .amt (btn),
    .y   (rot_r)
  );

  mux2 #(.WIDTH(DATA_W)) u_sel (
    .d0  (rot_l),
    .d1  (rot_r),
    .sel (dir == barrel_pkg::DIR_RIGHT),
    .y   (led)
  );

endmodule : multifunctional_shifter_fpga
