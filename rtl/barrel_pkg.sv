// barrel_pkg: types shared by the multifunction barrel shifter.
//
// dir_e names the two values of the direction input lr: 0 rotates left,
// 1 rotates right, as in the original board design.
package barrel_pkg;

  typedef enum logic {
    DIR_LEFT  = 1'b0,
    DIR_RIGHT = 1'b1
  } dir_e;

endpackage : barrel_pkg
