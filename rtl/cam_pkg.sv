// cam_pkg: constants and types shared by the CAM cell, word and array.
//
// The CAM cell has one control line, R/W. Driving it low writes the input
// bit into the cell; driving it high leaves the stored bit alone, so the cell
// only presents it for reading and matching. That polarity is the one the
// cell's function table defines. The enum below names the two values so that
// the rest of the design never writes a bare 0 or 1 for it.
package cam_pkg;

  typedef enum logic {
    RW_WRITE = 1'b0,  // store the input bit I into F
    RW_READ  = 1'b1   // keep F unchanged
  } rw_e;

endpackage
