// rsin_pkg: types shared by the resource sharing interconnection networks (RSINs).
//
// The cross-bar switch runs in one of two modes selected by a single global line:
// request mode, in which processors look for free resources, and reset mode, in which
// they give back resources they hold. The enum below is that line.
package rsin_pkg;

  typedef enum logic {
    MODE_REQUEST = 1'b0,
    MODE_RESET   = 1'b1
  } xbar_mode_e;

endpackage
