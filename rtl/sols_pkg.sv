// sols_pkg: types shared by the FM0 / Manchester encoder and its testbenches.
//
// The coding mode is one bit. Mode 0 selects FM0 and mode 1 selects
// Manchester; this encoding is the one the encoder is specified with.
package sols_pkg;

  typedef enum logic {
    MODE_FM0        = 1'b0,
    MODE_MANCHESTER = 1'b1
  } mode_e;

endpackage
