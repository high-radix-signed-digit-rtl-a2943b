// hrsd_pkg: types shared by the high-radix signed-digit (HRSD) adder.
//
// A transfer digit t in {-1, 0, +1} travels from each digit position to the
// next more significant one. It is carried as a 2-bit two's complement number
// {t^1, t^0}: 00 = 0, 01 = +1, 11 = -1. The code 10 (-2) never occurs. This
// encoding is the one the CHRA transfer logic produces directly, so no
// re-encoding is needed between the transfer logic and the final-sum stage.
// The 2-bit two's complement code is the document's; the enum is this
// design's way of naming it.
package hrsd_pkg;

  typedef enum logic [1:0] {
    T_ZERO  = 2'b00,
    T_PLUS  = 2'b01,
    T_MINUS = 2'b11
  } transfer_t;

endpackage
