// isd_pkg: shared constants and helpers of the information-set decoder.
//
// The default code is the binary C(7,4) code whose generator matrix is
//     1000110
//     0100011
//     0010111
//     0001101
// written with codeword position 0 on the left. In the RTL a row is a packed
// vector whose bit i is codeword position i, so each row is stored bit-reversed
// with respect to the text above. Received symbols are quantized to Q = 3 bits
// (0 = strong "0", 7 = strong "1"). All of this follows the decoder's reference
// example; the packing conventions are this design's own.
package isd_pkg;

  localparam int N_DEF = 7;
  localparam int K_DEF = 4;
  localparam int Q_DEF = 3;

  // Rows 3..0 of the C(7,4) generator matrix, bit i = codeword position i.
  localparam logic [K_DEF-1:0][N_DEF-1:0] G_C74 = {
    7'b1011000,   // row 3: 0001101
    7'b1110100,   // row 2: 0010111
    7'b1100010,   // row 1: 0100011
    7'b0110001    // row 0: 1000110
  };

endpackage
