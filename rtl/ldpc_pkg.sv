// ldpc_pkg: constants and helpers shared by the layered LDPC decoder.
//
// The defaults describe the main configuration: 64800-bit DVB-S2 frames
// decoded by 360 processors (180 bit groups of 360 bits), 6-bit messages and
// offset min-sum. The layer count, checknode degree and table depth are sized
// for the rates 1/4, 1/3, 1/2, 3/5 and 3/4: up to 135 layers (rate 1/4,
// 48600 checks), degree up to 16 (rate 3/4 has 14) and up to 792 circulant
// blocks (rate 3/5). The S_i width and the offset are this design's choices.
package ldpc_pkg;

  localparam int unsigned P_DEF     = 360;  // processors = lanes = memories
  localparam int unsigned NG_DEF    = 180;  // bit groups (64800 / 360)
  localparam int unsigned NL_DEF    = 135;  // layers (48600 checks / 360)
  localparam int unsigned W_DEF     = 6;    // message width (signed)
  localparam int unsigned SW_DEF    = 8;    // S_i width (signed), own choice
  localparam int unsigned DCMAX_DEF = 16;   // largest checknode degree
  localparam int unsigned M_ALT_DEF = 2;    // alternate S_i copies per group
  localparam int unsigned OFFSET_DEF = 1;   // offset of the corrected min-sum
  localparam int unsigned DEPTH_DEF = 792;  // matrix-table entries (rate 3/5)

  // Width of the compressed u_j record: dc signs, two magnitudes of W-1 bits
  // and the index of the edge holding the first minimum.
  function automatic int unsigned rec_width(int unsigned w, int unsigned dcmax);
    return dcmax + 2 * (w - 1) + $clog2(dcmax);
  endfunction

endpackage
