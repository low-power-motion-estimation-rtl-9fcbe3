// me_pkg: types and constants shared by the integer-pixel motion estimation
// (ME) datapath and the half-pixel ME power-reduction logic.
//
// Pixels are 8-bit luminance samples. A search location is identified by
// its column and row inside the 47x47-pixel search window; the motion
// vector (MV) is that position minus 16, giving the [-16, 15] search range.
// The 41 variable-block-size sub-blocks are numbered (0-based) as: 16 4x4
// blocks in raster order over the macroblock, 8 4x8 blocks, 8 8x4 blocks,
// 4 8x8, 2 8x16, 2 16x8 and the 16x16 block; each group in raster order.
// "WxH" means W pixels wide and H rows tall, so an 8x4 block is the
// horizontal pair of 4x4 blocks k and k+1.
//
// Block size, search range, pixel width and the number of memories follow
// the original design; the sub-block numbering follows its examples for the
// 4x4, 4x8, 8x4 and 8x8 blocks, while the order of the 8x16 and 16x8
// entries, the field widths and the enum encodings are this design's choice.
package me_pkg;

  localparam int PIX_W   = 8;
  localparam int MB_N    = 16;                 // macroblock is 16x16
  localparam int RANGE   = 16;                 // search range [-16, 15]
  localparam int SW_N    = MB_N + 2*RANGE - 1; // 47 search-window rows/cols
  localparam int NLOC    = 2*RANGE;            // 32 locations per axis
  localparam int NBANK   = MB_N + 1;           // 17 search-window memories
  localparam int NSUB    = 41;                 // VBS sub-blocks per MB
  localparam int MV_W    = 6;                  // signed MV component width
  localparam int SAD_W   = 16;                 // SAD of up to 256 pixels

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [SAD_W-1:0]  sad_t;

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // Absolute-difference implementation of a processing element.
  //   AD_STD : comparator + two multiplexers + subtractor (exact)
  //   AD_RADP: comparison prediction, AD register reset on a misprediction
  //   AD_EADP: comparison prediction, AD register held on a misprediction
  typedef enum logic [1:0] {AD_STD = 2'd0, AD_RADP = 2'd1, AD_EADP = 2'd2} ad_mode_e;

  // How the search-pixel registers of the PE array move in one cycle.
  typedef enum logic [1:0] {
    SH_HOLD  = 2'd0,
    SH_UP    = 2'd1,   // rows move up, new row enters at the bottom
    SH_DOWN  = 2'd2,   // rows move down, new row enters at the top
    SH_LEFT  = 2'd3    // columns move left, temp registers enter at right
  } shift_e;

  // Half-pixel search decided by trajectory estimation.
  typedef enum logic [1:0] {HP_2D = 2'd0, HP_1D_X = 2'd1, HP_1D_Y = 2'd2} hp_mode_e;

  // Trajectory estimation criteria (Zero, Twice Bigger Than, Bigger Than).
  typedef enum logic [1:0] {TR_Z = 2'd0, TR_TBT = 2'd1, TR_BT = 2'd2} traj_method_e;

  // Index of each block size's first entry in the 41-entry SAD/MV arrays.
  localparam int IDX_4X4   = 0;
  localparam int IDX_4X8   = 16;
  localparam int IDX_8X4   = 24;
  localparam int IDX_8X8   = 32;
  localparam int IDX_8X16  = 36;
  localparam int IDX_16X8  = 38;
  localparam int IDX_16X16 = 40;

endpackage
