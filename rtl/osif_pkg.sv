// osif_pkg: types and constants shared by the accelerators and the
// switchable interconnect framework.
//
// The frame stream (frame_fwd_t plus a separate stall bit running the other
// way) is the interface every reconfigurable frame presents: a data word, the
// address of that word inside the 8x8 macroblock, a valid flag telling the
// next stage that data is there, and back-pressure from the next stage. A word
// moves when valid is high and stall is low in the same clock cycle.
//
// The DCT cosine table and the default quantisation table are this design's
// choices (standard JPEG values), not numbers printed with the accelerators.
package osif_pkg;

  // ---------------------------------------------------------------- frames
  localparam int unsigned FRAME_DW = 16;   // one macroblock element: 2 bytes
  localparam int unsigned FRAME_AW = 6;    // 64 elements per macroblock
  localparam int unsigned MB_ELEMS = 64;

  typedef logic signed [FRAME_DW-1:0] elem_t;
  typedef logic [FRAME_AW-1:0]        eaddr_t;

  typedef struct packed {
    logic   valid;
    eaddr_t addr;
    elem_t  data;
  } frame_fwd_t;

  // number of frames in the chain (DCT, quantiser, one empty frame)
  localparam int unsigned N_FRAMES = 3;

  // ------------------------------------------------------ DCR addresses
  // offsets from the framework's DCR base
  localparam logic [9:0] DCR_CONFIG = 10'd0;  // frame enables of the chain
  localparam logic [9:0] DCR_START  = 10'd1;  // write 1: block is in the input buffer
  localparam logic [9:0] DCR_STATUS = 10'd2;  // bit0 toggles on each finished block, bit1 busy

  // ------------------------------------------------------ DMA registers
  // byte offsets in the DMA controller's memory-mapped window
  localparam logic [3:0] DMA_SYS  = 4'h0;   // system memory address (bytes)
  localparam logic [3:0] DMA_LOC  = 4'h4;   // offset in the local buffer (bytes)
  localparam logic [3:0] DMA_LEN  = 4'h8;   // length (bytes, multiple of 8)
  localparam logic [3:0] DMA_CTRL = 4'hC;   // bit0 start, bit1 direction (1 = out buffer -> memory)

  // --------------------------------------------------------------- DCT
  // 0.5*cos(m*pi/16) in 1.13 fixed point, m = 0..8, and 1/(2*sqrt 2).
  localparam int COS_FRAC = 13;
  localparam int DC_COEF  = 2896;
  typedef int cos_tab_t [0:8];
  localparam cos_tab_t COS_TAB = '{4096, 4017, 3784, 3406, 2896, 2276, 1567, 799, 0};

  // DCT basis a(u,k) = C(u)/2 * cos((2k+1) u pi / 16), scaled by 2^13
  function automatic int dct_coef(input int u, input int k);
    int m;
    if (u == 0) return DC_COEF;
    m = ((2*k + 1) * u) % 32;
    if (m <= 8)       return  COS_TAB[m];
    else if (m <= 16) return -COS_TAB[16-m];
    else if (m <= 24) return -COS_TAB[m-16];
    else              return  COS_TAB[32-m];
  endfunction

  // ------------------------------------------------------ quantiser
  // JPEG Annex K luminance table scaled to quality 75 (row-major).
  typedef logic [7:0] qtab_t [0:63];
  localparam qtab_t QTAB_DEFAULT = '{
     8,  6,  5,  8, 12, 20, 26, 31,
     6,  6,  7, 10, 13, 29, 30, 28,
     7,  7,  8, 12, 20, 29, 35, 28,
     7,  9, 11, 15, 26, 44, 40, 31,
     9, 11, 19, 28, 34, 55, 52, 39,
    12, 18, 28, 32, 41, 52, 57, 46,
    25, 32, 39, 44, 52, 61, 60, 51,
    36, 46, 48, 49, 56, 50, 52, 50};

  // ------------------------------------------------- motion estimation
  // word addresses in the 512 x 32 BRAM
  localparam int unsigned ME_MB_BASE   = 0;     // 64 words: 256 macroblock pixels
  localparam int unsigned ME_SA_BASE   = 64;    // 241 words: 961 search-area pixels
  localparam int unsigned ME_CTRL_ADDR = 510;   // bit0 ready (CPU sets), bit1 done (accelerator sets)
  localparam int unsigned ME_RES_ADDR  = 511;   // {mv_x[7:0], mv_y[7:0], sad[15:0]}

endpackage
