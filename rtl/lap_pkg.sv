// lap_pkg: constants and types shared by the pixel array processor.
//
// The array computes the discrete Laplacian I - (N + S + E + W)/4 of an 8-bit
// grey-scale frame with one bit-serial processor per pixel, each neighbour being
// quartered by truncation: R = I - (N>>2) - (S>>2) - (E>>2) - (W>>2). Each processor keeps
// its pixel in a 32-stage shift register (one SRL32 LUT on the target FPGA) that
// is written and read back through the FPGA configuration plane, frame by frame.
//
// Register word layout (bit i is stage i, stage 0 is the end that shifts out):
//   before a pass : [7:0] = pixel, [31:8] = 0
//   after a pass  : [31:23] = 9-bit two's-complement Laplacian
// The 8-bit depth, the 40x40 size, the 32-stage register, the truncated quarter
// and the frame geometry (81 words, 40 slices per region) follow the source
// design; the 9-bit result and its position are this design's choice.
package lap_pkg;

  localparam int unsigned PIX_W        = 8;   // grey-scale bit depth
  localparam int unsigned SRL_DEPTH    = 32;  // stages per pixel register (SRL32)
  localparam int unsigned NBR_TAP      = 2;   // stage the neighbours read: quarter = drop 2 LSBs
  localparam int unsigned RES_W        = PIX_W + 1; // signed result width (-252..255)
  localparam int unsigned PASS_CYCLES  = RES_W; // serial cycles per frame (9)
  localparam int unsigned RES_LSB      = SRL_DEPTH - RES_W; // result position after a pass

  // Virtex-6 configuration frame geometry
  localparam int unsigned FRAME_WORDS  = 81;  // 32-bit words per frame
  localparam int unsigned HCLK_WORD    = 40;  // word index of the clock-row / ECC word
  localparam int unsigned REGION_ROWS  = 40;  // slices per column in one clock region

  typedef enum logic [1:0] {LUT_A = 2'd0, LUT_B = 2'd1, LUT_C = 2'd2, LUT_D = 2'd3} lut_e;

  // One configuration frame address as seen by the array's frame port.
  typedef struct packed {
    logic [3:0] region;  // clock region row (40 pixel rows each)
    logic [7:0] column;  // slice column = pixel column
    logic [1:0] minor;   // frame 0..3 of the column's LUT frames
  } frame_addr_t;

  // Pixel word as loaded into a processor before a pass.
  function automatic logic [SRL_DEPTH-1:0] pack_pixel(input logic [PIX_W-1:0] p);
    logic [SRL_DEPTH-1:0] w;
    w = '0;
    w[PIX_W-1:0] = p;
    return w;
  endfunction

  // Result field of a register word after a pass.
  function automatic logic signed [RES_W-1:0] unpack_result(input logic [SRL_DEPTH-1:0] w);
    return w[RES_LSB +: RES_W];
  endfunction

endpackage
