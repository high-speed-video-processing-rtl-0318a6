// lap_array_top: the pixel array processor peripheral.
//
// A ROWS x COLS mesh of bit-serial processors computes the Laplacian
//     L(x,y) = I(x,y) - (I(x-1,y)>>2) - (I(x+1,y)>>2) - (I(x,y-1)>>2) - (I(x,y+1)>>2)
// of a whole 8-bit frame in one pass of 9 array clocks, whatever the frame size.
// Each neighbour is quartered by truncation, so L exceeds the exact Laplacian
// I - (sum of neighbours)/4 by 0 to 3.
// Pixels do not arrive over a bus: the host writes them, and later reads the
// results back, as configuration frames through the configuration port
// (`cfg_*`, driven on the FPGA by the ICAP and a DMA engine), and it starts a pass
// by writing the single AXI4-Lite register. `irq` rises when the frame is done.
//
// Sequence for one frame:
//   1. write every pixel word (lap_pkg::pack_pixel) as frame words on cfg_*;
//   2. write any value to the AXI4-Lite register;
//   3. wait for `irq` (PASS_CYCLES * CLK_DIV bus clocks after the write);
//   4. read the frame words back; the result of each pixel is in stages [31:23]
//      of its register (lap_pkg::unpack_result).
// Configuration writes are ignored while the pass runs (`busy` high).
//
// Sizes follow the source design (40 x 40 pixels, 8 bits, 0.31 MHz array clock);
// the frame port, the clock-enable scheme and the busy gating are this design's.
module lap_array_top
  import lap_pkg::*;
#(
  parameter int unsigned ROWS    = 40,
  parameter int unsigned COLS    = 40,
  parameter int unsigned CLK_DIV = 320
) (
  input  logic        aclk,
  input  logic        aresetn,
  // AXI4-Lite slave (start register)
  input  logic [31:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [31:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        irq,
  // configuration-frame port
  input  frame_addr_t cfg_addr,
  input  logic [6:0]  cfg_word,
  input  logic        cfg_we,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  output logic        cfg_hit,
  // status
  output logic        busy,
  output logic        start_dropped
);

  logic compute, tick;
  logic [$clog2(ROWS)-1:0] arr_row;
  logic [$clog2(COLS)-1:0] arr_col;
  logic                    arr_we;
  logic [SRL_DEPTH-1:0]    arr_mask, arr_wdata, arr_rdata;

  assign busy = compute;

  array_ctrl #(.CLK_DIV(CLK_DIV)) u_ctrl (
    .aclk, .aresetn,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .compute, .tick, .irq, .start_dropped
  );

  cfg_frame_port #(.ROWS(ROWS), .COLS(COLS)) u_port (
    .addr      (cfg_addr),
    .word      (cfg_word),
    .we        (cfg_we && !compute),
    .wdata     (cfg_wdata),
    .rdata     (cfg_rdata),
    .hit       (cfg_hit),
    .arr_row, .arr_col, .arr_we, .arr_mask, .arr_wdata, .arr_rdata
  );

  pixel_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk       (aclk),
    .compute,
    .tick,
    .cfg_row   (arr_row),
    .cfg_col   (arr_col),
    .cfg_we    (arr_we),
    .cfg_mask  (arr_mask),
    .cfg_wdata (arr_wdata),
    .cfg_rdata (arr_rdata)
  );

endmodule
