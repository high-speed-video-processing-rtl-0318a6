// pixel_array: ROWS x COLS mesh of bit-serial Laplacian processors.
//
// Every processor exchanges its serial pixel stream with its four nearest
// neighbours (west, north, east, south), as in a 2-D nearest-neighbour mesh.
// At the edge of the array a missing neighbour reads as 0, so border pixels see a
// smaller neighbour sum; the source design does not say how borders are treated,
// so this is this design's choice.
//
// All processors share the compute/not-reset net and the array clock enable, so
// one pass of PASS_CYCLES ticks filters the whole frame at once, independent of
// the frame size. The configuration side addresses one processor at a time by
// (cfg_row, cfg_col): cfg_we with cfg_mask/cfg_wdata writes register stages of
// that processor, and cfg_rdata returns its whole register combinationally.
module pixel_array
  import lap_pkg::*;
#(
  parameter int unsigned ROWS = 40,
  parameter int unsigned COLS = 40
) (
  input  logic                     clk,
  input  logic                     compute,
  input  logic                     tick,
  input  logic [$clog2(ROWS)-1:0]  cfg_row,
  input  logic [$clog2(COLS)-1:0]  cfg_col,
  input  logic                     cfg_we,
  input  logic [SRL_DEPTH-1:0]     cfg_mask,
  input  logic [SRL_DEPTH-1:0]     cfg_wdata,
  output logic [SRL_DEPTH-1:0]     cfg_rdata
);

  logic                 stream [ROWS][COLS];
  logic [SRL_DEPTH-1:0] q      [ROWS][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      logic w, n, e, s;
      if (j > 0)        begin : g_w assign w = stream[i][j-1]; end else begin : g_w0 assign w = 1'b0; end
      if (i > 0)        begin : g_n assign n = stream[i-1][j]; end else begin : g_n0 assign n = 1'b0; end
      if (j < COLS - 1) begin : g_e assign e = stream[i][j+1]; end else begin : g_e0 assign e = 1'b0; end
      if (i < ROWS - 1) begin : g_s assign s = stream[i+1][j]; end else begin : g_s0 assign s = 1'b0; end

      pixel_processor u_pe (
        .clk       (clk),
        .compute   (compute),
        .tick      (tick),
        .nbr_w     (w),
        .nbr_n     (n),
        .nbr_e     (e),
        .nbr_s     (s),
        .nbr_out   (stream[i][j]),
        .cfg_sel   (cfg_we && cfg_row == i && cfg_col == j),
        .cfg_mask  (cfg_mask),
        .cfg_wdata (cfg_wdata),
        .q         (q[i][j])
      );
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (int'(cfg_row) < ROWS && int'(cfg_col) < COLS) cfg_rdata = q[cfg_row][cfg_col];
  end

endmodule
