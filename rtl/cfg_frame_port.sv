// cfg_frame_port: frame-addressed access to the pixel registers.
//
// On the FPGA the pixel registers are reached only through the configuration
// plane: a write of a configuration frame sets LUT contents and a read-back
// returns them. This module presents the pixel array the same way, so that a
// host can prepare pixel data as frame words.
//
// Geometry (from the source design): pixel (r, c) is placed in slice column c,
// clock region r / 40, slice row r % 40, and its register is the SRL32 in LUT
// SRL_LUT (default D) of that slice. A frame has 81 words: words 0..39 hold slice rows 0..19
// (two words per slice, the lower-addressed word holding bits 0..31 of the
// slice's 64-bit share), word 40 is the clock-row / ECC word, and words 41..80
// hold slice rows 20..39. Within the 64 bits the lut_frame_map correspondence
// applies. An SRL32 keeps shift position k in LUT entry k, position 0 being where
// data enters and position 31 the Q31 end, so register stage s (stage 0 = the
// output end) is LUT entry 31 - s. Entries 32..63 of that LUT and the other three
// LUTs are not modelled: they read as 0 and writes to them are dropped. The choice
// of LUT D and of one pixel per slice is this design's.
//
// Timing: a write with `we` high updates the addressed register bits at the next
// clock edge; `rdata` follows `addr`/`word` combinationally. Word 40 and addresses
// outside the array write nothing and read 0 (`hit` low).
module cfg_frame_port
  import lap_pkg::*;
#(
  parameter int unsigned ROWS    = 40,
  parameter int unsigned COLS    = 40,
  parameter int unsigned SRL_LUT = 3    // 3 = LUT D
) (
  input  frame_addr_t               addr,
  input  logic [6:0]                word,
  input  logic                      we,
  input  logic [31:0]               wdata,
  output logic [31:0]               rdata,
  output logic                      hit,
  // array side
  output logic [$clog2(ROWS)-1:0]   arr_row,
  output logic [$clog2(COLS)-1:0]   arr_col,
  output logic                      arr_we,
  output logic [SRL_DEPTH-1:0]      arr_mask,
  output logic [SRL_DEPTH-1:0]      arr_wdata,
  input  logic [SRL_DEPTH-1:0]      arr_rdata
);

  logic [5:0]  wofs;
  logic [5:0]  slot;      // slice row within the region
  logic        half;      // which word of the slice's pair
  logic        data_word;
  int unsigned row_full;

  always_comb begin
    data_word = (word != 7'(HCLK_WORD)) && (word < 7'(FRAME_WORDS));
    wofs      = 6'((word > 7'(HCLK_WORD)) ? word - 7'(HCLK_WORD + 1) : word);
    half      = wofs[0];
    slot      = {1'b0, wofs[5:1]} + ((word > 7'(HCLK_WORD)) ? 6'(REGION_ROWS / 2) : 6'd0);
    row_full  = int'(addr.region) * REGION_ROWS + int'(slot);
    hit       = data_word && row_full < ROWS && int'(addr.column) < COLS;
    arr_row   = $clog2(ROWS)'(row_full);
    arr_col   = $clog2(COLS)'(addr.column);
  end

  lut_e       map_lut   [32];
  logic [5:0] map_entry [32];

  for (genvar j = 0; j < 32; j++) begin : g_bit
    lut_frame_map u_map (
      .minor   (addr.minor),
      .bit_idx ({half, 5'(j)}),
      .lut     (map_lut[j]),
      .entry   (map_entry[j])
    );
  end

  always_comb begin
    arr_mask  = '0;
    arr_wdata = '0;
    rdata     = '0;
    for (int j = 0; j < 32; j++) begin
      if (hit && map_lut[j] == lut_e'(SRL_LUT) && map_entry[j] < 6'(SRL_DEPTH)) begin
        arr_mask [5'd31 - map_entry[j][4:0]] = 1'b1;
        arr_wdata[5'd31 - map_entry[j][4:0]] = wdata[j];
        rdata[j]                             = arr_rdata[5'd31 - map_entry[j][4:0]];
      end
    end
    arr_we = we && hit;
  end

endmodule
