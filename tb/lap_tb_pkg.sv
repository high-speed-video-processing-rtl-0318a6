// lap_tb_pkg: host-side helpers for the testbenches: formatting pixel registers
// as configuration frame words and back, written independently of the RTL.
//
// The LUT-entry to frame-bit correspondence is taken from its repeating
// 4 x 16 tile: for entries 63..48 of LUT A, entry 63-k sits in bit row
// TILE_ROW[k] of frame minor TILE_MINOR[k]; the tile repeats every 16 entries
// (4 bit rows further) and every LUT (16 bits further). A pixel register is
// the SRL32 in LUT D: register stage s (stage 0 = output end) is SRL position
// 31-s, stored in LUT entry 31-s.
//
// Interface of the helpers: stage_minor/stage_bit give the frame minor and the
// bit (0..63 of the slice's share) holding a stage; slice_word builds one frame
// word of a slice from its register value; regval_from_words rebuilds it.
package lap_tb_pkg;

  localparam int TILE_ROW   [16] = '{0, 0, 1, 1, 2, 2, 3, 3, 0, 0, 1, 1, 2, 2, 3, 3};
  localparam int TILE_MINOR [16] = '{1, 0, 1, 0, 1, 0, 1, 0, 2, 3, 2, 3, 2, 3, 2, 3};

  localparam int SRL_LUT = 3;   // LUT D

  // frame minor and bit (0..63 within the slice's share) of entry e of LUT l
  function automatic int entry_minor(input int e);
    return TILE_MINOR[(63 - e) % 16];
  endfunction

  function automatic int entry_bit(input int l, input int e);
    return 16 * l + 4 * ((63 - e) / 16) + TILE_ROW[(63 - e) % 16];
  endfunction

  function automatic int stage_minor(input int s);
    return entry_minor(31 - s);
  endfunction

  function automatic int stage_bit(input int s);
    return entry_bit(SRL_LUT, 31 - s);
  endfunction

  // slice row (0..39) and word half served by frame word w; -1 for the clock-row word
  function automatic int word_slot(input int w, output int half);
    if (w < 40) begin half = w % 2; return w / 2; end
    if (w == 40) begin half = 0; return -1; end
    half = (w - 41) % 2;
    return 20 + (w - 41) / 2;
  endfunction

  // frame word (minor, half) contributed by a slice whose SRL holds regval
  function automatic logic [31:0] slice_word(input logic [31:0] regval, input int f_minor, input int f_half);
    logic [31:0] word;
    word = '0;
    for (int e = 0; e < 32; e++) begin
      int m, b;
      m = stage_minor(e);
      b = stage_bit(e);
      if (m == f_minor && b / 32 == f_half) word[b % 32] = regval[e];
    end
    return word;
  endfunction

  // register value recovered from the four frame words (one per minor) of a half
  function automatic logic [31:0] regval_from_words(input logic [31:0] words [4][2]);
    logic [31:0] v;
    v = '0;
    for (int e = 0; e < 32; e++) begin
      int m, b;
      m = stage_minor(e);
      b = stage_bit(e);
      v[e] = words[m][b / 32][b % 32];
    end
    return v;
  endfunction

endpackage
