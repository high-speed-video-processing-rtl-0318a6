// tb_lut_frame_map: exhaustive check of the frame-bit to LUT-entry correspondence.
//
// The expected mapping is built here from the repeating 4 x 16 tile of the
// correspondence (entry -> bit row and frame minor for entries 63..48 of LUT A),
// which recurs down the four 16-entry groups of a LUT and across the four LUTs.
// Every one of the 4 x 64 (minor, bit) pairs is applied; the test checks the
// entry against the tile, that all 256 LUT bits are reached exactly once, and the
// worked example: bit 2 of the fourth frame (minor 3) sets entry 50 of LUT A.
module tb_lut_frame_map;
  import lap_pkg::*;

  logic [1:0] minor;
  logic [5:0] bit_idx;
  lut_e       lut;
  logic [5:0] entry;

  int checks = 0, failures = 0;
  int tile_row   [16] = '{0, 0, 1, 1, 2, 2, 3, 3, 0, 0, 1, 1, 2, 2, 3, 3};
  int tile_minor [16] = '{1, 0, 1, 0, 1, 0, 1, 0, 2, 3, 2, 3, 2, 3, 2, 3};
  bit seen [4][64];

  lut_frame_map dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int exp_minor, exp_bit, k;
    foreach (seen[l, e]) seen[l][e] = 1'b0;
    for (int m = 0; m < 4; m++)
      for (int b = 0; b < 64; b++) begin
        minor = 2'(m); bit_idx = 6'(b);
        #1;
        // forward map of the reported entry must give back (m, b)
        k = (63 - int'(entry)) % 16;            // position inside the tile
        exp_minor = tile_minor[k];
        exp_bit   = 16 * int'(lut) + 4 * ((63 - int'(entry)) / 16) + tile_row[k];
        check(exp_minor == m && exp_bit == b,
              $sformatf("minor %0d bit %0d -> LUT %0d entry %0d", m, b, lut, entry));
        check(!seen[lut][entry], "LUT bit reached twice");
        seen[lut][entry] = 1'b1;
      end
    minor = 2'd3; bit_idx = 6'd2;
    #1;
    check(lut == LUT_A && entry == 6'd50, "worked example A50");
    minor = 2'd1; bit_idx = 6'd0;
    #1;
    check(lut == LUT_A && entry == 6'd63, "A63 in frame 1, bit 0");
    minor = 2'd0; bit_idx = 6'd63;
    #1;
    check(lut == LUT_D && entry == 6'd8, "last bit of frame 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
