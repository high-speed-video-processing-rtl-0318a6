// lut_frame_map: which LUT entry a configuration-frame bit sets (Virtex-6 CLB).
//
// Four consecutively addressed frames (minor 0..3) configure the LUTs of a column
// of slices; each slice owns 64 bits (two 32-bit words) of every frame, so the four
// frames together hold the 4 x 64 = 256 LUT bits of the slice. Within those 64
// bits, bits [16L+15:16L] belong to LUT L (A, B, C, D). Inside one LUT, bit group
// q = bit[3:2] covers entries 63-16q down to 48-16q, and the two LSBs of the bit
// index with the frame minor pick the entry:
//     minor 1 : entry = 16(3-q) + 15 - 2*row      minor 0 : ... + 14 - 2*row
//     minor 2 : entry = 16(3-q) +  7 - 2*row      minor 3 : ... +  6 - 2*row
// where row = bit[1:0]. For example bit 2 of minor 3 sets entry 50 of LUT A.
// This correspondence is the one reverse-engineered by the source work; the
// module only encodes it. Purely combinational.
module lut_frame_map
  import lap_pkg::*;
(
  input  logic [1:0] minor,  // frame 0..3 of the column
  input  logic [5:0] bit_idx, // bit within the slice's 64-bit share (LSB = 0)
  output lut_e       lut,
  output logic [5:0] entry
);

  logic [1:0] q, row;
  logic [3:0] u;

  always_comb begin
    q   = bit_idx[3:2];
    row = bit_idx[1:0];
    unique case (minor)
      2'd0:    u = 4'd14 - {1'b0, row, 1'b0};
      2'd1:    u = 4'd15 - {1'b0, row, 1'b0};
      2'd2:    u = 4'd7  - {1'b0, row, 1'b0};
      default: u = 4'd6  - {1'b0, row, 1'b0};
    endcase
    lut   = lut_e'(bit_idx[5:4]);
    entry = {2'd3 - q, u};
  end

endmodule
