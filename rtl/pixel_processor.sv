// pixel_processor: one bit-serial Laplacian processor of the pixel array.
//
// The pixel lives in a 32-stage shift register (an SRL32 LUT on the FPGA). While
// the compute/not-reset net `compute` is high, every array clock tick (`tick`)
// shifts the register one stage towards stage 0 and four full adders evaluate
// one bit of
//     R = I - (W>>2) - (N>>2) - (E>>2) - (S>>2)
// least significant bit first:
//   FA0 adds the west and north quarter-pixel bits, FA1 the east and south ones,
//   FA2 adds the two partial sums, giving one bit of the sum of quarters;
//   FA3 adds the centre bit, the inverted sum bit and its carry (set to 1 while
//   `compute` is low), i.e. it subtracts. Each adder keeps its carry in one
//   flip-flop, so the processor has exactly four flip-flops besides the register.
// The result bit from FA3 is shifted back into the top of the same register.
//
// A quarter pixel is the pixel with its two LSBs dropped. The neighbours
// therefore read this register at stage NBR_TAP (2) while FA3 reads the centre
// at stage 0: in cycle t the neighbours see bit t+2 of this pixel, which is bit t
// of its quarter. Truncating each neighbour separately makes the result exceed
// the exact Laplacian by 0 to 3 (four fractions of 0, 1/4, 1/2 or 3/4), as in
// the source design. After PASS_CYCLES (9) ticks the 9-bit signed result sits in
// stages [31:23]. The tap as the way of dropping the two bits, the pass length and
// the result position are this design's choices; the adder arrangement, the
// LSB-first register and the truncation follow the source architecture.
//
// Interface: nbr_* are the neighbours' `nbr_out` bits (0 at the array edge);
// cfg_sel/cfg_mask/cfg_wdata write single stages of the register from the
// configuration plane (only while `compute` is low); `q` is the whole register
// for read-back. All outputs are registered or direct register taps.
module pixel_processor
  import lap_pkg::*;
(
  input  logic                 clk,
  input  logic                 compute,   // compute / not-reset global net
  input  logic                 tick,      // array clock enable
  input  logic                 nbr_w,     // pixel(i, j-1)
  input  logic                 nbr_n,     // pixel(i-1, j)
  input  logic                 nbr_e,     // pixel(i, j+1)
  input  logic                 nbr_s,     // pixel(i+1, j)
  output logic                 nbr_out,   // this pixel's stream to the neighbours
  input  logic                 cfg_sel,
  input  logic [SRL_DEPTH-1:0] cfg_mask,
  input  logic [SRL_DEPTH-1:0] cfg_wdata,
  output logic [SRL_DEPTH-1:0] q
);

  logic [SRL_DEPTH-1:0] srl;
  logic c0, c1, c2, c3;          // carry flip-flops of FA0..FA3
  logic s0, s1, s2, r;           // sum outputs
  logic c0_n, c1_n, c2_n, c3_n;  // carry outputs
  logic centre;

  assign centre  = srl[0];
  assign nbr_out = srl[NBR_TAP];
  assign q       = srl;

  always_comb begin
    {c0_n, s0} = {1'b0, nbr_w} + {1'b0, nbr_n} + {1'b0, c0};
    {c1_n, s1} = {1'b0, nbr_e} + {1'b0, nbr_s} + {1'b0, c1};
    {c2_n, s2} = {1'b0, s0}    + {1'b0, s1}    + {1'b0, c2};
    {c3_n, r}  = {1'b0, centre} + {1'b0, ~s2}  + {1'b0, c3};
  end

  always_ff @(posedge clk) begin
    if (!compute) begin
      c0 <= 1'b0;
      c1 <= 1'b0;
      c2 <= 1'b0;
      c3 <= 1'b1;
    end else if (tick) begin
      c0 <= c0_n;
      c1 <= c1_n;
      c2 <= c2_n;
      c3 <= c3_n;
    end
  end

  always_ff @(posedge clk) begin
    if (compute) begin
      if (tick) srl <= {r, srl[SRL_DEPTH-1:1]};
    end else if (cfg_sel) begin
      srl <= (srl & ~cfg_mask) | (cfg_wdata & cfg_mask);
    end
  end

endmodule
