// tb_pixel_array: self-checking test of the processor mesh.
//
// A small ROWS x COLS array (overridden to 5 x 7 so that every border case and
// interior pixels occur) is loaded through its per-processor configuration port
// with random frames, one pass of PASS_CYCLES ticks is run, and every register is
// read back and compared with I - (W>>2) - (N>>2) - (E>>2) - (S>>2) computed
// here, with missing neighbours
// at the border taken as 0. A few frames are flat or extreme images.
module tb_pixel_array;
  import lap_pkg::*;

  localparam int unsigned R = 5;
  localparam int unsigned C = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic compute, tick, cfg_we;
  logic [$clog2(R)-1:0] cfg_row;
  logic [$clog2(C)-1:0] cfg_col;
  logic [SRL_DEPTH-1:0] cfg_mask, cfg_wdata, cfg_rdata;

  int checks = 0, failures = 0;
  int img [R][C];

  pixel_array #(.ROWS(R), .COLS(C)) dut (.*);

  function automatic int px(int i, int j);
    if (i < 0 || j < 0 || i >= int'(R) || j >= int'(C)) return 0;
    return img[i][j];
  endfunction

  task automatic run_frame(input int kind);
    int expected, got, cycles;
    for (int i = 0; i < int'(R); i++)
      for (int j = 0; j < int'(C); j++)
        case (kind)
          0: img[i][j] = 255;
          1: img[i][j] = ((i + j) % 2 != 0) ? 255 : 0;
          default: img[i][j] = int'($urandom_range(0, 255));
        endcase
    for (int i = 0; i < int'(R); i++)
      for (int j = 0; j < int'(C); j++) begin
        @(negedge clk);
        cfg_we = 1'b1; cfg_row = $clog2(R)'(i); cfg_col = $clog2(C)'(j);
        cfg_mask = '1; cfg_wdata = pack_pixel(8'(img[i][j]));
      end
    @(negedge clk);
    cfg_we = 1'b0;
    compute = 1'b1; tick = 1'b1;
    cycles = 0;
    repeat (PASS_CYCLES) begin @(negedge clk); cycles++; end
    compute = 1'b0; tick = 1'b0;
    checks++;
    if (cycles != int'(PASS_CYCLES)) failures++;
    for (int i = 0; i < int'(R); i++)
      for (int j = 0; j < int'(C); j++) begin
        cfg_row = $clog2(R)'(i); cfg_col = $clog2(C)'(j);
        #1;
        expected = img[i][j] - (px(i, j-1) >> 2) - (px(i-1, j) >> 2) - (px(i, j+1) >> 2) - (px(i+1, j) >> 2);
        got = int'(unpack_result(cfg_rdata));
        checks++;
        if (got != expected) begin
          failures++;
          $display("FAIL: frame kind %0d pixel (%0d,%0d) got %0d expected %0d", kind, i, j, got, expected);
        end
      end
  endtask

  initial begin
    compute = 1'b0; tick = 1'b0; cfg_we = 1'b0; cfg_row = '0; cfg_col = '0;
    cfg_mask = '0; cfg_wdata = '0;
    repeat (2) @(negedge clk);
    run_frame(0);
    run_frame(1);
    for (int f = 0; f < 20; f++) run_frame(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
