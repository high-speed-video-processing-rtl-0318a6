// lap_size_run: testbench harness that puts one random frame through a
// lap_array_top of a given size and checks every pixel.
//
// It formats the frame as configuration words for all clock regions the array
// spans (40 pixel rows each), starts the pass over AXI4-Lite, waits for the
// interrupt, reads the frames back and compares each result with
// I - (W>>2) - (N>>2) - (E>>2) - (S>>2), border neighbours being 0. It raises
// `done` when finished and reports its check and failure counts.
module lap_size_run
  import lap_pkg::*;
  import lap_tb_pkg::*;
#(
  parameter int R   = 2,
  parameter int C   = 2,
  parameter int DIV = 2
) (
  output logic done,
  output int   checks,
  output int   failures
);

  logic aclk = 1'b0;
  always #5 aclk = ~aclk;

  logic        aresetn;
  logic [31:0] s_axi_awaddr, s_axi_wdata, s_axi_araddr, s_axi_rdata;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready, irq;
  frame_addr_t cfg_addr;
  logic [6:0]  cfg_word;
  logic        cfg_we, cfg_hit, busy, start_dropped;
  logic [31:0] cfg_wdata, cfg_rdata;

  lap_array_top #(.ROWS(R), .COLS(C), .CLK_DIV(DIV)) dut (.*);

  int img [R][C];
  localparam int REGIONS = (R + 39) / 40;

  function automatic int px(int i, int j);
    if (i < 0 || j < 0 || i >= R || j >= C) return 0;
    return img[i][j];
  endfunction

  initial begin
    int cyc_start, cyc;
    done = 1'b0; checks = 0; failures = 0;
    aresetn = 1'b0;
    s_axi_awvalid = 1'b0; s_axi_wvalid = 1'b0; s_axi_bready = 1'b0;
    s_axi_arvalid = 1'b0; s_axi_rready = 1'b0;
    s_axi_awaddr = '0; s_axi_wdata = '0; s_axi_wstrb = 4'hF; s_axi_araddr = '0;
    cfg_addr = '0; cfg_word = '0; cfg_we = 1'b0; cfg_wdata = '0;
    foreach (img[i, j]) img[i][j] = int'($urandom_range(0, 255));
    repeat (3) @(negedge aclk);
    aresetn = 1'b1;

    for (int g = 0; g < REGIONS; g++)
      for (int c = 0; c < C; c++)
        for (int m = 0; m < 4; m++)
          for (int w = 0; w < 81; w++) begin
            int half, slot, row;
            slot = word_slot(w, half);
            row  = g * 40 + slot;
            @(negedge aclk);
            cfg_addr  = '{region: 4'(g), column: 8'(c), minor: 2'(m)};
            cfg_word  = 7'(w);
            cfg_we    = 1'b1;
            cfg_wdata = (slot < 0 || row >= R) ? 32'h0 : slice_word(pack_pixel(8'(img[row][c])), m, half);
          end
    @(negedge aclk);
    cfg_we = 1'b0;

    s_axi_awvalid = 1'b1; s_axi_wvalid = 1'b1; s_axi_bready = 1'b1;
    do @(posedge aclk); while (!(s_axi_awready && s_axi_wready));
    @(negedge aclk);
    s_axi_awvalid = 1'b0; s_axi_wvalid = 1'b0;
    cyc_start = 0;
    cyc = 0;
    while (!irq) begin @(posedge aclk); cyc++; end
    checks++;
    if (cyc < int'(PASS_CYCLES) * DIV - 2 || cyc > int'(PASS_CYCLES) * DIV + 2) begin
      failures++;
      $display("FAIL: %0dx%0d pass took %0d cycles", R, C, cyc);
    end

    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        logic [31:0] words [4][2];
        int slot, expected, got;
        slot = r % 40;
        for (int m = 0; m < 4; m++)
          for (int h = 0; h < 2; h++) begin
            cfg_addr = '{region: 4'(r / 40), column: 8'(c), minor: 2'(m)};
            cfg_word = 7'((slot < 20) ? 2 * slot + h : 41 + 2 * (slot - 20) + h);
            #1;
            words[m][h] = cfg_rdata;
          end
        expected = img[r][c] - (px(r, c-1) >> 2) - (px(r-1, c) >> 2) - (px(r, c+1) >> 2) - (px(r+1, c) >> 2);
        got = int'(unpack_result(regval_from_words(words)));
        checks++;
        if (got != expected) begin
          failures++;
          if (failures < 5) $display("FAIL: %0dx%0d pixel (%0d,%0d) got %0d expected %0d", R, C, r, c, got, expected);
        end
      end
    done = 1'b1;
  end

  logic unused;
  assign unused = ^{s_axi_rdata, s_axi_rresp, s_axi_bresp, s_axi_bvalid, s_axi_arready,
                    s_axi_rvalid, cfg_hit, busy, start_dropped};
endmodule
