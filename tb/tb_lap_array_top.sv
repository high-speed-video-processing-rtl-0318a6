// tb_lap_array_top: end-to-end test of the pixel array processor at full size.
//
// The top is used with its default parameters (40 x 40 pixels, CLK_DIV = 320).
// For each frame the testbench acts as the host: it formats every pixel register
// as configuration frame words (4 frames of 81 words per pixel column), writes
// them through the frame port, starts the pass with an AXI4-Lite write, waits for
// the interrupt, reads all frames back, rebuilds each register and compares the
// 9-bit result with I - (W>>2) - (N>>2) - (E>>2) - (S>>2), border neighbours
// being 0, and that it exceeds the exact Laplacian I - (W+N+E+S)/4 by 0 to 3.
// It checks the pass length (PASS_CYCLES * CLK_DIV bus cycles between the start
// and the interrupt edge), and it makes each mechanism happen and counts it:
// frame writes, clock-row words skipped, read-back, start, interrupt edge, a
// configuration write ignored during a pass and a start dropped during a pass.
// On the random frame it also tests, with a chi-square test, that the error of
// the interior pixels follows the multinomial (1 + x + x^2 + x^3)^4 / 256 model.
module tb_lap_array_top;
  import lap_pkg::*;
  import lap_tb_pkg::*;

  localparam int N = 40;      // matches the top's defaults
  localparam int DIV = 320;

  logic aclk = 1'b0;
  always #5 aclk = ~aclk;     // 100 MHz bus clock

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

  lap_array_top dut (.*);

  int checks = 0, failures = 0;
  int n_frame_writes = 0, n_hclk_skipped = 0, n_readback = 0, n_starts = 0;
  int n_irq_edges = 0, n_busy_writes = 0, n_dropped = 0, n_chi2 = 0;
  int img [N][N];
  int max_err4 = 0;
  int err_hist [13] = '{default: 0};
  int frame_hist [13];
  // coefficients of (1 + x + x^2 + x^3)^4: the error distribution, in quarters, of
  // four independently truncated quarter pixels whose two LSBs are uniform
  localparam int ERR_COEF [13] = '{1, 4, 10, 20, 31, 40, 44, 40, 31, 20, 10, 4, 1};
  logic irq_d = 1'b0;
  longint cyc = 0;

  always_ff @(posedge aclk) begin
    cyc   <= cyc + 1;
    irq_d <= irq;
    if (aresetn && irq && !irq_d) n_irq_edges <= n_irq_edges + 1;
    if (aresetn && start_dropped) n_dropped <= n_dropped + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int got_of(input logic [31:0] words [4][2]);
    return int'(unpack_result(regval_from_words(words)));
  endfunction

  function automatic int px(int i, int j);
    if (i < 0 || j < 0 || i >= N || j >= N) return 0;
    return img[i][j];
  endfunction

  task automatic axi_start();
    @(negedge aclk);
    s_axi_awvalid = 1'b1; s_axi_wvalid = 1'b1; s_axi_wdata = $urandom; s_axi_bready = 1'b1;
    do @(posedge aclk); while (!(s_axi_awready && s_axi_wready));
    @(negedge aclk);
    s_axi_awvalid = 1'b0; s_axi_wvalid = 1'b0;
    while (!s_axi_bvalid) @(negedge aclk);
    @(negedge aclk);
    s_axi_bready = 1'b0;
  endtask

  task automatic load_frame();
    for (int c = 0; c < N; c++)
      for (int m = 0; m < 4; m++)
        for (int w = 0; w < 81; w++) begin
          int half, slot;
          slot = word_slot(w, half);
          @(negedge aclk);
          cfg_addr = '{region: 4'd0, column: 8'(c), minor: 2'(m)};
          cfg_word = 7'(w);
          cfg_we   = 1'b1;
          cfg_wdata = (slot < 0) ? 32'hFFFF_FFFF : slice_word(pack_pixel(8'(img[slot][c])), m, half);
          #1;
          if (slot < 0) begin if (!cfg_hit) n_hclk_skipped++; end
          else n_frame_writes++;
        end
    @(negedge aclk);
    cfg_we = 1'b0;
  endtask

  task automatic check_frame(input string name);
    logic [31:0] words [4][2];
    int bad = 0;
    for (int c = 0; c < N; c++)
      for (int slot = 0; slot < N; slot++) begin
        int expected, got;
        for (int m = 0; m < 4; m++)
          for (int h = 0; h < 2; h++) begin
            cfg_addr = '{region: 4'd0, column: 8'(c), minor: 2'(m)};
            cfg_word = 7'((slot < 20) ? 2 * slot + h : 41 + 2 * (slot - 20) + h);
            #1;
            words[m][h] = cfg_rdata;
            n_readback++;
          end
        expected = img[slot][c] - (px(slot, c-1) >> 2) - (px(slot-1, c) >> 2) - (px(slot, c+1) >> 2) - (px(slot+1, c) >> 2);
        begin
          // error against the exact Laplacian, in quarters: 0 .. 12
          int err4;
          err4 = 4 * got_of(words) - (4 * img[slot][c] - (px(slot, c-1) + px(slot-1, c) + px(slot, c+1) + px(slot+1, c)));
          checks++;
          if (err4 < 0 || err4 > 12) begin failures++; $display("FAIL: truncation error %0d/4 outside 0..3", err4); end
          if (err4 > max_err4) max_err4 = err4;
          err_hist[err4 < 0 ? 0 : (err4 > 12 ? 12 : err4)]++;
          if (slot > 0 && slot < N - 1 && c > 0 && c < N - 1) frame_hist[err4 < 0 ? 0 : (err4 > 12 ? 12 : err4)]++;
        end
        got = got_of(words);
        checks++;
        if (got != expected) begin
          failures++;
          if (bad++ < 5) $display("FAIL: %s pixel (%0d,%0d) got %0d expected %0d", name, slot, c, got, expected);
        end
      end
  endtask

  task automatic run_frame(input string name, input int kind, input bit poke_during_pass);
    longint t_start, t_irq;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        case (kind)
          0: img[i][j] = 255;
          1: img[i][j] = ((i + j) % 2 != 0) ? 255 : 0;
          2: img[i][j] = (i * 6 + j * 3) % 256;
          default: img[i][j] = int'($urandom_range(0, 255));
        endcase
    load_frame();
    check(!busy, "idle before the start");
    axi_start();
    t_start = cyc;
    n_starts++;
    check(busy, "pass running after the start write");
    if (poke_during_pass) begin
      // configuration write and a second start while the pass runs: both ignored
      @(negedge aclk);
      cfg_addr = '{region: 4'd0, column: 8'd0, minor: 2'd0};
      cfg_word = 7'd0; cfg_wdata = 32'hFFFF_FFFF; cfg_we = 1'b1;
      @(negedge aclk);
      cfg_we = 1'b0;
      n_busy_writes++;
      axi_start();
    end
    while (!irq) @(posedge aclk);
    t_irq = cyc;
    check(!busy, "busy low at the interrupt");
    // start write accepted -> compute high one cycle later; irq rises as compute falls
    check(t_irq - t_start >= longint'(PASS_CYCLES * DIV) - 2 && t_irq - t_start <= longint'(PASS_CYCLES * DIV) + 2,
          $sformatf("%s: pass took %0d bus cycles, expected about %0d", name, t_irq - t_start, PASS_CYCLES * DIV));
    foreach (frame_hist[k]) frame_hist[k] = 0;
    check_frame(name);
    if (kind == 3) begin
      // chi-square test of the interior error histogram against the multinomial model
      real chi2, e;
      chi2 = 0.0;
      foreach (frame_hist[k]) begin
        e = real'((N - 2) * (N - 2)) * real'(ERR_COEF[k]) / 256.0;
        chi2 += (real'(frame_hist[k]) - e) * (real'(frame_hist[k]) - e) / e;
      end
      $display("%s: truncation error chi-square %0.2f over 12 degrees of freedom", name, chi2);
      check(chi2 < 32.91, "error follows the multinomial model (99.9% level)");
      n_chi2++;
    end
  endtask

  initial begin
    aresetn = 1'b0;
    s_axi_awvalid = 1'b0; s_axi_wvalid = 1'b0; s_axi_bready = 1'b0;
    s_axi_arvalid = 1'b0; s_axi_rready = 1'b0;
    s_axi_awaddr = '0; s_axi_wdata = '0; s_axi_wstrb = 4'hF; s_axi_araddr = '0;
    cfg_addr = '0; cfg_word = '0; cfg_we = 1'b0; cfg_wdata = '0;
    repeat (4) @(negedge aclk);
    aresetn = 1'b1;
    repeat (2) @(negedge aclk);

    run_frame("random", 3, 1'b0);
    run_frame("flat", 0, 1'b1);
    run_frame("checkerboard", 1, 1'b0);
    run_frame("ramp", 2, 1'b0);
    @(negedge aclk);

    $display("mechanisms: frame words written %0d, clock-row words skipped %0d, words read back %0d,",
             n_frame_writes, n_hclk_skipped, n_readback);
    $display("            starts %0d, interrupt edges %0d, writes ignored in a pass %0d, starts dropped %0d",
             n_starts, n_irq_edges, n_busy_writes, n_dropped);
    $display("truncation error (quarters 0..12): max %0d/4, histogram %p", max_err4, err_hist);
    check(n_chi2 > 0, "error distribution tested");
    check(max_err4 > 0, "truncation error observed");
    check(n_frame_writes > 0, "frame writes happened");
    check(n_hclk_skipped > 0, "clock-row words skipped");
    check(n_readback > 0, "read-back happened");
    check(n_irq_edges == n_starts, "one interrupt edge per frame");
    check(n_busy_writes > 0, "configuration write during a pass happened");
    check(n_dropped > 0, "start during a pass dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
