// tb_array_ctrl: self-checking test of the start register and pass sequencer.
//
// With CLK_DIV = 4 the test starts frames by AXI4-Lite writes (address and data
// together, address first, data first, with a stalled response channel), and
// checks that `compute` rises the cycle after the write, lasts PASS * CLK_DIV
// cycles with exactly PASS ticks spaced CLK_DIV apart, that `irq` rises in the
// cycle `compute` falls and stays high until the next start, that a read returns
// 0 and starts nothing, and that a write during a pass is answered but dropped.
module tb_array_ctrl;
  import lap_pkg::*;

  localparam int unsigned DIV = 4;

  logic aclk = 1'b0;
  always #5 aclk = ~aclk;

  logic        aresetn;
  logic [31:0] s_axi_awaddr, s_axi_wdata, s_axi_araddr, s_axi_rdata;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready;
  logic        compute, tick, irq, start_dropped;

  int checks = 0, failures = 0;
  int ticks = 0, compute_cycles = 0, last_tick = -1, cyc = 0, irq_rises = 0, drops = 0;
  logic irq_d = 1'b0, compute_d = 1'b0;
  bit tick_spacing_ok = 1'b1, irq_at_end_ok = 1'b1;

  array_ctrl #(.CLK_DIV(DIV)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always_ff @(posedge aclk) begin
    cyc <= cyc + 1;
    irq_d <= irq;
    compute_d <= compute;
    if (aresetn && irq && !irq_d) irq_rises <= irq_rises + 1;
    if (aresetn && start_dropped) drops <= drops + 1;
    if (aresetn && compute) compute_cycles <= compute_cycles + 1;
    if (!aresetn || !compute) last_tick <= -1;
    else if (tick) begin
      ticks <= ticks + 1;  // counted only after reset
      if (last_tick >= 0 && cyc - last_tick != int'(DIV)) tick_spacing_ok <= 1'b0;
      last_tick <= cyc;
    end
    if (aresetn && compute_d && !compute && !irq) irq_at_end_ok <= 1'b0;
  end

  // mode 0: AW and W together, 1: AW first, 2: W first; bstall cycles of BREADY low
  task automatic axi_write(input int mode, input int bstall);
    @(negedge aclk);
    s_axi_awaddr = 32'h0; s_axi_wdata = $urandom; s_axi_wstrb = 4'hF;
    s_axi_awvalid = (mode != 2); s_axi_wvalid = (mode != 1); s_axi_bready = 1'b0;
    do @(posedge aclk); while (!((s_axi_awvalid && s_axi_awready) || (s_axi_wvalid && s_axi_wready)));
    @(negedge aclk);
    if (mode == 0) begin s_axi_awvalid = 1'b0; s_axi_wvalid = 1'b0; end
    else if (mode == 1) begin s_axi_awvalid = 1'b0; @(negedge aclk); s_axi_wvalid = 1'b1;
      do @(posedge aclk); while (!s_axi_wready); @(negedge aclk); s_axi_wvalid = 1'b0; end
    else begin s_axi_wvalid = 1'b0; @(negedge aclk); s_axi_awvalid = 1'b1;
      do @(posedge aclk); while (!s_axi_awready); @(negedge aclk); s_axi_awvalid = 1'b0; end
    while (!s_axi_bvalid) @(negedge aclk);
    repeat (bstall) begin @(negedge aclk); check(s_axi_bvalid, "BVALID held while BREADY low"); end
    s_axi_bready = 1'b1;
    @(negedge aclk);
    s_axi_bready = 1'b0;
    check(s_axi_bresp == 2'b00, "write response OKAY");
  endtask

  task automatic frame(input int mode, input int bstall);
    int t0, c0, k0;
    t0 = ticks; c0 = compute_cycles;
    axi_write(mode, bstall);
    check(compute || ticks > t0, "pass started by the write");
    check(!irq, "irq low while the pass runs");
    while (compute) @(negedge aclk);
    check(irq, "irq high at the end of the pass");
    check(ticks - t0 == int'(PASS_CYCLES), $sformatf("ticks per pass %0d", ticks - t0));
    check(compute_cycles - c0 == int'(PASS_CYCLES * DIV),
          $sformatf("pass length %0d bus cycles", compute_cycles - c0));
    repeat (2) @(negedge aclk);
    k0 = irq_rises;
    repeat (10) @(negedge aclk);
    check(irq && irq_rises == k0, "irq stays high until the next start");
  endtask

  initial begin
    aresetn = 1'b0;
    s_axi_awvalid = 1'b0; s_axi_wvalid = 1'b0; s_axi_bready = 1'b0;
    s_axi_arvalid = 1'b0; s_axi_rready = 1'b0;
    s_axi_awaddr = '0; s_axi_wdata = '0; s_axi_wstrb = '0; s_axi_araddr = '0;
    repeat (3) @(negedge aclk);
    aresetn = 1'b1;
    repeat (2) @(negedge aclk);
    check(!compute && !irq, "idle after reset");

    frame(0, 0);
    frame(1, 3);
    frame(2, 1);

    // read: returns 0, starts nothing
    @(negedge aclk);
    s_axi_araddr = 32'h0; s_axi_arvalid = 1'b1; s_axi_rready = 1'b0;
    do @(posedge aclk); while (!s_axi_arready);
    @(negedge aclk);
    s_axi_arvalid = 1'b0;
    repeat (2) begin check(s_axi_rvalid, "RVALID held while RREADY low"); @(negedge aclk); end
    check(s_axi_rdata == 32'h0 && s_axi_rresp == 2'b00, "read data 0, OKAY");
    s_axi_rready = 1'b1;
    @(negedge aclk);
    s_axi_rready = 1'b0;
    repeat (5) @(negedge aclk);
    check(!compute && !s_axi_rvalid, "read starts no pass");

    // a start written during a pass is dropped
    fork
      frame(0, 0);
      begin
        repeat (12) @(negedge aclk);
        axi_write(0, 0);
      end
    join
    repeat (5) @(negedge aclk);
    check(drops == 1, "start during a pass dropped");
    check(!compute, "dropped start does not extend the pass");

    check(irq_rises == 4, $sformatf("one irq edge per frame (%0d)", irq_rises));
    check(tick_spacing_ok, "ticks spaced CLK_DIV cycles apart");
    check(irq_at_end_ok, "irq rises when compute falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
