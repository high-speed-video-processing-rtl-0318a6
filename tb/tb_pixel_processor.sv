// tb_pixel_processor: self-checking test of one bit-serial Laplacian processor.
//
// The four neighbours are modelled in the testbench as plain 32-bit shift
// registers loaded with packed pixel words; they shift on the same ticks and feed
// their stage-2 bit to the processor. Each trial loads random pixels, runs one
// pass of PASS_CYCLES ticks with random idle cycles between ticks (tick is an
// enable), and compares the 9-bit result with I - sum of (neighbour >> 2) computed here in
// integer arithmetic. It also checks masked configuration writes, that the
// register holds between ticks, and that writes are ignored during a pass.
module tb_pixel_processor;
  import lap_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic compute, tick;
  logic nbr_w, nbr_n, nbr_e, nbr_s, nbr_out;
  logic cfg_sel;
  logic [SRL_DEPTH-1:0] cfg_mask, cfg_wdata, q;

  logic [SRL_DEPTH-1:0] nb [4];   // W, N, E, S neighbour registers

  int checks = 0, failures = 0;

  pixel_processor dut (.*);

  assign nbr_w = nb[0][NBR_TAP];
  assign nbr_n = nb[1][NBR_TAP];
  assign nbr_e = nb[2][NBR_TAP];
  assign nbr_s = nb[3][NBR_TAP];

  always_ff @(posedge clk) if (compute && tick) for (int k = 0; k < 4; k++) nb[k] <= nb[k] >> 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_trial(input logic [7:0] c, input logic [7:0] w, input logic [7:0] n,
                           input logic [7:0] e, input logic [7:0] s);
    int expected, got, nticks;
    logic [SRL_DEPTH-1:0] held;
    @(negedge clk);
    cfg_sel = 1'b1; cfg_mask = '1; cfg_wdata = pack_pixel(c);
    nb[0] = pack_pixel(w); nb[1] = pack_pixel(n); nb[2] = pack_pixel(e); nb[3] = pack_pixel(s);
    @(negedge clk);
    cfg_sel = 1'b0;
    check(q == pack_pixel(c), "configuration write of a whole word");
    compute = 1'b1;
    nticks = 0;
    while (nticks < int'(PASS_CYCLES)) begin
      @(negedge clk);
      tick = ($urandom_range(0, 2) != 0);
      if (tick) nticks++;
    end
    @(negedge clk);
    tick = 1'b0;
    held = q;
    // a write attempted during the pass must not land
    cfg_sel = 1'b1; cfg_mask = '1; cfg_wdata = ~q;
    @(negedge clk);
    cfg_sel = 1'b0;
    check(q == held, "register holds without tick and ignores writes during a pass");
    compute = 1'b0;
    expected = int'(c) - (int'(w) >> 2) - (int'(n) >> 2) - (int'(e) >> 2) - (int'(s) >> 2);
    got = int'(unpack_result(q));
    check(got == expected, $sformatf("laplacian c=%0d w=%0d n=%0d e=%0d s=%0d got %0d expected %0d",
                                     c, w, n, e, s, got, expected));
  endtask

  initial begin
    compute = 1'b0; tick = 1'b0; cfg_sel = 1'b0; cfg_mask = '0; cfg_wdata = '0;
    for (int k = 0; k < 4; k++) nb[k] = '0;
    repeat (2) @(negedge clk);

    // masked write: only the selected stages change
    cfg_sel = 1'b1; cfg_mask = '1; cfg_wdata = 32'h0000_0000;
    @(negedge clk);
    cfg_mask = 32'h00FF_00F0; cfg_wdata = 32'hA5A5_A5A5;
    @(negedge clk);
    cfg_sel = 1'b0;
    check(q == 32'h00A5_00A0, "masked configuration write");

    // corner cases of the arithmetic
    run_trial(8'd0,   8'd255, 8'd255, 8'd255, 8'd255);  // most negative result
    run_trial(8'd255, 8'd0,   8'd0,   8'd0,   8'd0);    // most positive result
    run_trial(8'd100, 8'd100, 8'd100, 8'd100, 8'd100);  // flat region gives 0
    run_trial(8'd10,  8'd3,   8'd3,   8'd3,   8'd3);    // each quarter truncated to 0
    run_trial(8'd10,  8'd4,   8'd7,   8'd255, 8'd128);  // mixed truncation
    run_trial(8'd0,   8'd0,   8'd0,   8'd0,   8'd0);
    for (int t = 0; t < 300; t++)
      run_trial(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
