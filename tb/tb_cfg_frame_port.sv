// tb_cfg_frame_port: self-checking test of the frame-addressed register access.
//
// The pixel array is replaced by a testbench register file that obeys the port's
// array-side row/column/mask/data signals. The test fills an array of 45 x 3
// registers (two clock regions, the second partly used) by writing complete
// frames formatted on the host side, checks every register, reads every frame
// back and compares it word by word with the host formatting, and checks that
// the clock-row word, partial masks and out-of-range addresses write nothing.
module tb_cfg_frame_port;
  import lap_pkg::*;
  import lap_tb_pkg::*;

  localparam int unsigned R = 45;
  localparam int unsigned C = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  frame_addr_t addr;
  logic [6:0]  word;
  logic        we, hit;
  logic [31:0] wdata, rdata;
  logic [$clog2(R)-1:0] arr_row;
  logic [$clog2(C)-1:0] arr_col;
  logic                 arr_we;
  logic [SRL_DEPTH-1:0] arr_mask, arr_wdata, arr_rdata;

  logic [31:0] regs [R][C];
  logic [31:0] want [R][C];

  int checks = 0, failures = 0;

  cfg_frame_port #(.ROWS(R), .COLS(C)) dut (.*);

  assign arr_rdata = regs[arr_row][arr_col];
  always_ff @(posedge clk)
    if (arr_we) regs[arr_row][arr_col] <= (regs[arr_row][arr_col] & ~arr_mask) | (arr_wdata & arr_mask);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] host_word(int region, int col, int minor, int w);
    int half, slot, row;
    slot = word_slot(w, half);
    if (slot < 0) return 32'hFFFF_FFFF;     // clock-row word: must be ignored
    row = region * 40 + slot;
    if (row >= int'(R)) return '0;
    return slice_word(want[row][col], minor, half);
  endfunction

  task automatic write_frame(int region, int col, int minor);
    for (int w = 0; w < 81; w++) begin
      @(negedge clk);
      addr = '{region: 4'(region), column: 8'(col), minor: 2'(minor)};
      word = 7'(w); wdata = host_word(region, col, minor, w); we = 1'b1;
    end
    @(negedge clk);
    we = 1'b0;
  endtask

  initial begin
    int half, slot;
    we = 1'b0; addr = '0; word = '0; wdata = '0;
    foreach (want[i, j]) want[i][j] = $urandom;
    for (int reg_n = 0; reg_n < 2; reg_n++)
      for (int c = 0; c < int'(C); c++)
        for (int m = 0; m < 4; m++) write_frame(reg_n, c, m);
    foreach (regs[i, j]) check(regs[i][j] == want[i][j],
      $sformatf("register (%0d,%0d) = %h, expected %h", i, j, regs[i][j], want[i][j]));

    // read-back of every frame word
    for (int reg_n = 0; reg_n < 2; reg_n++)
      for (int c = 0; c < int'(C); c++)
        for (int m = 0; m < 4; m++)
          for (int w = 0; w < 81; w++) begin
            addr = '{region: 4'(reg_n), column: 8'(c), minor: 2'(m)};
            word = 7'(w);
            #1;
            slot = word_slot(w, half);
            if (slot < 0 || reg_n * 40 + slot >= int'(R)) begin
              check(rdata == 32'h0 && !hit, "unmapped word reads 0");
            end else begin
              check(hit && rdata == host_word(reg_n, c, m, w),
                    $sformatf("read-back region %0d col %0d minor %0d word %0d", reg_n, c, m, w));
            end
          end

    // a word whose bits miss the SRL (lower word of a slice pair) writes nothing
    @(negedge clk);
    addr = '{region: 4'd0, column: 8'd1, minor: 2'd2}; word = 7'd6; wdata = '1; we = 1'b1;
    @(negedge clk);
    addr = '{region: 4'd0, column: 8'd5, minor: 2'd0}; word = 7'd0; wdata = '1; // column off the array
    @(negedge clk);
    we = 1'b0;
    check(regs[3][1] == want[3][1], "lower word of a slice leaves the SRL alone");
    check(regs[0][0] == want[0][0] && regs[0][1] == want[0][1] && regs[0][2] == want[0][2],
          "write off the array is dropped");

    // a single frame touches only its quarter of a register
    @(negedge clk);
    addr = '{region: 4'd0, column: 8'd2, minor: 2'd1}; word = 7'd11; wdata = '0; we = 1'b1;
    @(negedge clk);
    we = 1'b0;
    begin
      logic [31:0] exp_v;
      exp_v = want[5][2];
      for (int e = 0; e < 32; e++)
        if (stage_minor(e) == 1 && stage_bit(e) >= 32) exp_v[e] = 1'b0;
      check(regs[5][2] == exp_v, "partial update by one frame word");
    end

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
