// tb_lap_array_sizes: the array at the sizes of the resource table, 2x2 up to
// 60x60, each with one random frame through the full configuration-frame path.
// 60x60 spans two clock regions of the frame address. The 40x40 default size is
// covered by tb_lap_array_top. The array clock divider is set to 2 to keep the
// run short; the pass length is still checked against PASS_CYCLES * CLK_DIV.
module tb_lap_array_sizes;
  localparam int NS = 6;
  logic done [NS];
  int   chk  [NS];
  int   fail [NS];

  lap_size_run #(.R(2),  .C(2),  .DIV(2)) u2  (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  lap_size_run #(.R(4),  .C(4),  .DIV(2)) u4  (.done(done[1]), .checks(chk[1]), .failures(fail[1]));
  lap_size_run #(.R(8),  .C(8),  .DIV(2)) u8  (.done(done[2]), .checks(chk[2]), .failures(fail[2]));
  lap_size_run #(.R(16), .C(16), .DIV(2)) u16 (.done(done[3]), .checks(chk[3]), .failures(fail[3]));
  lap_size_run #(.R(32), .C(32), .DIV(2)) u32 (.done(done[4]), .checks(chk[4]), .failures(fail[4]));
  lap_size_run #(.R(60), .C(60), .DIV(2)) u60 (.done(done[5]), .checks(chk[5]), .failures(fail[5]));

  int checks = 0, failures = 0;

  initial begin
    bit all_done;
    do begin
      #100;
      all_done = 1'b1;
      foreach (done[k]) if (!done[k]) all_done = 1'b0;
    end while (!all_done);
    foreach (chk[k]) begin checks += chk[k]; failures += fail[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures = 1;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
