// tb_blnoc_mesh: self-checking test of the buffer-less mesh at the three
// sizes the design was evaluated at, 2x2, 3x3 (the default) and 4x4. Each
// size runs in its own tb_mesh_harness: label d is loaded to mean "deliver
// to node d" along the X-then-Y path, a directed packet checks the set-up
// latency of one cycle per router and the one-word-per-cycle payload, and
// random all-to-all traffic with back-pressure checks that every packet
// arrives whole, contiguous and in order.
module tb_blnoc_mesh;
  bit d2, d3, d4;
  int c2, c3, c4, f2, f3, f4;
  int checks, failures;

  tb_mesh_harness #(.ROWS(2), .COLS(2), .NPKT(80)) u_2x2 (.done(d2), .checks(c2), .failures(f2));
  tb_mesh_harness #(.ROWS(3), .COLS(3), .NPKT(80)) u_3x3 (.done(d3), .checks(c3), .failures(f3));
  tb_mesh_harness #(.ROWS(4), .COLS(4), .NPKT(60)) u_4x4 (.done(d4), .checks(c4), .failures(f4));

  initial begin : watchdog
    #200_000;
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c4, f2 + f3 + f4 + 1);
    $finish;
  end

  initial begin
    wait (d2 && d3 && d4);
    checks = c2 + c3 + c4;
    failures = f2 + f3 + f4;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
