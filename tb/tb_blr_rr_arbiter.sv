// tb_blr_rr_arbiter: self-checking test of the round-robin arbiter.
// Random request patterns and random grant use; a reference pointer kept in
// the testbench predicts the one-hot grant every cycle. Also checks that a
// permanently requesting input is served within N grants.
module tb_blr_rr_arbiter;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic adv;
  int checks = 0, failures = 0;
  int unsigned ref_ptr;
  int cycle = 0;

  blr_rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .adv, .grant);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] model(logic [N-1:0] r, int unsigned p);
    for (int unsigned k = 0; k < N; k++) begin
      if (r[(p + k) % N]) return (N'(1) << ((p + k) % N));
    end
    return '0;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait0;
    req = '0; adv = 0; ref_ptr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      if (t > 2000) req[0] = 1'b1;
      adv = ($urandom % 4) != 0;
      #1;
      checks++;
      if (grant !== model(req, ref_ptr)) begin
        failures++;
        if (failures < 10) $display("ERR t=%0d req=%b ptr=%0d grant=%b exp=%b", t, req, ref_ptr, grant, model(req, ref_ptr));
      end
      @(posedge clk);
      if (adv && req != 0) begin
        for (int unsigned k = 0; k < N; k++) if (grant[k]) ref_ptr = (k + 1) % N;
      end
    end
    // fairness: input 0 always requesting, all others too
    wait0 = 0;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      req = '1; adv = 1'b1; #1;
      if (grant[0]) begin
        checks++;
        if (wait0 > N - 1) failures++;
        wait0 = 0;
      end else wait0++;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
