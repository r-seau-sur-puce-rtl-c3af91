// tb_blr_crossbar: self-checking test of the 5x5 crossbar.
// Drives random connections (each input selected by at most one output),
// random flits and random readies, and compares outputs and input readies
// with values computed in the testbench.
module tb_blr_crossbar;
  import blnoc_pkg::*;
  localparam int unsigned DATA_W = 32;
  port_e      [NUM_PORTS-1:0]             sel;
  logic       [NUM_PORTS-1:0]             en;
  logic       [NUM_PORTS-1:0]             in_valid, in_ready, out_valid, out_ready;
  flit_type_e [NUM_PORTS-1:0]             in_type, out_type;
  logic       [NUM_PORTS-1:0][DATA_W-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  blr_crossbar #(.DATA_W(DATA_W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [NUM_PORTS];
    logic [NUM_PORTS-1:0] exp_rdy;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NUM_PORTS; i++) perm[i] = i;
      perm.shuffle();
      for (int o = 0; o < NUM_PORTS; o++) begin
        sel[o] = port_e'(perm[o]);
        en[o] = $urandom % 3 != 0;
        out_ready[o] = ($urandom % 2) != 0;
        in_valid[o] = $urandom % 4 != 0;
        in_type[o] = flit_type_e'($urandom % 3);
        in_data[o] = $urandom;
      end
      #1;
      exp_rdy = '0;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (en[o]) begin
          exp_rdy[perm[o]] = out_ready[o];
          if (out_valid[o] !== in_valid[perm[o]] || out_data[o] !== in_data[perm[o]] ||
              (out_valid[o] && out_type[o] !== in_type[perm[o]])) failures++;
        end else if (out_valid[o] !== 1'b0) failures++;
      end
      checks++;
      if (in_ready !== exp_rdy) begin
        failures++;
        if (failures < 10) $display("ERR t=%0d in_ready=%b exp=%b", t, in_ready, exp_rdy);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
