// tb_blr_switch_table: self-checking test of the label switching table.
// Checks that all entries read invalid after reset, then writes random
// entries and compares all five read ports, on random labels, with a model
// array every cycle.
module tb_blr_switch_table;
  import blnoc_pkg::*;
  localparam int unsigned LABEL_W = 4;
  localparam int unsigned NUM_RD = 5;
  localparam int unsigned DEPTH = 1 << LABEL_W;
  logic clk = 0, rst_n = 0;
  logic we, wr_valid;
  logic [LABEL_W-1:0] wr_label;
  port_e wr_port;
  logic [NUM_RD-1:0][LABEL_W-1:0] rd_label;
  logic [NUM_RD-1:0] rd_valid;
  port_e [NUM_RD-1:0] rd_port;
  logic m_valid [DEPTH];
  port_e m_port [DEPTH];
  int checks = 0, failures = 0;

  blr_switch_table #(.LABEL_W(LABEL_W), .NUM_RD(NUM_RD)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wr_valid = 0; wr_label = '0; wr_port = PORT_L; rd_label = '0;
    for (int i = 0; i < DEPTH; i++) begin m_valid[i] = 1'b0; m_port[i] = PORT_L; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < DEPTH; l++) begin
      @(negedge clk);
      for (int r = 0; r < NUM_RD; r++) rd_label[r] = LABEL_W'(l);
      #1;
      checks++;
      if (rd_valid != '0) failures++;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // check reads against the model
      for (int r = 0; r < NUM_RD; r++) rd_label[r] = LABEL_W'($urandom);
      #1;
      for (int r = 0; r < NUM_RD; r++) begin
        checks++;
        if (rd_valid[r] !== m_valid[rd_label[r]] ||
            (m_valid[rd_label[r]] && rd_port[r] !== m_port[rd_label[r]])) begin
          failures++;
          if (failures < 10) $display("ERR t=%0d rd%0d label=%0d got %0b/%0d", t, r, rd_label[r], rd_valid[r], rd_port[r]);
        end
      end
      we = ($urandom % 3) == 0;
      wr_label = LABEL_W'($urandom);
      wr_valid = ($urandom % 5) != 0;
      wr_port = port_e'($urandom % NUM_PORTS);
      @(posedge clk);
      if (we) begin m_valid[wr_label] = wr_valid; m_port[wr_label] = wr_port; end
      #1 we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
