// tb_blr_router: self-checking test of the buffer-less router.
// 1. Directed: a header with an unwritten label waits; once the table entry
//    is written it reserves its output and appears there exactly one cycle
//    later, and the payload follows at one flit per cycle.
// 2. Random: all five inputs send packets with random labels, lengths and
//    gaps while every output applies random back-pressure. Each output must
//    carry whole packets, each contiguous, with the output the table gives
//    for its label, every word intact and in order per source; every packet
//    sent must arrive. Contention (several headers for one output) and
//    back-pressure are counted and must both occur.
module tb_blr_router;
  import blnoc_pkg::*;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned LABEL_W = 4;
  localparam int unsigned NPKT = 150;

  logic clk = 0, rst_n = 0;
  logic tbl_we, tbl_valid;
  logic [LABEL_W-1:0] tbl_label;
  port_e tbl_port;
  logic       [NUM_PORTS-1:0]             in_valid, in_ready, out_valid, out_ready;
  flit_type_e [NUM_PORTS-1:0]             in_type, out_type;
  logic       [NUM_PORTS-1:0][DATA_W-1:0] in_data, out_data;

  blr_router #(.DATA_W(DATA_W), .LABEL_W(LABEL_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  port_e route [1 << LABEL_W];
  int sent_pkts = 0, recv_pkts = 0;
  int n_contention = 0, n_backpressure = 0;
  bit random_phase = 0;
  bit [NUM_PORTS-1:0] src_done;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("ERR @%0d: %s", cyc, msg);
  endtask

  task automatic write_entry(int l, port_e p);
    @(negedge clk);
    tbl_we = 1; tbl_label = LABEL_W'(l); tbl_valid = 1; tbl_port = p;
    @(negedge clk);
    tbl_we = 0;
    route[l] = p;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------- sources (random phase) --------
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_src
    initial begin
      int len, lbl;
      src_done[i] = 0;
      wait (random_phase);
      for (int p = 0; p < NPKT; p++) begin
        len = 1 + $urandom % 6;
        lbl = $urandom % 16;
        for (int w = -1; w < len; w++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) @(negedge clk);
          in_valid[i] = 1;
          in_type[i]  = (w < 0) ? FLIT_HEAD : (w == len - 1) ? FLIT_TAIL : FLIT_BODY;
          in_data[i]  = (w < 0) ? DATA_W'(lbl) : {4'(i), 12'(p), 16'(w)};
          @(posedge clk);
          while (!in_ready[i]) @(posedge clk);
          #1 in_valid[i] = 0;
        end
        sent_pkts++;
      end
      src_done[i] = 1;
    end
  end

  // -------- sinks (random phase) --------
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_sink
    int cur_src = -1, exp_w = 0, pkt_no = 0;
    bit in_pkt = 0;
    int last_seq [NUM_PORTS];
    initial for (int k = 0; k < NUM_PORTS; k++) last_seq[k] = -1;
    always @(negedge clk) if (random_phase) out_ready[o] = ($urandom % 3) != 0;
    always @(posedge clk) if (random_phase && out_valid[o]) begin
      if (!out_ready[o]) n_backpressure++;
      else begin
        checks++;
        if (!in_pkt) begin
          if (out_type[o] != FLIT_HEAD) fail($sformatf("out %0d: payload without header", o));
          else if (route[out_data[o][LABEL_W-1:0]] != port_e'(o))
            fail($sformatf("out %0d: label %0d routed here", o, out_data[o][LABEL_W-1:0]));
          in_pkt = 1; cur_src = -1; exp_w = 0;
        end else begin
          if (out_type[o] == FLIT_HEAD) fail($sformatf("out %0d: header inside a packet", o));
          if (cur_src < 0) begin
            cur_src = int'(out_data[o][31:28]);
            pkt_no = int'(out_data[o][27:16]);
            if (pkt_no <= last_seq[cur_src]) fail($sformatf("out %0d: packet order from %0d", o, cur_src));
            last_seq[cur_src] = pkt_no;
          end
          if (out_data[o] != {4'(cur_src), 12'(pkt_no), 16'(exp_w)})
            fail($sformatf("out %0d: word %h, expected %h", o, out_data[o], {4'(cur_src), 12'(pkt_no), 16'(exp_w)}));
          exp_w++;
          if (out_type[o] == FLIT_TAIL) begin in_pkt = 0; recv_pkts++; end
        end
      end
    end
  end

  // contention: more than one header asking for one output
  always @(posedge clk) if (random_phase) begin
    for (int o = 0; o < NUM_PORTS; o++) if ($countones(dut.req[o]) > 1) n_contention++;
  end

  initial begin
    int t0;
    tbl_we = 0; tbl_valid = 0; tbl_label = '0; tbl_port = PORT_L;
    in_valid = '0; in_type = {NUM_PORTS{FLIT_BODY}}; in_data = '0; out_ready = '1;
    for (int l = 0; l < 16; l++) route[l] = PORT_L;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- directed: unknown label waits, then one cycle of set-up ----
    @(negedge clk);
    in_valid[PORT_W] = 1; in_type[PORT_W] = FLIT_HEAD; in_data[PORT_W] = 32'd9;
    repeat (5) begin
      @(posedge clk); #1;
      checks++;
      if (in_ready[PORT_W] || out_valid != '0) fail("header with unwritten label moved");
    end
    write_entry(9, PORT_E);   // entry visible from the next cycle
    t0 = cyc;
    while (!out_valid[PORT_E]) begin @(posedge clk); #1; end
    checks++;
    if (cyc - t0 != 1) fail($sformatf("header set-up took %0d cycles, expected 1", cyc - t0));
    if (out_type[PORT_E] != FLIT_HEAD || out_data[PORT_E] != 32'd9 || !in_ready[PORT_W]) fail("header not passed");
    @(posedge clk);
    // payload: 3 body + tail, one per cycle, no extra cycle
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      in_type[PORT_W] = (w == 3) ? FLIT_TAIL : FLIT_BODY; in_data[PORT_W] = 32'hA000 + w;
      #1;
      checks++;
      if (!out_valid[PORT_E] || out_data[PORT_E] != 32'hA000 + w || !in_ready[PORT_W])
        fail($sformatf("payload word %0d did not pass in its cycle", w));
      @(posedge clk);
    end
    @(negedge clk) in_valid[PORT_W] = 0;
    @(negedge clk);
    checks++;
    if (dut.rsv != '0) fail("reservation not released after tail");

    // ---- random ----
    for (int l = 0; l < 16; l++) write_entry(l, port_e'($urandom % NUM_PORTS));
    random_phase = 1;
    wait (src_done == '1);
    repeat (50) @(posedge clk);
    checks++;
    if (recv_pkts != sent_pkts || sent_pkts != NUM_PORTS * NPKT)
      fail($sformatf("sent %0d packets, received %0d", sent_pkts, recv_pkts));
    $display("contention=%0d backpressure=%0d packets=%0d", n_contention, n_backpressure, recv_pkts);
    checks++; if (n_contention == 0) fail("no contention happened");
    checks++; if (n_backpressure == 0) fail("no back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
