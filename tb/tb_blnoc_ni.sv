// tb_blnoc_ni: self-checking test of the network interface.
// Two interfaces are tested side by side:
//  * u_ip (relabelling): packets with random labels arrive from the router
//    side; a small IP model in the testbench takes each payload and returns
//    every word plus a constant. The result packet must carry the relabel
//    table's entry for the arriving label in its header, then the results as
//    body flits with the last word as tail. A second header must be held off
//    until the previous result has left (one packet in flight).
//  * u_io (scenario label): words offered on the IP side leave as packets
//    labelled with ext_label, and arriving packets are handed out with their
//    label on ip_rx_label.
// Random back-pressure is applied on every side.
module tb_blnoc_ni;
  import blnoc_pkg::*;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned LABEL_W = 4;
  localparam int unsigned NPKT = 120;
  localparam logic [DATA_W-1:0] K = 32'h0101_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("ERR @%0d: %s", cyc, msg);
  endtask

  // ---------------- relabelling interface ----------------
  logic cfg_we, cfg_valid;
  logic [LABEL_W-1:0] cfg_label, cfg_new_label;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  flit_type_e rx_type, tx_type;
  logic [DATA_W-1:0] rx_data, tx_data;
  logic ip_rx_valid, ip_rx_last, ip_rx_ready, ip_tx_valid, ip_tx_last, ip_tx_ready;
  logic [DATA_W-1:0] ip_rx_data, ip_tx_data;
  logic [LABEL_W-1:0] ip_rx_label;

  blnoc_ni #(.DATA_W(DATA_W), .LABEL_W(LABEL_W), .EXT_LABEL(1'b0)) u_ip (
    .clk, .rst_n, .cfg_we, .cfg_label, .cfg_valid, .cfg_new_label,
    .rx_valid, .rx_type, .rx_data, .rx_ready,
    .tx_valid, .tx_type, .tx_data, .tx_ready,
    .ip_rx_valid, .ip_rx_data, .ip_rx_last, .ip_rx_label, .ip_rx_ready,
    .ip_tx_valid, .ip_tx_data, .ip_tx_last, .ip_tx_ready,
    .ext_label('0));

  logic [LABEL_W-1:0] relabel [1 << LABEL_W];
  int exp_len [$];
  logic [LABEL_W-1:0] exp_lbl [$];
  logic [DATA_W-1:0] exp_words [$];
  int pkts_out = 0, held_headers = 0;
  bit pkt_open = 0;

  // source of network packets
  initial begin
    int len;
    logic [LABEL_W-1:0] l;
    rx_valid = 0; rx_type = FLIT_BODY; rx_data = '0;
    wait (rst_n);
    repeat (40) @(posedge clk);
    for (int p = 0; p < NPKT; p++) begin
      len = 1 + $urandom % 8;
      l = LABEL_W'($urandom);
      exp_len.push_back(len); exp_lbl.push_back(relabel[l]);
      for (int w = -1; w < len; w++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) @(negedge clk);
        rx_valid = 1;
        rx_type = (w < 0) ? FLIT_HEAD : (w == len - 1) ? FLIT_TAIL : FLIT_BODY;
        rx_data = (w < 0) ? DATA_W'(l) : DATA_W'({p[15:0], w[15:0]});
        if (w >= 0) exp_words.push_back(rx_data + K);
        @(posedge clk);
        while (!rx_ready) begin
          if (w < 0 && pkt_open) held_headers++;
          @(posedge clk);
        end
        #1 rx_valid = 0;
      end
    end
  end

  // IP model: collect a payload, then return each word + K
  initial begin
    logic [DATA_W-1:0] buf_q [$];
    bit last;
    ip_rx_ready = 0; ip_tx_valid = 0; ip_tx_data = '0; ip_tx_last = 0;
    forever begin
      buf_q.delete();
      last = 0;
      while (!last) begin
        @(negedge clk);
        ip_rx_ready = ($urandom % 3) != 0;
        @(posedge clk);
        if (ip_rx_valid && ip_rx_ready) begin buf_q.push_back(ip_rx_data); last = ip_rx_last; end
      end
      @(negedge clk) ip_rx_ready = 0;
      for (int w = 0; w < buf_q.size(); w++) begin
        @(negedge clk);
        ip_tx_valid = 1; ip_tx_data = buf_q[w] + K; ip_tx_last = (w == buf_q.size() - 1);
        @(posedge clk);
        while (!ip_tx_ready) @(posedge clk);
        #1 ip_tx_valid = 0;
      end
    end
  end

  // network sink of result packets
  int sink_w = 0, sink_len = 0;
  always @(negedge clk) tx_ready = ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    checks++;
    if (!pkt_open) begin
      if (tx_type != FLIT_HEAD) fail("result without header");
      else if (exp_lbl.size() == 0) fail("unexpected packet");
      else begin
        if (tx_data[LABEL_W-1:0] != exp_lbl[0]) fail($sformatf("label %0d, expected %0d", tx_data[LABEL_W-1:0], exp_lbl[0]));
        void'(exp_lbl.pop_front());
        sink_len = exp_len.pop_front();
        sink_w = 0; pkt_open = 1;
      end
    end else begin
      if (exp_words.size() == 0) fail("extra word");
      else if (tx_data != exp_words.pop_front()) fail("result word differs");
      sink_w++;
      if ((tx_type == FLIT_TAIL) != (sink_w == sink_len)) fail("tail misplaced");
      if (tx_type == FLIT_TAIL) begin pkt_open = 0; pkts_out++; end
    end
  end

  // ---------------- scenario-label interface ----------------
  logic io_rx_valid, io_rx_ready, io_tx_valid, io_tx_ready;
  flit_type_e io_rx_type, io_tx_type;
  logic [DATA_W-1:0] io_rx_data, io_tx_data;
  logic io_ip_rx_valid, io_ip_rx_last, io_ip_rx_ready, io_ip_tx_valid, io_ip_tx_last, io_ip_tx_ready;
  logic [DATA_W-1:0] io_ip_rx_data, io_ip_tx_data;
  logic [LABEL_W-1:0] io_ip_rx_label, scen;

  blnoc_ni #(.DATA_W(DATA_W), .LABEL_W(LABEL_W), .EXT_LABEL(1'b1)) u_io (
    .clk, .rst_n, .cfg_we(1'b0), .cfg_label('0), .cfg_valid(1'b0), .cfg_new_label('0),
    .rx_valid(io_rx_valid), .rx_type(io_rx_type), .rx_data(io_rx_data), .rx_ready(io_rx_ready),
    .tx_valid(io_tx_valid), .tx_type(io_tx_type), .tx_data(io_tx_data), .tx_ready(io_tx_ready),
    .ip_rx_valid(io_ip_rx_valid), .ip_rx_data(io_ip_rx_data), .ip_rx_last(io_ip_rx_last),
    .ip_rx_label(io_ip_rx_label), .ip_rx_ready(io_ip_rx_ready),
    .ip_tx_valid(io_ip_tx_valid), .ip_tx_data(io_ip_tx_data), .ip_tx_last(io_ip_tx_last),
    .ip_tx_ready(io_ip_tx_ready), .ext_label(scen));

  // loop the interface's output back to its input: what leaves comes back
  assign io_rx_valid = io_tx_valid;
  assign io_rx_type  = io_tx_type;
  assign io_rx_data  = io_tx_data;
  assign io_tx_ready = io_rx_ready;

  logic [LABEL_W-1:0] io_exp_lbl [$];
  logic [DATA_W-1:0]  io_exp_w [$];
  int io_pkts = 0;
  bit io_done = 0;
  initial begin
    int len;
    io_ip_tx_valid = 0; io_ip_tx_data = '0; io_ip_tx_last = 0; scen = '0;
    wait (rst_n);
    for (int p = 0; p < 60; p++) begin
      len = 1 + $urandom % 5;
      @(negedge clk);
      scen = LABEL_W'($urandom);
      io_exp_lbl.push_back(scen);
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        io_ip_tx_valid = 1; io_ip_tx_data = $urandom; io_ip_tx_last = (w == len - 1);
        io_exp_w.push_back(io_ip_tx_data);
        @(posedge clk);
        while (!io_ip_tx_ready) @(posedge clk);
        #1 io_ip_tx_valid = 0;
      end
    end
    io_done = 1;
  end
  always @(negedge clk) io_ip_rx_ready = ($urandom % 3) != 0;
  bit io_first = 1;
  always @(posedge clk) if (rst_n && io_ip_rx_valid && io_ip_rx_ready) begin
    checks++;
    if (io_exp_w.size() == 0) fail("io: extra word");
    else if (io_ip_rx_data != io_exp_w.pop_front()) fail("io: word differs");
    if (io_first) begin
      if (io_ip_rx_label != io_exp_lbl.pop_front()) fail("io: label is not the scenario");
      io_first = 0;
    end
    if (io_ip_rx_last) begin io_first = 1; io_pkts++; end
  end

  // ---------------- sequence ----------------
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_valid = 0; cfg_label = '0; cfg_new_label = '0;
    for (int l = 0; l < 16; l++) relabel[l] = LABEL_W'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int l = 0; l < 16; l++) begin
      @(negedge clk);
      cfg_we = 1; cfg_label = LABEL_W'(l); cfg_valid = 1; cfg_new_label = relabel[l];
    end
    @(negedge clk) cfg_we = 0;
    wait (pkts_out == NPKT && io_done && io_exp_w.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_words.size() != 0) fail("words left over");
    $display("packets relabelled=%0d headers held=%0d io packets=%0d", pkts_out, held_headers, io_pkts);
    checks++; if (held_headers == 0) fail("a header was never held off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
