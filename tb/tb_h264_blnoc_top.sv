// tb_h264_blnoc_top: end-to-end test of the H.264 coding-chain interconnect
// at its default size (3x3 mesh, 32-bit words, 4-bit labels).
//
// The testbench plays the set-up processor: it loads every router's
// switching table and every interface's relabel table for two scenarios,
// each a chain of cores that a packet visits in turn:
//   intra (labels 1..6):  in -> Intra-Coding -> DCT/Q -> Q^-1/DCT^-1
//                         -> Intra-Decoding -> Deblock-Filter -> out
//   inter (labels 8..14): in -> Memory -> Inter-Coding -> DCT/Q
//                         -> Q^-1/DCT^-1 -> Inter-Decoding -> Deblock-Filter -> out
// Each hop's label is routed along the X-then-Y path between the two nodes.
// Behavioural core models (tb_ip_model) sit on the eight core nodes. Packets
// of random length and scenario enter at the centre node; every packet
// leaving there must carry its scenario's last label and the words the
// chain of core functions gives, in order within its scenario.
// An interface holds one packet at a time and a circuit keeps its links
// while it waits, so chains whose circuits share links can wait on each
// other in a circle; the inter chain does (for example through the centre
// router's west output). The input therefore keeps at most MAX_INTRA intra
// and MAX_INTER inter packets in the network at once.
// Checked timing: the first header reaches the Intra-Coding interface two
// cycles after it is offered (two routers, one set-up cycle each).
// Counted, and each must happen: arbitration contention, a header held by
// another packet's reservation, back-pressure through a circuit, a label
// change in an interface, an interface holding off a packet while its core
// is busy, reservation release, packets of both scenarios.
module tb_h264_blnoc_top;
  import blnoc_pkg::*;
  localparam int unsigned ROWS = 3, COLS = 3, NODES = 9;
  localparam int unsigned DATA_W = 32, LABEL_W = 4;
  localparam int unsigned IO = 4;
  localparam int unsigned NPKT = 300;
  localparam int MAX_INTRA = 3, MAX_INTER = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic cfg_we, cfg_target, cfg_valid;
  logic [3:0] cfg_node;
  logic [LABEL_W-1:0] cfg_label, cfg_new_label, io_scenario;
  port_e cfg_port;
  logic [NODES-1:0] ip_rx_valid, ip_rx_last, ip_rx_ready, ip_tx_valid, ip_tx_last, ip_tx_ready;
  logic [NODES-1:0][DATA_W-1:0] ip_rx_data, ip_tx_data;
  logic [NODES-1:0][LABEL_W-1:0] ip_rx_label;

  h264_blnoc_top dut (.*);

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("ERR @%0d: %s", cyc, msg);
  endtask

  // node numbers
  localparam int INTER_COD = 0, INTRA_COD = 1, DCTQ = 2, INTER_DEC = 3,
                 IQIDCT = 5, MEM = 6, DBF = 7, INTRA_DEC = 8;
  localparam int CH_INTRA [5] = '{INTRA_COD, DCTQ, IQIDCT, INTRA_DEC, DBF};
  localparam int CH_INTER [6] = '{MEM, INTER_COD, DCTQ, IQIDCT, INTER_DEC, DBF};
  localparam int L_INTRA = 1, L_INTER = 8;

  function automatic logic [31:0] k_of(int n);
    return 32'h0102_0304 * (n + 1);
  endfunction
  function automatic logic [31:0] f(int n, logic [31:0] x);
    return {x[30:0], x[31]} + k_of(n);
  endfunction
  function automatic port_e xy(int n, int d);
    int r = n / COLS, c = n % COLS, dr = d / COLS, dc = d % COLS;
    if (dc > c) return PORT_E;
    if (dc < c) return PORT_W;
    if (dr > r) return PORT_S;
    if (dr < r) return PORT_N;
    return PORT_L;
  endfunction

  // ---- core models ----
  for (genvar n = 0; n < NODES; n++) begin : g_core
    if (n != IO) begin : g_m
      tb_ip_model #(.DATA_W(DATA_W), .K(32'h0102_0304 * (n + 1)), .LATENCY(2 + n)) u_core (
        .clk, .rst_n,
        .rx_valid(ip_rx_valid[n]), .rx_data(ip_rx_data[n]), .rx_last(ip_rx_last[n]), .rx_ready(ip_rx_ready[n]),
        .tx_valid(ip_tx_valid[n]), .tx_data(ip_tx_data[n]), .tx_last(ip_tx_last[n]), .tx_ready(ip_tx_ready[n]));
    end
  end

  // ---- configuration ----
  task automatic cfg_write(bit target, int node, int label, int port_or_label);
    @(negedge clk);
    cfg_we = 1; cfg_target = target; cfg_node = 4'(node); cfg_label = LABEL_W'(label);
    cfg_valid = 1; cfg_port = port_e'(target ? 0 : port_or_label);
    cfg_new_label = LABEL_W'(port_or_label);
    @(negedge clk) cfg_we = 0;
  endtask

  task automatic route_label(int label, int src, int dst);
    int n = src;
    port_e p;
    forever begin
      p = xy(n, dst);
      cfg_write(0, n, label, int'(p));
      if (p == PORT_L) break;
      case (p)
        PORT_E: n = n + 1;
        PORT_W: n = n - 1;
        PORT_S: n = n + COLS;
        default: n = n - COLS;
      endcase
    end
  endtask

  task automatic load_chain(int first_label, int chain[], int len);
    int prev = IO;
    for (int s = 0; s <= len; s++) begin
      int dst = (s == len) ? IO : chain[s];
      route_label(first_label + s, prev, dst);
      if (s < len) cfg_write(1, dst, first_label + s, first_label + s + 1);
      prev = dst;
    end
  endtask

  // ---- mechanism counters ----
  int n_contention = 0, n_blocked = 0, n_bp = 0, n_relabel = 0, n_held = 0, n_release = 0;
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      always @(posedge clk) if (rst_n) begin
        for (int o = 0; o < NUM_PORTS; o++) begin
          if ($countones(dut.u_mesh.g_row[r].g_col[c].u_blr.req[o]) > 1) n_contention++;
          if (dut.u_mesh.g_row[r].g_col[c].u_blr.rsv[o] && dut.u_mesh.g_row[r].g_col[c].u_blr.out_valid[o]
              && !dut.u_mesh.g_row[r].g_col[c].u_blr.out_ready[o]) n_bp++;
          if (dut.u_mesh.g_row[r].g_col[c].u_blr.tail_done[o]) n_release++;
        end
        for (int i = 0; i < NUM_PORTS; i++) begin
          // a header whose output is reserved by another packet
          if (dut.u_mesh.g_row[r].g_col[c].u_blr.in_valid[i]
              && dut.u_mesh.g_row[r].g_col[c].u_blr.in_type[i] == FLIT_HEAD
              && dut.u_mesh.g_row[r].g_col[c].u_blr.lk_valid[i]
              && dut.u_mesh.g_row[r].g_col[c].u_blr.rsv[dut.u_mesh.g_row[r].g_col[c].u_blr.lk_port[i]]
              && !dut.u_mesh.g_row[r].g_col[c].u_blr.in_busy[i]) n_blocked++;
        end
      end
    end
  end
  for (genvar n = 0; n < NODES; n++) begin : g_nic
    always @(posedge clk) if (rst_n) begin
      if (n != IO && dut.g_ni[n].u_ni.tx_valid && dut.g_ni[n].u_ni.tx_ready
          && dut.g_ni[n].u_ni.tx_type == FLIT_HEAD
          && dut.g_ni[n].u_ni.tx_data[LABEL_W-1:0] != dut.g_ni[n].u_ni.cur_label) n_relabel++;
      if (dut.g_ni[n].u_ni.rx_valid && !dut.g_ni[n].u_ni.rx_ready
          && dut.g_ni[n].u_ni.rx_st == dut.g_ni[n].u_ni.RX_HEAD) n_held++;
    end
  end

  // ---- video input at the centre node ----
  logic [31:0] exp_intra [$], exp_inter [$];
  int len_intra [$], len_inter [$];
  int n_in_intra = 0, n_in_inter = 0;
  int out_intra = 0, out_inter = 0, w_in_pkt = 0;
  bit in_done = 0;
  int t_first = -1;

  initial begin
    int len, scen;
    logic [31:0] x, y;
    ip_tx_valid[IO] = 0; ip_tx_data[IO] = '0; ip_tx_last[IO] = 0; io_scenario = '0;
    wait (rst_n);
    wait (cfg_done);
    for (int p = 0; p < NPKT; p++) begin
      len = 1 + $urandom % 16;
      scen = (p == 0) ? 0 : ($urandom % 2);
      // keep the chain free of circular waits: limit packets in flight
      while ((scen == 0 && n_in_intra - out_intra >= MAX_INTRA) ||
             (scen == 1 && n_in_inter - out_inter >= MAX_INTER)) @(negedge clk);
      @(negedge clk);
      io_scenario = LABEL_W'((scen != 0) ? L_INTER : L_INTRA);
      if (scen != 0) begin len_inter.push_back(len); n_in_inter++; end
      else begin len_intra.push_back(len); n_in_intra++; end
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        if (p > 0) while ($urandom % 4 == 0) @(negedge clk);
        x = $urandom;
        ip_tx_valid[IO] = 1; ip_tx_data[IO] = x; ip_tx_last[IO] = (w == len - 1);
        if (p == 0 && w == 0) t_first = cyc;
        y = x;
        if (scen != 0) begin
          foreach (CH_INTER[s]) y = f(CH_INTER[s], y);
          exp_inter.push_back(y);
        end else begin
          foreach (CH_INTRA[s]) y = f(CH_INTRA[s], y);
          exp_intra.push_back(y);
        end
        @(posedge clk);
        while (!ip_tx_ready[IO]) @(posedge clk);
        #1 ip_tx_valid[IO] = 0;
      end
    end
    in_done = 1;
  end

  // first header reaches Intra-Coding's interface two cycles after offered
  bit first_seen = 0;
  always @(posedge clk) if (!first_seen && t_first >= 0 && dut.g_ni[INTRA_COD].u_ni.rx_valid) begin
    first_seen = 1;
    checks++;
    if (cyc - t_first != 2) fail($sformatf("first header took %0d cycles to Intra-Coding, expected 2", cyc - t_first));
  end

  // ---- video output at the centre node ----
  always @(negedge clk) ip_rx_ready[IO] = ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && ip_rx_valid[IO] && ip_rx_ready[IO]) begin
    checks++;
    w_in_pkt++;
    if (ip_rx_label[IO] == LABEL_W'(L_INTRA + 5)) begin
      if (exp_intra.size() == 0) fail("unexpected intra word");
      else if (ip_rx_data[IO] != exp_intra.pop_front()) fail("intra result differs");
      if (ip_rx_last[IO]) begin
        if (len_intra.size() == 0 || w_in_pkt != len_intra.pop_front()) fail("intra packet length");
        out_intra++; w_in_pkt = 0;
      end
    end else if (ip_rx_label[IO] == LABEL_W'(L_INTER + 6)) begin
      if (exp_inter.size() == 0) fail("unexpected inter word");
      else if (ip_rx_data[IO] != exp_inter.pop_front()) fail("inter result differs");
      if (ip_rx_last[IO]) begin
        if (len_inter.size() == 0 || w_in_pkt != len_inter.pop_front()) fail("inter packet length");
        out_inter++; w_in_pkt = 0;
      end
    end else fail($sformatf("output label %0d", ip_rx_label[IO]));
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit cfg_done = 0;
  initial begin
    cfg_we = 0; cfg_target = 0; cfg_node = '0; cfg_label = '0; cfg_valid = 0;
    cfg_port = PORT_L; cfg_new_label = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    load_chain(L_INTRA, CH_INTRA, 5);
    load_chain(L_INTER, CH_INTER, 6);
    cfg_done = 1;
    wait (in_done && out_intra == n_in_intra && out_inter == n_in_inter);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_intra.size() != 0 || exp_inter.size() != 0) fail("words missing");
    $display("packets intra=%0d inter=%0d contention=%0d blocked=%0d backpressure=%0d relabel=%0d held=%0d released=%0d cycles=%0d",
             out_intra, out_inter, n_contention, n_blocked, n_bp, n_relabel, n_held, n_release, cyc);
    checks++; if (out_intra == 0 || out_inter == 0) fail("a scenario never ran");
    checks++; if (n_contention == 0) fail("no arbitration contention");
    checks++; if (n_blocked == 0) fail("no header waited on a reservation");
    checks++; if (n_bp == 0) fail("no back-pressure through a circuit");
    checks++; if (n_relabel == 0) fail("no label change");
    checks++; if (n_held == 0) fail("no interface held off a packet");
    checks++; if (n_release == 0) fail("no reservation released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
