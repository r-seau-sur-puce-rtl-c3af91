// tb_mesh_harness: traffic generator and checker for one buffer-less mesh
// of ROWS x COLS routers, used by tb_blnoc_mesh at several sizes.
// The switching tables are loaded so that label d means "deliver to node d"
// along the X-then-Y path (a table set-up a processor could load).
// 1. Directed: one packet from the north-west node to the south-east node
//    crosses ROWS+COLS-1 routers; its header must arrive that many cycles
//    after it is first offered (one set-up cycle per router) and the payload
//    must follow at one word per cycle.
// 2. Random: every node sends packets to random destinations while every
//    sink applies random back-pressure. Each sink must receive whole,
//    contiguous packets with its own label, words intact and in order per
//    source, and all packets must arrive. Headers held by another packet's
//    reservation and back-pressure stalls are counted; both must occur.
// Results are returned on checks/failures when done rises.
module tb_mesh_harness #(
  parameter int unsigned ROWS = 3,
  parameter int unsigned COLS = 3,
  parameter int unsigned NPKT = 80
) (
  output bit done,
  output int checks,
  output int failures
);
  import blnoc_pkg::*;
  localparam int unsigned NODES = ROWS * COLS;
  localparam int unsigned DATA_W = 32, LABEL_W = 4;
  localparam int unsigned NODE_W = (NODES > 1) ? $clog2(NODES) : 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic tbl_we, tbl_valid;
  logic [NODE_W-1:0] tbl_node;
  logic [LABEL_W-1:0] tbl_label;
  port_e tbl_port;
  logic       [NODES-1:0]             loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  flit_type_e [NODES-1:0]             loc_in_type, loc_out_type;
  logic       [NODES-1:0][DATA_W-1:0] loc_in_data, loc_out_data;

  blnoc_mesh #(.ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W), .LABEL_W(LABEL_W)) dut (.*);

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("ERR %0dx%0d @%0d: %s", ROWS, COLS, cyc, msg);
  endtask

  function automatic port_e xy(int n, int d);
    int r = n / COLS, c = n % COLS, dr = d / COLS, dc = d % COLS;
    if (dc > c) return PORT_E;
    if (dc < c) return PORT_W;
    if (dr > r) return PORT_S;
    if (dr < r) return PORT_N;
    return PORT_L;
  endfunction

  bit random_phase = 0;
  bit [NODES-1:0] src_done;
  int sent = 0, recvd = 0, n_blocked = 0, n_bp = 0;

  for (genvar s = 0; s < NODES; s++) begin : g_src
    initial begin
      int len, d;
      src_done[s] = 0;
      wait (random_phase);
      for (int p = 0; p < NPKT; p++) begin
        len = 1 + $urandom % 8;
        d = $urandom % NODES;
        for (int w = -1; w < len; w++) begin
          @(negedge clk);
          while ($urandom % 5 == 0) @(negedge clk);
          loc_in_valid[s] = 1;
          loc_in_type[s] = (w < 0) ? FLIT_HEAD : (w == len - 1) ? FLIT_TAIL : FLIT_BODY;
          loc_in_data[s] = (w < 0) ? DATA_W'(d) : {4'(s), 12'(p), 16'(w)};
          @(posedge clk);
          while (!loc_in_ready[s]) @(posedge clk);
          #1 loc_in_valid[s] = 0;
        end
        sent++;
      end
      src_done[s] = 1;
    end
  end

  for (genvar d = 0; d < NODES; d++) begin : g_sink
    bit in_pkt = 0;
    int cur_src = -1, pkt_no = 0, exp_w = 0;
    int last_seq [NODES];
    initial for (int k = 0; k < NODES; k++) last_seq[k] = -1;
    always @(negedge clk) if (random_phase) loc_out_ready[d] = ($urandom % 4) != 0;
    always @(posedge clk) if (random_phase && loc_out_valid[d]) begin
      if (!loc_out_ready[d]) n_bp++;
      else begin
        checks++;
        if (!in_pkt) begin
          if (loc_out_type[d] != FLIT_HEAD) fail($sformatf("node %0d: payload without header", d));
          if (loc_out_data[d] != DATA_W'(d)) fail($sformatf("node %0d: got label %0d", d, loc_out_data[d]));
          in_pkt = 1; cur_src = -1; exp_w = 0;
        end else begin
          if (cur_src < 0) begin
            cur_src = int'(loc_out_data[d][31:28]);
            pkt_no = int'(loc_out_data[d][27:16]);
            if (cur_src >= NODES || pkt_no <= last_seq[cur_src]) fail($sformatf("node %0d: order", d));
            else last_seq[cur_src] = pkt_no;
          end
          if (loc_out_data[d] != {4'(cur_src), 12'(pkt_no), 16'(exp_w)}) fail($sformatf("node %0d: word", d));
          exp_w++;
          if (loc_out_type[d] == FLIT_TAIL) begin in_pkt = 0; recvd++; end
        end
      end
    end
  end

  // headers held because their output is reserved by another packet
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      always @(posedge clk) if (random_phase) begin
        for (int i = 0; i < NUM_PORTS; i++) begin
          if (dut.g_row[r].g_col[c].u_blr.in_valid[i]
              && dut.g_row[r].g_col[c].u_blr.in_type[i] == FLIT_HEAD
              && dut.g_row[r].g_col[c].u_blr.lk_valid[i]
              && dut.g_row[r].g_col[c].u_blr.rsv[dut.g_row[r].g_col[c].u_blr.lk_port[i]]
              && !dut.g_row[r].g_col[c].u_blr.in_busy[i]) n_blocked++;
        end
      end
    end
  end

  initial begin
    int t0;
    done = 0; checks = 0; failures = 0;
    tbl_we = 0; tbl_valid = 0; tbl_node = '0; tbl_label = '0; tbl_port = PORT_L;
    loc_in_valid = '0; loc_in_type = {NODES{FLIT_BODY}}; loc_in_data = '0; loc_out_ready = '1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < NODES; n++) for (int d = 0; d < NODES; d++) begin
      @(negedge clk);
      tbl_we = 1; tbl_node = NODE_W'(n); tbl_label = LABEL_W'(d); tbl_valid = 1; tbl_port = xy(n, d);
    end
    @(negedge clk) tbl_we = 0;

    // ---- directed latency ----
    @(negedge clk);
    loc_in_valid[0] = 1; loc_in_type[0] = FLIT_HEAD; loc_in_data[0] = DATA_W'(NODES - 1);
    t0 = cyc;
    @(posedge clk); #1;
    while (!loc_out_valid[NODES-1]) begin @(posedge clk); #1; end
    checks++;
    if (cyc - t0 != ROWS + COLS - 1)
      fail($sformatf("%0dx%0d: header took %0d cycles over %0d routers", ROWS, COLS, cyc - t0, ROWS + COLS - 1));
    if (!loc_in_ready[0]) fail("header not taken when it arrived");
    @(posedge clk);
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      loc_in_type[0] = (w == 3) ? FLIT_TAIL : FLIT_BODY; loc_in_data[0] = 32'hB0 + w;
      #1;
      checks++;
      if (!loc_out_valid[NODES-1] || loc_out_data[NODES-1] != 32'hB0 + w || !loc_in_ready[0]) fail("payload not streamed");
      @(posedge clk);
    end
    @(negedge clk) loc_in_valid[0] = 0;

    // ---- random ----
    repeat (3) @(negedge clk);
    random_phase = 1;
    wait (src_done == '1);
    repeat (100) @(posedge clk);
    checks++;
    if (sent != NODES * NPKT || recvd != sent) fail($sformatf("sent %0d received %0d", sent, recvd));
    $display("%0dx%0d mesh: packets=%0d blocked-header cycles=%0d back-pressure cycles=%0d",
             ROWS, COLS, recvd, n_blocked, n_bp);
    checks++; if (n_blocked == 0) fail("no header was ever blocked");
    checks++; if (n_bp == 0) fail("no back-pressure");
    done = 1;
  end
endmodule
