// blr_router: buffer-less router (BLR) of the video network-on-chip.
//
// The router has five ports (North, East, South, West and the local IP port)
// and holds no flit storage: it is a switching table, a crossbar and, per
// output, a one-bit reservation with the index of the input that owns it.
//
// Operation (circuit switching on labels):
//  * A header flit waiting at an input reads the switching table with its
//    label and requests the output the table names.
//  * Each free output grants one requester through a round-robin arbiter and
//    is reserved for it at the next clock edge. The header therefore crosses
//    one cycle after it won (one cycle of set-up per hop); while it waits the
//    input is held off with ready low.
//  * While reserved, the output is wired to its owner through the crossbar:
//    body flits stream through at one per cycle with no register on the path,
//    and the valid/ready handshake runs straight through.
//  * The reservation is dropped when the tail flit is handed on.
// A header whose label has no valid table entry waits until one is written.
//
// Interface: flits in and out on valid/type/data with ready, indexed by
// blnoc_pkg::port_e; table writes on tbl_*. Inputs are ignored in reset.
//
// Following the design: label switching table instead of XY routing,
// crossbar without buffers, valid/ready handshake flow control and round-
// robin arbitration. This implementation's choices: reservation per output
// from header to tail, one set-up cycle per hop, stall on an unknown label.
// Because routers pass valid forward and ready backward without registers, a
// mesh of them has combinational paths that close on themselves through the
// crossbars (for instance around a ring of four routers). No circuit
// actually uses such a loop unless the tables route a packet in a circle.
module blr_router
  import blnoc_pkg::*;
#(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned LABEL_W = 4
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // switching-table write
  input  logic                                   tbl_we,
  input  logic       [LABEL_W-1:0]               tbl_label,
  input  logic                                   tbl_valid,
  input  port_e                                  tbl_port,
  // inputs
  input  logic       [NUM_PORTS-1:0]             in_valid,
  input  flit_type_e [NUM_PORTS-1:0]             in_type,
  input  logic       [NUM_PORTS-1:0][DATA_W-1:0] in_data,
  output logic       [NUM_PORTS-1:0]             in_ready,
  // outputs
  output logic       [NUM_PORTS-1:0]             out_valid,
  output flit_type_e [NUM_PORTS-1:0]             out_type,
  output logic       [NUM_PORTS-1:0][DATA_W-1:0] out_data,
  input  logic       [NUM_PORTS-1:0]             out_ready
);

  // reservation state per output
  logic  [NUM_PORTS-1:0] rsv;
  port_e [NUM_PORTS-1:0] owner;

  // table look-up per input
  logic  [NUM_PORTS-1:0][LABEL_W-1:0] lk_label;
  logic  [NUM_PORTS-1:0]              lk_valid;
  port_e [NUM_PORTS-1:0]              lk_port;

  always_comb begin
    for (int unsigned i = 0; i < NUM_PORTS; i++) begin
      lk_label[i] = in_data[i][LABEL_W-1:0];
    end
  end

  blr_switch_table #(
    .LABEL_W (LABEL_W),
    .NUM_RD  (NUM_PORTS)
  ) u_table (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (tbl_we),
    .wr_label (tbl_label),
    .wr_valid (tbl_valid),
    .wr_port  (tbl_port),
    .rd_label (lk_label),
    .rd_valid (lk_valid),
    .rd_port  (lk_port)
  );

  // an input already connected through some output
  logic [NUM_PORTS-1:0] in_busy;
  always_comb begin
    in_busy = '0;
    for (int unsigned o = 0; o < NUM_PORTS; o++) begin
      if (rsv[o]) in_busy[owner[o]] = 1'b1;
    end
  end

  // requests: req[o][i]
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] req;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] gnt;
  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++) begin
      for (int unsigned i = 0; i < NUM_PORTS; i++) begin
        req[o][i] = !rsv[o] && in_valid[i] && (in_type[i] == FLIT_HEAD)
                    && !in_busy[i] && lk_valid[i]
                    && (int'(lk_port[i]) == int'(o));
      end
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_arb
    blr_rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk   (clk),
      .rst_n (rst_n),
      .req   (req[o]),
      .adv   (1'b1),
      .grant (gnt[o])
    );
  end

  // reservation update
  logic [NUM_PORTS-1:0] tail_done;
  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++) begin
      tail_done[o] = rsv[o] && out_valid[o] && out_ready[o]
                     && (out_type[o] == FLIT_TAIL);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsv   <= '0;
      owner <= {NUM_PORTS{PORT_L}};
    end else begin
      for (int unsigned o = 0; o < NUM_PORTS; o++) begin
        if (tail_done[o]) begin
          rsv[o] <= 1'b0;
        end else if (!rsv[o] && (gnt[o] != '0)) begin
          rsv[o] <= 1'b1;
          for (int unsigned i = 0; i < NUM_PORTS; i++) begin
            if (gnt[o][i]) owner[o] <= port_e'(i);
          end
        end
      end
    end
  end

  blr_crossbar #(.DATA_W(DATA_W)) u_xbar (
    .sel       (owner),
    .en        (rsv),
    .in_valid  (in_valid),
    .in_type   (in_type),
    .in_data   (in_data),
    .in_ready  (in_ready),
    .out_valid (out_valid),
    .out_type  (out_type),
    .out_data  (out_data),
    .out_ready (out_ready)
  );

  // A flit offered and not taken must stay the same until it is taken.
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid[p] && !out_ready[p]) |=> (out_valid[p] && out_type[p] == $past(out_type[p])
                                           && out_data[p] == $past(out_data[p])))
      else $error("blr_router: output %0d changed a flit before it was taken", p);
  end

endmodule
