// h264_blnoc_top: H.264/AVC coding-chain interconnect on a buffer-less NoC.
//
// A ROWS x COLS mesh of buffer-less routers (blnoc_mesh) with one network
// interface (blnoc_ni) per router. In the default 3x3 layout the nodes serve,
// row by row from the north-west corner:
//   0 Inter-Coding    1 Intra-Coding    2 DCT/Q
//   3 Inter-Decoding  4 Input/Output    5 Q^-1/DCT^-1
//   6 Memory          7 Deblock-Filter  8 Intra-Decoding
// The H.264 cores themselves are outside this module: for each node the
// network interface's IP side is brought out (ip_rx_* towards the core,
// ip_tx_* from it). Node IO_NODE is where raw video enters (ip_tx_*) and
// finished data leaves (ip_rx_*); its interface labels every entering packet
// with io_scenario, the label that selects the processing chain.
//
// Operation: a set-up processor first writes, on cfg_*, the switching table
// of every router (cfg_target = 0: label -> output port) and the relabel
// table of every interface (cfg_target = 1: arriving label -> label of the
// result). A packet then follows its label from the input to the first core;
// the core's result leaves with the next label, and so on to the output.
// Different scenarios (labels) can share cores, such as DCT/Q for intra and
// inter coding.
// Timing: no flit register anywhere on the path; each router hop costs one
// clock to reserve the output when a header passes, after which words
// stream at one per clock end to end.
// The mesh, node placement, label switching and label change in the network
// interfaces follow the design; the configuration bus and the relabel tables
// are this implementation's.
module h264_blnoc_top
  import blnoc_pkg::*;
#(
  parameter int unsigned ROWS    = 3,
  parameter int unsigned COLS    = 3,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned LABEL_W = 4,
  parameter int unsigned IO_NODE = 4,
  localparam int unsigned NODES  = ROWS * COLS,
  localparam int unsigned NODE_W = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // configuration by the set-up processor
  input  logic                               cfg_we,
  input  logic                               cfg_target,    // 0 router table, 1 NI relabel
  input  logic       [NODE_W-1:0]            cfg_node,
  input  logic       [LABEL_W-1:0]           cfg_label,
  input  logic                               cfg_valid,
  input  port_e                              cfg_port,
  input  logic       [LABEL_W-1:0]           cfg_new_label,
  // per node: payload towards the core (node IO_NODE: video output)
  output logic       [NODES-1:0]              ip_rx_valid,
  output logic       [NODES-1:0][DATA_W-1:0]  ip_rx_data,
  output logic       [NODES-1:0]              ip_rx_last,
  output logic       [NODES-1:0][LABEL_W-1:0] ip_rx_label,
  input  logic       [NODES-1:0]              ip_rx_ready,
  // per node: results from the core (node IO_NODE: video input)
  input  logic       [NODES-1:0]              ip_tx_valid,
  input  logic       [NODES-1:0][DATA_W-1:0]  ip_tx_data,
  input  logic       [NODES-1:0]              ip_tx_last,
  output logic       [NODES-1:0]              ip_tx_ready,
  // scenario label of packets entering at IO_NODE
  input  logic       [LABEL_W-1:0]            io_scenario
);

  logic       [NODES-1:0]             li_valid;
  flit_type_e [NODES-1:0]             li_type;
  logic       [NODES-1:0][DATA_W-1:0] li_data;
  logic       [NODES-1:0]             li_ready;
  logic       [NODES-1:0]             lo_valid;
  flit_type_e [NODES-1:0]             lo_type;
  logic       [NODES-1:0][DATA_W-1:0] lo_data;
  logic       [NODES-1:0]             lo_ready;

  blnoc_mesh #(
    .ROWS    (ROWS),
    .COLS    (COLS),
    .DATA_W  (DATA_W),
    .LABEL_W (LABEL_W)
  ) u_mesh (
    .clk           (clk),
    .rst_n         (rst_n),
    .tbl_we        (cfg_we && !cfg_target),
    .tbl_node      (cfg_node),
    .tbl_label     (cfg_label),
    .tbl_valid     (cfg_valid),
    .tbl_port      (cfg_port),
    .loc_in_valid  (li_valid),
    .loc_in_type   (li_type),
    .loc_in_data   (li_data),
    .loc_in_ready  (li_ready),
    .loc_out_valid (lo_valid),
    .loc_out_type  (lo_type),
    .loc_out_data  (lo_data),
    .loc_out_ready (lo_ready)
  );

  for (genvar n = 0; n < NODES; n++) begin : g_ni
    blnoc_ni #(
      .DATA_W    (DATA_W),
      .LABEL_W   (LABEL_W),
      .EXT_LABEL (n == IO_NODE)
    ) u_ni (
      .clk           (clk),
      .rst_n         (rst_n),
      .cfg_we        (cfg_we && cfg_target && (int'(cfg_node) == n)),
      .cfg_label     (cfg_label),
      .cfg_valid     (cfg_valid),
      .cfg_new_label (cfg_new_label),
      .rx_valid      (lo_valid[n]),
      .rx_type       (lo_type[n]),
      .rx_data       (lo_data[n]),
      .rx_ready      (lo_ready[n]),
      .tx_valid      (li_valid[n]),
      .tx_type       (li_type[n]),
      .tx_data       (li_data[n]),
      .tx_ready      (li_ready[n]),
      .ip_rx_valid   (ip_rx_valid[n]),
      .ip_rx_data    (ip_rx_data[n]),
      .ip_rx_last    (ip_rx_last[n]),
      .ip_rx_label   (ip_rx_label[n]),
      .ip_rx_ready   (ip_rx_ready[n]),
      .ip_tx_valid   (ip_tx_valid[n]),
      .ip_tx_data    (ip_tx_data[n]),
      .ip_tx_last    (ip_tx_last[n]),
      .ip_tx_ready   (ip_tx_ready[n]),
      .ext_label     (io_scenario)
    );
  end

endmodule
