// blnoc_mesh: ROWS x COLS mesh of buffer-less routers.
//
// Router n = r*COLS + c sits in row r (row 0 on top, north) and column c
// (column 0 on the west). Each pair of neighbours is joined by two one-way
// flit links, one in each direction: the north output of (r,c) feeds the
// south input of (r-1,c), the east output feeds the west input of (r,c+1),
// and so on. Ports on the edge of the mesh lead nowhere: their inputs
// present no flit and their outputs are never ready, so a packet routed off
// the edge by a wrong table entry stalls instead of vanishing.
// The local (IP) port of every router is brought out as loc_in_* / loc_out_*.
// Switching-table writes are broadcast with the router index tbl_node.
// Timing: no register between routers. Valid and data run forward and ready
// runs backward through every router of a circuit in the same cycle, so the
// clock period grows with the longest circuit. Because each router's
// crossbar can connect any input to any output, the link wires form
// combinational cycles around the mesh as far as a lint tool can tell (it
// reports circular logic on the link arrays); a signal only goes round such
// a cycle if the switching tables send a packet in a circle.
// The 2D mesh of buffer-less routers is the design's; the wiring of edge
// ports and the table-write bus are this implementation's.
module blnoc_mesh
  import blnoc_pkg::*;
#(
  parameter int unsigned ROWS    = 3,
  parameter int unsigned COLS    = 3,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned LABEL_W = 4,
  localparam int unsigned NODES  = ROWS * COLS,
  localparam int unsigned NODE_W = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // switching-table write
  input  logic                               tbl_we,
  input  logic       [NODE_W-1:0]            tbl_node,
  input  logic       [LABEL_W-1:0]           tbl_label,
  input  logic                               tbl_valid,
  input  port_e                              tbl_port,
  // local ports
  input  logic       [NODES-1:0]             loc_in_valid,
  input  flit_type_e [NODES-1:0]             loc_in_type,
  input  logic       [NODES-1:0][DATA_W-1:0] loc_in_data,
  output logic       [NODES-1:0]             loc_in_ready,
  output logic       [NODES-1:0]             loc_out_valid,
  output flit_type_e [NODES-1:0]             loc_out_type,
  output logic       [NODES-1:0][DATA_W-1:0] loc_out_data,
  input  logic       [NODES-1:0]             loc_out_ready
);

  logic       [NODES-1:0][NUM_PORTS-1:0]             r_in_valid;
  flit_type_e [NODES-1:0][NUM_PORTS-1:0]             r_in_type;
  logic       [NODES-1:0][NUM_PORTS-1:0][DATA_W-1:0] r_in_data;
  logic       [NODES-1:0][NUM_PORTS-1:0]             r_in_ready;
  logic       [NODES-1:0][NUM_PORTS-1:0]             r_out_valid;
  flit_type_e [NODES-1:0][NUM_PORTS-1:0]             r_out_type;
  logic       [NODES-1:0][NUM_PORTS-1:0][DATA_W-1:0] r_out_data;
  logic       [NODES-1:0][NUM_PORTS-1:0]             r_out_ready;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned N = r * COLS + c;

      // neighbour index of each direction (only used where it exists)
      localparam int unsigned NB_N = (r > 0)        ? N - COLS : N;
      localparam int unsigned NB_S = (r < ROWS - 1) ? N + COLS : N;
      localparam int unsigned NB_E = (c < COLS - 1) ? N + 1    : N;
      localparam int unsigned NB_W = (c > 0)        ? N - 1    : N;

      // ---- inputs of router N: neighbour's facing output ----
      if (r > 0) begin : g_in_n
        assign r_in_valid[N][PORT_N] = r_out_valid[NB_N][PORT_S];
        assign r_in_type [N][PORT_N] = r_out_type [NB_N][PORT_S];
        assign r_in_data [N][PORT_N] = r_out_data [NB_N][PORT_S];
        assign r_out_ready[NB_N][PORT_S] = r_in_ready[N][PORT_N];
      end else begin : g_edge_n
        assign r_in_valid[N][PORT_N] = 1'b0;
        assign r_in_type [N][PORT_N] = FLIT_BODY;
        assign r_in_data [N][PORT_N] = '0;
        assign r_out_ready[N][PORT_N] = 1'b0;
      end
      if (r < ROWS - 1) begin : g_in_s
        assign r_in_valid[N][PORT_S] = r_out_valid[NB_S][PORT_N];
        assign r_in_type [N][PORT_S] = r_out_type [NB_S][PORT_N];
        assign r_in_data [N][PORT_S] = r_out_data [NB_S][PORT_N];
        assign r_out_ready[NB_S][PORT_N] = r_in_ready[N][PORT_S];
      end else begin : g_edge_s
        assign r_in_valid[N][PORT_S] = 1'b0;
        assign r_in_type [N][PORT_S] = FLIT_BODY;
        assign r_in_data [N][PORT_S] = '0;
        assign r_out_ready[N][PORT_S] = 1'b0;
      end
      if (c < COLS - 1) begin : g_in_e
        assign r_in_valid[N][PORT_E] = r_out_valid[NB_E][PORT_W];
        assign r_in_type [N][PORT_E] = r_out_type [NB_E][PORT_W];
        assign r_in_data [N][PORT_E] = r_out_data [NB_E][PORT_W];
        assign r_out_ready[NB_E][PORT_W] = r_in_ready[N][PORT_E];
      end else begin : g_edge_e
        assign r_in_valid[N][PORT_E] = 1'b0;
        assign r_in_type [N][PORT_E] = FLIT_BODY;
        assign r_in_data [N][PORT_E] = '0;
        assign r_out_ready[N][PORT_E] = 1'b0;
      end
      if (c > 0) begin : g_in_w
        assign r_in_valid[N][PORT_W] = r_out_valid[NB_W][PORT_E];
        assign r_in_type [N][PORT_W] = r_out_type [NB_W][PORT_E];
        assign r_in_data [N][PORT_W] = r_out_data [NB_W][PORT_E];
        assign r_out_ready[NB_W][PORT_E] = r_in_ready[N][PORT_W];
      end else begin : g_edge_w
        assign r_in_valid[N][PORT_W] = 1'b0;
        assign r_in_type [N][PORT_W] = FLIT_BODY;
        assign r_in_data [N][PORT_W] = '0;
        assign r_out_ready[N][PORT_W] = 1'b0;
      end

      // ---- local port ----
      assign r_in_valid[N][PORT_L] = loc_in_valid[N];
      assign r_in_type [N][PORT_L] = loc_in_type[N];
      assign r_in_data [N][PORT_L] = loc_in_data[N];
      assign loc_in_ready[N]       = r_in_ready[N][PORT_L];
      assign loc_out_valid[N]      = r_out_valid[N][PORT_L];
      assign loc_out_type[N]       = r_out_type[N][PORT_L];
      assign loc_out_data[N]       = r_out_data[N][PORT_L];
      assign r_out_ready[N][PORT_L] = loc_out_ready[N];

      blr_router #(
        .DATA_W  (DATA_W),
        .LABEL_W (LABEL_W)
      ) u_blr (
        .clk       (clk),
        .rst_n     (rst_n),
        .tbl_we    (tbl_we && (int'(tbl_node) == int'(N))),
        .tbl_label (tbl_label),
        .tbl_valid (tbl_valid),
        .tbl_port  (tbl_port),
        .in_valid  (r_in_valid[N]),
        .in_type   (r_in_type[N]),
        .in_data   (r_in_data[N]),
        .in_ready  (r_in_ready[N]),
        .out_valid (r_out_valid[N]),
        .out_type  (r_out_type[N]),
        .out_data  (r_out_data[N]),
        .out_ready (r_out_ready[N])
      );
    end
  end

endmodule
