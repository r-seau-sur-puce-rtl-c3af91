// blnoc_ni: network interface between an H.264 IP core and its router.
//
// The interface turns packets into plain data streams and back, and it is
// where a packet's label changes from one processing stage to the next.
//
// Receive side (router -> IP): a header flit is taken, its label kept in
// ip_rx_label, and the body and tail flits are passed to the IP as a word
// stream (ip_rx_*), ip_rx_last marking the tail's word. The header is not
// forwarded.
// Send side (IP -> router): when the IP offers its first result word the
// interface first sends a header whose label is the relabel-table entry of
// the label that arrived (or ext_label when EXT_LABEL is set), then the
// words as body flits, the word flagged ip_tx_last as the tail.
//
// With EXT_LABEL = 0 one packet is in flight per IP: a new header is taken
// only after the result of the previous packet has left, so the arriving
// label needs no queue. With EXT_LABEL = 1 (the node where video enters and
// leaves the network) both sides run independently and every packet sent is
// labelled with ext_label, the scenario it belongs to.
//
// Because a waiting header keeps the links it has reserved, label paths
// whose circuits share links can wait on each other in a circle through
// interfaces that are holding packets; traffic must be mapped or metered so
// that this cannot close.
// The relabel table (one entry and a valid bit per label) is written by the
// set-up processor on cfg_*; a result waits while its entry is invalid.
// Timing: no register on the data path; the header costs one cycle on the
// send side; words pass in the cycle they are offered.
// The design's: header/payload/tail packets, label assignment and label
// change in the interface. This implementation's: the relabel table, one
// packet in flight, the tail carrying the last word.
module blnoc_ni
  import blnoc_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned LABEL_W   = 4,
  parameter bit          EXT_LABEL = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  // relabel-table write
  input  logic               cfg_we,
  input  logic [LABEL_W-1:0] cfg_label,
  input  logic               cfg_valid,
  input  logic [LABEL_W-1:0] cfg_new_label,
  // from the router's IP output
  input  logic               rx_valid,
  input  flit_type_e         rx_type,
  input  logic [DATA_W-1:0]  rx_data,
  output logic               rx_ready,
  // to the router's IP input
  output logic               tx_valid,
  output flit_type_e         tx_type,
  output logic [DATA_W-1:0]  tx_data,
  input  logic               tx_ready,
  // payload to the IP
  output logic               ip_rx_valid,
  output logic [DATA_W-1:0]  ip_rx_data,
  output logic               ip_rx_last,
  output logic [LABEL_W-1:0] ip_rx_label,
  input  logic               ip_rx_ready,
  // result from the IP
  input  logic               ip_tx_valid,
  input  logic [DATA_W-1:0]  ip_tx_data,
  input  logic               ip_tx_last,
  output logic               ip_tx_ready,
  // label of outgoing packets when EXT_LABEL is set
  input  logic [LABEL_W-1:0] ext_label
);

  localparam int unsigned DEPTH = 1 << LABEL_W;

  typedef enum logic {RX_HEAD, RX_PAYLOAD} rx_state_e;
  typedef enum logic {TX_HEAD, TX_PAYLOAD} tx_state_e;

  rx_state_e rx_st;
  tx_state_e tx_st;
  logic [LABEL_W-1:0] cur_label;
  logic               pending;

  // relabel table
  logic [DEPTH-1:0]              rl_valid;
  logic [DEPTH-1:0][LABEL_W-1:0] rl_label;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rl_valid <= '0;
      rl_label <= '0;
    end else if (cfg_we) begin
      rl_valid[cfg_label] <= cfg_valid;
      rl_label[cfg_label] <= cfg_new_label;
    end
  end

  // ---------------- receive side ----------------
  logic head_ok;
  assign head_ok = EXT_LABEL || !pending;

  always_comb begin
    if (rx_st == RX_HEAD) begin
      rx_ready    = head_ok;
      ip_rx_valid = 1'b0;
    end else begin
      rx_ready    = ip_rx_ready;
      ip_rx_valid = rx_valid;
    end
  end
  assign ip_rx_data  = rx_data;
  assign ip_rx_last  = (rx_type == FLIT_TAIL);
  assign ip_rx_label = cur_label;

  logic head_in, tail_in;
  assign head_in = (rx_st == RX_HEAD) && rx_valid && rx_ready && (rx_type == FLIT_HEAD);
  assign tail_in = (rx_st == RX_PAYLOAD) && rx_valid && rx_ready && (rx_type == FLIT_TAIL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_st     <= RX_HEAD;
      cur_label <= '0;
    end else if (head_in) begin
      rx_st     <= RX_PAYLOAD;
      cur_label <= rx_data[LABEL_W-1:0];
    end else if (tail_in) begin
      rx_st     <= RX_HEAD;
    end
  end

  // ---------------- send side ----------------
  logic               lbl_ok;
  logic [LABEL_W-1:0] out_label;
  always_comb begin
    if (EXT_LABEL) begin
      lbl_ok    = 1'b1;
      out_label = ext_label;
    end else begin
      lbl_ok    = pending && rl_valid[cur_label];
      out_label = rl_label[cur_label];
    end
  end

  always_comb begin
    if (tx_st == TX_HEAD) begin
      tx_valid    = ip_tx_valid && lbl_ok;
      tx_type     = FLIT_HEAD;
      tx_data     = DATA_W'(out_label);
      ip_tx_ready = 1'b0;
    end else begin
      tx_valid    = ip_tx_valid;
      tx_type     = ip_tx_last ? FLIT_TAIL : FLIT_BODY;
      tx_data     = ip_tx_data;
      ip_tx_ready = tx_ready;
    end
  end

  logic tail_out;
  assign tail_out = (tx_st == TX_PAYLOAD) && tx_valid && tx_ready && (tx_type == FLIT_TAIL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_st <= TX_HEAD;
    end else if ((tx_st == TX_HEAD) && tx_valid && tx_ready) begin
      tx_st <= TX_PAYLOAD;
    end else if (tail_out) begin
      tx_st <= TX_HEAD;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending <= 1'b0;
    end else if (!EXT_LABEL) begin
      if (head_in) pending <= 1'b1;
      else if (tail_out) pending <= 1'b0;
    end
  end

  // A header may only arrive between packets.
  assert property (@(posedge clk) disable iff (!rst_n)
    (rx_valid && rx_st == RX_HEAD) |-> (rx_type == FLIT_HEAD))
    else $error("blnoc_ni: payload flit arrived without a header");

endmodule
