// blr_switch_table: the switching table of a buffer-less router.
//
// One entry per label holds a valid bit and the output port that packets
// with that label leave by. The set-up processor writes one entry per clock
// (we, wr_label, wr_valid, wr_port); the entry is visible from the next
// cycle. Each of the NUM_RD router inputs reads its own entry
// combinationally, so a header's output is known in the cycle it arrives.
// All entries reset to invalid. The table's function is the design's; its
// form (valid bit, combinational multi-port read) is this implementation's.
module blr_switch_table
  import blnoc_pkg::*;
#(
  parameter int unsigned LABEL_W = 4,
  parameter int unsigned NUM_RD  = 5
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            we,
  input  logic [LABEL_W-1:0]              wr_label,
  input  logic                            wr_valid,
  input  port_e                           wr_port,
  input  logic [NUM_RD-1:0][LABEL_W-1:0]  rd_label,
  output logic [NUM_RD-1:0]               rd_valid,
  output port_e [NUM_RD-1:0]              rd_port
);

  localparam int unsigned DEPTH = 1 << LABEL_W;

  logic  [DEPTH-1:0] ent_valid;
  port_e [DEPTH-1:0] ent_port;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ent_valid <= '0;
      ent_port  <= {DEPTH{PORT_L}};
    end else if (we) begin
      ent_valid[wr_label] <= wr_valid;
      ent_port[wr_label]  <= wr_port;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NUM_RD; i++) begin
      rd_valid[i] = ent_valid[rd_label[i]];
      rd_port[i]  = ent_port[rd_label[i]];
    end
  end

endmodule
