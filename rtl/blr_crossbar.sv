// blr_crossbar: the 5x5 crossbar of a buffer-less router.
//
// Each output o is either idle (en[o] low) or connected to input sel[o].
// A connected output shows that input's flit (valid, type, data) and the
// input sees the output's ready, so the valid/ready handshake runs end to end
// through the switch with no storage in it. An input connected to no output
// is not ready. The controller guarantees that at most one output selects a
// given input. Purely combinational; the multiplexer structure is this
// implementation's, the crossbar itself is the design's.
module blr_crossbar
  import blnoc_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  port_e      [NUM_PORTS-1:0]             sel,
  input  logic       [NUM_PORTS-1:0]             en,
  input  logic       [NUM_PORTS-1:0]             in_valid,
  input  flit_type_e [NUM_PORTS-1:0]             in_type,
  input  logic       [NUM_PORTS-1:0][DATA_W-1:0] in_data,
  output logic       [NUM_PORTS-1:0]             in_ready,
  output logic       [NUM_PORTS-1:0]             out_valid,
  output flit_type_e [NUM_PORTS-1:0]             out_type,
  output logic       [NUM_PORTS-1:0][DATA_W-1:0] out_data,
  input  logic       [NUM_PORTS-1:0]             out_ready
);

  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = en[o] && in_valid[sel[o]];
      out_type[o]  = in_type[sel[o]];
      out_data[o]  = en[o] ? in_data[sel[o]] : '0;
    end
  end

  always_comb begin
    in_ready = '0;
    for (int unsigned i = 0; i < NUM_PORTS; i++) begin
      for (int unsigned o = 0; o < NUM_PORTS; o++) begin
        if (en[o] && (int'(sel[o]) == int'(i)) && out_ready[o]) begin
          in_ready[i] = 1'b1;
        end
      end
    end
  end

endmodule
