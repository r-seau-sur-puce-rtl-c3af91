// blr_rr_arbiter: round-robin arbiter guarding one router output.
//
// Among the asserted requests it grants the first one at or after the
// priority pointer, wrapping around: requests at or above the pointer are
// tried first (lowest index wins), and only if there are none the lowest
// request overall wins. When the grant is used (adv high) the pointer moves
// to the input just after the winner, so a requester waits at most N-1
// grants. The grant is combinational from req and the pointer; the pointer
// is the only state and resets to input 0.
// The router's arbitration is round robin as the design calls for; the
// pointer-after-winner rule is this implementation's choice.
module blr_rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         adv,
  output logic [N-1:0] grant
);

  logic [N-1:0] ptr_mask;   // one bit per input at or above the pointer
  logic [N-1:0] hi_req;
  logic [N-1:0] hi_gnt, lo_gnt;
  logic [N-1:0] next_mask;

  assign hi_req = req & ptr_mask;

  // lowest set bit of a vector
  function automatic logic [N-1:0] lowest(logic [N-1:0] v);
    return v & (~v + 1'b1);
  endfunction

  always_comb begin
    hi_gnt = lowest(hi_req);
    lo_gnt = lowest(req);
    grant  = (hi_req != '0) ? hi_gnt : lo_gnt;
    // inputs strictly above the winner; all inputs if the winner is the last
    next_mask = ~((grant << 1) - 1'b1);
    if (next_mask == '0) next_mask = '1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr_mask <= '1;
    end else if (adv && (req != '0)) begin
      ptr_mask <= next_mask;
    end
  end

endmodule
