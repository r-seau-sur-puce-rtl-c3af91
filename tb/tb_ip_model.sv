// tb_ip_model: behavioural stand-in for an H.264 processing core.
// Not a model of any real coding step: it only behaves like a core on the
// network interface's IP side. It takes one payload (a word stream ended by
// last) with random stalls, waits LATENCY cycles, then returns one result
// word per input word, y = rotate_left(x, 1) + K, again with random stalls.
// The rotate makes the order of stages in a chain visible in the result.
module tb_ip_model #(
  parameter int unsigned DATA_W  = 32,
  parameter logic [31:0] K       = 32'h0,
  parameter int unsigned LATENCY = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_valid,
  input  logic [DATA_W-1:0] rx_data,
  input  logic              rx_last,
  output logic              rx_ready,
  output logic              tx_valid,
  output logic [DATA_W-1:0] tx_data,
  output logic              tx_last,
  input  logic              tx_ready
);
  logic [DATA_W-1:0] buf_q [$];
  int n_packets = 0;

  initial begin
    bit last;
    rx_ready = 0; tx_valid = 0; tx_data = '0; tx_last = 0;
    wait (rst_n);
    forever begin
      buf_q.delete();
      last = 0;
      while (!last) begin
        @(negedge clk);
        rx_ready = ($urandom % 4) != 0;
        @(posedge clk);
        if (rx_valid && rx_ready) begin
          buf_q.push_back({rx_data[DATA_W-2:0], rx_data[DATA_W-1]} + DATA_W'(K));
          last = rx_last;
        end
      end
      @(negedge clk) rx_ready = 0;
      repeat (LATENCY) @(posedge clk);
      for (int w = 0; w < buf_q.size(); w++) begin
        @(negedge clk);
        while ($urandom % 5 == 0) @(negedge clk);
        tx_valid = 1; tx_data = buf_q[w]; tx_last = (w == buf_q.size() - 1);
        @(posedge clk);
        while (!tx_ready) @(posedge clk);
        #1 tx_valid = 0;
      end
      n_packets++;
    end
  end
endmodule
