// ble_host_model: behavioural model of the Bluetooth path between the two
// boards (each board's BLE module plus the relaying host), for testbenches
// only. It decodes bytes sent by one board (start, 8 data bits LSB first,
// stop; no parity) and sends each one on to the other board as a frame with
// an even-parity bit, as the host does, CLKS_PER_BAUD clocks per bit.
// `relayed` counts forwarded bytes.
module ble_host_model #(
  parameter int CLKS_PER_BAUD = 868
) (
  input  logic clk,
  input  logic from_tx,
  output logic to_rx,
  output int   relayed
);
  logic [7:0] q [$];

  initial begin
    logic [7:0] b;
    forever begin
      @(negedge from_tx);
      repeat (CLKS_PER_BAUD / 2) @(posedge clk);
      if (from_tx == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (CLKS_PER_BAUD) @(posedge clk);
          b[i] = from_tx;
        end
        repeat (CLKS_PER_BAUD) @(posedge clk);
        if (from_tx == 1'b1) q.push_back(b);
      end
    end
  end

  initial begin
    logic [7:0] b;
    logic [10:0] f;
    to_rx   = 1'b1;
    relayed = 0;
    forever begin
      @(posedge clk);
      if (q.size() > 0) begin
        b = q.pop_front();
        f = {1'b1, ^b, b, 1'b0};
        for (int i = 0; i < 11; i++) begin
          to_rx = f[i];
          repeat (CLKS_PER_BAUD) @(posedge clk);
        end
        relayed++;
      end
    end
  end
endmodule
