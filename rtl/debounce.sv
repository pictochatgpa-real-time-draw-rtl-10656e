// debounce: cleans a mechanical push-button signal.
//
// The raw input is first passed through two flip-flops to bring it into the
// clock domain. The output follows the input only after the synchronised
// input has held a new level for DEBOUNCE_CYCLES consecutive cycles
// (10 ms at 100 MHz by default). The block diagram places one such filter on
// each button used; its inner workings and the 10 ms window are this
// design's choice. Latency from a stable change to the output is
// DEBOUNCE_CYCLES + 2 cycles. Reset is synchronous and clears the output.
module debounce #(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic btn_in,
  output logic btn_out
);
  localparam int unsigned CW = $clog2(DEBOUNCE_CYCLES + 1);

  logic          s0, s1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      s0      <= 1'b0;
      s1      <= 1'b0;
      count   <= '0;
      btn_out <= 1'b0;
    end else begin
      s0 <= btn_in;
      s1 <= s0;
      if (s1 == btn_out) begin
        count <= '0;
      end else if (count == CW'(DEBOUNCE_CYCLES - 1)) begin
        count   <= '0;
        btn_out <= s1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
