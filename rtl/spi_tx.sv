// spi_tx: writes one byte to the display controller over SPI.
//
// On `valid_in && ready` the byte and its data/command flag are captured,
// chip select goes low and `dc` is set (0 command, 1 data/parameter). The
// eight bits follow most significant first at 1 MHz (CLKS_PER_BIT = 100
// cycles of the 100 MHz clock): each bit period starts with SCLK falling and
// the new bit placed on MOSI, and SCLK rises half way through, where the
// display samples it. After the eighth bit chip select returns high and
// `ready` comes back one cycle later. A byte takes 8 x CLKS_PER_BIT + 1
// cycles (801), i.e. the roughly 800 cycles per byte of the description.
//
// The 1 MHz rate, chip select, the data/command line and setting data on the
// falling edge follow the design description; MSB-first order, the idle-low
// clock and releasing chip select after every byte are this design's choices
// (consistent with the display controller's SPI timing).
module spi_tx #(
  parameter int unsigned CLKS_PER_BIT = 100
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  input  logic [7:0] data_in,
  input  logic       dc_in,
  output logic       ready,
  output logic       sclk,
  output logic       mosi,
  output logic       cs_n,
  output logic       dc
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic          active;
  logic [CW-1:0] count;
  logic [2:0]    bitn;
  logic [7:0]    shift;

  assign ready = !active && cs_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      count  <= '0;
      bitn   <= '0;
      shift  <= '0;
      sclk   <= 1'b0;
      mosi   <= 1'b0;
      cs_n   <= 1'b1;
      dc     <= 1'b0;
    end else if (!active) begin
      cs_n <= 1'b1;
      sclk <= 1'b0;
      if (valid_in && ready) begin
        active <= 1'b1;
        cs_n   <= 1'b0;
        dc     <= dc_in;
        mosi   <= data_in[7];
        shift  <= {data_in[6:0], 1'b0};
        count  <= '0;
        bitn   <= '0;
      end
    end else begin
      count <= count + 1'b1;
      if (count == CW'(CLKS_PER_BIT / 2 - 1)) sclk <= 1'b1;
      if (count == CW'(CLKS_PER_BIT - 1)) begin
        count <= '0;
        sclk  <= 1'b0;
        if (bitn == 3'd7) begin
          active <= 1'b0;
          cs_n   <= 1'b1;
        end else begin
          bitn  <= bitn + 1'b1;
          mosi  <= shift[7];
          shift <= {shift[6:0], 1'b0};
        end
      end
    end
  end

  // The clock only toggles while the display is selected.
  assert property (@(posedge clk) disable iff (rst) cs_n |-> !sclk)
    else $error("spi_tx: SCLK high while chip select is inactive");
endmodule
