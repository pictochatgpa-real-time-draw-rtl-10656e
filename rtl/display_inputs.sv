// display_inputs: chooses what the display draws next.
//
// Two sources produce draw requests: the local touchscreen (position from
// the touch block, colour from the colour selector) and the far board (a
// message decoded by bt_rx). Each source has a one-entry holding register;
// a newer request from the same source replaces one not yet drawn, so the
// display always catches up with the latest position. When the display is
// ready, the local request goes first, then the remote one. `draw_valid`
// stays high until `display_ready` accepts it (valid/ready handshake; the
// request is taken in the cycle both are high).
//
// The block and its inputs are those of the design's block diagram; the
// holding registers and the local-first priority are this design's choices.
// `dropped` pulses when a waiting request is replaced by a newer one.
module display_inputs
  import pictochat_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      local_valid,
  input  draw_req_t local_req,
  input  logic      remote_valid,
  input  draw_req_t remote_req,
  input  logic      display_ready,
  output logic      draw_valid,
  output draw_req_t draw_req,
  output logic      draw_is_remote,
  output logic      dropped
);
  logic      local_pend, remote_pend;
  draw_req_t local_q, remote_q;

  wire take = draw_valid && display_ready;

  assign draw_valid     = local_pend || remote_pend;
  assign draw_is_remote = !local_pend;
  assign draw_req       = local_pend ? local_q : remote_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      local_pend  <= 1'b0;
      remote_pend <= 1'b0;
      local_q     <= '0;
      remote_q    <= '0;
      dropped     <= 1'b0;
    end else begin
      dropped <= (local_valid && local_pend && !(take && !draw_is_remote)) ||
                 (remote_valid && remote_pend && !(take && draw_is_remote));
      if (take && !draw_is_remote) local_pend  <= 1'b0;
      if (take &&  draw_is_remote) remote_pend <= 1'b0;
      if (local_valid) begin
        local_pend <= 1'b1;
        local_q    <= local_req;
      end
      if (remote_valid) begin
        remote_pend <= 1'b1;
        remote_q    <= remote_req;
      end
    end
  end

  // A request on offer must not change until it is taken.
  assert property (@(posedge clk) disable iff (rst)
                   draw_valid && !display_ready && !local_valid && !remote_valid
                   |=> draw_valid && $stable(draw_req))
    else $error("display_inputs: offered request changed before it was taken");
endmodule
