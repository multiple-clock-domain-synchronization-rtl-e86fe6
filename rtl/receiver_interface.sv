// Receiver interface: input register of the receiving switch or IP block.
//
// In its own clock domain (clk) the receiver asks for data with recv_ready.
// When the last FIFO stage holds a word (full_last) and the receiver is ready,
// the interface loads that word into recv_data on the rising clk edge, raises
// recv_valid for that cycle, and lets the same clock edge through to
// empty_clk, the empty input of the last FIFO control cell. The control cell
// then marks its buffer empty and the next word can move up.
//
// How it works: recv_ready and the asynchronous full_last are captured in a
// latch that is transparent while clk is low. The register load, recv_valid
// and the gated clock empty_clk = clk AND latched value all use that one
// sample, so a word is never marked taken without being loaded, nor loaded
// twice.
//
// Timing: recv_data/recv_valid update on the rising clk edge; empty_clk rises
// on the same edge and the control cell registers it one inverter delay later,
// so buf_q is still stable when it is loaded.
//
// Following the reference: the register clocked by the receiver clock and the
// receiver clock as the event that empties the last stage. Own choices: the
// recv_ready request, gating that clock with it and with full_last, and reset.
//
// The latch is intended: it is the clock gate.
module receiver_interface #(
  parameter int unsigned DATA_W = mcd_sync_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              recv_ready,
  output logic              recv_valid,
  output logic [DATA_W-1:0] recv_data,
  input  logic              full_last,
  input  logic [DATA_W-1:0] buf_q,
  output logic              empty_clk
);
  timeunit 1ps;
  timeprecision 1ps;

  logic take_l;

  always_latch begin
    if (!rst_n)    take_l = 1'b0;
    else if (!clk) take_l = recv_ready & full_last;
  end

  assign empty_clk = clk & take_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      recv_valid <= 1'b0;
      recv_data  <= '0;
    end else begin
      recv_valid <= take_l;
      if (take_l) recv_data <= buf_q;
    end
  end
endmodule
