// Sender interface: output latch of the sending switch or IP block.
//
// The sender offers a word with send_valid/send_data in its own clock domain
// (clk). The interface accepts it on a rising clk edge when send_ready is high,
// holds it in data_q for the first FIFO stage, and lets that same clock edge
// through to req_clk, the request input of the first FIFO control cell. So the
// controller only ever sees a sender clock edge that comes with a valid word,
// and the word travels together with its clock.
//
// Flow control: send_ready is low while the first control cell still holds an
// unserved request (req_pending) and while its enable pulse is high
// (first_enable): the first buffer cell is transparent during that pulse, so
// the output latch must not change before enable has fallen again. This is
// the feedback that keeps a fast sender from outrunning the self-timed
// controllers.
//
// How it works: send_valid and not(req_pending or first_enable) are captured in a latch that is
// transparent while clk is low, the usual clock-gating arrangement. req_clk is
// clk AND the latched enable, so it is a clean copy of the clock's high phase in
// accepted cycles only. send_ready is the latched ready value, so the sender,
// the data register and the gated clock all judge a cycle by the same sample
// of the asynchronous req_pending.
//
// Timing: data_q and req_clk change on the same rising clk edge; the control
// cell registers the request one inverter delay later and loads the buffer
// several gate delays after that, when data_q has long settled.
//
// Following the reference: the output latch clocked by the sender clock and
// the sender clock forwarded as the request, held back until the first
// enable pulse has ended. Own choices: the gating latch, the
// ready signal and the asynchronous reset.
//
// The two latches are intended: they form the clock gate.
module sender_interface #(
  parameter int unsigned DATA_W = mcd_sync_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              send_valid,
  input  logic [DATA_W-1:0] send_data,
  output logic              send_ready,
  input  logic              req_pending,
  input  logic              first_enable,
  output logic              req_clk,
  output logic [DATA_W-1:0] data_q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic ready_l;
  logic valid_l;

  always_latch begin
    if (!rst_n) begin
      ready_l = 1'b0;
      valid_l = 1'b0;
    end else if (!clk) begin
      ready_l = ~(req_pending | first_enable);
      valid_l = send_valid;
    end
  end

  assign send_ready = ready_l;
  assign req_clk    = clk & ready_l & valid_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  data_q <= '0;
    else if (ready_l && valid_l) data_q <= send_data;
  end
endmodule
