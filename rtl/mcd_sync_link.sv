// Multiple-clock-domain synchronizing link (top level).
//
// Carries words from a sender running on clk_send to a receiver running on
// clk_recv, where the two clocks are independent and of arbitrary frequency and
// phase. Instead of a global clock or a synchronizer flip-flop chain, the link
// is a distributed FIFO: STAGES relay stations, each a self-timed FIFO control
// cell with a one-word buffer cell. A stage fires its enable pulse when the
// stage before it offers a word and its own buffer is empty; that pulse loads
// the word, acts as the request of the next stage and as the empty event of the
// stage before. The sender clock edge that launches a word is the request of
// the first stage, and the receiver clock edge that takes a word is the empty
// event of the last stage, so every local clock pulse moves valid data.
//
// Structure:
//   sender_interface -> relay_station[0] -> ... -> relay_station[STAGES-1]
//                    -> receiver_interface
//
// Interface:
//   sender side   clk_send, send_valid, send_data in; send_ready out
//                 (a word is accepted on a clk_send edge with valid and ready)
//   receiver side clk_recv, recv_ready in; recv_valid, recv_data out
//                 (recv_valid marks the clk_recv cycle that delivers a word)
//   status        stage_full, stage_req_pending, stage_enable per stage;
//                 overrun, set if any control cell ever saw a request it
//                 could not queue (never, when the flow control works)
//   rst_n         asynchronous, active low; empties the link
//
// Timing: into an empty link a word reaches the last buffer cell
// STAGES * FIRE_INV * T_INV_PS after the sender clock edge (320 ps with the
// defaults), and the receiver takes it on its next clock edge. Throughput is one
// word per sender cycle while the receiver keeps up; otherwise the link fills
// and send_ready drops.
//
// Following the reference: the chain of control and buffer cells, data moving
// with its local clock, the sender and receiver clocks as the two ends' events,
// 32-bit words and two stages. Own choices: the ready/valid signals at both ends
// and the status outputs.
module mcd_sync_link #(
  parameter int unsigned DATA_W    = mcd_sync_pkg::DATA_W,
  parameter int unsigned STAGES    = mcd_sync_pkg::STAGES,
  parameter int unsigned T_INV_PS  = mcd_sync_pkg::T_INV_PS,
  parameter int unsigned FIRE_INV  = mcd_sync_pkg::FIRE_INV,
  parameter int unsigned PULSE_INV = mcd_sync_pkg::PULSE_INV
) (
  input  logic              rst_n,
  // sender clock domain
  input  logic              clk_send,
  input  logic              send_valid,
  input  logic [DATA_W-1:0] send_data,
  output logic              send_ready,
  // receiver clock domain
  input  logic              clk_recv,
  input  logic              recv_ready,
  output logic              recv_valid,
  output logic [DATA_W-1:0] recv_data,
  // status
  output logic [STAGES-1:0] stage_full,
  output logic [STAGES-1:0] stage_req_pending,
  output logic [STAGES-1:0] stage_enable,
  output logic              overrun
);
  timeunit 1ps;
  timeprecision 1ps;

  logic              req_clk   [STAGES];
  logic              empty_clk [STAGES];
  logic [DATA_W-1:0] stage_d   [STAGES];
  logic [DATA_W-1:0] stage_q   [STAGES];
  logic [STAGES-1:0] stage_overrun;

  logic              send_req_clk;
  logic [DATA_W-1:0] send_q;
  logic              recv_empty_clk;

  sender_interface #(.DATA_W(DATA_W)) u_send (
    .clk        (clk_send),
    .rst_n      (rst_n),
    .send_valid (send_valid),
    .send_data  (send_data),
    .send_ready (send_ready),
    .req_pending (stage_req_pending[0]),
    .first_enable(stage_enable[0]),
    .req_clk     (send_req_clk),
    .data_q     (send_q)
  );

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    if (k == 0) begin : g_first
      assign req_clk[k] = send_req_clk;
      assign stage_d[k] = send_q;
    end else begin : g_mid
      assign req_clk[k] = stage_enable[k-1];
      assign stage_d[k] = stage_q[k-1];
    end
    if (k == STAGES - 1) begin : g_last
      assign empty_clk[k] = recv_empty_clk;
    end else begin : g_inner
      assign empty_clk[k] = stage_enable[k+1];
    end

    relay_station #(
      .DATA_W   (DATA_W),
      .T_INV_PS (T_INV_PS),
      .FIRE_INV (FIRE_INV),
      .PULSE_INV(PULSE_INV)
    ) u_rs (
      .rst_n      (rst_n),
      .req_clk    (req_clk[k]),
      .empty_clk  (empty_clk[k]),
      .d          (stage_d[k]),
      .enable     (stage_enable[k]),
      .q          (stage_q[k]),
      .req_pending(stage_req_pending[k]),
      .full       (stage_full[k]),
      .overrun    (stage_overrun[k])
    );
  end

  receiver_interface #(.DATA_W(DATA_W)) u_recv (
    .clk       (clk_recv),
    .rst_n     (rst_n),
    .recv_ready(recv_ready),
    .recv_valid(recv_valid),
    .recv_data (recv_data),
    .full_last (stage_full[STAGES-1]),
    .buf_q     (stage_q[STAGES-1]),
    .empty_clk (recv_empty_clk)
  );

  assign overrun = |stage_overrun;
endmodule
