// Relay station: one stage of the distributed FIFO.
//
// A stage is a FIFO control cell and the buffer cell it drives. A rising edge
// on req_clk says that a valid word is waiting at d; a rising edge on empty_clk
// says that the word this stage holds has been taken downstream. When a request
// is pending and the stage is empty, the control cell fires enable, the buffer
// loads d, and enable is passed on: to the next stage as its request, and back
// to the previous stage as its empty event. Data thus moves together with its
// own local clock pulse, one stage per pulse.
//
// Timing (defaults): enable rises 4 inverter delays (160 ps) after the later of
// the two events and stays high 2 inverter delays.
//
// Interface: rst_n, req_clk, empty_clk, d in; enable, q, req_pending, full,
// overrun out (see fifo_control_cell and buffer_cell).
//
// Following the reference: the control-cell / buffer-cell pair and its chaining.
module relay_station #(
  parameter int unsigned DATA_W    = mcd_sync_pkg::DATA_W,
  parameter int unsigned T_INV_PS  = mcd_sync_pkg::T_INV_PS,
  parameter int unsigned FIRE_INV  = mcd_sync_pkg::FIRE_INV,
  parameter int unsigned PULSE_INV = mcd_sync_pkg::PULSE_INV
) (
  input  logic              rst_n,
  input  logic              req_clk,
  input  logic              empty_clk,
  input  logic [DATA_W-1:0] d,
  output logic              enable,
  output logic [DATA_W-1:0] q,
  output logic              req_pending,
  output logic              full,
  output logic              overrun
);
  timeunit 1ps;
  timeprecision 1ps;

  fifo_control_cell #(
    .T_INV_PS (T_INV_PS),
    .FIRE_INV (FIRE_INV),
    .PULSE_INV(PULSE_INV)
  ) u_ctrl (
    .rst_n      (rst_n),
    .req_clk    (req_clk),
    .empty_clk  (empty_clk),
    .enable     (enable),
    .req_pending(req_pending),
    .full       (full),
    .overrun    (overrun)
  );

  buffer_cell #(.DATA_W(DATA_W)) u_buf (
    .rst_n (rst_n),
    .enable(enable),
    .d     (d),
    .q     (q)
  );
endmodule
