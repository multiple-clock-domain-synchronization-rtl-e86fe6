// FIFO control cell of one distributed-FIFO stage (behavioural model).
//
// This file is a behavioural model, not synthesizable logic: the real cell is a
// small self-timed transistor circuit whose output pulse is shaped by gate
// delays, so it is modelled with delays here.
//
// Operation. The cell keeps two state nodes:
//   req_pending : the request latch. A rising edge on req_clk (the sender clock,
//                 or the enable of the previous stage) sets it. It stands for
//                 the cross-coupled pair A / A_bar of the circuit.
//   empty       : the full/empty node C. A rising edge on empty_clk (the
//                 receiver clock, or the enable of the next stage) sets it,
//                 meaning the word in this cell's buffer has been taken.
// When both are set, enable rises FIRE_INV inverter delays after the later of
// the two events (four inverter delays in the reference circuit). The rising
// edge of enable clears both nodes: the buffer is now full and the request has
// been served. Enable falls again PULSE_INV inverter delays later. Because the
// cell waits for whichever event comes last, a request can be queued behind a
// full buffer, or an empty buffer can wait for a request, so the two clocks may
// have any frequencies and phases.
//
// Timing. An event on req_clk or empty_clk is registered one inverter delay
// after its rising edge, so the interface logic that produced it (and samples
// the state on the same edge) always sees the state from before the event.
// Reset (rst_n low, asynchronous) leaves the cell empty with no request.
//
// Interface:
//   req_clk     in : rising edge = a valid word is offered at the buffer input
//   empty_clk   in : rising edge = the word in the buffer has been taken
//   enable      out: local clock pulse that loads the buffer cell
//   req_pending out: a request is stored and not yet served
//   full        out: the buffer holds a word not yet taken (not C)
//   overrun     out: sticky; a request arrived while one was already pending,
//                    which the surrounding flow control must never allow
//
// Following the reference: the two state nodes, the enable condition, the
// enable clearing both nodes and the four-inverter delay. Own choices: the
// one-inverter event registration delay, the pulse width, the reset state and
// the overrun flag.
//
// Tool messages: the state nodes are written from several event processes with
// blocking assignments, as a delay model needs; synthesis tools therefore
// report several drivers for them. They stand because this file is a
// simulation model of a transistor circuit, not a netlist to be synthesized.
module fifo_control_cell #(
  parameter int unsigned T_INV_PS  = mcd_sync_pkg::T_INV_PS,
  parameter int unsigned FIRE_INV  = mcd_sync_pkg::FIRE_INV,
  parameter int unsigned PULSE_INV = mcd_sync_pkg::PULSE_INV
) (
  input  logic rst_n,
  input  logic req_clk,
  input  logic empty_clk,
  output logic enable,
  output logic req_pending,
  output logic full,
  output logic overrun
);
  timeunit 1ps;
  timeprecision 1ps;

  logic empty;

  initial begin
    req_pending = 1'b0;
    empty       = 1'b1;
    enable      = 1'b0;
    overrun     = 1'b0;
  end

  assign full = ~empty;

  always @(negedge rst_n) begin
    req_pending = 1'b0;
    empty       = 1'b1;
    enable      = 1'b0;
    overrun     = 1'b0;
  end

  // Request latch (A / A_bar): set by the upstream clock edge.
  always @(posedge req_clk) begin
    #(T_INV_PS);
    if (rst_n) begin
      if (req_pending) overrun = 1'b1;
      req_pending = 1'b1;
    end
  end

  // Full/empty node (C): set by the downstream clock edge.
  always @(posedge empty_clk) begin
    #(T_INV_PS);
    if (rst_n) empty = 1'b1;
  end

  // Enable generation: the later of the two conditions starts the pulse.
  always begin
    wait (rst_n && req_pending && empty && !enable);
    #((FIRE_INV - 1) * T_INV_PS);
    if (rst_n) begin
      enable      = 1'b1;
      empty       = 1'b0;
      req_pending = 1'b0;
      #(PULSE_INV * T_INV_PS);
      enable      = 1'b0;
    end
  end

  // A request must never arrive while the previous one is still queued.
  always @(posedge overrun) begin
    if (rst_n) $warning("fifo_control_cell: request overrun");
  end
endmodule
