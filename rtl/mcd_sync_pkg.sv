// Shared constants of the multiple-clock-domain synchronizing link.
//
// The link moves words from a sender clock domain to a receiver clock domain
// through a chain of self-timed FIFO stages. Every stage pairs a FIFO control
// cell, which generates a local enable pulse, with a buffer cell that stores one
// word. The constants below are the defaults used by all modules of the link:
//   DATA_W    : word width. 32 bits, the data bus width of the reference
//               implementation.
//   STAGES    : control-cell/buffer-cell pairs between sender and receiver. Two,
//               the arrangement of the basic two-switch link and of the long
//               tree link split by one intermediate stage.
//   T_INV_PS  : one inverter delay in ps. 40 ps is a fan-out-of-4 delay in a
//               90 nm process, where a 15-FO4 clock cycle gives 1.67 GHz.
//   FIRE_INV  : inverter delays from a request or empty event to the rising
//               edge of enable (four, as the controller's critical path).
//   PULSE_INV : width of the enable pulse in inverter delays (a design choice).
package mcd_sync_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DATA_W    = 32;
  localparam int unsigned STAGES    = 2;
  localparam int unsigned T_INV_PS  = 40;
  localparam int unsigned FIRE_INV  = 4;
  localparam int unsigned PULSE_INV = 2;

  // Time from a pending request (or empty event) to the enable edge of one
  // stage, and the resulting best-case latency through an empty link.
  localparam int unsigned STAGE_LATENCY_PS = FIRE_INV * T_INV_PS;
endpackage
