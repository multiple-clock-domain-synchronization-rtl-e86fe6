// Self-checking testbench for fifo_control_cell.
//
// Drives the request and empty events by hand at chosen times and checks that
// enable fires exactly FIRE_INV inverter delays after the later of the two
// events, stays high PULSE_INV inverter delays, and never fires on one event
// alone. Covers: request into an empty cell, request queued behind a full cell
// and released by the empty event, empty event waiting for a request, and the
// overrun flag for a second request while one is pending.
module tb_fifo_control_cell;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TI = 40;
  localparam int unsigned FIRE = 4 * TI;
  localparam int unsigned PULSE = 2 * TI;

  logic rst_n = 1'b0;
  logic req_clk = 1'b0;
  logic empty_clk = 1'b0;
  logic enable, req_pending, full, overrun;

  int checks = 0;
  int failures = 0;
  int n_enable = 0;
  time rise_t, fall_t;

  fifo_control_cell dut (
    .rst_n(rst_n), .req_clk(req_clk), .empty_clk(empty_clk),
    .enable(enable), .req_pending(req_pending), .full(full), .overrun(overrun)
  );

  always @(posedge enable) begin n_enable++; rise_t = $time; end
  always @(negedge enable) fall_t = $time;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic pulse_req(); req_clk = 1'b1; #300; req_clk = 1'b0; endtask
  task automatic pulse_empty(); empty_clk = 1'b1; #300; empty_clk = 1'b0; endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    #500 rst_n = 1'b1;
    #500;
    check(!enable && !req_pending && !full && !overrun, "reset state: empty, no request");

    // 1. Request into an empty cell: enable after 4 inverter delays.
    t0 = $time;
    fork pulse_req(); join_none
    #(FIRE - 1);
    check(!enable, "enable not yet high one ps before the firing time");
    #2;
    check(enable, "enable high right after the firing time");
    check(rise_t == t0 + FIRE, $sformatf("enable rose at %0t, expected %0t", rise_t, t0 + FIRE));
    #(PULSE + 10);
    check(!enable && fall_t == t0 + FIRE + PULSE, "enable pulse width");
    check(full && !req_pending, "after firing: full, request served");

    // 2. Request while full: queued, released by the empty event.
    #1000;
    fork pulse_req(); join_none
    #200;
    check(req_pending && full && !enable, "request queued behind a full buffer");
    #1000;
    check(n_enable == 1, "no enable while full");
    t0 = $time;
    fork pulse_empty(); join_none
    #(FIRE + 1);
    check(rise_t == t0 + FIRE && n_enable == 2, "queued request fires 4 inverter delays after the empty event");
    #200;
    check(full && !req_pending, "second word stored");

    // 3. Empty event with no request: cell waits empty.
    #1000;
    fork pulse_empty(); join_none
    #(TI + 1);
    check(!full && !req_pending, "cell empty after the empty event");
    #1000;
    check(n_enable == 2, "no enable without a request");
    t0 = $time;
    fork pulse_req(); join_none
    #(FIRE + 1);
    check(rise_t == t0 + FIRE && n_enable == 3, "request into the waiting empty cell fires");

    // 4. Overrun: two requests while the buffer stays full.
    #1000;
    fork pulse_req(); join_none
    #1000;
    check(!overrun, "one queued request is no overrun");
    fork pulse_req(); join_none
    #(TI + 10);
    check(overrun, "second queued request flags overrun");

    // 5. Reset clears everything.
    rst_n = 1'b0;
    #10;
    check(!full && !req_pending && !enable && !overrun, "asynchronous reset");
    #500;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
