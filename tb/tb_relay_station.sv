// Self-checking testbench for relay_station (one control cell with its buffer).
//
// Offers a sequence of words with request edges and takes them with empty
// edges at random, independent times. Checks that each enable pulse loads the
// word offered at that moment (the request-first order
// and the empty-event-first order both occur), that it comes FIRE_INV inverter delays after the
// later of the request and the empty event, and that words are neither lost
// nor duplicated.
module tb_relay_station;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 32;
  localparam int unsigned FIRE = 4 * 40;

  logic rst_n = 1'b0;
  logic req_clk = 1'b0;
  logic empty_clk = 1'b0;
  logic [W-1:0] d = '0;
  logic enable, req_pending, full, overrun;
  logic [W-1:0] q;

  int checks = 0;
  int failures = 0;
  int n_fire = 0;
  int n_waited_full = 0;
  int n_waited_req = 0;
  time t_req, t_empty;

  relay_station dut (
    .rst_n(rst_n), .req_clk(req_clk), .empty_clk(empty_clk), .d(d),
    .enable(enable), .q(q), .req_pending(req_pending), .full(full), .overrun(overrun)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Expected firing time: FIRE after the later of the last request and the
  // last empty event.
  always @(posedge enable) begin
    time later;
    n_fire++;
    later = (t_req > t_empty) ? t_req : t_empty;
    if (t_empty > t_req) n_waited_full++; else n_waited_req++;
    check($time == later + FIRE, $sformatf("enable at %0t, expected %0t", $time, later + FIRE));
    #1 check(q == d, "buffer loads the offered word");
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] taken;
    t_req = 0;
    t_empty = 0;
    #1000 rst_n = 1'b1;
    #1000;
    for (int i = 0; i < 200; i++) begin
      // Offer word i (only when no request is pending, as the sender would).
      d = 32'hA000_0000 + i;
      #($urandom_range(50, 1500));
      t_req = $time;
      req_clk = 1'b1;
      #100 req_clk = 1'b0;
      // Wait a random time, then take the word (release the stage).
      #($urandom_range(50, 1500));
      if (!full) wait (full);
      #1;
      taken = q;
      check(taken == 32'hA000_0000 + i, "word in order, not lost");
      t_empty = $time;
      empty_clk = 1'b1;
      #100 empty_clk = 1'b0;
      // Next word arrives only after the cell cleared its request.
      wait (!req_pending);
    end
    // Phase 2: each new word is requested while the stage is still full, so
    // the request queues and the empty event releases it.
    d = 32'hB000_0000;
    #300 t_req = $time;
    req_clk = 1'b1;
    #100 req_clk = 1'b0;
    #500;
    for (int i = 1; i <= 100; i++) begin
      check(full && !req_pending, "stage holds a word");
      d = 32'hB000_0000 + i;
      #($urandom_range(50, 700));
      t_req = $time;
      req_clk = 1'b1;
      #100 req_clk = 1'b0;
      #($urandom_range(50, 1500));
      check(req_pending && full && q == 32'hB000_0000 + i - 1, "request queued behind the full stage");
      t_empty = $time;
      empty_clk = 1'b1;
      #100 empty_clk = 1'b0;
      #(FIRE + 100);
      check(q == 32'hB000_0000 + i, "queued word loaded after the empty event");
    end
    #2000;
    check(n_fire == 301, "one enable per word");
    check(n_waited_full == 100, "queued requests were released by empty events");
    check(!overrun, "no overrun");
    check(n_waited_req > 0, "an empty stage waited for a request");
    $display("fires=%0d", n_fire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
