// Self-checking testbench for sender_interface.
//
// A simple model of the first control cell answers each forwarded clock edge:
// it raises req_pending one inverter delay later and, after a random service
// time (some short, some several cycles long), clears it and raises
// first_enable for an 80 ps pulse, so the sender both streams and stalls. At
// every clock edge the testbench predicts from its own samples whether a word
// is accepted (send_valid, no pending request, enable low) and checks the
// forwarded request edge, send_ready and the output latch.
module tb_sender_interface;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 32;
  localparam int unsigned HALF = 500;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic send_valid = 1'b0;
  logic [W-1:0] send_data = '0;
  logic send_ready;
  logic req_pending = 1'b0;
  logic first_enable = 1'b0;
  logic req_clk;
  logic [W-1:0] data_q;

  int checks = 0;
  int failures = 0;
  int n_accept = 0;
  int n_stall = 0;
  int n_req_edges = 0;

  sender_interface dut (
    .clk(clk), .rst_n(rst_n), .send_valid(send_valid), .send_data(send_data),
    .send_ready(send_ready), .req_pending(req_pending), .first_enable(first_enable), .req_clk(req_clk), .data_q(data_q)
  );

  always #(HALF) clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Model of the control cell's request latch.
  int unsigned service [4] = '{130, 370, 1730, 2930};
  always @(posedge req_clk) begin
    n_req_edges++;
    fork begin
      automatic int unsigned d = service[$urandom_range(3)];
      #40 req_pending = 1'b1;
      #(d);
      req_pending = 1'b0;
      first_enable = 1'b1;
      #80 first_enable = 1'b0;
    end join_none
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_accept;
    logic [W-1:0] exp_q;
    logic [W-1:0] sent;
    exp_q = '0;
    #2300 rst_n = 1'b1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(posedge clk);
      exp_accept = send_valid && !req_pending && !first_enable;
      sent = send_data;
      check(send_ready == !(req_pending || first_enable), "send_ready: no pending request, enable low");
      #1;
      check(req_clk == exp_accept, "request edge forwarded only for an accepted word");
      if (exp_accept) begin
        exp_q = sent;
        n_accept++;
      end else if (send_valid) n_stall++;
      check(data_q == exp_q, "output latch holds the last accepted word");
      #100;
      send_valid = ($urandom_range(3) != 0);
      send_data = $urandom;
    end
    check(n_accept > 100, "words were accepted");
    check(n_stall > 50, "sender was stalled by a pending request");
    check(n_req_edges == n_accept, "one request edge per accepted word");
    $display("accepted=%0d stalled=%0d", n_accept, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
