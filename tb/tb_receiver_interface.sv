// Self-checking testbench for receiver_interface.
//
// A simple model of the last FIFO stage offers words: after each empty event it
// clears full_last one inverter delay later and refills the buffer with a new
// word after a random time. The receiver asks for data at random. At every
// clock edge the testbench predicts from its own samples whether a word is
// taken (recv_ready and full_last) and checks recv_valid, recv_data and the
// empty event returned to the stage; it also checks that no word is lost or
// taken twice.
module tb_receiver_interface;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 32;
  localparam int unsigned HALF = 500;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic recv_ready = 1'b0;
  logic recv_valid;
  logic [W-1:0] recv_data;
  logic full_last = 1'b0;
  logic [W-1:0] buf_q = '0;
  logic empty_clk;

  int checks = 0;
  int failures = 0;
  int n_take = 0;
  int n_offered = 0;
  int n_idle = 0;
  int n_empty_edges = 0;
  logic [W-1:0] next_word = 32'h1000;

  receiver_interface dut (
    .clk(clk), .rst_n(rst_n), .recv_ready(recv_ready), .recv_valid(recv_valid),
    .recv_data(recv_data), .full_last(full_last), .buf_q(buf_q), .empty_clk(empty_clk)
  );

  always #(HALF) clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int unsigned refill [4] = '{170, 330, 1310, 2470};
  task automatic offer();
    buf_q = next_word;
    next_word = next_word + 1;
    full_last = 1'b1;
    n_offered++;
  endtask

  always @(posedge empty_clk) begin
    n_empty_edges++;
    fork begin
      automatic int unsigned d = refill[$urandom_range(3)];
      #40 full_last = 1'b0;
      #(d) offer();
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
    logic exp_take;
    logic [W-1:0] word;
    logic [W-1:0] expect_word;
    expect_word = 32'h1000;
    #2300 rst_n = 1'b1;
    #111 offer();
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(posedge clk);
      exp_take = recv_ready && full_last;
      word = buf_q;
      #1;
      check(empty_clk == exp_take, "empty event only when a word is taken");
      check(recv_valid == exp_take, "recv_valid marks a taken word");
      if (exp_take) begin
        check(recv_data == word && word == expect_word, "word delivered in order");
        expect_word = expect_word + 1;
        n_take++;
      end else if (recv_ready) n_idle++;
      #100 recv_ready = ($urandom_range(3) != 0);
    end
    check(n_take > 100, "words were taken");
    check(n_idle > 50, "receiver waited on an empty stage");
    check(n_empty_edges == n_take, "one empty event per taken word");
    $display("taken=%0d idle=%0d", n_take, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
