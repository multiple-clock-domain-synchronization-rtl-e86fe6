// Test harness for one mcd_sync_link of a given stage count (used by
// tb_mcd_sync_link_stages).
//
// Once start rises it checks, on its own link instance:
//   - latency: a word into the empty link fills the last stage exactly
//     STAGES x 4 inverter delays after the launching sender edge;
//   - capacity: with the receiver stopped, the link accepts exactly STAGES + 1
//     words (one per buffer cell plus the sender's output latch) and then
//     holds send_ready low;
//   - random traffic: WORDS words with random valid/ready at both ends arrive
//     once each and in order.
// Results are returned on checks/failures, and done rises at the end.
module link_stage_check #(
  parameter int unsigned STAGES = 4,
  parameter int unsigned WORDS  = 1000
) (
  input  logic clk_send,
  input  logic clk_recv,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  timeunit 1ps;
  timeprecision 1ps;

  import mcd_sync_pkg::*;

  logic rst_n = 1'b1;
  logic send_valid = 1'b0;
  logic [DATA_W-1:0] send_data = '0;
  logic send_ready;
  logic recv_ready = 1'b0;
  logic recv_valid;
  logic [DATA_W-1:0] recv_data;
  logic [STAGES-1:0] stage_full, stage_req_pending, stage_enable;
  logic overrun;

  mcd_sync_link #(.STAGES(STAGES)) dut (
    .rst_n(rst_n),
    .clk_send(clk_send), .send_valid(send_valid), .send_data(send_data), .send_ready(send_ready),
    .clk_recv(clk_recv), .recv_ready(recv_ready), .recv_valid(recv_valid), .recv_data(recv_data),
    .stage_full(stage_full), .stage_req_pending(stage_req_pending), .stage_enable(stage_enable),
    .overrun(overrun)
  );

  logic [DATA_W-1:0] sb [$];
  logic [DATA_W-1:0] next_word = 32'h0002_0000;
  bit random_mode = 1'b0;
  int n_sent = 0;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t (STAGES=%0d): %s", $time, STAGES, what);
    end
  endtask

  always @(posedge clk_send) begin
    if (send_valid && send_ready) begin
      sb.push_back(send_data);
      n_sent++;
    end
    if (random_mode) begin
      #1;
      if (!send_valid || send_ready) begin
        send_valid = ($urandom_range(99) < 60);
        if (send_valid) begin
          send_data = next_word;
          next_word = next_word + 1;
        end
      end
    end
  end

  always @(posedge clk_recv) begin
    #1;
    if (recv_valid) begin
      if (sb.size() == 0) check(1'b0, "word delivered that was never sent");
      else check(recv_data == sb.pop_front(), "word delivered in order");
    end
    if (random_mode) recv_ready = ($urandom_range(99) < 60);
  end

  always @(posedge overrun) check(1'b0, "request overrun");

  initial begin
    time t_acc, t_full;
    int accepted;
    wait (start);
    rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    repeat (3) @(posedge clk_send);

    // latency
    #1 send_valid = 1'b1;
    send_data = 32'hBEEF_0000 + STAGES;
    @(posedge clk_send);
    t_acc = $time;
    #1 send_valid = 1'b0;
    @(posedge stage_full[STAGES-1]);
    t_full = $time;
    check(t_full - t_acc == STAGES * STAGE_LATENCY_PS,
          $sformatf("latency %0d ps, expected %0d ps", t_full - t_acc, STAGES * STAGE_LATENCY_PS));
    $display("STAGES=%0d latency %0d ps", STAGES, t_full - t_acc);
    @(negedge clk_recv) recv_ready = 1'b1;
    wait (sb.size() == 0);
    @(negedge clk_recv) recv_ready = 1'b0;

    // capacity with the receiver stopped
    accepted = n_sent;
    for (int i = 0; i < 4 * (STAGES + 2); i++) begin
      @(posedge clk_send);
      #1 send_valid = 1'b1;
      send_data = next_word;
      next_word = next_word + 1;
      // keep offering the same word until it is taken
      while (1) begin
        @(posedge clk_send);
        if (send_ready) break;
        if (n_sent - accepted >= STAGES + 1) break;
      end
      #1 send_valid = 1'b0;
      if (n_sent - accepted >= STAGES + 1) begin
        repeat (20) @(posedge clk_send);
        break;
      end
    end
    check(n_sent - accepted == STAGES + 1, $sformatf("capacity %0d words, expected %0d", n_sent - accepted, STAGES + 1));
    check(!send_ready && (&stage_full), "full link holds send_ready low");
    $display("STAGES=%0d capacity %0d words", STAGES, n_sent - accepted);
    send_valid = 1'b0;
    @(negedge clk_recv) recv_ready = 1'b1;
    wait (sb.size() == 0);
    @(negedge clk_recv) recv_ready = 1'b0;

    // random traffic
    accepted = n_sent;
    random_mode = 1'b1;
    wait (n_sent - accepted >= WORDS);
    random_mode = 1'b0;
    @(posedge clk_send) #1 send_valid = 1'b0;
    recv_ready = 1'b1;
    wait (sb.size() == 0);
    repeat (4) @(posedge clk_recv);
    check(stage_full == '0 && !overrun, "link drained, no overrun");
    done = 1'b1;
  end
endmodule
