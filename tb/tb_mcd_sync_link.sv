// End-to-end testbench for mcd_sync_link at its default parameters
// (32-bit words, two stages, 40 ps inverter delay).
//
// The link is run with four sender/receiver clock pairs: 1.0/1.0 GHz in phase,
// 1.0/1.0 GHz with the receiver clock shifted by 370 ps, 1.66/0.66 GHz and
// 0.66/1.66 GHz (periods 602 ps and 1514 ps). For each pair:
//   1. latency: one word into the empty link must fill the last stage exactly
//      STAGES x 4 inverter delays after the sender edge that launched it, and
//      be delivered on the first receiver edge after that;
//   2. random traffic: sender and receiver are valid/ready at random; a
//      scoreboard checks that every word arrives once and in order;
//   3. throughput: both ends always ready; the mean interval between delivered
//      words must match the slower clock's period (one word per cycle).
// Mechanisms counted over the run, each required at least once: sender stalled
// by back-pressure, a request queued behind a full stage, an empty stage
// waiting for a request, receiver waiting on an empty link, all stages full.
// The overrun flag must never rise.
module tb_mcd_sync_link;
  timeunit 1ps;
  timeprecision 1ps;

  import mcd_sync_pkg::*;

  logic rst_n = 1'b1;
  logic clk_send = 1'b0;
  logic clk_recv = 1'b0;
  logic send_valid = 1'b0;
  logic [DATA_W-1:0] send_data = '0;
  logic send_ready;
  logic recv_ready = 1'b0;
  logic recv_valid;
  logic [DATA_W-1:0] recv_data;
  logic [STAGES-1:0] stage_full, stage_req_pending, stage_enable;
  logic overrun;

  mcd_sync_link dut (
    .rst_n(rst_n),
    .clk_send(clk_send), .send_valid(send_valid), .send_data(send_data), .send_ready(send_ready),
    .clk_recv(clk_recv), .recv_ready(recv_ready), .recv_valid(recv_valid), .recv_data(recv_data),
    .stage_full(stage_full), .stage_req_pending(stage_req_pending), .stage_enable(stage_enable),
    .overrun(overrun)
  );

  int checks = 0;
  int failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- clocks ----------------
  int unsigned half_s = 500;
  int unsigned half_r = 500;
  bit run_s = 1'b0;
  bit run_r = 1'b0;
  always begin
    if (run_s) #(half_s) clk_send = ~clk_send;
    else #7;
  end
  always begin
    if (run_r) #(half_r) clk_recv = ~clk_recv;
    else #7;
  end

  // ---------------- traffic ----------------
  // mode 0: idle (driven by the main sequence), 1: random, 2: always on
  int mode = 0;
  int unsigned p_send = 70;
  int unsigned p_recv = 70;
  logic [DATA_W-1:0] sb [$];
  logic [DATA_W-1:0] next_word = 32'h0001_0000;
  int n_sent = 0;
  int n_recv = 0;
  time t_rpos = 0;
  time t_last_recv = 0;
  time t_first_tp = 0;
  int n_tp = 0;

  // mechanism counters
  int n_stall = 0;
  int n_queued = 0;
  int n_wait_req = 0;
  int n_starved = 0;
  int n_link_full = 0;

  always @(posedge clk_send) begin
    if (rst_n) begin
      if (send_valid && send_ready) begin
        if (!stage_full[0] && !stage_req_pending[0]) n_wait_req++;
        sb.push_back(send_data);
        n_sent++;
      end else if (send_valid) n_stall++;
      if ((stage_req_pending & stage_full) != '0) n_queued++;
      if (&stage_full) n_link_full++;
      if (mode != 0) begin
        #1;
        if (!send_valid || send_ready) begin
          send_valid = (mode == 2) || ($urandom_range(99) < p_send);
          if (send_valid) begin
            send_data = next_word;
            next_word = next_word + 1;
          end
        end
      end
    end
  end

  always @(posedge clk_recv) begin
    t_rpos = $time;
    if (rst_n) begin
      if ((stage_req_pending & stage_full) != '0) n_queued++;
      if (recv_ready && !stage_full[STAGES-1]) n_starved++;
      #1;
      if (recv_valid) begin
        n_recv++;
        if (sb.size() == 0) check(1'b0, "word delivered that was never sent");
        else check(recv_data == sb.pop_front(), "word delivered in order");
        if (mode == 2) begin
          if (n_tp == 0) t_first_tp = $time;
          n_tp++;
          t_last_recv = $time;
        end
      end
      if (mode != 0) recv_ready = (mode == 2) || ($urandom_range(99) < p_recv);
    end
  end

  always @(posedge overrun) check(1'b0, "request overrun in a control cell");

  // ---------------- watchdog ----------------
  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- one clock configuration ----------------
  task automatic run_config(input int unsigned ps_send, input int unsigned ps_recv,
                            input int unsigned offset, input int words);
    time t_acc, t_full;
    int unsigned slow;
    real mean;
    $display("config: sender %0d ps, receiver %0d ps, offset %0d ps", ps_send, ps_recv, offset);
    // stop clocks, reset
    mode = 0;
    run_s = 1'b0;
    run_r = 1'b0;
    #3000;
    clk_send = 1'b0;
    clk_recv = 1'b0;
    send_valid = 1'b0;
    recv_ready = 1'b0;
    rst_n = 1'b0;
    sb.delete();
    half_s = ps_send / 2;
    half_r = ps_recv / 2;
    #1000;
    check(stage_full == '0 && stage_req_pending == '0 && !recv_valid, "reset empties the link");
    rst_n = 1'b1;
    run_s = 1'b1;
    #(offset) run_r = 1'b1;
    repeat (3) @(posedge clk_send);

    // 1. latency through the empty link
    #1;
    send_valid = 1'b1;
    send_data = 32'hCAFE_0000 + ps_send;
    next_word = send_data + 1;
    @(posedge clk_send);
    t_acc = $time;
    #1 send_valid = 1'b0;
    @(posedge stage_full[STAGES-1]);
    t_full = $time;
    check(t_full - t_acc == STAGE_LATENCY_PS * STAGES,
          $sformatf("link latency %0d ps, expected %0d ps", t_full - t_acc, STAGE_LATENCY_PS * STAGES));
    $display("  latency sender edge to last stage: %0d ps", t_full - t_acc);
    @(negedge clk_recv);
    recv_ready = 1'b1;
    wait (recv_valid);
    check(t_rpos > t_full && t_rpos - t_full <= ps_recv + 1 + ps_recv,
          "word taken at a receiver edge soon after it arrived");
    @(negedge clk_recv);
    recv_ready = 1'b0;
    check(sb.size() == 0, "latency word delivered");

    // 2. random traffic
    mode = 1;
    wait (n_sent >= words);
    mode = 0;
    @(posedge clk_send) #1 send_valid = 1'b0;
    recv_ready = 1'b1;
    wait (sb.size() == 0);
    repeat (4) @(posedge clk_recv);
    check(sb.size() == 0 && stage_full == '0, "all random-traffic words delivered");

    // 3. throughput with both ends always on
    n_tp = 0;
    mode = 2;
    wait (n_tp >= 201);
    mode = 0;
    @(posedge clk_send) #1 send_valid = 1'b0;
    recv_ready = 1'b1;
    wait (sb.size() == 0);
    repeat (4) @(posedge clk_recv);
    slow = (ps_send > ps_recv) ? 2 * half_s : 2 * half_r;
    mean = real'(t_last_recv - t_first_tp) / 200.0;
    $display("  mean interval between words: %0.1f ps (slower clock %0d ps)", mean, slow);
    check(mean > 0.98 * slow && mean < 1.02 * slow, "one word per cycle of the slower clock");
  endtask

  initial begin
    #1000;
    run_config(1000, 1000, 0, 2000);
    run_config(1000, 1000, 370, 2000);
    run_config(602, 1514, 0, 2000);
    run_config(1514, 602, 0, 2000);
    $display("mechanisms: stall=%0d queued=%0d wait_req=%0d starved=%0d link_full=%0d",
             n_stall, n_queued, n_wait_req, n_starved, n_link_full);
    check(n_stall > 0, "sender stalled by back-pressure");
    check(n_queued > 0, "request queued behind a full stage");
    check(n_wait_req > 0, "empty stage waited for a request");
    check(n_starved > 0, "receiver waited on an empty link");
    check(n_link_full > 0, "all stages full");
    check(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
