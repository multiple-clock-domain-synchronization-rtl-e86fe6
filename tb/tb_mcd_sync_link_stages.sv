// Testbench for mcd_sync_link with other stage counts: one stage (two
// neighbouring switches with a single buffer between them), three, and four
// relay stations (a long wire cut into four segments). Each link runs in its
// own harness (link_stage_check) with sender and receiver clocks of 1.66 GHz
// and 0.66 GHz, checking latency STAGES x 160 ps, capacity STAGES + 1 words and
// in-order delivery of random traffic.
module tb_mcd_sync_link_stages;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_send = 1'b0;
  logic clk_recv = 1'b0;
  logic start = 1'b0;
  logic done1, done3, done4;
  int c1, f1, c3, f3, c4, f4;

  always #301 clk_send = ~clk_send;
  always #757 clk_recv = ~clk_recv;

  link_stage_check #(.STAGES(1)) u_s1 (.clk_send(clk_send), .clk_recv(clk_recv), .start(start),
                                       .done(done1), .checks(c1), .failures(f1));
  link_stage_check #(.STAGES(3)) u_s3 (.clk_send(clk_recv), .clk_recv(clk_send), .start(start),
                                       .done(done3), .checks(c3), .failures(f3));
  link_stage_check #(.STAGES(4)) u_s4 (.clk_send(clk_send), .clk_recv(clk_recv), .start(start),
                                       .done(done4), .checks(c4), .failures(f4));

  initial begin
    #100_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c3 + c4, f1 + f3 + f4 + 1);
    $finish;
  end

  initial begin
    #2000 start = 1'b1;
    wait (done1 && done3 && done4);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c3 + c4, f1 + f3 + f4);
    $finish;
  end
endmodule
