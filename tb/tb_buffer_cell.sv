// Self-checking testbench for buffer_cell: reset value, transparency while
// enable is high, and holding the last word after enable falls while the input
// keeps changing.
module tb_buffer_cell;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 32;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  int checks = 0;
  int failures = 0;

  buffer_cell dut (.rst_n(rst_n), .enable(enable), .d(d), .q(q));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] held;
    d = 32'hDEAD_BEEF;
    #10;
    check(q == '0, "reset clears the cell");
    rst_n = 1'b1;
    #10;
    check(q == '0, "no load without enable");
    for (int i = 0; i < 200; i++) begin
      d = $urandom;
      #5 enable = 1'b1;
      #5 check(q == d, "transparent while enable high");
      held = d;
      #5 enable = 1'b0;
      #5 d = $urandom;
      #5 check(q == held, "holds after enable falls");
    end
    rst_n = 1'b0;
    #5 check(q == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
