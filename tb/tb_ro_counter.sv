// tb_ro_counter -- oscillator-edge counter: counts rising edges, raises full
// at its limit 2^COUNT_W - 1 and stays there, clears asynchronously.
module tb_ro_counter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = 4;
  logic ro_clk = 0, clr = 0, full;
  logic [W-1:0] count;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ro_counter #(.COUNT_W(W)) dut (.ro_clk(ro_clk), .clr(clr), .count(count), .full(full));

  task automatic pulse();
    #1 ro_clk = 1;
    #1 ro_clk = 0;
  endtask

  task automatic expect_count(int n, logic f);
    checks++;
    if (count !== W'(n) || full !== f) begin
      failures++; $display("FAIL: count %0d full %b, expected %0d %b", count, full, n, f);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr = 1;     // an explicit edge starts the asynchronous clear
    #2;
    expect_count(0, 0);
    pulse();                        // held in clear: no count
    expect_count(0, 0);
    clr = 0;
    for (int i = 1; i <= 14; i++) begin pulse(); expect_count(i, 0); end
    pulse(); expect_count(15, 1);
    repeat (5) begin pulse(); expect_count(15, 1); end   // saturates
    #0.5 clr = 1;                   // asynchronous clear, no edge needed
    #0.1 expect_count(0, 0);
    clr = 0;
    repeat (3) pulse();
    expect_count(3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
