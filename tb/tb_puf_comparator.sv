// tb_puf_comparator -- race decision: counter A first gives 0, counter B
// first gives 1, both at once gives 0; the decision is held when the other
// flag follows, appears 3 clock edges after the flag, and clear forgets it.
module tb_puf_comparator;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 1, clear = 0, full_a = 0, full_b = 0, decided, bit_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  puf_comparator dut (.clk(clk), .rst_n(rst_n), .clear(clear), .full_a(full_a), .full_b(full_b),
                      .decided(decided), .bit_out(bit_out));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Raise the flags a (after da ns) and b (after db ns), then check.
  task automatic race(int da, int db, logic exp_bit);
    int edges;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    full_a = 0; full_b = 0;
    checks++;
    if (decided !== 1'b0) begin failures++; $display("FAIL: decided after clear"); end
    fork
      begin repeat (da) #1; full_a = 1; end
      begin repeat (db) #1; full_b = 1; end
    join_none
    repeat (da < db ? da : db) #1;
    edges = 0;
    while (!decided) begin @(posedge clk); #1; edges++; end
    checks++;
    if (edges != 3) begin failures++; $display("FAIL: decided after %0d edges", edges); end
    repeat ((da > db ? da : db) + 30) #1;
    checks++;
    if (!decided || bit_out !== exp_bit) begin
      failures++; $display("FAIL: race a=%0d b=%0d gave %b, expected %b", da, db, bit_out, exp_bit);
    end
    full_a = 0; full_b = 0;
  endtask

  initial begin
    #1 rst_n = 0;   // an explicit edge starts the asynchronous reset
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (decided !== 1'b0) begin failures++; $display("FAIL: decided with no flag"); end
    race(13, 60, 1'b0);
    race(60, 13, 1'b1);
    race(21, 21, 1'b0);
    race(12, 47, 1'b0);
    race(40, 4, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
