// tb_ring_oscillator -- behavioural ring oscillator: output at rest while the
// challenge is low, toggling every STAGES * STAGE_DELAY_PS while it is high
// (checked by counting edges and timing them), and back at rest after the
// challenge falls.
module tb_ring_oscillator;
  timeunit 1ns;
  timeprecision 1ps;

  logic challenge = 0, ro_out;
  logic clk = 0;
  int checks = 0, failures = 0;
  int rises = 0;
  realtime first_rise = -1.0, last_rise = 0.0, t_en;
  always #5 clk = ~clk;

  // 7 stages of 120 ps: half period 0.84 ns, period 1.68 ns.
  ring_oscillator #(.STAGES(7), .STAGE_DELAY_PS(120)) dut (.challenge(challenge), .ro_out(ro_out));

  always @(posedge ro_out) begin
    rises++;
    if (first_rise < 0.0) first_rise = $realtime;
    last_rise = $realtime;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    checks++;
    if (rises != 0 || ro_out !== 1'b0) begin failures++; $display("FAIL: oscillates while disabled"); end
    t_en = $realtime;
    challenge = 1;
    #(168.0);                       // 100 periods
    challenge = 0;
    checks++;
    if (rises != 100) begin failures++; $display("FAIL: %0d rising edges, expected 100", rises); end
    checks++;
    if (first_rise - t_en < 0.839 || first_rise - t_en > 0.841) begin
      failures++; $display("FAIL: first rise after %f ns", first_rise - t_en);
    end
    checks++;
    if ((last_rise - first_rise) / 99.0 < 1.679 || (last_rise - first_rise) / 99.0 > 1.681) begin
      failures++; $display("FAIL: period %f ns", (last_rise - first_rise) / 99.0);
    end
    #10;
    rises = 0;
    #100;
    checks++;
    if (rises != 0 || ro_out !== 1'b0) begin failures++; $display("FAIL: not at rest after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
