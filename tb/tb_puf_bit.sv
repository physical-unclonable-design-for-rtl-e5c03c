// tb_puf_bit -- one PUF cell on two behavioural ring oscillators: when the
// first oscillator is faster the bit is 0, when the second is faster it is 1,
// and repeating the challenge gives the same bit.
module tb_puf_bit;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = 6;
  logic clk = 0, rst_n = 1, challenge = 0, cnt_clr = 0, clear = 0;
  logic [1:0] ro_a, ro_b, decided, bit_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // Cell 0: oscillator A faster (90 ps vs 110 ps per stage). Cell 1: B faster.
  localparam int unsigned DA [2] = '{90, 110};
  localparam int unsigned DB [2] = '{110, 90};

  for (genvar i = 0; i < 2; i++) begin : g_cell
    ring_oscillator #(.STAGES(5), .STAGE_DELAY_PS(DA[i])) u_ro_a (.challenge(challenge), .ro_out(ro_a[i]));
    ring_oscillator #(.STAGES(5), .STAGE_DELAY_PS(DB[i])) u_ro_b (.challenge(challenge), .ro_out(ro_b[i]));
    puf_bit #(.COUNT_W(W)) dut (.clk(clk), .rst_n(rst_n), .ro_a(ro_a[i]), .ro_b(ro_b[i]),
                                .cnt_clr(cnt_clr), .clear(clear), .decided(decided[i]),
                                .bit_out(bit_out[i]));
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;   // an explicit edge starts the asynchronous reset
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      @(negedge clk); clear = 1; cnt_clr = 1;
      @(negedge clk); clear = 0;
      checks++;
      if (decided !== 2'b00) begin failures++; $display("FAIL: decided before challenge"); end
      cnt_clr = 0; challenge = 1;
      while (decided != 2'b11) @(negedge clk);
      challenge = 0;
      checks++;
      if (bit_out !== 2'b10) begin failures++; $display("FAIL trial %0d: bits %b expected 10", trial, bit_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
