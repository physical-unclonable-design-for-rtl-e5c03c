// tb_puf_keygen -- key generator with 16 cells on two simulated dies. For
// each cell the winner of the race is predicted from the two oscillators'
// stage delays (the faster first oscillator gives 0, an exact tie gives 0);
// cells whose two counters fill within two clock periods of each other are
// not predicted. Checks the predicted bits, that a second challenge gives the
// same key on the same die, that the two dies give different keys, that both
// bit values occur, and the challenge/key_valid sequencing.
module tb_puf_keygen;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;

  localparam int unsigned NB = 16;
  localparam int unsigned W  = 10;
  localparam int unsigned MAXC = 2 ** W - 1;
  localparam int unsigned SEED [2] = '{7, 8};

  logic clk = 0, rst_n = 1, gen = 0;
  logic [1:0] challenge, key_valid, key_done, busy;
  logic [NB-1:0] ro_a [2], ro_b [2], key [2];
  int checks = 0, failures = 0, zeros = 0, ones = 0, unpredicted = 0;
  always #5 clk = ~clk;

  for (genvar d = 0; d < 2; d++) begin : g_die
    for (genvar i = 0; i < NB; i++) begin : g_ro
      ring_oscillator #(.STAGES(RO_STAGES), .STAGE_DELAY_PS(ro_stage_delay_ps(SEED[d], 2 * i)))
        u_a (.challenge(challenge[d]), .ro_out(ro_a[d][i]));
      ring_oscillator #(.STAGES(RO_STAGES), .STAGE_DELAY_PS(ro_stage_delay_ps(SEED[d], 2 * i + 1)))
        u_b (.challenge(challenge[d]), .ro_out(ro_b[d][i]));
    end
    puf_keygen #(.KEY_BITS(NB), .COUNT_W(W)) dut (
      .clk(clk), .rst_n(rst_n), .gen(gen), .ro_a(ro_a[d]), .ro_b(ro_b[d]),
      .challenge(challenge[d]), .key(key[d]), .key_valid(key_valid[d]),
      .key_done(key_done[d]), .busy(busy[d]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Predicted bit of cell i on die seed s; returns 0 when it cannot be told.
  function automatic bit predict(int unsigned s, int unsigned i, output logic b);
    longint da, db, dt;
    da = longint'(ro_stage_delay_ps(s, 2 * i));
    db = longint'(ro_stage_delay_ps(s, 2 * i + 1));
    dt = longint'(RO_STAGES) * (2 * MAXC - 1) * (da > db ? da - db : db - da);
    b  = (da > db);
    return (da == db) || (dt >= 20000);
  endfunction

  initial begin
    logic [NB-1:0] first [2];
    logic b;
    #1 rst_n = 0;   // an explicit edge starts the asynchronous reset
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 2; trial++) begin
      @(negedge clk); gen = 1;
      @(negedge clk); gen = 0;
      checks++;
      if (busy !== 2'b11 || key_valid !== 2'b00) begin failures++; $display("FAIL: not busy after gen"); end
      while (key_valid != 2'b11) begin
        @(negedge clk);
        if ((challenge & key_valid) != 2'b00) begin failures++; $display("FAIL: challenge during valid"); end
      end
      checks++;
      if (challenge !== 2'b00) begin failures++; $display("FAIL: challenge still high"); end
      for (int d = 0; d < 2; d++) begin
        if (trial == 0) begin
          first[d] = key[d];
          for (int i = 0; i < NB; i++) begin
            if (predict(SEED[d], i, b)) begin
              checks++;
              if (key[d][i] !== b) begin failures++; $display("FAIL die %0d bit %0d = %b, predicted %b", d, i, key[d][i], b); end
            end else unpredicted++;
            if (key[d][i]) ones++; else zeros++;
          end
        end else begin
          checks++;
          if (key[d] !== first[d]) begin failures++; $display("FAIL die %0d key changed: %h then %h", d, first[d], key[d]); end
        end
      end
    end
    checks++;
    if (key[0] === key[1]) begin failures++; $display("FAIL: both dies gave key %h", key[0]); end
    checks++;
    if (zeros == 0 || ones == 0) begin failures++; $display("FAIL: only one bit value seen"); end
    $display("keys %h %h, zeros %0d ones %0d, unpredicted %0d", key[0], key[1], zeros, ones, unpredicted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
