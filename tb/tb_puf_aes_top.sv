// tb_puf_aes_top -- end-to-end test of the whole design at its default
// parameters: the PUF generates the 128-bit key from 256 ring oscillators,
// the key is expanded, and blocks are encrypted and decrypted with it.
//
// The key is predicted bit by bit from the oscillators' stage delays (faster
// first oscillator gives 0, an exact tie gives 0). Bits whose two counters
// fill within two clock periods of each other are not predicted; for those
// the generated bit is taken as it is. With the key so known, ciphertexts are
// compared with the reference AES model and decryption must return the
// plaintext. The mechanisms exercised are counted: key generation, both bit
// values, encryption, decryption; any that never happens is a failure.
module tb_puf_aes_top;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned MAXC = 2 ** 10 - 1;   // default counter limit
  localparam int unsigned SEED = 1;              // default die

  logic clk = 0, rst_n = 1, gen_key = 0, key_ready, start = 0, decrypt = 0, busy, dout_valid;
  logic [127:0] din = '0, dout;
  int checks = 0, failures = 0;
  int n_keygen = 0, n_zero = 0, n_one = 0, n_enc = 0, n_dec = 0, n_unpred = 0;
  always #5 clk = ~clk;

  puf_aes_top dut (.clk(clk), .rst_n(rst_n), .gen_key(gen_key), .key_ready(key_ready),
                   .start(start), .decrypt(decrypt), .din(din), .busy(busy), .dout(dout),
                   .dout_valid(dout_valid));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic block(logic dec, logic [127:0] d, output logic [127:0] res);
    int cycles;
    @(negedge clk); din = d; decrypt = dec; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!dout_valid) begin @(negedge clk); cycles++; end
    res = dout;
    checks++;
    if (cycles != 11) begin failures++; $display("FAIL latency %0d", cycles); end
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    logic [127:0] key, ct, pt, p;
    longint da, db, dt;
    int kcycles;
    #1 rst_n = 0;   // an explicit edge starts the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (key_ready !== 1'b0) begin failures++; $display("FAIL: key ready before generation"); end
    @(negedge clk); gen_key = 1;
    @(negedge clk); gen_key = 0;
    kcycles = 1;
    while (!key_ready) begin @(negedge clk); kcycles++; end
    $display("key generated and expanded after %0d cycles", kcycles);
    n_keygen++;
    // Predict the key; take unpredictable bits from the generator.
    key = dut.u_keygen.key;
    for (int i = 0; i < KEY_BITS; i++) begin
      da = longint'(ro_stage_delay_ps(SEED, 2 * i));
      db = longint'(ro_stage_delay_ps(SEED, 2 * i + 1));
      dt = longint'(RO_STAGES) * (2 * MAXC - 1) * (da > db ? da - db : db - da);
      if (da == db || dt >= 20000) begin
        checks++;
        if (key[i] !== (da > db)) begin
          failures++; $display("FAIL key bit %0d = %b, delays %0d/%0d ps", i, key[i], da, db);
        end
      end else n_unpred++;
      if (key[i]) n_one++; else n_zero++;
    end
    $display("PUF key %h (%0d bits not predicted)", key, n_unpred);
    for (int n = 0; n < 8; n++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      block(0, p, ct);
      checks++;
      if (ct !== encrypt(key, p)) begin failures++; $display("FAIL encrypt %h: %h", p, ct); end
      block(1, ct, pt);
      checks++;
      if (pt !== p) begin failures++; $display("FAIL decrypt %h: %h expected %h", ct, pt, p); end
    end
    $display("mechanisms: keygen=%0d zero_bits=%0d one_bits=%0d encrypt=%0d decrypt=%0d",
             n_keygen, n_zero, n_one, n_enc, n_dec);
    checks++;
    if (n_keygen == 0 || n_zero == 0 || n_one == 0 || n_enc == 0 || n_dec == 0) begin
      failures++; $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
