// puf_aes_top -- AES-128 encryption/decryption with its key taken from a
// ring-oscillator physical unclonable function instead of a stored key.
//
// Structure: 2 * KEY_BITS ring oscillators (behavioural models; on silicon
// their frequencies differ by fabrication spread) feed puf_keygen, which races
// them in pairs and produces a 128-bit key that never leaves the chip. When
// the key is ready it is loaded into aes_core, whose key expansion derives
// the 11 round keys; after that blocks are encrypted or decrypted on request.
// DIE_SEED selects the simulated fabrication spread of the oscillators, i.e.
// which chip is modelled.
//
// Interface:
//   gen_key        request a key from the PUF (done once after power-up)
//   key_ready      the PUF key is expanded and the engine accepts blocks
//   start/decrypt/din, busy, dout/dout_valid   as in aes_core
// Timing: key_ready comes CLEAR_CYCLES + PUF race + 4 + NR + 2 cycles after
// gen_key; each block then takes NR + 1 = 11 cycles.
module puf_aes_top
  import aes_pkg::*;
#(
  parameter int unsigned COUNT_W   = 10,
  parameter int unsigned RO_STAGES = puf_pkg::RO_STAGES,
  parameter int unsigned DIE_SEED  = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   gen_key,
  output logic   key_ready,
  input  logic   start,
  input  logic   decrypt,
  input  block_t din,
  output logic   busy,
  output block_t dout,
  output logic   dout_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned KEY_BITS = puf_pkg::KEY_BITS;

  logic [KEY_BITS-1:0] ro_a, ro_b;
  logic                challenge;
  logic [KEY_BITS-1:0] puf_key;
  logic                puf_key_done;

  // Oscillator 2i races oscillator 2i+1 for key bit i.
  for (genvar i = 0; i < KEY_BITS; i++) begin : g_ro
    ring_oscillator #(
      .STAGES        (RO_STAGES),
      .STAGE_DELAY_PS(puf_pkg::ro_stage_delay_ps(DIE_SEED, 2 * i))
    ) u_ro_a (.challenge(challenge), .ro_out(ro_a[i]));
    ring_oscillator #(
      .STAGES        (RO_STAGES),
      .STAGE_DELAY_PS(puf_pkg::ro_stage_delay_ps(DIE_SEED, 2 * i + 1))
    ) u_ro_b (.challenge(challenge), .ro_out(ro_b[i]));
  end

  puf_keygen #(.KEY_BITS(KEY_BITS), .COUNT_W(COUNT_W)) u_keygen (
    .clk      (clk),
    .rst_n    (rst_n),
    .gen      (gen_key),
    .ro_a     (ro_a),
    .ro_b     (ro_b),
    .challenge(challenge),
    .key      (puf_key),
    .key_valid(),
    .key_done (puf_key_done),
    .busy     ()
  );

  aes_core u_aes (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_load  (puf_key_done),
    .key       (puf_key),
    .key_ready (key_ready),
    .start     (start),
    .decrypt   (decrypt),
    .din       (din),
    .busy      (busy),
    .dout      (dout),
    .dout_valid(dout_valid)
  );

endmodule
