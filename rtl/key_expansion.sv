// key_expansion -- "Expand key": turns the 128-bit cipher key into the 11
// round keys w(0,3), w(4,7) .. w(40,43) used by the AES rounds.
//
// How it works: on load the key is stored as round key 0. In each of the next
// NR clock cycles one further round key is derived from the previous one with
// the AES-128 schedule: the last word is rotated by one byte, passed through
// four S-boxes and XORed with the round constant, then each word is the XOR of
// the word four positions back and the word before it. The round constant
// starts at 01 and is doubled in GF(2^8) every round. All round keys are kept
// in a register file, because decryption uses them in reverse order.
// The original description names this block only; its insides here are the
// standard AES-128 key schedule, computed one round key per cycle (this
// design's choice).
//
// Interface: load/key start an expansion (load is ignored while busy);
// ready is 1 once all 11 round keys are valid; rk_idx selects the round key
// presented combinationally on round_key.
// Timing: ready rises NR + 1 cycles after the load cycle.
module key_expansion
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  block_t     key,
  output logic       ready,
  input  logic [3:0] rk_idx,
  output block_t     round_key
);
  timeunit 1ns;
  timeprecision 1ps;

  block_t     rk [NR + 1];
  logic [3:0] step;         // index of the round key being produced
  logic       busy;
  byte_t      rcon;

  block_t prev;
  word_t  w0, w1, w2, w3, rot, sub, t;
  block_t next_rk;

  assign prev = rk[step - 4'd1];
  assign {w0, w1, w2, w3} = prev;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_subword
    aes_sbox u_sbox (.din(rot[8 * i +: 8]), .inverse(1'b0), .dout(sub[8 * i +: 8]));
  end

  always_comb begin
    t       = sub ^ {rcon, 24'h0};
    next_rk[127:96] = w0 ^ t;
    next_rk[95:64]  = w0 ^ t ^ w1;
    next_rk[63:32]  = w0 ^ t ^ w1 ^ w2;
    next_rk[31:0]   = w0 ^ t ^ w1 ^ w2 ^ w3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      step  <= '0;
      rcon  <= 8'h01;
      for (int i = 0; i <= NR; i++) rk[i] <= '0;
    end else if (load && !busy) begin
      rk[0] <= key;
      busy  <= 1'b1;
      ready <= 1'b0;
      step  <= 4'd1;
      rcon  <= 8'h01;
    end else if (busy) begin
      rk[step] <= next_rk;
      rcon     <= xtime(rcon);
      if (step == 4'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end else begin
        step <= step + 4'd1;
      end
    end
  end

  assign round_key = (rk_idx <= 4'(NR)) ? rk[rk_idx] : '0;

endmodule
