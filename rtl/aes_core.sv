// aes_core -- AES-128 encryption and decryption engine, one round per clock.
//
// Encryption follows the flow of the design: an initial AddRoundKey with
// w(0,3), then rounds 1..9 of SubBytes, ShiftRows, MixColumns, AddRoundKey,
// and a last round 10 without MixColumns. Decryption is the reverse flow:
// AddRoundKey with w(40,43), then rounds of InvShiftRows, InvSubBytes,
// AddRoundKey, InvMixColumns, the last round without InvMixColumns, using the
// round keys in reverse order.
//
// How it works: one shared round datapath. SubBytes acts on every byte
// separately and ShiftRows only moves bytes, so the two commute; the datapath
// always shifts first and substitutes second, which gives the same result as
// either order. A round key is added before mix_columns (decryption) or after
// it (encryption), using two add_round_key instances so that no mux loop
// forms. The round keys come from key_expansion.
// The round-per-cycle schedule and the handshake are this design's choice;
// the original description gives the steps and their order, not a schedule.
//
// Interface:
//   key_load/key  start a key expansion; key_ready = 1 when it is done
//   start/decrypt/din  start one block (accepted when !busy and key_ready)
//   dout/dout_valid    result; dout_valid is a one-cycle pulse, dout holds
// Timing: dout_valid is high NR + 1 = 11 cycles after the start cycle; a new
// block can start in the cycle after dout_valid.
module aes_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key,
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

  block_t     state;
  logic [3:0] round;        // round being computed, 1..NR
  logic       dec_q;
  logic [3:0] rk_idx;
  block_t     round_key;

  block_t sr_out, sb_out, mc_in, mc_out, ark_pre, ark_post, init_out, round_out;
  logic   last;

  key_expansion u_keyexp (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (key_load),
    .key      (key),
    .ready    (key_ready),
    .rk_idx   (rk_idx),
    .round_key(round_key)
  );

  // Round key index: the initial AddRoundKey uses key 0 (encrypt) or NR
  // (decrypt); round r uses key r (encrypt) or NR - r (decrypt).
  always_comb begin
    if (!busy) rk_idx = decrypt ? 4'(NR) : 4'd0;
    else       rk_idx = dec_q ? 4'(NR) - round : round;
  end

  add_round_key u_ark_init (.state_in(din), .round_key(round_key), .state_out(init_out));

  shift_rows  u_sr (.state_in(state),  .inverse(dec_q), .state_out(sr_out));
  sub_bytes   u_sb (.state_in(sr_out), .inverse(dec_q), .state_out(sb_out));
  add_round_key u_ark_pre (.state_in(sb_out), .round_key(round_key), .state_out(ark_pre));
  assign mc_in = dec_q ? ark_pre : sb_out;
  mix_columns u_mc (.state_in(mc_in),  .inverse(dec_q), .state_out(mc_out));
  add_round_key u_ark_post (.state_in(mc_out), .round_key(round_key), .state_out(ark_post));

  assign last = (round == 4'(NR));
  always_comb begin
    if (last)       round_out = ark_pre;   // no (Inv)MixColumns in the last round
    else if (dec_q) round_out = mc_out;
    else            round_out = ark_post;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= '0;
      round      <= '0;
      dec_q      <= 1'b0;
      busy       <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (!busy) begin
        if (start && key_ready) begin
          state <= init_out;
          dec_q <= decrypt;
          round <= 4'd1;
          busy  <= 1'b1;
        end
      end else begin
        state <= round_out;
        if (last) begin
          busy       <= 1'b0;
          dout       <= round_out;
          dout_valid <= 1'b1;
        end else begin
          round <= round + 4'd1;
        end
      end
    end
  end

  // A block must not be started before the round keys exist.
  a_start_needs_key: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> key_ready);

endmodule
