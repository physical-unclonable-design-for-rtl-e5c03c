// puf_keygen -- generates the 128-bit AES key from KEY_BITS one-bit RO PUF
// cells.
//
// How it works: a request on gen runs one challenge. The controller first
// clears every comparator and every counter (CLEAR, CLEAR_CYCLES cycles; the
// counter clear rises on entering CLEAR, so that even counters that powered up
// at random values see a clear edge), then raises challenge, which enables
// all 2 * KEY_BITS ring oscillators at once (RUN). When every cell has decided
// its bit the challenge is dropped, the bits are stored as the key and
// key_valid goes high with a one-cycle key_done pulse. Bit i of the key comes
// from cell i, which races oscillator ro_a[i] against ro_b[i].
// Generating all key bits from one PUF bit per key bit follows the original
// description; the controller, its states and the shared challenge are this
// design's choice.
//
// Interface: gen (request, taken when not busy), ro_a/ro_b (oscillator
// outputs), challenge (oscillator enable), key, key_valid, key_done, busy.
// Timing: one challenge takes CLEAR_CYCLES + the time for the slower
// counter of the last pair to fill + about 4 cycles of synchronisation.
module puf_keygen #(
  parameter int unsigned KEY_BITS     = 128,
  parameter int unsigned COUNT_W      = 10,
  parameter int unsigned CLEAR_CYCLES = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                gen,
  input  logic [KEY_BITS-1:0] ro_a,
  input  logic [KEY_BITS-1:0] ro_b,
  output logic                challenge,
  output logic [KEY_BITS-1:0] key,
  output logic                key_valid,
  output logic                key_done,
  output logic                busy
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_DONE} state_t;
  state_t state;

  logic [$clog2(CLEAR_CYCLES + 1)-1:0] clr_cnt;
  logic [KEY_BITS-1:0]                 decided;
  logic [KEY_BITS-1:0]                 bits;
  logic                                cnt_clr;
  logic                                cmp_clear;

  // challenge and the counter clear are registered so that neither can
  // glitch: one enables free-running oscillators, the other is an
  // asynchronous reset.
  assign cmp_clear = (state == S_CLEAR);
  assign busy      = (state != S_IDLE);

  for (genvar i = 0; i < KEY_BITS; i++) begin : g_cell
    puf_bit #(.COUNT_W(COUNT_W)) u_bit (
      .clk    (clk),
      .rst_n  (rst_n),
      .ro_a   (ro_a[i]),
      .ro_b   (ro_b[i]),
      .cnt_clr(cnt_clr),
      .clear  (cmp_clear),
      .decided(decided[i]),
      .bit_out(bits[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      clr_cnt   <= '0;
      key       <= '0;
      key_valid <= 1'b0;
      key_done  <= 1'b0;
      challenge <= 1'b0;
      cnt_clr   <= 1'b0;
    end else begin
      key_done <= 1'b0;
      unique case (state)
        S_IDLE: if (gen) begin
          state     <= S_CLEAR;
          clr_cnt   <= '0;
          key_valid <= 1'b0;
          cnt_clr   <= 1'b1;
        end
        S_CLEAR: begin
          clr_cnt <= clr_cnt + 1'b1;
          if (clr_cnt == $bits(clr_cnt)'(CLEAR_CYCLES - 1)) begin
            state     <= S_RUN;
            challenge <= 1'b1;
            cnt_clr   <= 1'b0;
          end
        end
        S_RUN: if (&decided) begin
          key       <= bits;
          state     <= S_DONE;
          challenge <= 1'b0;
        end
        S_DONE: begin
          key_valid <= 1'b1;
          key_done  <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
