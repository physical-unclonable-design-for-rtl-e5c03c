// puf_comparator -- decides one PUF bit from the race of two counters.
//
// The full flags of the two counters come from the two ring-oscillator clock
// domains; each is brought into the system clock domain through a two-flop
// synchronizer. On the first system clock edge at which either synchronized
// flag is seen, the bit is decided and held: 0 if the first counter (A) has
// reached its limit, otherwise 1. If both are seen at the same edge, counter
// A counts as first and the bit is 0. clear (synchronous) forgets the decision
// before a new challenge.
// The 0/1 rule is the original description's; the synchronizers and the tie
// rule are this design's choice.
//
// Interface: clk, rst_n, clear, full_a, full_b in; decided, bit_out out.
// Timing: decided rises 3 clk edges after the first full flag rises.
module puf_comparator (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic full_a,
  input  logic full_b,
  output logic decided,
  output logic bit_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [1:0] sync_a;
  logic [1:0] sync_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a  <= '0;
      sync_b  <= '0;
      decided <= 1'b0;
      bit_out <= 1'b0;
    end else if (clear) begin
      sync_a  <= '0;
      sync_b  <= '0;
      decided <= 1'b0;
      bit_out <= 1'b0;
    end else begin
      sync_a <= {sync_a[0], full_a};
      sync_b <= {sync_b[0], full_b};
      if (!decided && (sync_a[1] || sync_b[1])) begin
        decided <= 1'b1;
        bit_out <= ~sync_a[1];
      end
    end
  end

endmodule
