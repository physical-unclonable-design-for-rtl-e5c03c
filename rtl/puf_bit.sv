// puf_bit -- one-bit ring-oscillator PUF cell: two counters and a comparator.
//
// The cell watches two ring oscillators that the same challenge enables. Each
// oscillator clocks its own ro_counter; whichever counter reaches its maximum
// first wins, and puf_comparator turns the race into a bit (0 when the first
// oscillator's counter wins, 1 otherwise). Because the winner depends on
// delays that fabrication gives the two oscillators, the bit differs from
// chip to chip but is repeatable on one chip. The oscillators themselves are
// outside the cell (see ring_oscillator), so the cell is synthesizable.
//
// Interface: ro_a, ro_b (oscillator outputs), clk/rst_n (system clock),
// cnt_clr (async counter clear), clear (sync comparator clear),
// decided, bit_out.
module puf_bit #(
  parameter int unsigned COUNT_W = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ro_a,
  input  logic ro_b,
  input  logic cnt_clr,
  input  logic clear,
  output logic decided,
  output logic bit_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic               full_a, full_b;

  ro_counter #(.COUNT_W(COUNT_W)) u_cnt_a (.ro_clk(ro_a), .clr(cnt_clr), .count(), .full(full_a));
  ro_counter #(.COUNT_W(COUNT_W)) u_cnt_b (.ro_clk(ro_b), .clr(cnt_clr), .count(), .full(full_b));

  puf_comparator u_cmp (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (clear),
    .full_a (full_a),
    .full_b (full_b),
    .decided(decided),
    .bit_out(bit_out)
  );

endmodule
