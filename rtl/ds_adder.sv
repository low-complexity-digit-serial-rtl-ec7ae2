// ds_adder -- digit-serial adder / subtractor.
//
// Adds (SUB = 0) or subtracts (SUB = 1, computes a - b) two two's-complement
// words that arrive one DIGIT_W-bit digit per enabled clock, least significant
// digit first. Inside is a ripple chain of DIGIT_W full adders; the carry out
// of the last one is stored in a single flip-flop and fed back as the carry
// into the first one on the next digit, so one word costs one flip-flop of
// state regardless of its length. Subtraction inverts b and starts each word
// with a carry of 1 (a - b = a + ~b + 1).
//
// Interface: `first` marks the least significant digit of a word; on that
// digit the stored carry is ignored and replaced by the word's initial carry
// (0 for add, 1 for subtract). `en` qualifies a digit: when low the carry
// flip-flop holds and the inputs are ignored.
//
// Timing: `s` is combinational in a, b, first and the carry flip-flop, i.e.
// the sum digit appears in the same cycle as the operand digits (zero
// latency); the carry is updated on the rising clock edge when `en` is high.
// The full-adder chain with a carry flip-flop follows the digit-serial adder of
// the design; the word-start carry control, the enable and the asynchronous
// active-low reset are this implementation's choices.
module ds_adder #(
  parameter int unsigned DIGIT_W = fir_ds_pkg::DIGIT_W_DEF,
  parameter bit          SUB     = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               first,
  input  logic [DIGIT_W-1:0] a,
  input  logic [DIGIT_W-1:0] b,
  output logic [DIGIT_W-1:0] s
);

  logic               carry_q;
  logic [DIGIT_W:0]   c;      // c[i] is the carry into full adder i
  logic [DIGIT_W-1:0] b_op;

  assign b_op = SUB ? ~b : b;
  assign c[0] = first ? SUB : carry_q;

  // Ripple chain of full adders, one per bit of the digit.
  for (genvar i = 0; i < DIGIT_W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b_op[i] ^ c[i];
    assign c[i+1] = (a[i] & b_op[i]) | (c[i] & (a[i] ^ b_op[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  carry_q <= 1'b0;
    else if (en) carry_q <= c[DIGIT_W];
  end

endmodule
