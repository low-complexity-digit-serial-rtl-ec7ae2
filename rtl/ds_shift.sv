// ds_shift -- digit-serial left shift by a constant SHIFT bit positions.
//
// A left shift of a word that streams least significant digit first is a
// delay of the bit stream by SHIFT bits, with zeros entering at the bottom of
// every word and the top SHIFT bits of the word dropped (arithmetic modulo
// 2^word length). The last SHIFT bits seen are kept in a SHIFT-bit register;
// each output digit is the low DIGIT_W bits of {current digit, kept bits},
// and the kept bits are refreshed from the top of that concatenation.
//
// Interface: `first` marks the least significant digit of a word; on that
// digit the kept bits are taken as zero so nothing leaks from the previous
// word. `en` qualifies a digit; when low the register holds.
//
// Timing: `q` is combinational in d, first and the register (zero latency);
// the register updates on the rising clock edge when `en` is high. SHIFT may
// be smaller than, equal to or larger than DIGIT_W.
// The shifts themselves (<<1 ... <<4) are those of the multiplier graph; how a
// shift is built in digit-serial form is this implementation's choice.
module ds_shift #(
  parameter int unsigned DIGIT_W = fir_ds_pkg::DIGIT_W_DEF,
  parameter int unsigned SHIFT   = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               first,
  input  logic [DIGIT_W-1:0] d,
  output logic [DIGIT_W-1:0] q
);

  if (SHIFT < 1) begin : g_bad_shift
    $error("ds_shift: SHIFT must be at least 1");
  end

  logic [SHIFT-1:0]         hist_q;
  logic [DIGIT_W+SHIFT-1:0] cat;

  always_comb begin
    cat = {d, (first ? '0 : hist_q)};
    q   = cat[DIGIT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  hist_q <= '0;
    else if (en) hist_q <= cat[DIGIT_W+SHIFT-1:DIGIT_W];
  end

endmodule
