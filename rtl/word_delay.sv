// word_delay -- one-sample delay (z^-1) of a digit-serial word stream.
//
// A word of WORD_W bits occupies WORD_W/DIGIT_W consecutive enabled digits,
// so delaying it by one sample is a shift register of WORD_W/DIGIT_W digit
// registers. Because the delay is exactly one word long, the output stays
// aligned to the same word boundaries as the input and the digit following a
// word boundary out is the least significant digit of the previous word.
//
// Interface: `d` is the incoming digit, `q` the digit of the previous word at
// the same position; `en` qualifies a digit (the register holds when low).
// Reset clears the register, so the first word out is zero (filter state
// starts at rest).
//
// Timing: `q` is a register output; one word of latency, measured in enabled
// clocks. The delay element is the design's; its digit-register form and the
// zero reset are this implementation's choices.
module word_delay #(
  parameter int unsigned DIGIT_W = fir_ds_pkg::DIGIT_W_DEF,
  parameter int unsigned WORD_W  = fir_ds_pkg::WORD_W_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [DIGIT_W-1:0] d,
  output logic [DIGIT_W-1:0] q
);

  localparam int unsigned NDIG = WORD_W / DIGIT_W;

  if (WORD_W % DIGIT_W != 0) begin : g_bad_size
    $error("word_delay: WORD_W must be a multiple of DIGIT_W");
  end

  logic [DIGIT_W-1:0] sr_q [NDIG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NDIG; i++) sr_q[i] <= '0;
    end else if (en) begin
      sr_q[0] <= d;
      for (int i = 1; i < NDIG; i++) sr_q[i] <= sr_q[i-1];
    end
  end

  assign q = sr_q[NDIG-1];

endmodule
