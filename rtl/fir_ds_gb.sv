// fir_ds_gb -- 4-tap digit-serial transposed-form FIR filter, multiplierless.
//
//   y(n) = 89 x(n) + 59 x(n-1) + 43 x(n-2) + 29 x(n-3)
//
// The input sample stream x enters DIGIT_W bits per clock, least significant
// digit first, each sample a WORD_W-bit two's-complement word (WORD_W/DIGIT_W
// clocks per sample). One mcm_gb block forms 29x, 43x, 59x and 89x with six
// shifts and six adders/subtractors. In transposed form the products feed a
// chain of one-word delays and digit-serial structural adders:
//
//   29x -> [z^-1] -> (+43x) -> [z^-1] -> (+59x) -> [z^-1] -> (+89x) -> y
//
// A digit counter frames the words: `first` is high on digit 0 of each word
// and resets the carry and shift state of every adder and shift in the
// datapath. Output digits are registered.
//
// Interface: in_valid qualifies x_digit; while it is low every register in the
// filter holds (the stream may stall at any digit). The first valid digit
// after reset is digit 0 of the first sample. y_valid/y_digit give the output
// stream; y_first marks digit 0 (least significant) of each output word.
// Results are modulo 2^WORD_W: with the default 16-bit words any 8-bit signed
// input sample gives the exact output (|y| <= 220 * 128 < 2^15).
//
// Timing: one output digit per input digit; every output digit leaves one
// clock after the input digit of the same position (the whole datapath is
// combinational from the input digit to the output register). A sample rate
// of one word per WORD_W/DIGIT_W clocks.
// Structure, coefficients and digit sizes (2, 4, 8) follow the design; word
// length, framing counter, stall input, output register and the asynchronous
// active-low reset are this implementation's choices.
// The assertion at the end is disabled during reset, so lint reports rst_n as
// used both asynchronously (flip-flops) and synchronously (assertion); that is
// intended.
module fir_ds_gb #(
  parameter int unsigned DIGIT_W = fir_ds_pkg::DIGIT_W_DEF,
  parameter int unsigned WORD_W  = fir_ds_pkg::WORD_W_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [DIGIT_W-1:0] x_digit,
  output logic               y_valid,
  output logic               y_first,
  output logic [DIGIT_W-1:0] y_digit
);

  localparam int unsigned NDIG  = fir_ds_pkg::digits_per_word(WORD_W, DIGIT_W);
  localparam int unsigned CNT_W = (NDIG > 1) ? $clog2(NDIG) : 1;

  if (WORD_W % DIGIT_W != 0) begin : g_bad_size
    $error("fir_ds_gb: WORD_W must be a multiple of DIGIT_W");
  end

  // ---------------- word framing ----------------
  logic [CNT_W-1:0] dig_cnt_q;
  logic             first;

  assign first = (dig_cnt_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dig_cnt_q <= '0;
    end else if (in_valid) begin
      if (dig_cnt_q == CNT_W'(NDIG - 1)) dig_cnt_q <= '0;
      else                               dig_cnt_q <= dig_cnt_q + 1'b1;
    end
  end

  // ---------------- multiplier block ----------------
  logic [DIGIT_W-1:0] p29, p43, p59, p89;

  mcm_gb #(.DIGIT_W(DIGIT_W)) u_mcm (
    .clk, .rst_n, .en(in_valid), .first, .x(x_digit),
    .y29(p29), .y43(p43), .y59(p59), .y89(p89));

  // ---------------- transposed delay / adder line ----------------
  logic [DIGIT_W-1:0] r1, s1, r2, s2, r3, y_comb;

  word_delay #(.DIGIT_W(DIGIT_W), .WORD_W(WORD_W)) u_d1 (
    .clk, .rst_n, .en(in_valid), .d(p29), .q(r1));
  ds_adder #(.DIGIT_W(DIGIT_W), .SUB(1'b0)) u_a1 (
    .clk, .rst_n, .en(in_valid), .first, .a(r1), .b(p43), .s(s1));
  word_delay #(.DIGIT_W(DIGIT_W), .WORD_W(WORD_W)) u_d2 (
    .clk, .rst_n, .en(in_valid), .d(s1), .q(r2));
  ds_adder #(.DIGIT_W(DIGIT_W), .SUB(1'b0)) u_a2 (
    .clk, .rst_n, .en(in_valid), .first, .a(r2), .b(p59), .s(s2));
  word_delay #(.DIGIT_W(DIGIT_W), .WORD_W(WORD_W)) u_d3 (
    .clk, .rst_n, .en(in_valid), .d(s2), .q(r3));
  ds_adder #(.DIGIT_W(DIGIT_W), .SUB(1'b0)) u_a3 (
    .clk, .rst_n, .en(in_valid), .first, .a(r3), .b(p89), .s(y_comb));

  // ---------------- output register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_first <= 1'b0;
      y_digit <= '0;
    end else begin
      y_valid <= in_valid;
      y_first <= in_valid & first;
      if (in_valid) y_digit <= y_comb;
    end
  end

  // A word boundary can only be marked on a valid digit.
  a_first_valid : assert property (@(posedge clk) disable iff (!rst_n) y_first |-> y_valid);

endmodule
