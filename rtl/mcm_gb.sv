// mcm_gb -- digit-serial multiple constant multiplier for 29x, 43x, 59x, 89x.
//
// One input stream x is multiplied by the four filter coefficients at once
// with shifts and adders only, sharing intermediate results as found by a
// graph-based MCM search:
//
//    7x = (x << 3) - x          15x = (x << 4) - x
//   29x = (7x << 2) + x         59x = (15x << 2) - x
//   43x = (7x << 1) + 29x       89x = (15x << 1) + 59x
//
// Each coefficient pair therefore costs three adders/subtractors and three
// shifts (29/43: one subtractor, two adders; 59/89: two subtractors, one
// adder), six of each in total. Every adder is a ds_adder and every shift a
// ds_shift, so all results stream out digit by digit, least significant
// digit first, in step with the input.
//
// Interface: `x` is one DIGIT_W-bit digit of a two's-complement word; `first`
// marks its least significant digit; `en` qualifies the digit. Outputs are
// the matching digits of the four products, modulo 2^word length.
//
// Timing: all outputs are combinational in the current input digit and the
// internal carry / shift registers (zero latency, one digit per enabled
// clock). The decomposition follows the design's multiplier graph; the
// digit-serial word framing is this implementation's choice.
module mcm_gb #(
  parameter int unsigned DIGIT_W = fir_ds_pkg::DIGIT_W_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               first,
  input  logic [DIGIT_W-1:0] x,
  output logic [DIGIT_W-1:0] y29,
  output logic [DIGIT_W-1:0] y43,
  output logic [DIGIT_W-1:0] y59,
  output logic [DIGIT_W-1:0] y89
);

  logic [DIGIT_W-1:0] x_sl3, x7, x7_sl2, x7_sl1;
  logic [DIGIT_W-1:0] x_sl4, x15, x15_sl2, x15_sl1;

  // ---- pair 29x / 43x ----
  ds_shift #(.DIGIT_W(DIGIT_W), .SHIFT(3)) u_sl3 (
    .clk, .rst_n, .en, .first, .d(x), .q(x_sl3));
  ds_adder #(.DIGIT_W(DIGIT_W), .SUB(1'b1)) u_sub7 (
    .clk, .rst_n, .en, .first, .a(x_sl3), .b(x), .s(x7));
  ds_shift #(.DIGIT_W(DIGIT_W), .SHIFT(2)) u_sl2_7 (
    .clk, .rst_n, .en, .first, .d(x7), .q(x7_sl2));
  ds_adder #(.DIGIT_W(DIGIT_W), .SUB(1'b0)) u_add29 (
    .clk, .rst_n, .en, .first, .a(x7_sl2), .b(x), .s(y29));
  ds_shift #(.DIGIT_W(DIGIT_W), .SHIFT(1)) u_sl1_7 (
    .clk, .rst_n, .en, .first, .d(x7), .q(x7_sl1));
  ds_adder #(.DIGIT_W(DIGIT_W), .SUB(1'b0)) u_add43 (
    .clk, .rst_n, .en, .first, .a(x7_sl1), .b(y29), .s(y43));

  // ---- pair 59x / 89x ----
  ds_shift #(.DIGIT_W(DIGIT_W), .SHIFT(4)) u_sl4 (
    .clk, .rst_n, .en, .first, .d(x), .q(x_sl4));
  ds_adder #(.DIGIT_W(DIGIT_W), .SUB(1'b1)) u_sub15 (
    .clk, .rst_n, .en, .first, .a(x_sl4), .b(x), .s(x15));
  ds_shift #(.DIGIT_W(DIGIT_W), .SHIFT(2)) u_sl2_15 (
    .clk, .rst_n, .en, .first, .d(x15), .q(x15_sl2));
  ds_adder #(.DIGIT_W(DIGIT_W), .SUB(1'b1)) u_sub59 (
    .clk, .rst_n, .en, .first, .a(x15_sl2), .b(x), .s(y59));
  ds_shift #(.DIGIT_W(DIGIT_W), .SHIFT(1)) u_sl1_15 (
    .clk, .rst_n, .en, .first, .d(x15), .q(x15_sl1));
  ds_adder #(.DIGIT_W(DIGIT_W), .SUB(1'b0)) u_add89 (
    .clk, .rst_n, .en, .first, .a(x15_sl1), .b(y59), .s(y89));

endmodule
