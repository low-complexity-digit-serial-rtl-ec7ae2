// fir_ds_gb_tb -- end-to-end test of the digit-serial 4-tap FIR filter.
//
// The filter runs in its default configuration (2-bit digits, 16-bit words,
// no parameter override). The input stream starts with a step (ten
// samples of 1, whose response must climb 89, 148, 191, 220 and stay at 220),
// then an impulse, the extremes +127 / -128, then random 8-bit signed
// samples. Digits go in least significant first with random stall cycles.
// A reference computes y(n) = 89x(n) + 59x(n-1) + 43x(n-2) + 29x(n-3) from
// the sample history; every output word is compared with it.
//
// Timing is checked too: the least significant output digit of each word
// (y_first) must come exactly one clock after the least significant input
// digit of the same sample is accepted, and one output digit leaves per
// accepted input digit.
//
// Mechanisms counted (each must occur at least once):
// input stalls, negative output words, output words whose magnitude needs
// more than 8 bits (carries through several digits), the settled step value
// 220 and the impulse response taps.
module fir_ds_gb_tb;
  import fir_ds_pkg::COEF;
  localparam int W      = fir_ds_pkg::WORD_W_DEF;
  localparam int NCFG   = 1;
  localparam int NWORDS = 400;
  localparam int CFG_D [NCFG] = '{fir_ds_pkg::DIGIT_W_DEF};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ndone = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int sample_at(int w);
    // Stimulus: step, impulse, extremes, then random 8-bit signed values.
    if (w < 10)       return 1;
    else if (w < 14)  return 0;
    else if (w == 14) return 1;
    else if (w < 19)  return 0;
    else if (w < 24)  return 127;
    else if (w < 29)  return -128;
    else              return int'($signed(8'($urandom)));
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int D = CFG_D[g];
    localparam int N = W / D;
    logic         in_valid, y_valid, y_first;
    logic [D-1:0] x_digit, y_digit;

    int     xs [NWORDS];
    longint first_in_cyc [$];
    int     n_stall = 0, n_neg = 0, n_wide = 0, n_step = 0, n_imp = 0, n_out = 0;
    int     n_in_digits = 0, n_out_digits = 0;
    bit     drv_done = 1'b0;

    fir_ds_gb dut (.clk, .rst_n, .in_valid, .x_digit, .y_valid, .y_first, .y_digit);

    // ---- driver ----
    initial begin : drive
      logic [W-1:0] wx;
      in_valid = 1'b0; x_digit = '0;
      for (int w = 0; w < NWORDS; w++) xs[w] = sample_at(w);
      wait (rst_n);
      for (int w = 0; w < NWORDS; w++) begin
        wx = W'(xs[w]);
        for (int i = 0; i < N; ) begin
          @(negedge clk);
          in_valid = ($urandom_range(4) != 0);
          if (in_valid) begin
            x_digit = wx[i*D +: D];
            if (i == 0) first_in_cyc.push_back(cyc);
            n_in_digits++;
            i++;
          end else begin
            x_digit = D'($urandom);
            n_stall++;
          end
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      drv_done = 1'b1;
    end

    // ---- monitor ----
    initial begin : monitor
      logic [W-1:0] got;
      int  oidx;
      longint expv, t0;
      got = '0; oidx = 0;
      wait (rst_n);
      while (n_out < NWORDS) begin
        @(negedge clk);
        if (y_valid) begin
          n_out_digits++;
          if (y_first) begin
            checks++;
            if (oidx != 0) begin
              failures++;
              $display("FAIL D=%0d y_first at digit %0d", D, oidx);
            end
            t0 = first_in_cyc.pop_front();
            checks++;
            if (cyc != t0 + 1) begin
              failures++;
              $display("FAIL D=%0d output word %0d latency %0d cycles", D, n_out, cyc - t0);
            end
            oidx = 0;
          end
          got[oidx*D +: D] = y_digit;
          oidx++;
          if (oidx == N) begin
            expv = 89 * xs[n_out];
            if (n_out >= 1) expv += 59 * xs[n_out-1];
            if (n_out >= 2) expv += 43 * xs[n_out-2];
            if (n_out >= 3) expv += 29 * xs[n_out-3];
            checks++;
            if (longint'($signed(got)) != expv) begin
              failures++;
              $display("FAIL D=%0d word %0d: y=%0d expected %0d", D, n_out, $signed(got), expv);
            end
            if (expv < 0) n_neg++;
            if (expv > 255 || expv < -256) n_wide++;
            if (n_out >= 3 && n_out < 10 && expv == 220) n_step++;
            // impulse at sample 14 after four zero samples: taps 89, 59, 43, 29
            if (n_out >= 14 && n_out <= 17 && expv == longint'(COEF[n_out-14])) n_imp++;
            n_out++;
            oidx = 0;
          end
        end
      end
      // Rate: one output digit per accepted input digit.
      wait (drv_done);
      checks++;
      if (n_out_digits != n_in_digits) begin
        failures++;
        $display("FAIL D=%0d %0d output digits for %0d input digits", D, n_out_digits, n_in_digits);
      end
      $display("D=%0d words=%0d stalls=%0d negative=%0d wide=%0d step220=%0d impulse_taps=%0d",
               D, n_out, n_stall, n_neg, n_wide, n_step, n_imp);
      checks++;
      if (n_stall == 0 || n_neg == 0 || n_wide == 0 || n_step == 0 || n_imp != 4) begin
        failures++;
        $display("FAIL D=%0d a mechanism was not exercised", D);
      end
      ndone++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (ndone == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
