// ds_shift_tb -- self-checking test of the digit-serial constant shifter.
//
// Instances cover shifts smaller than, equal to and larger than the digit
// (including the shifts 1..4 of the multiplier block at digit sizes 1, 2, 3, 4
// and 8). Each gets random 24-bit words streamed least significant digit
// first with random stalls; the collected output words must equal
// (word << SHIFT) modulo 2^24, so nothing may leak across word boundaries.
module ds_shift_tb;
  localparam int W    = 24;
  localparam int NCFG = 9;
  localparam int NWORDS = 200;
  localparam int CFG_D [NCFG] = '{2, 2, 2, 2, 4, 4, 8, 1, 3};
  localparam int CFG_K [NCFG] = '{1, 2, 3, 4, 3, 4, 1, 2, 4};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ndone = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int D = CFG_D[g];
    localparam int K = CFG_K[g];
    localparam int N = W / D;
    logic         en, first;
    logic [D-1:0] d, q;

    ds_shift #(.DIGIT_W(D), .SHIFT(K)) dut (
      .clk, .rst_n, .en, .first, .d, .q);

    initial begin : drive
      logic [W-1:0] wd, expv, got;
      en = 1'b0; first = 1'b0; d = '0;
      wait (rst_n);
      for (int w = 0; w < NWORDS; w++) begin
        wd   = (w < 2) ? {W{1'b1}} : W'($urandom);
        expv = wd << K;
        got  = '0;
        for (int i = 0; i < N; ) begin
          @(negedge clk);
          en = ($urandom_range(3) != 0);
          first = en ? (i == 0) : 1'($urandom);
          d = en ? wd[i*D +: D] : D'($urandom);
          #1;
          if (en) begin
            got[i*D +: D] = q;
            i++;
          end
        end
        checks++;
        if (got !== expv) begin
          failures++;
          $display("FAIL D=%0d SHIFT=%0d: %h -> %h, expected %h", D, K, wd, got, expv);
        end
      end
      @(negedge clk);
      en = 1'b0;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
