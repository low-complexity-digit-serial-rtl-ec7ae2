// word_delay_tb -- self-checking test of the one-word digit-serial delay.
//
// Instances with 2-, 4- and 8-bit digits (16-bit words) are fed a stream of
// random words with random stalls. The word collected at the output while
// word k goes in must be word k-1, and zero for the first word after reset.
module word_delay_tb;
  localparam int W    = 16;
  localparam int NCFG = 3;
  localparam int NWORDS = 200;
  localparam int CFG_D [NCFG] = '{2, 4, 8};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ndone = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int D = CFG_D[g];
    localparam int N = W / D;
    logic         en;
    logic [D-1:0] d, q;

    word_delay #(.DIGIT_W(D), .WORD_W(W)) dut (.clk, .rst_n, .en, .d, .q);

    initial begin : drive
      logic [W-1:0] wd, prev, got;
      en = 1'b0; d = '0;
      prev = '0;
      wait (rst_n);
      for (int w = 0; w < NWORDS; w++) begin
        wd  = W'($urandom);
        got = '0;
        for (int i = 0; i < N; ) begin
          @(negedge clk);
          en = ($urandom_range(3) != 0);
          d  = en ? wd[i*D +: D] : D'($urandom);
          #1;
          if (en) begin
            got[i*D +: D] = q;
            i++;
          end
        end
        checks++;
        if (got !== prev) begin
          failures++;
          $display("FAIL D=%0d word %0d: got %h expected %h", D, w, got, prev);
        end
        prev = wd;
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
