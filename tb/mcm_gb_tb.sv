// mcm_gb_tb -- self-checking test of the digit-serial 29/43/59/89 multiplier.
//
// One instance per digit size (2, 4 and 8 bits, 16-bit words) is fed 8-bit
// signed samples sign-extended to 16 bits plus full-range 16-bit words and
// the extremes, with random stalls. Each of the four product words must equal
// c * x modulo 2^16, computed here with an ordinary multiplication.
module mcm_gb_tb;
  localparam int W    = 16;
  localparam int NCFG = 3;
  localparam int NWORDS = 300;
  localparam int CFG_D [NCFG] = '{2, 4, 8};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ndone = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int D = CFG_D[g];
    localparam int N = W / D;
    logic         en, first;
    logic [D-1:0] x, y29, y43, y59, y89;

    mcm_gb #(.DIGIT_W(D)) dut (
      .clk, .rst_n, .en, .first, .x, .y29, .y43, .y59, .y89);

    initial begin : drive
      logic [W-1:0] wx;
      logic [W-1:0] got [4];
      logic [W-1:0] expv [4];
      en = 1'b0; first = 1'b0; x = '0;
      wait (rst_n);
      for (int w = 0; w < NWORDS; w++) begin
        case (w)
          0: wx = 16'h0001;
          1: wx = 16'hFF80;   // -128
          2: wx = 16'h007F;   // 127
          3: wx = 16'hFFFF;   // -1
          default: wx = (w % 2 != 0) ? W'($signed(8'($urandom))) : W'($urandom);
        endcase
        expv[0] = W'(29 * wx);
        expv[1] = W'(43 * wx);
        expv[2] = W'(59 * wx);
        expv[3] = W'(89 * wx);
        for (int k = 0; k < 4; k++) got[k] = '0;
        for (int i = 0; i < N; ) begin
          @(negedge clk);
          en = ($urandom_range(3) != 0);
          first = en ? (i == 0) : 1'($urandom);
          x = en ? wx[i*D +: D] : D'($urandom);
          #1;
          if (en) begin
            got[0][i*D +: D] = y29;
            got[1][i*D +: D] = y43;
            got[2][i*D +: D] = y59;
            got[3][i*D +: D] = y89;
            i++;
          end
        end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (got[k] !== expv[k]) begin
            failures++;
            $display("FAIL D=%0d x=%h product %0d: got %h expected %h", D, wx, k, got[k], expv[k]);
          end
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
