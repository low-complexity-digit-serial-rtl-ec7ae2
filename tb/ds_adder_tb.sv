// ds_adder_tb -- self-checking test of the digit-serial adder/subtractor.
//
// Four instances run side by side: 2-bit digits adding, 2-bit digits
// subtracting, 4-bit digits subtracting and 1-bit (bit-serial) adding. Each
// is fed random 16-bit words plus corner cases (carry through every digit,
// borrow through every digit), least significant digit first, with random
// stall cycles during which the operands are garbage. The collected sum
// digits are compared with a + b or a - b modulo 2^16 computed directly.
module ds_adder_tb;
  localparam int W    = 16;
  localparam int NCFG = 4;
  localparam int NWORDS = 300;
  localparam int CFG_D   [NCFG] = '{2, 2, 4, 1};
  localparam bit CFG_SUB [NCFG] = '{1'b0, 1'b1, 1'b1, 1'b0};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ndone = 0, stalls = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int  D   = CFG_D[g];
    localparam bit  SUB = CFG_SUB[g];
    localparam int  N   = W / D;
    logic         en, first;
    logic [D-1:0] a, b, s;

    ds_adder #(.DIGIT_W(D), .SUB(SUB)) dut (
      .clk, .rst_n, .en, .first, .a, .b, .s);

    initial begin : drive
      logic [W-1:0] wa, wb, expv, got;
      en = 1'b0; first = 1'b0; a = '0; b = '0;
      wait (rst_n);
      for (int w = 0; w < NWORDS; w++) begin
        case (w)
          0: begin wa = 16'hFFFF; wb = 16'h0001; end
          1: begin wa = 16'h0000; wb = 16'h0001; end
          2: begin wa = 16'h8000; wb = 16'h8000; end
          3: begin wa = 16'h7FFF; wb = 16'hFFFF; end
          default: begin wa = W'($urandom); wb = W'($urandom); end
        endcase
        expv = SUB ? (wa - wb) : (wa + wb);
        got  = '0;
        for (int i = 0; i < N; ) begin
          @(negedge clk);
          en = ($urandom_range(3) != 0);
          if (en) begin
            first = (i == 0);
            a = wa[i*D +: D];
            b = wb[i*D +: D];
          end else begin
            first = 1'($urandom);
            a = D'($urandom);
            b = D'($urandom);
            stalls++;
          end
          #1;
          if (en) begin
            got[i*D +: D] = s;
            i++;
          end
        end
        checks++;
        if (got !== expv) begin
          failures++;
          $display("FAIL cfg %0d (D=%0d SUB=%0d): %h %s %h = %h, expected %h",
                   g, D, SUB, wa, SUB ? "-" : "+", wb, got, expv);
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
    if (stalls == 0) begin
      failures++;
      $display("FAIL no stall cycle was exercised");
    end
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
