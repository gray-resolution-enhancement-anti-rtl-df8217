// tb_gret_gray_detect: windows of near-binary values with zero or one gray
// pixel at a random place, plus values right at the band limits.
module tb_gret_gray_detect;
  logic [8:0][7:0] win;
  logic [7:0]      lo = 32, hi = 224;
  logic            gray;
  int checks = 0, failures = 0;
  gret_gray_detect #(.PIX_W(8)) dut (.win, .lo, .hi, .gray);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int exp = 0;
      automatic int g = $urandom % 12;       // 0..8 gray position, else none
      for (int i = 0; i < 9; i++) begin
        case ($urandom % 4)
          0: win[i] = 8'($urandom % 33);          // 0..32, white side
          1: win[i] = 8'(224 + $urandom % 32);    // 224..255, black side
          2: win[i] = lo;
          default: win[i] = hi;
        endcase
      end
      if (g < 9) begin
        win[g] = 8'(33 + $urandom % 191);          // 33..223
        exp = 1;
      end
      #1;
      checks++;
      if (gray !== 1'(exp)) begin
        failures++;
        $display("FAIL win=%h got %0d exp %0d", win, gray, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
