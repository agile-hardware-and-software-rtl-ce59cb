// tb_pooling: random windows of 1 to 9 words in each precision; the expected
// result is the element-wise signed maximum computed per element; checks the
// value and that it appears one cycle after the last word.
module tb_pooling;
  import acc_pkg::*;
  import tb_ref_pkg::*;
  localparam int TI = 4, WW = TI * 8;
  logic clk = 0, rst_n = 0;
  prec_e prec;
  logic in_valid, in_first, in_last, out_valid;
  logic [WW-1:0] in_word, out_word;
  int checks = 0, failures = 0;

  pooling #(.T_IN(TI)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_word = '0; prec = PREC_8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      int b, n;
      int mx [32];
      prec = prec_e'(k % 3);
      b = bits_of(k % 3);
      n = $urandom_range(1, 9);
      for (int e = 0; e < WW / b; e++) mx[e] = -1000;
      for (int s = 0; s < n; s++) begin
        @(negedge clk);
        in_valid = 1; in_first = (s == 0); in_last = (s == n - 1);
        in_word = WW'($urandom);
        for (int e = 0; e < WW / b; e++)
          if (elem(2048'(in_word), e, b) > mx[e]) mx[e] = elem(2048'(in_word), e, b);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int e = 0; e < WW / b; e++) begin
        checks++;
        if (elem(2048'(out_word), e, b) != mx[e]) begin
          failures++;
          if (failures < 10) $display("FAIL b=%0d e=%0d got %0d exp %0d", b, e, elem(2048'(out_word), e, b), mx[e]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
