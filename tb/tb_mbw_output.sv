// tb_mbw_output: sends runs of random pixels in each precision and rebuilds
// the expected output words bit by bit (pixel slot k, channel c at bit
// k*T*b + c*b); checks word count, contents and the early flush of a partial
// word at the last pixel of a run.
module tb_mbw_output;
  import acc_pkg::*;
  localparam int TO = 4;
  logic clk = 0, rst_n = 0;
  prec_e prec;
  logic in_valid, in_last, word_valid;
  logic [TO-1:0][7:0] in_q;
  logic [TO*8-1:0] word;
  logic [TO*8-1:0] exp_q [$];
  int checks = 0, failures = 0, partial_words = 0;

  mbw_output #(.T_OUT(TO)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && word_valid) begin
    checks++;
    if (exp_q.size() == 0 || word !== exp_q[0]) begin
      failures++;
      $display("FAIL got %h exp %h", word, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  initial begin
    in_valid = 0; in_last = 0; in_q = '0; prec = PREC_8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      int b, L, n;
      logic [TO*8-1:0] w;
      prec = prec_e'(run % 3);
      b = (run % 3 == 0) ? 8 : (run % 3 == 1) ? 4 : 2;
      L = 8 / b;
      n = $urandom_range(1, 11);
      w = '0;
      for (int p = 0; p < n; p++) begin
        @(negedge clk);
        in_valid = 1; in_last = (p == n - 1);
        for (int c = 0; c < TO; c++) begin
          int v;
          v = $urandom_range(0, 2**b - 1) - 2**(b-1);
          in_q[c] = 8'(v);
          for (int i = 0; i < b; i++) w[(p % L) * TO * b + c * b + i] = 1'(v >> i);
        end
        if ((p % L) == L - 1 || p == n - 1) begin
          exp_q.push_back(w);
          if ((p % L) != L - 1) partial_words++;
          w = '0;
        end
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
      end
      @(negedge clk) in_valid = 0;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || partial_words == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
