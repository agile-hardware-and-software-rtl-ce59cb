// tb_accum_unit: feeds pixels of random length (1 to 9 steps, back to back,
// with idle gaps) and checks that each completed sum equals the sum of its
// inputs and appears one cycle after the step marked last, with its tag.
module tb_accum_unit;
  import acc_pkg::*;
  localparam int TO = 3, IW = 20;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, in_last;
  logic [0:0] in_tag, out_tag;
  logic [TO-1:0][IW-1:0] in_psum;
  logic out_valid;
  logic [TO-1:0][ACC_W-1:0] out_acc;
  int checks = 0, failures = 0;

  accum_unit #(.T_OUT(TO), .IN_W(IW), .TAG_W(1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [TO-1:0][31:0] sum;
  logic [TO-1:0][31:0] exp_q [$];
  bit tag_q [$];
  logic ev = 0;
  always @(posedge clk) ev <= in_valid && in_last;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid != ev) begin failures++; $display("FAIL timing"); end
    if (out_valid && exp_q.size() > 0) begin
      logic [TO-1:0][31:0] e;
      bit t;
      e = exp_q.pop_front(); t = tag_q.pop_front();
      checks++;
      if (out_tag != t) failures++;
      for (int r = 0; r < TO; r++) begin
        checks++;
        if (out_acc[r] != e[r]) begin
          failures++; $display("FAIL r%0d got %0d exp %0d", r, $signed(out_acc[r]), $signed(e[r]));
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_tag = 0; in_psum = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      int n;
      n = $urandom_range(1, 9);
      sum = '0;
      for (int s = 0; s < n; s++) begin
        @(negedge clk);
        in_valid = 1; in_first = (s == 0); in_last = (s == n - 1); in_tag = 1'($urandom);
        for (int r = 0; r < TO; r++) begin
          int v;
          v = $urandom_range(0, 2**IW - 1) - 2**(IW-1);
          in_psum[r] = IW'(v);
          sum[r] = sum[r] + 32'(v);
        end
        if (in_last) begin exp_q.push_back(sum); tag_q.push_back(in_tag); end
      end
      if ($urandom_range(0, 2) == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(negedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
