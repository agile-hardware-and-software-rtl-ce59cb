// tb_bsc_pe: checks the BSC multi-bit-width PE against integer dot products
// of the packed operands, for random and corner-case words in all three
// precisions (8-bit: one product, 4-bit: two, 2-bit: four).
module tb_bsc_pe;
  import acc_pkg::*;
  import tb_ref_pkg::*;

  prec_e              prec;
  logic [7:0]         feat, wgt;
  logic signed [16:0] psum;
  int checks = 0, failures = 0;
  logic clk = 0;

  bsc_pe dut (.prec, .feat, .wgt, .psum);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(prec_e p, logic [7:0] f, logic [7:0] w);
    int exp;
    prec = p; feat = f; wgt = w;
    #1;
    exp = dot({2040'd0, f}, {2040'd0, w}, 8, bits_of(int'(p)));
    checks++;
    if (int'(psum) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL prec=%0d f=%h w=%h got=%0d exp=%0d", p, f, w, psum, exp);
    end
  endtask

  initial begin
    for (int p = 0; p < 3; p++) begin
      check_one(prec_e'(p), 8'h80, 8'h80);
      check_one(prec_e'(p), 8'h7F, 8'h80);
      check_one(prec_e'(p), 8'hFF, 8'hFF);
      check_one(prec_e'(p), 8'h7F, 8'h7F);
      check_one(prec_e'(p), 8'h88, 8'h77);
      check_one(prec_e'(p), 8'hAA, 8'h55);
      for (int i = 0; i < 3000; i++) check_one(prec_e'(p), 8'($urandom), 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
