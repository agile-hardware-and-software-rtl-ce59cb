// tb_pe_array: drives a 3-row x 4-column array with a new random feature
// word and row weights every cycle in all precisions and checks each row sum
// against the integer dot product, two cycles after the input (latency).
module tb_pe_array;
  import acc_pkg::*;
  import tb_ref_pkg::*;

  localparam int TI = 4, TO = 3;
  localparam int RW = PE_OUT_W + $clog2(TI) + 1;
  logic clk = 0, rst_n = 0;
  prec_e prec;
  logic in_valid;
  logic [2:0] in_tag, out_tag;
  logic [TI*8-1:0] feat;
  logic [TO-1:0][TI*8-1:0] wgt;
  logic out_valid;
  logic [TO-1:0][RW-1:0] psum;
  int checks = 0, failures = 0;

  pe_array #(.T_IN(TI), .T_OUT(TO), .TAG_W(3)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values, delayed by the array latency of two cycles
  int  e_now [TO], e1 [TO], e2 [TO];
  logic ev1 = 0, ev2 = 0;
  always_comb
    for (int r = 0; r < TO; r++) e_now[r] = dot(2048'(feat), 2048'(wgt[r]), TI*8, bits_of(int'(prec)));
  always @(posedge clk) begin
    ev1 <= in_valid; e1 <= e_now;
    ev2 <= ev1;      e2 <= e1;
  end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid != ev2) begin
      failures++;
      $display("FAIL valid timing");
    end
    if (ev2)
      for (int r = 0; r < TO; r++) begin
        checks++;
        if (int'($signed(psum[r])) != e2[r]) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d got %0d exp %0d", r, $signed(psum[r]), e2[r]);
        end
      end
  end

  initial begin
    in_valid = 0; in_tag = 0; feat = 0; wgt = '0; prec = PREC_8;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      @(negedge clk);
      prec = prec_e'(p);
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 4) != 0);
        feat = TI*8'($urandom);
        for (int r = 0; r < TO; r++) wgt[r] = TI*8'($urandom);
      end
      @(negedge clk) in_valid = 0;
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
