// tb_activation: random and extreme accumulator values through ReLU on/off,
// shifts 0..20 and all three precisions; each output is compared with the
// reference round-and-clamp one cycle after the input.
module tb_activation;
  import acc_pkg::*;
  import tb_ref_pkg::*;
  localparam int TO = 4;
  logic clk = 0, rst_n = 0;
  prec_e prec;
  logic relu;
  logic [4:0] shift;
  logic in_valid, out_valid;
  logic [0:0] in_tag, out_tag;
  logic [TO-1:0][ACC_W-1:0] in_acc;
  logic [TO-1:0][7:0] out_q;
  int checks = 0, failures = 0;

  activation #(.T_OUT(TO), .TAG_W(1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prec = PREC_8; relu = 0; shift = 0; in_valid = 0; in_tag = 0; in_acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int e [TO];
      @(negedge clk);
      prec = prec_e'($urandom_range(0, 2));
      relu = 1'($urandom); shift = 5'($urandom_range(0, 20)); in_valid = 1;
      for (int r = 0; r < TO; r++) begin
        case ($urandom_range(0, 3))
          0: in_acc[r] = 32'($urandom);
          1: in_acc[r] = 32'($urandom_range(0, 2000)) - 32'd1000;
          2: in_acc[r] = 32'h8000_0000;
          default: in_acc[r] = 32'h7FFF_FFFF;
        endcase
        e[r] = requant(longint'($signed(in_acc[r])), relu, int'(shift), bits_of(int'(prec)));
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int r = 0; r < TO; r++) begin
        checks++;
        if (int'($signed(out_q[r])) != e[r]) begin
          failures++;
          if (failures < 10) $display("FAIL acc=%0d relu=%0d sh=%0d p=%0d got %0d exp %0d",
            $signed(in_acc[r]), relu, shift, prec, $signed(out_q[r]), e[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
