// tb_weight_buffer: fills four 32-word banks bank by bank with random words,
// then reads every address and checks that all four banks answer together
// one cycle later with their own word.
module tb_weight_buffer;
  localparam int TI = 2, TO = 4, D = 32;
  logic clk = 0;
  logic we;
  logic [1:0] wrow;
  logic [4:0] waddr, raddr;
  logic [TI*8-1:0] wdata;
  logic [TO-1:0][TI*8-1:0] rdata;
  logic [TI*8-1:0] shadow [TO][D];
  int checks = 0, failures = 0;

  weight_buffer #(.T_IN(TI), .T_OUT(TO), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wrow = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < D; a++)
      for (int r = 0; r < TO; r++) begin
        @(negedge clk);
        we = 1; wrow = 2'(r); waddr = 5'(a); wdata = 16'($urandom); shadow[r][a] = wdata;
      end
    @(negedge clk) we = 0;
    for (int k = 0; k < 3 * D; k++) begin
      int a;
      a = $urandom_range(0, D - 1);
      raddr = 5'(a);
      @(negedge clk);
      for (int r = 0; r < TO; r++) begin
        checks++;
        if (rdata[r] !== shadow[r][a]) begin
          failures++;
          $display("FAIL bank %0d addr %0d got %h exp %h", r, a, rdata[r], shadow[r][a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
