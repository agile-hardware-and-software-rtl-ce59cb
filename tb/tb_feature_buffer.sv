// tb_feature_buffer: writes random words to random addresses of a 64-word
// buffer, keeps a shadow copy, and reads every address back, checking the
// one-cycle read latency and that a simultaneous write does not disturb
// other words.
module tb_feature_buffer;
  localparam int TI = 4, D = 64;
  logic clk = 0;
  logic we;
  logic [5:0] waddr, raddr;
  logic [TI*8-1:0] wdata, rdata;
  logic [TI*8-1:0] shadow [D];
  int checks = 0, failures = 0;

  feature_buffer #(.T_IN(TI), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = 32'($urandom); shadow[i] = wdata;
    end
    for (int i = 0; i < 500; i++) begin
      logic [5:0] a;
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = 6'($urandom); wdata = 32'($urandom);
      a = 6'($urandom);
      if (we && waddr == a) a = a + 1;
      raddr = a;
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rdata, shadow[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
