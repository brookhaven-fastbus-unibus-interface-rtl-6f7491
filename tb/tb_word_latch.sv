// tb_word_latch -- self-checking test of the holding register at 16 and 32
// bits: reset to zero, load on ld, hold otherwise.
module tb_word_latch;
  logic clk = 0, rst = 1, ld = 0;
  logic [15:0] d16, q16;
  logic [31:0] d32, q32;
  logic [15:0] m16;
  logic [31:0] m32;
  int checks = 0, failures = 0;

  word_latch #(.W(16)) u16 (.clk, .rst, .ld, .d(d16), .q(q16));
  word_latch #(.W(32)) u32 (.clk, .rst, .ld, .d(d32), .q(q32));
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    d16 = 16'hFFFF; d32 = '1;
    @(negedge clk); @(negedge clk);
    chk(q16 == 0 && q32 == 0, "reset");
    rst = 0; m16 = 0; m32 = 0;
    repeat (300) begin
      d16 = 16'($urandom); d32 = $urandom; ld = 1'($urandom);
      if (ld) begin m16 = d16; m32 = d32; end
      @(negedge clk);
      chk(q16 == m16 && q32 == m32, "load/hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
