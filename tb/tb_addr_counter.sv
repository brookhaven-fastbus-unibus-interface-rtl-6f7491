// tb_addr_counter -- self-checking test of the address counter/shifter:
// loads random 20-bit FASTBUS word addresses, steps through blocks of 32- and
// 16-bit words and checks every UNIBUS byte address (4N or 2N mapping, +2
// for the high word of a pair).
module tb_addr_counter;
  logic clk = 0, rst = 1, load = 0, step = 0, w32 = 0, hi = 0;
  logic [19:0] fb_addr = 0;
  logic [17:0] ub_addr, exp_a;
  int checks = 0, failures = 0;

  addr_counter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s got %h exp %h", what, ub_addr, exp_a); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    repeat (40) begin
      int n;
      w32 = 1'($urandom); fb_addr = 20'($urandom); n = $urandom_range(1, 20);
      load = 1; @(negedge clk); load = 0;
      for (int k = 0; k < n; k++) begin
        exp_a = w32 ? 18'((fb_addr + 20'(k)) * 4) : 18'((fb_addr + 20'(k)) * 2);
        hi = 0; #1; chk(ub_addr == exp_a, "word address");
        if (w32) begin
          hi = 1; #1; exp_a = exp_a + 2; chk(ub_addr == exp_a, "high word address");
        end
        step = 1; @(negedge clk); step = 0; hi = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
