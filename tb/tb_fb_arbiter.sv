// tb_fb_arbiter -- self-checking test of the FASTBUS segment arbiter with
// random request patterns: at most one grant, grant to the highest-priority
// requester when the bus is free, grant held while its request stays up.
module tb_fb_arbiter;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  logic [N-1:0] req = '0, gnt, prev_gnt, prev_req;
  int checks = 0, failures = 0;

  fb_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s req=%b gnt=%b", what, req, gnt); end
  endtask

  function automatic logic [N-1:0] highest(input logic [N-1:0] r);
    for (int i = 0; i < N; i++) if (r[i]) return N'(1) << i;
    return '0;
  endfunction

  logic [N-1:0] owner_req;
  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    repeat (2000) begin
      prev_gnt = gnt; prev_req = req;
      // holders keep their request most of the time
      req = (prev_gnt & req & {N{($urandom_range(0, 4) != 0)}}) | N'($urandom & $urandom);
      owner_req = req;
      @(negedge clk);
      chk($onehot0(gnt), "one grant");
      if ((prev_gnt & owner_req) != 0) chk(gnt == prev_gnt, "grant held");
      else chk(gnt == highest(owner_req), "priority grant");
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
