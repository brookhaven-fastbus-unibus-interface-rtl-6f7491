// tb_intr_logic -- self-checking test of the UNIBUS interrupt logic with a
// model of the processor's arbiter: BR on a new interrupt, SACK on BG, BBSY
// and INTR with the vector once the bus is free, release on SSYN; a grant
// that is not wanted passes to BG_OUT.
module tb_intr_logic;
  logic clk = 0, rst = 1, int_req = 0, bg_in = 0, bbsy_in = 0, ssyn = 0;
  logic bg_out, br, sack, bbsy, intr, intr_oe;
  logic [15:0] vec;
  int checks = 0, failures = 0;

  intr_logic #(.VECTOR(9'o254)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    // unwanted grant passes through
    bg_in = 1; #1; chk(bg_out && !sack, "grant passed on"); @(negedge clk); bg_in = 0;
    repeat (2) @(negedge clk);
    chk(!br, "no request");
    int_req = 1; bbsy_in = 1;   // another master still holds the bus
    repeat (2) @(negedge clk);
    chk(br, "BR raised");
    bg_in = 1; #1; chk(!bg_out, "grant not passed while requesting");
    @(negedge clk);
    chk(sack && !br, "SACK on grant");
    bg_in = 0; repeat (3) @(negedge clk);
    chk(sack && !intr, "waits for BBSY to clear");
    bbsy_in = 0; @(negedge clk); @(negedge clk);
    chk(bbsy && intr && intr_oe && vec == 16'o254 && !sack, "INTR with vector");
    ssyn = 1; @(negedge clk); @(negedge clk);
    chk(!intr && !bbsy && !intr_oe, "released after SSYN");
    ssyn = 0; repeat (3) @(negedge clk);
    chk(!br, "one interrupt per request");
    int_req = 0; @(negedge clk); int_req = 1; repeat (2) @(negedge clk);
    chk(br, "new request after re-arm");
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
