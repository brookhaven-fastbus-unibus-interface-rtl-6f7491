// tb_status_error -- self-checking test of the status/error logic (CSR, IR):
// transaction status bits, error flag codes and classes, interrupt enables,
// IR locking, interrupt overflow, BUSY/EMPTY enable from the mapping
// register, suspension until the second word of a pair, and FASTBUS messages.
module tb_status_error;
  import fbu_pkg::*;
  logic clk = 0, rst = 1;
  logic csr_wr = 0;
  logic [15:0] wdata = 0, csr, ir;
  logic txn = 0, txn_fbi = 0, txn_blk = 0, txn_rd = 0, pend = 0;
  logic ev = 0, ev_beie = 0, ev_susp = 0, int_req;
  ev_code_e ev_code = EV_NONE;
  logic [11:0] ev_addr = 0;
  logic [14:0] ev_msg = 0;
  int checks = 0, failures = 0;

  status_error dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s csr=%h ir=%h", what, csr, ir); end
  endtask

  task automatic post(input ev_code_e c, input logic [11:0] a, input logic [14:0] m = 0,
                      input logic be = 0, input logic su = 0);
    @(negedge clk); ev = 1; ev_code = c; ev_addr = a; ev_msg = m; ev_beie = be; ev_susp = su;
    @(negedge clk); ev = 0;
  endtask

  task automatic wcsr(input logic [15:0] d);
    @(negedge clk); csr_wr = 1; wdata = d; @(negedge clk); csr_wr = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    chk(csr == 0 && ir == 0 && !int_req, "reset");
    // transaction status
    @(negedge clk); txn = 1; txn_fbi = 1; txn_blk = 1; txn_rd = 1; pend = 0;
    @(negedge clk); txn = 0;
    chk(csr[CSR_FBI] && csr[CSR_BLK] && csr[CSR_RD] && !csr[CSR_PEND], "txn status");
    pend = 1; #1; chk(csr[CSR_PEND], "pend bit"); pend = 0;
    // event with interrupts disabled: error logged, no interrupt
    post(EV_DK_TMO, 12'h123);
    chk(csr[CSR_ERROR] && csr[12:11] == CL_ERROR && ir == 16'h2123 && !int_req, "logged, not enabled");
    // enable case 1 and case 7
    wcsr(16'h0000 | (1 << CSR_IE_AK) | (1 << CSR_IE_TMO) | (1 << CSR_IE_MSG) | (1 << CSR_IE_BLK));
    chk(!csr[CSR_ERROR], "error cleared by write 0");
    post(EV_AK_TMO, 12'hABC);
    chk(int_req && csr[CSR_INT] && ir == 16'h1ABC, "interrupt case 1");
    post(EV_WORD_TMO, 12'h555);
    chk(csr[CSR_OVF] && ir == 16'h1ABC, "overflow, IR locked");
    post(EV_DK_TMO, 12'h777);
    chk(ir == 16'h1ABC, "IR locked for disabled event");
    // clear INTERRUPT and OVERFLOW, keep enables
    wcsr(csr & 16'h003F);
    chk(!int_req && !csr[CSR_OVF], "interrupt cleared");
    post(EV_MESSAGE, 12'h0, 15'h5A5A);
    chk(int_req && ir == {1'b1, 15'h5A5A} && csr[12:11] == CL_MSG, "message case 9");
    wcsr(csr & 16'h003F);
    // BUSY/EMPTY enabled only by the mapping register bit
    post(EV_EMPTY, 12'h010, 0, 1'b0);
    chk(!int_req && ir == 16'h4010, "EMPTY not enabled");
    post(EV_BUSYEMP, 12'h011, 0, 1'b1);
    chk(int_req && ir == 16'h5011, "BUSY+EMPTY enabled by map");
    wcsr(csr & 16'h003F);
    // suspension until the second word of a pair
    pend = 1;
    post(EV_AK_TMO, 12'h020, 0, 0, 1'b1);
    chk(!int_req && ir == 16'h1020, "suspended");
    post(EV_WORD_TMO, 12'h021, 0, 0, 1'b1);
    chk(csr[CSR_OVF] && ir == 16'h1020, "second event during suspension");
    @(negedge clk); pend = 0; @(negedge clk);
    chk(int_req, "released after pair");
    wcsr(csr & 16'h003F);
    // block end class
    post(EV_BLK_END, 12'h3FC);
    chk(int_req && csr[12:11] == CL_BLOCK && ir == 16'h83FC, "block end case 8");
    // alignment, disabled
    wcsr(16'h0000);
    post(EV_ALIGN, 12'h002);
    chk(!int_req && ir == 16'h6002 && csr[CSR_ERROR], "alignment logged");
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
