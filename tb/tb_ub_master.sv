// tb_ub_master -- self-checking test of the UNIBUS DMA master against a
// model of the processor's NPR arbiter and a memory slave: DATO and DATI
// cycles (address, C1/C0, data, MSYN/SSYN order, data held until release),
// waiting for another master's BBSY, and the 10 ms (T_WORD) timeouts when
// the grant or SSYN never comes.
module tb_ub_master;
  import fbu_pkg::*;
  localparam int TW = 60;
  logic clk = 0, rst = 1;
  logic req = 0, wr = 0, release_i = 0, done;
  logic [17:0] addr = 0, a_out;
  logic [15:0] wdata = 0, d_out;
  ev_code_e err;
  logic npr, npg = 0, sack, bbsy_in = 0, bbsy, a_oe, d_oe, msyn, ssyn = 0;
  logic [1:0] c_out;
  int checks = 0, failures = 0;

  ub_master #(.T_WORD(TW)) dut (.*);
  always #5 clk = ~clk;

  // memory and arbiter model
  logic [15:0] mem [logic [17:0]];
  logic grant_on = 1, mem_on = 1;
  logic [15:0] rd_bus;
  always @(posedge clk) begin
    npg <= grant_on && npr;
    if (msyn && !ssyn && mem_on) begin
      if (!a_oe) failures++;
      if (c_out == 2'b10) begin
        if (!d_oe) failures++;
        mem[a_out] = d_out;
      end else rd_bus <= mem.exists(a_out) ? mem[a_out] : 16'h0;
      ssyn <= 1;
    end
    if (!msyn) ssyn <= 0;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic word(input logic w, input logic [17:0] a, input logic [15:0] d, output int n);
    @(negedge clk); req = 1; wr = w; addr = a; wdata = d; n = 0;
    while (!done) begin @(negedge clk); n++; if (n > 500) break; end
    req = 0;
  endtask

  task automatic rel();
    release_i = 1; @(negedge clk); release_i = 0; repeat (4) @(negedge clk);
    chk(!bbsy && !msyn && !npr && !sack, "bus released");
  endtask

  int n;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    word(1, 18'o1000, 16'hBEEF, n); chk(err == EV_NONE && mem[18'o1000] == 16'hBEEF, "DATO"); rel();
    word(1, 18'o1002, 16'h1234, n); rel();
    word(0, 18'o1000, 0, n);
    chk(err == EV_NONE && rd_bus == 16'hBEEF && msyn && !d_oe && c_out == 2'b00, "DATI held");
    rel();
    // another master holds BBSY: the interface waits
    bbsy_in = 1;
    fork
      begin repeat (10) @(negedge clk); chk(!bbsy && sack, "waiting for bus"); bbsy_in = 0; end
      word(0, 18'o1002, 0, n);
    join
    chk(rd_bus == 16'h1234 && n >= 10, "DATI after bus free"); rel();
    // no grant: timeout code 7
    grant_on = 0; word(1, 0, 0, n);
    chk(err == EV_WORD_TMO && n >= TW && n <= TW + 3, "grant timeout"); rel(); grant_on = 1;
    // no slave: timeout code 7
    mem_on = 0; word(0, 18'o7000, 0, n);
    chk(err == EV_WORD_TMO && !msyn, "SSYN timeout"); rel(); mem_on = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
