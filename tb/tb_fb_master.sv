// tb_fb_master -- self-checking test of the FASTBUS master sequencer against
// a FASTBUS slave model and a grant model. Checks the address and data on AD
// in each cycle, the double handshake order, the hold until release, the
// BUSY/EMPTY codes, the address and data handshake timeouts with their cycle
// counts, the arbitration timeout and a broadcast (no data cycle, BC/GL).
module tb_fb_master;
  import fbu_pkg::*;
  localparam int TAK = 40, TDK = 30, TW = 100;
  logic clk = 0, rst = 1;
  logic req = 0, rd = 0, bcast = 0, gbl = 0, release_i = 0, done;
  logic [31:0] addr = 0, wdata = 0, ad_out;
  ev_code_e err;
  logic fb_req, fb_gnt = 0, ad_oe, as_o, ds_o, rd_o, bc_o, gl_o;
  logic ak_i = 0, dk_i = 0, busy_i = 0, empty_i = 0;
  int checks = 0, failures = 0;

  fb_master #(.T_AK(TAK), .T_DK(TDK), .T_WORD(TW)) dut (.*);
  always #5 clk = ~clk;

  // slave model
  logic slave_on = 1, slave_dk_on = 1, gnt_on = 1;
  logic [31:0] seen_addr, seen_data;
  logic seen_bc, seen_gl, saw_ds;
  always @(posedge clk) begin
    fb_gnt <= gnt_on && fb_req;
    if (as_o && !ak_i && slave_on) begin
      ak_i <= 1; seen_addr <= ad_out; seen_bc <= bc_o; seen_gl <= gl_o;
      if (!ad_oe) begin failures++; $display("FAIL AD not driven in address cycle t=%0t st=%0d", $time, dut.st); end
    end
    if (!as_o) ak_i <= 0;
    if (ds_o) saw_ds <= 1;
    if (ds_o && !dk_i && ak_i && slave_dk_on) begin dk_i <= 1; seen_data <= ad_out; end
    if (!ds_o) dk_i <= 0;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s err=%0d", what, err); end
  endtask

  task automatic run(input logic r, input logic b, input logic g, input logic [31:0] a,
                     input logic [31:0] d, output int cycles);
    @(negedge clk); req = 1; rd = r; bcast = b; gbl = g; addr = a; wdata = d; saw_ds = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; if (cycles > 1000) break; end
    req = 0;
  endtask

  task automatic finish_cycle();
    release_i = 1; @(negedge clk); release_i = 0;
    repeat (6) @(negedge clk);
    chk(!as_o && !ds_o && !fb_req, "bus released");
  endtask

  int n;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    // write
    run(0, 0, 0, 32'h1234_5678, 32'hCAFE_F00D, n);
    chk(err == EV_NONE && seen_addr == 32'h1234_5678 && seen_data == 32'hCAFE_F00D, "write");
    chk(as_o && ds_o && !rd_o, "held during done");
    finish_cycle();
    // read: AD not driven in the data cycle
    run(1, 0, 0, 32'h0000_0040, 32'h0, n);
    chk(err == EV_NONE && rd_o && !ad_oe && ds_o, "read held, AD released");
    finish_cycle();
    // BUSY, EMPTY, both
    busy_i = 1; run(0, 0, 0, 1, 2, n); chk(err == EV_BUSY, "busy code 3"); finish_cycle();
    busy_i = 0; empty_i = 1; run(1, 0, 0, 1, 2, n); chk(err == EV_EMPTY, "empty code 4"); finish_cycle();
    busy_i = 1; run(1, 0, 0, 1, 2, n); chk(err == EV_BUSYEMP, "both code 5"); finish_cycle();
    busy_i = 0; empty_i = 0;
    // address handshake timeout
    slave_on = 0; run(0, 0, 0, 9, 9, n);
    chk(err == EV_AK_TMO && !as_o, "AK timeout code 1");
    chk(n >= TAK && n <= TAK + 6, "AK timeout length");
    finish_cycle(); slave_on = 1;
    // data handshake timeout
    slave_dk_on = 0; run(0, 0, 0, 9, 9, n);
    chk(err == EV_DK_TMO, "DK timeout code 2");
    chk(n >= TDK && n <= TDK + 8, "DK timeout length");
    finish_cycle(); slave_dk_on = 1;
    // arbitration failure
    gnt_on = 0; run(0, 0, 0, 9, 9, n);
    chk(err == EV_WORD_TMO && !as_o, "arbitration timeout code 7");
    chk(n >= TW && n <= TW + 4, "word timeout length");
    finish_cycle(); gnt_on = 1;
    // global broadcast
    run(0, 1, 1, 32'hB0B0_0001, 0, n);
    chk(err == EV_NONE && seen_bc && seen_gl && seen_addr == 32'hB0B0_0001 && !saw_ds, "global broadcast");
    finish_cycle();
    run(0, 1, 0, 32'h0000_0077, 0, n);
    chk(seen_bc && !seen_gl, "local broadcast");
    finish_cycle();
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
