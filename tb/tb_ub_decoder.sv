// tb_ub_decoder -- self-checking test of the UNIBUS address decoder.
// Sweeps addresses over the window page, the register page and outside, and
// compares every select output with an independent reference decode.
module tb_ub_decoder;
  import fbu_pkg::*;
  logic [17:0] addr;
  logic win_hit, reg_hit, map_sel, csr_sel, ir_sel, lbr_sel, bc_sel, bc_global;
  logic [3:0] map_idx;
  logic [1:0] map_field;
  int checks = 0, failures = 0;

  ub_decoder dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s addr=%o", what, addr); end
  endtask

  initial begin
    // fixed points (octal addresses)
    addr = 18'o760000; #1; chk(win_hit && !reg_hit, "window low");
    addr = 18'o767776; #1; chk(win_hit && !reg_hit, "window high");
    addr = 18'o770000; #1; chk(!win_hit && !reg_hit, "above window");
    addr = 18'o772400; #1; chk(reg_hit && map_sel && map_idx == 0 && map_field == 0, "map0 base lo");
    addr = 18'o772400 + 8*5 + 4; #1; chk(map_sel && map_idx == 5 && map_field == 2, "map5 ctrl");
    addr = 18'o772400 + 18'h80; #1; chk(csr_sel && !map_sel && !ir_sel, "csr");
    addr = 18'o772400 + 18'h82; #1; chk(ir_sel && !csr_sel, "ir");
    addr = 18'o772400 + 18'h84; #1; chk(lbr_sel, "lbr");
    addr = 18'o772400 + 18'h86; #1; chk(bc_sel && !bc_global, "bcast local");
    addr = 18'o772400 + 18'h88; #1; chk(bc_sel && bc_global, "bcast global");
    // random sweep against reference
    repeat (2000) begin
      addr = 18'($urandom);
      if ($urandom_range(0, 3) == 0) addr[17:8] = 10'(18'o772400 >> 8);
      if ($urandom_range(0, 3) == 0) addr[17:12] = 6'o76;
      #1;
      chk(win_hit == (addr >= 18'o760000 && addr < 18'o770000), "win ref");
      chk(reg_hit == (addr >= 18'o772400 && addr < 18'o773000), "reg ref");
      chk(map_sel == (reg_hit && (addr - 18'o772400) < 128), "map ref");
      if (map_sel) chk(map_idx == 4'((addr - 18'o772400) / 8) && map_field == 2'(((addr - 18'o772400) % 8) / 2), "map idx ref");
      chk(csr_sel == (reg_hit && ((addr - 18'o772400) >> 1) == 64), "csr ref");
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
