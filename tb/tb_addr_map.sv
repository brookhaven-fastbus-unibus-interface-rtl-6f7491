// tb_addr_map -- self-checking test of the UNIBUS-to-FASTBUS address map.
// Programs all sixteen mapping registers with random bases and control
// fields through the register port, reads them back, then checks the
// translation of random 12-bit offsets for 8-, 16- and 32-bit mappings
// against a reference (offset shifted right by 0/1/2 ORed with the base).
module tb_addr_map;
  import fbu_pkg::*;
  logic clk = 0, rst = 1, wr = 0;
  logic [3:0] wr_idx = 0;
  logic [1:0] wr_field = 0;
  logic [15:0] wdata = 0, rdata;
  logic [11:0] ub_off = 0;
  logic [31:0] fb_addr;
  map_ctrl_t ctrl;
  logic hi_word;
  logic [31:0] base_m [16];
  logic [4:0]  ctl_m [16];
  int checks = 0, failures = 0;

  addr_map dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s off=%h", what, ub_off); end
  endtask

  task automatic wreg(input int i, input int f, input logic [15:0] d);
    @(negedge clk); wr = 1; wr_idx = 4'(i); wr_field = 2'(f); wdata = d;
    @(negedge clk); wr = 0;
  endtask

  logic [31:0] exp_a;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 16; i++) begin
      base_m[i] = $urandom & 32'hFFFF_FF00;   // bases are block aligned
      ctl_m[i]  = 5'($urandom);
      wreg(i, 0, base_m[i][15:0]);
      wreg(i, 1, base_m[i][31:16]);
      wreg(i, 2, {11'd0, ctl_m[i]});
    end
    for (int i = 0; i < 16; i++) begin
      wr_idx = 4'(i);
      wr_field = 0; #1; chk(rdata == base_m[i][15:0], "readback lo");
      wr_field = 1; #1; chk(rdata == base_m[i][31:16], "readback hi");
      wr_field = 2; #1; chk(rdata == {11'd0, ctl_m[i]}, "readback ctl");
    end
    repeat (3000) begin
      ub_off = 12'($urandom);
      #1;
      begin
        int r; r = ub_off[11:8];
        if (ctl_m[r][0])      exp_a = base_m[r] | 32'(ub_off[7:0] / 4);
        else if (ctl_m[r][1]) exp_a = base_m[r] | 32'(ub_off[7:0]);
        else                  exp_a = base_m[r] | 32'(ub_off[7:0] / 2);
        chk(fb_addr == exp_a, "translation");
        chk(ctrl == map_ctrl_t'(ctl_m[r]), "ctrl select");
        chk(hi_word == (ctl_m[r][0] && ub_off[1]), "hi word");
      end
    end
    // 32-bit block: 64 words, consecutive UNIBUS word pairs share one address
    wreg(3, 0, 16'h1200); wreg(3, 1, 16'hABCD); wreg(3, 2, 16'h0001);
    ub_off = 12'h3FC; #1; chk(fb_addr == 32'hABCD_123F, "32-bit last word");
    ub_off = 12'h3FE; #1; chk(fb_addr == 32'hABCD_123F && hi_word, "32-bit last word high half");
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
