// tb_data_mux -- self-checking test of the data multiplexer: every
// composition (16-bit, byte lane, 32-bit with LWL, broadcast with LBR) and
// decomposition (low, high, HWL, byte into lane) on random data.
module tb_data_mux;
  import fbu_pkg::*;
  ib_sel_e ib_sel;
  ub_sel_e ub_sel;
  logic odd;
  logic [15:0] ub_in, lwl, lbr, hwl, ub_out;
  logic [31:0] ib_in, ib_out;
  int checks = 0, failures = 0;

  data_mux dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500) begin
      ub_in = 16'($urandom); lwl = 16'($urandom); lbr = 16'($urandom); hwl = 16'($urandom);
      ib_in = $urandom; odd = 1'($urandom);
      ib_sel = IB_W16;  ub_sel = UB_LO;  #1;
      chk(ib_out == {16'h0, ub_in}, "ib w16"); chk(ub_out == ib_in[15:0], "ub lo");
      ib_sel = IB_BYTE; ub_sel = UB_HI;  #1;
      chk(ib_out == (odd ? {24'h0, ub_in[15:8]} : {24'h0, ub_in[7:0]}), "ib byte");
      chk(ub_out == ib_in[31:16], "ub hi");
      ib_sel = IB_W32;  ub_sel = UB_HWL; #1;
      chk(ib_out == {ub_in, lwl}, "ib w32"); chk(ub_out == hwl, "ub hwl");
      ib_sel = IB_BC;   ub_sel = UB_BYTE; #1;
      chk(ib_out == {ub_in, lbr}, "ib bcast");
      chk(ub_out == (odd ? {ib_in[7:0], 8'h0} : {8'h0, ib_in[7:0]}), "ub byte");
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
