// tb_ub_ctrl -- self-checking test of the control section for
// UNIBUS-initiated transfers. A processor model runs UNIBUS slave cycles
// (MSYN/SSYN) with the decoded selects driven directly; a model of the
// FASTBUS master sequencer answers requests after a few clocks. Checks:
// register write and read, the 32-bit write pair (LWL, one FASTBUS write of
// the composed word), the 32-bit read pair (one FASTBUS read, HWL), the
// alignment error, 16-bit and byte transfers, UNIBUS broadcast, error
// reporting from FASTBUS, the clamp (FASTBUS cycle held until MSYN falls)
// and a broadcast requested through the FBR.
module tb_ub_ctrl;
  import fbu_pkg::*;
  logic clk = 0, rst = 1;
  logic msyn = 0, c1 = 0;
  logic [11:0] off = 0;
  logic ssyn, d_oe, reg_rd, reg_wr;
  logic win_hit = 0, reg_hit = 0, bc_sel = 0, bc_global = 0, hi_word = 0;
  map_ctrl_t mctl = '0;
  ib_sel_e ib_sel;
  ub_sel_e ub_sel;
  logic lwl_ld, hwl_ld, fm_req, fm_rd, fm_bcast, fm_global, fm_use_fbr, fm_use_ib, fm_release;
  logic fm_done = 0;
  ev_code_e fm_err = EV_NONE;
  logic fbr_req = 0, fbr_global = 0, fbr_ack;
  logic pend, pend_susp, txn, txn_rd, ev, ev_beie;
  ev_code_e ev_code;
  logic [11:0] ev_addr;
  int checks = 0, failures = 0;

  ub_ctrl dut (.*);
  always #5 clk = ~clk;

  // FASTBUS master model
  int n_fm = 0, n_lwl = 0, n_hwl = 0, n_regwr = 0, n_ev = 0, n_rel_early = 0;
  ev_code_e next_err = EV_NONE, last_ev = EV_NONE;
  ib_sel_e fm_ib;
  logic fm_rd_seen, fm_bc_seen, fm_gl_seen, fm_fbr_seen, fm_ib_seen;
  initial forever begin
    @(posedge clk);
    if (fm_req && !fm_done) begin
      n_fm++; fm_ib = ib_sel; fm_rd_seen = fm_rd; fm_bc_seen = fm_bcast; fm_gl_seen = fm_global;
      fm_fbr_seen = fm_use_fbr; fm_ib_seen = fm_use_ib;
      repeat (3) @(posedge clk);
      fm_done <= 1; fm_err <= next_err;
      do @(posedge clk); while (!fm_release);
      fm_done <= 0; fm_err <= EV_NONE;
    end
  end
  always @(posedge clk) begin
    if (lwl_ld) n_lwl++;
    if (hwl_ld) n_hwl++;
    if (reg_wr) n_regwr++;
    if (ev) begin n_ev++; last_ev = ev_code; end
    if (fm_release && msyn && !fm_use_fbr && fm_done) n_rel_early++;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // one UNIBUS cycle; returns the select seen while SSYN was up
  ub_sel_e seen_ub;
  logic seen_doe, seen_regrd;
  task automatic cyc(input logic w, input logic win, input logic reg_, input logic [11:0] o);
    int n;
    @(negedge clk);
    c1 = w; win_hit = win; reg_hit = reg_; off = o; msyn = 1; n = 0;
    while (!ssyn && n < 200) begin @(negedge clk); n++; end
    chk(ssyn, "SSYN returned");
    repeat (2) @(negedge clk);
    chk(ssyn, "SSYN held while MSYN");
    seen_ub = ub_sel; seen_doe = d_oe; seen_regrd = reg_rd;
    msyn = 0;
    n = 0;
    while (ssyn && n < 50) begin @(negedge clk); n++; end
    chk(!ssyn, "SSYN dropped");
    win_hit = 0; reg_hit = 0; bc_sel = 0;
    repeat (6) @(negedge clk);
  endtask

  int f0;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    // register write / read
    cyc(1, 0, 1, 12'h080); chk(n_regwr == 1 && n_fm == 0, "register write");
    cyc(0, 0, 1, 12'h080); chk(seen_regrd && seen_doe && n_regwr == 1, "register read");
    // 32-bit write pair
    mctl = '{spare: 0, susp: 1, beie: 1, byte8: 0, w32: 1};
    hi_word = 0; cyc(1, 1, 0, 12'h100);
    chk(n_lwl == 1 && n_fm == 0 && pend && pend_susp, "first word into LWL");
    hi_word = 1; cyc(1, 1, 0, 12'h102);
    chk(n_fm == 1 && fm_ib == IB_W32 && !fm_rd_seen && !pend, "one FASTBUS write per pair");
    // 32-bit read pair
    hi_word = 0; cyc(0, 1, 0, 12'h104);
    chk(n_fm == 2 && fm_rd_seen && n_hwl == 1 && seen_ub == UB_LO && pend && seen_doe, "read low: FASTBUS read, HWL");
    hi_word = 1; cyc(0, 1, 0, 12'h106);
    chk(n_fm == 2 && seen_ub == UB_HWL && !pend, "read high from HWL");
    // alignment: write low, read high
    hi_word = 0; cyc(1, 1, 0, 12'h108);
    f0 = n_fm;
    hi_word = 1; cyc(0, 1, 0, 12'h10A);
    chk(n_fm == f0 && last_ev == EV_ALIGN && !pend, "alignment error");
    // 16-bit write, byte read
    mctl = '{spare: 0, susp: 0, beie: 0, byte8: 0, w32: 0}; hi_word = 0;
    cyc(1, 1, 0, 12'h200); chk(n_fm == f0 + 1 && fm_ib == IB_W16 && !fm_rd_seen, "16-bit write");
    mctl.byte8 = 1;
    cyc(0, 1, 0, 12'h201); chk(n_fm == f0 + 2 && fm_rd_seen && seen_ub == UB_BYTE, "byte read");
    cyc(1, 1, 0, 12'h203); chk(n_fm == f0 + 3 && fm_ib == IB_BYTE, "byte write");
    // broadcast through the dummy location
    bc_sel = 1; bc_global = 1;
    cyc(1, 0, 1, 12'h088);
    chk(n_fm == f0 + 4 && fm_bc_seen && fm_gl_seen && fm_ib_seen && fm_ib == IB_BC && n_regwr == 1, "UNIBUS broadcast");
    // FASTBUS error reported, SSYN still returned
    mctl = '{spare: 0, susp: 0, beie: 1, byte8: 0, w32: 0};
    next_err = EV_DK_TMO;
    cyc(0, 1, 0, 12'h300);
    chk(last_ev == EV_DK_TMO && n_ev == 2, "error event");
    next_err = EV_NONE;
    // broadcast requested from the FBR
    @(negedge clk); fbr_req = 1; fbr_global = 0;
    begin int n = 0; while (!fbr_ack && n < 100) begin @(negedge clk); n++; end end
    fbr_req = 0;
    chk(n_fm == f0 + 6 && fm_fbr_seen && fm_bc_seen && !fm_gl_seen, "FBR broadcast");
    repeat (5) @(negedge clk);
    chk(n_rel_early == 0, "FASTBUS cycle held until MSYN fell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
