// tb_fb_ctrl -- self-checking test of the control section for
// FASTBUS-initiated transfers. A FASTBUS master model runs address and data
// cycles; a model of the UNIBUS DMA master answers word requests. Checks:
// address recognition, single 32-bit DMA write (low word straight through,
// high word from the HWL after DK), a 16-bit block write with counter steps,
// the block-end event and the transaction report, a 32-bit DMA read (LWL,
// composed word clamped with DK), FBR loading and the broadcast request,
// FASTBUS messages, FBR read-back and a UNIBUS timeout (DK withheld).
module tb_fb_ctrl;
  import fbu_pkg::*;
  localparam logic [11:0] DMAB = 12'h7F0;
  localparam logic [31:0] REGB = 32'h7F10_0000;
  logic clk = 0, rst = 1;
  logic as_i = 0, ds_i = 0, rd_i = 0;
  logic [31:0] ad_in = 0, ad_out, fbr = 32'hF00D_0001, ib_out = 32'h1357_9BDF;
  logic [15:0] ir = 16'h9ABC;
  logic [15:0] csr = 16'hA05A;
  logic ak_o, dk_o, ad_oe, fb32 = 1, fbr_ld, fbr_req, fbr_global, fbr_ack = 0;
  ib_sel_e ib_sel;
  ub_sel_e ub_sel;
  logic lwl_ld, hwl_ld, cnt_load, cnt_step, cnt_w32, cnt_hi;
  logic um_req, um_wr, um_release, um_done = 0;
  ev_code_e um_err = EV_NONE;
  logic txn, txn_blk, txn_rd, txn_ack, ev, ev_ack;
  ev_code_e ev_code;
  logic [14:0] ev_msg;
  int checks = 0, failures = 0;

  fb_ctrl #(.DMA_BASE(DMAB), .REG_BASE(REGB)) dut (.*);
  always #5 clk = ~clk;
  assign txn_ack = txn;
  assign ev_ack = ev;

  // UNIBUS DMA master model: logs each word
  int n_um = 0, n_wr = 0, n_hi = 0, n_step = 0, n_load = 0, n_lwl = 0, n_hwl = 0, n_ev = 0, n_txn = 0;
  ub_sel_e um_sel [$];
  ev_code_e next_um_err = EV_NONE, last_ev;
  logic last_blk;
  initial forever begin
    @(posedge clk);
    if (um_req && !um_done) begin
      n_um++; if (um_wr) n_wr++; if (cnt_hi) n_hi++; um_sel.push_back(ub_sel);
      repeat (4) @(posedge clk);
      um_done <= 1; um_err <= next_um_err;
      do @(posedge clk); while (!um_release);
      um_done <= 0; um_err <= EV_NONE;
    end
  end
  always @(posedge clk) begin
    if (cnt_step) n_step++;
    if (cnt_load) n_load++;
    if (lwl_ld) n_lwl++;
    if (hwl_ld) n_hwl++;
    if (ev) begin n_ev++; last_ev = ev_code; end
    if (txn) begin n_txn++; last_blk = txn_blk; end
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic addr_cyc(input logic [31:0] a, output logic acked);
    int n = 0;
    @(negedge clk); ad_in = a; as_i = 1;
    while (!ak_o && n < 20) begin @(negedge clk); n++; end
    acked = ak_o;
  endtask

  logic [31:0] rd_data;
  task automatic data_cyc(input logic r, input logic [31:0] d, output logic dked);
    int n = 0;
    @(negedge clk); rd_i = r; ad_in = d; ds_i = 1;
    while (!dk_o && n < 200) begin @(negedge clk); n++; end
    dked = dk_o;
    rd_data = ad_out;
    if (dked) chk(!r || ad_oe, "AD driven with read data");
    @(negedge clk); ds_i = 0;
    n = 0;
    while (dk_o && n < 200) begin @(negedge clk); n++; end
  endtask

  task automatic end_cyc();
    int n = 0;
    @(negedge clk); as_i = 0;
    while (ak_o && n < 20) begin @(negedge clk); n++; end
    chk(!ak_o, "AK falls with AS");
    repeat (3) @(negedge clk);
  endtask

  logic ok;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    // not addressed
    addr_cyc(32'h1234_0000, ok); chk(!ok, "foreign address ignored"); end_cyc();
    // single 32-bit write
    addr_cyc({DMAB, 20'h00010}, ok); chk(ok && n_load == 1, "DMA address cycle");
    data_cyc(0, 32'hAAAA_5555, ok);
    chk(ok && n_um == 2 && n_wr == 2 && n_hi == 1 && n_hwl == 1, "32-bit write: two UNIBUS words");
    chk(um_sel[0] == UB_LO && um_sel[1] == UB_HWL, "low word direct, high word from HWL");
    chk(n_step == 1, "counter stepped");
    end_cyc();
    chk(n_txn == 1 && !last_blk && n_ev == 0, "single transfer, no block end");
    // 16-bit block write of three words
    fb32 = 0;
    addr_cyc({DMAB, 20'h00100}, ok);
    for (int k = 0; k < 3; k++) begin data_cyc(0, 32'(k), ok); chk(ok, "block word"); end
    chk(n_um == 5 && n_hi == 1 && n_step == 4, "16-bit block: one UNIBUS word each");
    end_cyc();
    chk(n_txn == 2 && last_blk && n_ev == 1 && last_ev == EV_BLK_END, "block end event");
    // 32-bit read
    fb32 = 1;
    addr_cyc({DMAB, 20'h00200}, ok);
    data_cyc(1, 0, ok);
    chk(ok && n_um == 7 && n_lwl == 1 && n_hi == 2 && rd_data == ib_out && ib_sel == IB_W32, "32-bit read composed");
    end_cyc();
    // FBR write, global: broadcast requested
    addr_cyc(REGB + 1, ok); chk(ok, "register address");
    data_cyc(0, 32'hB0B0_CAFE, ok); chk(ok && fbr_req && fbr_global, "FBR broadcast request");
    end_cyc();
    @(negedge clk); fbr_ack = 1; @(negedge clk); fbr_ack = 0; @(negedge clk);
    chk(!fbr_req, "broadcast request acknowledged");
    // message to the IR
    addr_cyc(REGB + 2, ok); data_cyc(0, 32'h0000_4321, ok); end_cyc();
    chk(last_ev == EV_MESSAGE && ev_msg == 15'h4321, "message event");
    // FBR read back
    addr_cyc(REGB + 0, ok); data_cyc(1, 0, ok); end_cyc();
    chk(rd_data == fbr, "FBR read");
    // status read back at the message address
    addr_cyc(REGB + 2, ok); data_cyc(1, 0, ok); end_cyc();
    chk(rd_data == 32'hA05A_9ABC, "CSR/IR read");
    // UNIBUS timeout: DK withheld
    next_um_err = EV_WORD_TMO;
    addr_cyc({DMAB, 20'h00300}, ok); data_cyc(0, 32'h1, ok);
    chk(!ok && last_ev == EV_WORD_TMO, "UNIBUS timeout, no DK");
    end_cyc();
    next_um_err = EV_NONE;
    addr_cyc({DMAB, 20'h00300}, ok); chk(ok, "recovers after error"); end_cyc();
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
