// fbu_top -- FASTBUS/UNIBUS interface, top level.
//
// Connects a PDP-11 UNIBUS to one Brookhaven FASTBUS segment. A UNIBUS master
// reaches FASTBUS through a 4096-byte window of UNIBUS addresses: the address
// map turns the 12-bit offset into a 32-bit FASTBUS address, and the
// UNIBUS-side control section (ub_ctrl) runs the FASTBUS master cycle
// (fb_master), composing two UNIBUS words into one 32-bit FASTBUS word with
// the low-word latch (LWL) and splitting a 32-bit read with the high-word
// latch (HWL). A FASTBUS master reaches UNIBUS through a DMA window on
// FASTBUS: the FASTBUS-side control section (fb_ctrl) runs UNIBUS DMA cycles
// (ub_master) at addresses from the address counter/shifter, for single and
// block transfers. Errors, block ends and FASTBUS messages are logged in the
// CSR and IR and may interrupt the PDP-11 (intr_logic). Broadcasts reach
// FASTBUS from UNIBUS (dummy location + LBR) or from FASTBUS (FBR). The
// interface is also the central arbiter of its FASTBUS segment (master 0).
//
// Bus model: every bus line appears as the drive of the other devices (*_in)
// and the interface's own drive (*_out, with *_oe for the multi-bit fields);
// the receivers/drivers and level shifters are outside this RTL. All
// signals are active high and synchronous to clk. UNIBUS INIT resets the
// interface like rst. The internal 32-bit bus of the published block diagram
// is realised as point-to-point multiplexing.
module fbu_top
  import fbu_pkg::*;
#(
  parameter int          N_MASTERS = 8,
  parameter logic [5:0]  WIN_PAGE  = 6'o76,
  parameter logic [17:0] REG_BASE  = 18'o772400,
  parameter logic [11:0] DMA_BASE  = 12'h7F0,
  parameter logic [31:0] FB_REG    = 32'h7F10_0000,
  parameter logic [8:0]  VECTOR    = 9'o300,
  parameter int          T_AK      = 40_000,   // 4 ms at 10 MHz
  parameter int          T_DK      = 30_000,   // 3 ms
  parameter int          T_WORD    = 100_000   // 10 ms
) (
  input  logic                 clk,
  input  logic                 rst,
  // UNIBUS
  input  logic                 ub_init,
  input  logic [17:0]          ub_a_in,
  input  logic [1:0]           ub_c_in,
  input  logic [15:0]          ub_d_in,
  input  logic                 ub_msyn_in,
  input  logic                 ub_ssyn_in,
  input  logic                 ub_bbsy_in,
  input  logic                 ub_npg,
  input  logic                 ub_bg_in,
  output logic [17:0]          ub_a_out,
  output logic [1:0]           ub_c_out,
  output logic                 ub_a_oe,
  output logic [15:0]          ub_d_out,
  output logic                 ub_d_oe,
  output logic                 ub_msyn_out,
  output logic                 ub_ssyn_out,
  output logic                 ub_bbsy_out,
  output logic                 ub_npr,
  output logic                 ub_sack,
  output logic                 ub_br,
  output logic                 ub_bg_out,
  output logic                 ub_intr,
  // FASTBUS
  input  logic [31:0]          fb_ad_in,
  input  logic                 fb_as_in,
  input  logic                 fb_ds_in,
  input  logic                 fb_rd_in,
  input  logic                 fb_ak_in,
  input  logic                 fb_dk_in,
  input  logic                 fb_busy_in,
  input  logic                 fb_empty_in,
  input  logic [N_MASTERS-1:1] fb_req_in,
  output logic [N_MASTERS-1:1] fb_gnt_out,
  output logic [31:0]          fb_ad_out,
  output logic                 fb_ad_oe,
  output logic                 fb_as_out,
  output logic                 fb_ds_out,
  output logic                 fb_rd_out,
  output logic                 fb_bc_out,
  output logic                 fb_gl_out,
  output logic                 fb_ak_out,
  output logic                 fb_dk_out
);
  logic rst_i;
  assign rst_i = rst || ub_init;

  // ------------------------------------------------------------ decoding
  logic       win_hit, reg_hit, map_sel, csr_sel, ir_sel, lbr_sel, bc_sel, bc_global;
  logic [3:0] map_idx;
  logic [1:0] map_field;

  ub_decoder #(.WIN_PAGE(WIN_PAGE), .REG_BASE(REG_BASE)) u_dec (
    .addr(ub_a_in), .win_hit, .reg_hit, .map_sel, .map_idx, .map_field,
    .csr_sel, .ir_sel, .lbr_sel, .bc_sel, .bc_global);

  // ---------------------------------------------------------- registers
  logic        uc_reg_wr, uc_reg_rd;
  logic [15:0] map_rdata, csr, ir, lbr, lwl, hwl;
  logic [31:0] map_fb_addr, fbr;
  map_ctrl_t   mctl;
  logic        hi_word;

  addr_map u_map (
    .clk, .rst(rst_i), .wr(uc_reg_wr && map_sel), .wr_idx(map_idx), .wr_field(map_field),
    .wdata(ub_d_in), .rdata(map_rdata), .ub_off(ub_a_in[11:0]), .fb_addr(map_fb_addr),
    .ctrl(mctl), .hi_word);

  logic uc_lwl_ld, fc_lwl_ld, uc_hwl_ld, fc_hwl_ld, fc_fbr_ld;

  word_latch #(.W(16)) u_lbr (.clk, .rst(rst_i), .ld(uc_reg_wr && lbr_sel), .d(ub_d_in), .q(lbr));
  word_latch #(.W(16)) u_lwl (.clk, .rst(rst_i), .ld(uc_lwl_ld || fc_lwl_ld), .d(ub_d_in), .q(lwl));
  word_latch #(.W(16)) u_hwl (.clk, .rst(rst_i), .ld(uc_hwl_ld || fc_hwl_ld), .d(fb_ad_in[31:16]), .q(hwl));
  word_latch #(.W(32)) u_fbr (.clk, .rst(rst_i), .ld(fc_fbr_ld), .d(fb_ad_in), .q(fbr));

  // ----------------------------------------------------------- data path
  ib_sel_e     uc_ib_sel, fc_ib_sel, ib_sel;
  ub_sel_e     uc_ub_sel, fc_ub_sel, ub_sel;
  logic [31:0] ib_out;
  logic [15:0] mux_ub_out;
  logic        fc_ad_oe, um_a_oe;

  assign ib_sel = fc_ad_oe ? fc_ib_sel : uc_ib_sel;
  assign ub_sel = um_a_oe  ? fc_ub_sel : uc_ub_sel;

  data_mux u_mux (
    .ib_sel, .ub_sel, .odd(ub_a_in[0]), .ub_in(ub_d_in), .lwl, .lbr, .hwl,
    .ib_in(fb_ad_in), .ib_out, .ub_out(mux_ub_out));

  // ------------------------------------------------ UNIBUS-initiated side
  logic        fm_req, fm_rd, fm_bcast, fm_global, fm_use_fbr, fm_use_ib, fm_release, fm_done;
  ev_code_e    fm_err;
  logic [31:0] fm_addr;
  logic        fbr_req, fbr_global, fbr_ack;
  logic        pend, pend_susp, uc_txn, uc_txn_rd, uc_ev, uc_ev_beie, uc_d_oe;
  ev_code_e    uc_ev_code;
  logic [11:0] uc_ev_addr;
  logic [N_MASTERS-1:0] arb_req, arb_gnt;
  logic        fm_fb_req, fm_ad_oe;
  logic [31:0] fm_ad_out;

  ub_ctrl u_uc (
    .clk, .rst(rst_i), .msyn(ub_msyn_in), .c1(ub_c_in[1]), .off(ub_a_in[11:0]),
    .ssyn(ub_ssyn_out), .d_oe(uc_d_oe), .reg_rd(uc_reg_rd), .reg_wr(uc_reg_wr),
    .win_hit, .reg_hit, .bc_sel, .bc_global, .mctl, .hi_word,
    .ib_sel(uc_ib_sel), .ub_sel(uc_ub_sel), .lwl_ld(uc_lwl_ld), .hwl_ld(uc_hwl_ld),
    .fm_req, .fm_rd, .fm_bcast, .fm_global, .fm_use_fbr, .fm_use_ib, .fm_release,
    .fm_done, .fm_err, .fbr_req, .fbr_global, .fbr_ack,
    .pend, .pend_susp, .txn(uc_txn), .txn_rd(uc_txn_rd), .ev(uc_ev), .ev_code(uc_ev_code),
    .ev_addr(uc_ev_addr), .ev_beie(uc_ev_beie));

  assign fm_addr = fm_use_fbr ? fbr : (fm_use_ib ? ib_out : map_fb_addr);

  fb_master #(.T_AK(T_AK), .T_DK(T_DK), .T_WORD(T_WORD)) u_fm (
    .clk, .rst(rst_i), .req(fm_req), .rd(fm_rd), .bcast(fm_bcast), .gbl(fm_global),
    .addr(fm_addr), .wdata(ib_out), .release_i(fm_release), .done(fm_done), .err(fm_err),
    .fb_req(fm_fb_req), .fb_gnt(arb_gnt[0]), .ad_out(fm_ad_out),
    .ad_oe(fm_ad_oe), .as_o(fb_as_out), .ds_o(fb_ds_out), .rd_o(fb_rd_out),
    .bc_o(fb_bc_out), .gl_o(fb_gl_out), .ak_i(fb_ak_in), .dk_i(fb_dk_in),
    .busy_i(fb_busy_in), .empty_i(fb_empty_in));

  assign arb_req = {fb_req_in, fm_fb_req};
  fb_arbiter #(.N(N_MASTERS)) u_arb (.clk, .rst(rst_i), .req(arb_req), .gnt(arb_gnt));
  assign fb_gnt_out = arb_gnt[N_MASTERS-1:1];

  // ------------------------------------------------ FASTBUS-initiated side
  logic        cnt_load, cnt_step, cnt_w32, cnt_hi;
  logic        um_req, um_wr, um_release, um_done, um_d_oe;
  ev_code_e    um_err;
  logic [15:0] um_d_out;
  logic [17:0] cnt_addr;
  logic        fc_txn, fc_txn_blk, fc_txn_rd, fc_txn_ack, fc_ev, fc_ev_ack;
  ev_code_e    fc_ev_code;
  logic [14:0] fc_ev_msg;
  logic [31:0] fc_ad_out;

  fb_ctrl #(.DMA_BASE(DMA_BASE), .REG_BASE(FB_REG)) u_fc (
    .clk, .rst(rst_i), .as_i(fb_as_in), .ds_i(fb_ds_in), .rd_i(fb_rd_in), .ad_in(fb_ad_in),
    .ak_o(fb_ak_out), .dk_o(fb_dk_out), .ad_out(fc_ad_out), .ad_oe(fc_ad_oe),
    .fb32(csr[CSR_FB32]), .fbr, .csr, .ir, .ib_out, .fbr_ld(fc_fbr_ld), .fbr_req, .fbr_global, .fbr_ack,
    .ib_sel(fc_ib_sel), .ub_sel(fc_ub_sel), .lwl_ld(fc_lwl_ld),
    .hwl_ld(fc_hwl_ld), .cnt_load, .cnt_step, .cnt_w32, .cnt_hi,
    .um_req, .um_wr, .um_release, .um_done, .um_err,
    .txn(fc_txn), .txn_blk(fc_txn_blk), .txn_rd(fc_txn_rd), .txn_ack(fc_txn_ack),
    .ev(fc_ev), .ev_code(fc_ev_code), .ev_msg(fc_ev_msg), .ev_ack(fc_ev_ack));

  addr_counter u_cnt (
    .clk, .rst(rst_i), .load(cnt_load), .step(cnt_step), .w32(cnt_w32),
    .fb_addr(fb_ad_in[19:0]), .hi(cnt_hi), .ub_addr(cnt_addr));

  logic um_bbsy, um_sack;
  ub_master #(.T_WORD(T_WORD)) u_um (
    .clk, .rst(rst_i), .req(um_req), .wr(um_wr), .addr(cnt_addr), .wdata(mux_ub_out),
    .release_i(um_release), .done(um_done), .err(um_err),
    .npr(ub_npr), .npg(ub_npg), .sack(um_sack), .bbsy_in(ub_bbsy_in), .bbsy(um_bbsy),
    .a_out(ub_a_out), .c_out(ub_c_out), .d_out(um_d_out), .a_oe(um_a_oe), .d_oe(um_d_oe),
    .msyn(ub_msyn_out), .ssyn(ub_ssyn_in));
  assign ub_a_oe = um_a_oe;

  // -------------------------------------------------- status and interrupts
  logic     int_req, il_bbsy, il_sack, il_oe;
  logic [15:0] vec, reg_rdata;
  logic     se_ev, se_txn;

  assign se_ev      = uc_ev || fc_ev;
  assign fc_ev_ack  = fc_ev && !uc_ev;
  assign se_txn     = uc_txn || fc_txn;
  assign fc_txn_ack = fc_txn && !uc_txn;

  status_error u_se (
    .clk, .rst(rst_i), .csr_wr(uc_reg_wr && csr_sel), .wdata(ub_d_in), .csr, .ir,
    .txn(se_txn), .txn_fbi(!uc_txn), .txn_blk(!uc_txn && fc_txn_blk),
    .txn_rd(uc_txn ? uc_txn_rd : fc_txn_rd), .pend,
    .ev(se_ev), .ev_code(uc_ev ? uc_ev_code : fc_ev_code),
    .ev_addr(uc_ev ? uc_ev_addr : cnt_addr[11:0]),
    .ev_msg(fc_ev_msg), .ev_beie(uc_ev && uc_ev_beie), .ev_susp(pend_susp), .int_req);

  intr_logic #(.VECTOR(VECTOR)) u_il (
    .clk, .rst(rst_i), .int_req, .bg_in(ub_bg_in), .bg_out(ub_bg_out), .br(ub_br),
    .sack(il_sack), .bbsy_in(ub_bbsy_in), .bbsy(il_bbsy), .intr(ub_intr), .ssyn(ub_ssyn_in),
    .vec, .intr_oe(il_oe));

  // ------------------------------------------------------- bus drive
  always_comb begin
    if (map_sel)      reg_rdata = map_rdata;
    else if (csr_sel) reg_rdata = csr;
    else if (ir_sel)  reg_rdata = ir;
    else if (lbr_sel) reg_rdata = lbr;
    else              reg_rdata = '0;
    if (il_oe)          ub_d_out = vec;
    else if (uc_reg_rd) ub_d_out = reg_rdata;
    else if (um_d_oe)   ub_d_out = um_d_out;
    else                ub_d_out = mux_ub_out;
  end
  assign ub_d_oe     = uc_d_oe || um_d_oe || il_oe;
  assign ub_bbsy_out = um_bbsy || il_bbsy;
  assign ub_sack     = um_sack || il_sack;
  assign fb_ad_out   = fm_ad_oe ? fm_ad_out : fc_ad_out;
  assign fb_ad_oe    = fm_ad_oe || fc_ad_oe;

  // the two FASTBUS roles never drive AD together
  a_ad_excl: assert property (@(posedge clk) disable iff (rst_i) !(fm_ad_oe && fc_ad_oe));
endmodule
