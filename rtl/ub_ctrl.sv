// ub_ctrl -- control section for UNIBUS-initiated transfers.
//
// Answers the interface's UNIBUS addresses as a slave and drives the FASTBUS
// master sequencer (fb_master). Per UNIBUS cycle (MSYN with a decoded hit):
//  * register page: a DATO/DATOB loads the addressed register (reg_wr strobe),
//    a DATI returns its contents (reg_rd); a write to a broadcast dummy
//    location runs a FASTBUS broadcast whose high half is the UNIBUS word and
//    whose low half is the LBR.
//  * FASTBUS window, 32-bit mapping: the first (low, even) word of a write
//    goes into the LWL only; the second (high) word starts one FASTBUS write
//    of {UNIBUS word, LWL}. The first word of a read starts one FASTBUS read,
//    hands the low half straight to UNIBUS and keeps the high half in the
//    HWL; the second word is served from the HWL without touching FASTBUS.
//    If the second word disagrees with the first on read/write (or comes
//    without a first) it is an alignment error, code 6, and nothing moves.
//  * 16-bit and 8-bit mappings: one FASTBUS transfer per UNIBUS cycle; bytes
//    are moved to or from the addressed byte lane.
//  * when idle and no UNIBUS cycle is waiting, a broadcast requested by a
//    FASTBUS write to the FBR is run on FASTBUS.
// SSYN is raised after the FASTBUS data handshake; the FASTBUS cycle is held
// (data clamped through) until MSYN falls, then released. Error codes from
// fb_master become events for the status logic; SSYN is still returned.
// Only C1 (write) is used: DATIP is served as DATI, and DATOB writes the
// whole word except under a byte mapping, where address bit 0 picks the lane.
// The transfer rules are as published; the state sequence, the one-clock
// address deskew and answering SSYN after a FASTBUS error are this design's
// choice. Inputs are taken as synchronous to clk.
module ub_ctrl
  import fbu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // UNIBUS slave side
  input  logic        msyn,
  input  logic        c1,         // UNIBUS C1: 1 = DATO/DATOB (write)
  input  logic [11:0] off,        // address bits 11:0, for the IR
  output logic        ssyn,
  output logic        d_oe,       // interface drives the data lines
  output logic        reg_rd,     // data lines carry register read data
  output logic        reg_wr,     // one-cycle register write strobe
  // decoder and address map
  input  logic        win_hit,
  input  logic        reg_hit,
  input  logic        bc_sel,
  input  logic        bc_global,
  input  map_ctrl_t   mctl,
  input  logic        hi_word,
  // data path control
  output ib_sel_e     ib_sel,
  output ub_sel_e     ub_sel,
  output logic        lwl_ld,
  output logic        hwl_ld,
  // FASTBUS master sequencer
  output logic        fm_req,
  output logic        fm_rd,
  output logic        fm_bcast,
  output logic        fm_global,
  output logic        fm_use_fbr, // address from the FBR (FASTBUS-requested broadcast)
  output logic        fm_use_ib,  // address from the internal bus (UNIBUS broadcast)
  output logic        fm_release,
  input  logic        fm_done,
  input  ev_code_e    fm_err,
  // broadcast requested from FASTBUS
  input  logic        fbr_req,
  input  logic        fbr_global,
  output logic        fbr_ack,
  // status
  output logic        pend,       // second word of a 32-bit pair pending
  output logic        pend_susp,  // suspend option of that pair's mapping register
  output logic        txn,
  output logic        txn_rd,
  output logic        ev,
  output ev_code_e    ev_code,
  output logic [11:0] ev_addr,
  output logic        ev_beie
);
  typedef enum logic [2:0] {U_IDLE, U_DEC, U_FB, U_HOLD, U_REL, U_SSYN, U_FBR, U_FBR_REL} ust_e;
  ust_e st;
  logic rd_c, rd_q, pend_rd, bc_q, gl_q, reg_q, lo32_rd;
  ib_sel_e ib_q;
  ub_sel_e ub_q;

  assign rd_c = !c1;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= U_IDLE; pend <= 1'b0; pend_rd <= 1'b0; pend_susp <= 1'b0;
      rd_q <= 1'b0; bc_q <= 1'b0; gl_q <= 1'b0; reg_q <= 1'b0; lo32_rd <= 1'b0;
      ib_q <= IB_W16; ub_q <= UB_LO;
    end else begin
      unique case (st)
        U_IDLE: begin
          bc_q <= 1'b0; reg_q <= 1'b0; lo32_rd <= 1'b0;
          if (msyn && (win_hit || reg_hit)) st <= U_DEC;
          else if (fbr_req) begin st <= U_FBR; gl_q <= fbr_global; end
        end
        U_DEC: begin
          rd_q <= rd_c; reg_q <= reg_hit;
          if (!msyn) st <= U_IDLE;
          else if (reg_hit) begin
            if (bc_sel && !rd_c) begin
              st <= U_FB; bc_q <= 1'b1; gl_q <= bc_global; ib_q <= IB_BC;
            end else st <= U_SSYN;
          end else if (mctl.w32) begin
            if (!hi_word) begin
              pend_susp <= mctl.susp;
              if (rd_c) begin
                st <= U_FB; ub_q <= UB_LO; lo32_rd <= 1'b1;
              end else begin
                st <= U_SSYN; pend <= 1'b1; pend_rd <= 1'b0;
              end
            end else if (!pend || pend_rd != rd_c) begin
              st <= U_SSYN; pend <= 1'b0; ub_q <= UB_HWL;
            end else if (rd_c) begin
              st <= U_SSYN; pend <= 1'b0; ub_q <= UB_HWL;
            end else begin
              st <= U_FB; ib_q <= IB_W32;
            end
          end else begin
            st <= U_FB;
            ib_q <= mctl.byte8 ? IB_BYTE : IB_W16;
            ub_q <= mctl.byte8 ? UB_BYTE : UB_LO;
          end
        end
        U_FB: if (fm_done) begin
          st <= U_HOLD;
          if (lo32_rd) begin pend <= 1'b1; pend_rd <= 1'b1; end
          else if (ib_q == IB_W32) pend <= 1'b0;
        end
        U_HOLD: if (!msyn) st <= U_REL;
        U_REL:  if (!fm_done) st <= U_IDLE;
        U_SSYN: if (!msyn) st <= U_IDLE;
        U_FBR:  if (fm_done) st <= U_FBR_REL;
        U_FBR_REL: if (!fm_done) st <= U_IDLE;
        default: st <= U_IDLE;
      endcase
    end
  end

  wire dec_window = (st == U_DEC) && msyn && !reg_hit;
  wire align_err  = dec_window && mctl.w32 && hi_word && (!pend || pend_rd != rd_c);

  always_comb begin
    ssyn       = (st == U_HOLD) || (st == U_SSYN);
    reg_rd     = (st == U_SSYN) && reg_q && rd_q;
    d_oe       = ((st == U_HOLD) || (st == U_SSYN)) && rd_q;
    reg_wr     = (st == U_DEC) && msyn && reg_hit && !rd_c && !bc_sel;
    ib_sel     = ib_q;
    ub_sel     = ub_q;
    lwl_ld     = dec_window && mctl.w32 && !hi_word && !rd_c;
    hwl_ld     = (st == U_FB) && fm_done && lo32_rd;
    fm_req     = (st == U_FB) || (st == U_FBR);
    fm_rd      = rd_c && !bc_q;
    fm_bcast   = bc_q || (st == U_FBR);
    fm_global  = gl_q;
    fm_use_fbr = (st == U_FBR);
    fm_use_ib  = bc_q;
    fm_release = (st == U_HOLD && !msyn) || (st == U_FBR && fm_done);
    fbr_ack    = (st == U_FBR) && fm_done;
    txn        = (st == U_HOLD && !msyn) || (st == U_SSYN && !msyn && !reg_q);
    txn_rd     = rd_q;
    // events: alignment at decode, FASTBUS errors when the master is done
    ev         = align_err || ((st == U_FB || st == U_FBR) && fm_done && fm_err != EV_NONE);
    ev_code    = align_err ? EV_ALIGN : fm_err;
    ev_addr    = off;
    ev_beie    = mctl.beie;
  end
endmodule
