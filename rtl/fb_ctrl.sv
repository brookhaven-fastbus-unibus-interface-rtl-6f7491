// fb_ctrl -- control section for FASTBUS-initiated transfers.
//
// Answers the interface's FASTBUS addresses as a slave and drives the UNIBUS
// DMA master (ub_master) and the address counter. Address cycle: AS with an
// address in the DMA window (AD[31:20] = DMA_BASE) loads AD[19:0] into the
// address counter and returns AK; an address in the register block
// (AD[31:2] = REG_BASE[31:2]) selects the FBR (local or global broadcast) or
// the message port. Each data cycle (DS) then moves one word; several data
// cycles under one AS form a block transfer, with the counter stepping by one
// FASTBUS word each time.
//  * DMA write, 32-bit: the low half goes straight to UNIBUS (first DATO),
//    the high half into the HWL; DK is returned after the first UNIBUS word,
//    and the second DATO (HWL, address + 2) runs while FASTBUS is free.
//    DK falls once DS has fallen and the second word is done.
//  * DMA read, 32-bit: the first DATI goes into the LWL, the second DATI is
//    clamped through as {UNIBUS word, LWL} with DK; the UNIBUS cycle is
//    released when DS falls.
//  * 16-bit (CSR FB32 = 0): one UNIBUS word per data cycle.
//  * FBR write: loads the FBR and requests a broadcast; message write: an
//    event with code 9 and the low 15 data bits. Reads return the FBR, or
//    {CSR, IR} at the message address, so FASTBUS masters see the status too.
// AS falling ends the transfer: AK falls, the status logic gets the
// transaction, and after a block transfer of more than one word the
// block-end event (code 8). A UNIBUS timeout (code 7) is reported and DK is
// withheld, so the FASTBUS master sees the missing data handshake.
// Events and transaction reports are held until the status logic takes them.
// The transfer rules are as published; the address layout, state sequence and
// withholding DK after a UNIBUS error are this design's choice. Inputs are
// taken as synchronous to clk; they exclude the interface's own drive.
module fb_ctrl
  import fbu_pkg::*;
#(
  parameter logic [11:0] DMA_BASE = 12'h7F0,
  parameter logic [31:0] REG_BASE = 32'h7F10_0000
) (
  input  logic        clk,
  input  logic        rst,
  // FASTBUS slave side
  input  logic        as_i,
  input  logic        ds_i,
  input  logic        rd_i,
  input  logic [31:0] ad_in,
  output logic        ak_o,
  output logic        dk_o,
  output logic [31:0] ad_out,
  output logic        ad_oe,
  // configuration and registers
  input  logic        fb32,       // CSR FB32
  input  logic [31:0] fbr,
  input  logic [15:0] csr,
  input  logic [15:0] ir,
  input  logic [31:0] ib_out,     // composed word from the data multiplexer
  output logic        fbr_ld,
  output logic        fbr_req,    // broadcast wanted (level until acked)
  output logic        fbr_global,
  input  logic        fbr_ack,
  // data path control
  output ib_sel_e     ib_sel,
  output ub_sel_e     ub_sel,
  output logic        lwl_ld,
  output logic        hwl_ld,
  output logic        cnt_load,
  output logic        cnt_step,
  output logic        cnt_w32,
  output logic        cnt_hi,
  // UNIBUS DMA master
  output logic        um_req,
  output logic        um_wr,
  output logic        um_release,
  input  logic        um_done,
  input  ev_code_e    um_err,
  // status
  output logic        txn,
  output logic        txn_blk,
  output logic        txn_rd,
  input  logic        txn_ack,
  output logic        ev,
  output ev_code_e    ev_code,
  output logic [14:0] ev_msg,
  input  logic        ev_ack
);
  typedef enum logic [3:0] {
    F_IDLE, F_AK, F_W1, F_W1R, F_W2, F_W2R, F_WDK,
    F_R1, F_R1R, F_R2, F_RDK, F_RREL, F_RDONE, F_ERR
  } fst_e;
  fst_e st;
  logic        dma_q, w32_q, rd_q;
  logic [1:0]  rsel;
  logic [15:0] nwords;
  logic        w2_done;

  wire dma_hit = (ad_in[31:20] == DMA_BASE);
  wire reg_hit = (ad_in[31:2] == REG_BASE[31:2]);

  // pending event / transaction reports
  logic        ev_p, txn_p, txblk_p, txrd_p;
  ev_code_e    evc_p;
  logic [14:0] evm_p;

  task automatic post_ev(input ev_code_e c, input logic [14:0] m);
    ev_p  <= 1'b1;
    evc_p <= c;
    evm_p <= m;
  endtask

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= F_IDLE; dma_q <= 1'b0; w32_q <= 1'b0; rd_q <= 1'b0; rsel <= '0;
      nwords <= '0; w2_done <= 1'b0;
      ev_p <= 1'b0; evc_p <= EV_NONE; evm_p <= '0;
      txn_p <= 1'b0; txblk_p <= 1'b0; txrd_p <= 1'b0;
      fbr_req <= 1'b0; fbr_global <= 1'b0;
    end else begin
      if (ev_ack)  ev_p  <= 1'b0;
      if (txn_ack) txn_p <= 1'b0;
      if (fbr_ack) fbr_req <= 1'b0;
      unique case (st)
        F_IDLE: begin
          nwords <= '0; w2_done <= 1'b0;
          if (as_i && (dma_hit || reg_hit)) begin
            st <= F_AK; dma_q <= dma_hit; w32_q <= fb32; rsel <= ad_in[1:0];
          end
        end
        F_AK: begin
          if (!as_i) begin
            st <= F_IDLE;
            if (nwords != 0) begin
              txn_p <= 1'b1; txblk_p <= (nwords > 1); txrd_p <= rd_q;
            end
            if (dma_q && nwords > 1) post_ev(EV_BLK_END, '0);
          end else if (ds_i) begin
            rd_q <= rd_i;
            if (!dma_q) begin
              st <= F_WDK;
              if (!rd_i) begin
                if (rsel == FO_FBR_LOC || rsel == FO_FBR_GLB) begin
                  fbr_req <= 1'b1; fbr_global <= (rsel == FO_FBR_GLB);
                end else if (rsel == FO_MSG) post_ev(EV_MESSAGE, ad_in[14:0]);
              end
            end else if (rd_i) st <= w32_q ? F_R1 : F_R2;
            else               st <= F_W1;
          end
        end
        // ---- DMA write
        F_W1: if (um_done) begin
          st <= F_W1R;
          if (um_err != EV_NONE) post_ev(um_err, '0);
        end
        F_W1R: if (!um_done) st <= (ev_p && evc_p == EV_WORD_TMO) ? F_ERR : (w32_q ? F_W2 : F_WDK);
        F_W2: if (um_done) begin
          st <= F_W2R;
          if (um_err != EV_NONE) post_ev(um_err, '0);
        end
        F_W2R: if (!um_done) begin st <= F_WDK; w2_done <= 1'b1; end
        F_WDK: if (!ds_i) begin
          st <= F_AK; nwords <= nwords + 1'b1; w2_done <= 1'b0;
        end
        // ---- DMA read
        F_R1: if (um_done) begin
          st <= F_R1R;
          if (um_err != EV_NONE) post_ev(um_err, '0);
        end
        F_R1R: if (!um_done) st <= (ev_p && evc_p == EV_WORD_TMO) ? F_ERR : F_R2;
        F_R2: if (um_done) begin
          st <= (um_err != EV_NONE) ? F_RREL : F_RDK;
          if (um_err != EV_NONE) post_ev(um_err, '0);
        end
        F_RDK:  if (!ds_i) st <= F_RREL;
        F_RREL: if (!um_done) begin
          st <= (ev_p && evc_p == EV_WORD_TMO) ? F_ERR : F_RDONE;
        end
        F_RDONE: begin st <= F_AK; nwords <= nwords + 1'b1; end
        F_ERR:  if (!as_i) st <= F_IDLE;
        default: st <= F_IDLE;
      endcase
    end
  end

  always_comb begin
    ak_o   = (st != F_IDLE) && (st != F_ERR);
    // DK: 32-bit write after the first word; read with clamped data;
    // register cycles and 16-bit writes once the word is done
    dk_o   = (st == F_W2) || (st == F_W2R) || (st == F_RDK) ||
             (st == F_WDK && (!dma_q || !w32_q || w2_done));
    ad_oe  = (st == F_RDK) || (st == F_WDK && !dma_q && rd_q);
    if (!dma_q) ad_out = (rsel == FO_MSG) ? {csr, ir} : fbr;
    else        ad_out = ib_out;
    fbr_ld    = (st == F_AK) && as_i && ds_i && !dma_q && !rd_i &&
                (rsel == FO_FBR_LOC || rsel == FO_FBR_GLB);
    ib_sel    = w32_q ? IB_W32 : IB_W16;
    ub_sel    = (st == F_W2 || st == F_W2R) ? UB_HWL : UB_LO;
    hwl_ld    = (st == F_AK) && as_i && ds_i && dma_q && !rd_i && w32_q;
    lwl_ld    = (st == F_R1) && um_done;
    cnt_load  = (st == F_IDLE) && as_i && dma_hit;
    cnt_step  = (st == F_WDK && !ds_i && dma_q) || (st == F_RDONE);
    cnt_w32   = (st == F_IDLE) ? fb32 : w32_q;
    cnt_hi    = (st == F_W2) || (st == F_W2R) || ((st == F_R2 || st == F_RDK || st == F_RREL) && w32_q);
    um_req    = (st == F_W1) || (st == F_W2) || (st == F_R1) || (st == F_R2);
    um_wr     = (st == F_W1) || (st == F_W2);
    // writes end the UNIBUS word at once; a read's last word stays clamped until DS falls
    um_release = ((st == F_W1 || st == F_W2 || st == F_R1) && um_done) ||
                 (st == F_R2 && um_done && um_err != EV_NONE) || (st == F_RREL);
    txn       = txn_p;
    txn_blk   = txblk_p;
    txn_rd    = txrd_p;
    ev        = ev_p;
    ev_code   = evc_p;
    ev_msg    = evm_p;
  end
endmodule
