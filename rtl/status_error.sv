// status_error -- status/error logic with the control/status register (CSR)
// and the interrupt register (IR).
//
// Every transaction reports its origin (FASTBUS or UNIBUS), block mode,
// direction and whether the second UNIBUS word of a 32-bit pair is pending;
// these four bits appear in the CSR. An anomalous event (flag codes 1..9 of
// fbu_pkg) sets CSR ERROR and the two class bits and, unless the IR is
// locked, loads the IR: flag code in [15:12] and the 12-bit UNIBUS address in
// [11:0], or for a FASTBUS message a leading 1 and 15 data bits. If the event
// is enabled (six CSR enables; BUSY/EMPTY by the mapping register's beie bit)
// it requests an interrupt: CSR INTERRUPT is set and the IR is locked until
// software clears INTERRUPT. An enabled event while INTERRUPT is set (or one
// is already waiting) sets INTERRUPT OVERFLOW. When the mapping register's
// susp bit is set the request waits until the pending second word is done.
// UNIBUS writes: bits [6:0] load; INTERRUPT, OVERFLOW and ERROR are cleared
// by writing 0 to them. All updates on the clock edge; reset clears all.
// The codes, classes, locking, overflow and suspend rules are as published;
// the bit positions and write-0-to-clear are this design's choice.
module status_error
  import fbu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // UNIBUS register access
  input  logic        csr_wr,
  input  logic [15:0] wdata,
  output logic [15:0] csr,
  output logic [15:0] ir,
  // transaction status
  input  logic        txn,        // one-cycle strobe at the end of a transaction
  input  logic        txn_fbi,
  input  logic        txn_blk,
  input  logic        txn_rd,
  input  logic        pend,       // second word of a 32-bit pair pending (level)
  // events
  input  logic        ev,         // one-cycle strobe
  input  ev_code_e    ev_code,
  input  logic [11:0] ev_addr,
  input  logic [14:0] ev_msg,
  input  logic        ev_beie,    // BUSY/EMPTY enable of the mapping register in use
  input  logic        ev_susp,    // suspend option of the mapping register in use
  output logic        int_req     // CSR INTERRUPT, to the UNIBUS interrupt logic
);
  logic [5:0] ie;
  logic       fb32, rd_s, blk_s, fbi_s, err_s, ovf_s, int_s;
  ev_class_e  cls;
  logic       waiting;   // enabled event held back by the suspend option
  logic       en;
  ev_class_e  ev_cls;

  always_comb begin
    unique case (ev_code)
      EV_AK_TMO:   en = ie[CSR_IE_AK];
      EV_DK_TMO:   en = ie[CSR_IE_DK];
      EV_BUSY, EV_EMPTY, EV_BUSYEMP: en = ev_beie;
      EV_ALIGN:    en = ie[CSR_IE_ALIGN];
      EV_WORD_TMO: en = ie[CSR_IE_TMO];
      EV_BLK_END:  en = ie[CSR_IE_BLK];
      EV_MESSAGE:  en = ie[CSR_IE_MSG];
      default:     en = 1'b0;
    endcase
    unique case (ev_code)
      EV_BLK_END: ev_cls = CL_BLOCK;
      EV_MESSAGE: ev_cls = CL_MSG;
      default:    ev_cls = CL_ERROR;
    endcase
  end

  wire locked = int_s || waiting;

  always_ff @(posedge clk) begin
    if (rst) begin
      ie <= '0; fb32 <= 1'b0; rd_s <= 1'b0; blk_s <= 1'b0; fbi_s <= 1'b0;
      err_s <= 1'b0; ovf_s <= 1'b0; int_s <= 1'b0; cls <= CL_NONE;
      waiting <= 1'b0; ir <= '0;
    end else begin
      if (csr_wr) begin
        ie   <= wdata[5:0];
        fb32 <= wdata[CSR_FB32];
        if (!wdata[CSR_INT])   int_s <= 1'b0;
        if (!wdata[CSR_OVF])   ovf_s <= 1'b0;
        if (!wdata[CSR_ERROR]) err_s <= 1'b0;
      end
      if (txn) begin
        fbi_s <= txn_fbi;
        blk_s <= txn_blk;
        rd_s  <= txn_rd;
      end
      // a held-back request goes out once the pair is complete
      if (waiting && !pend) begin
        waiting <= 1'b0;
        int_s   <= 1'b1;
      end
      if (ev && ev_code != EV_NONE) begin
        err_s <= 1'b1;
        if (!locked) begin
          cls <= ev_cls;
          ir  <= (ev_code == EV_MESSAGE) ? {1'b1, ev_msg} : {ev_code, ev_addr};
        end
        if (en) begin
          if (locked)              ovf_s   <= 1'b1;
          else if (ev_susp && pend) waiting <= 1'b1;
          else                     int_s   <= 1'b1;
        end
      end
    end
  end

  assign csr = {int_s, ovf_s, err_s, cls, fbi_s, blk_s, rd_s, pend, fb32, ie};
  assign int_req = int_s;
endmodule
