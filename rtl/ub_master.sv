// ub_master -- UNIBUS DMA master of the interface.
//
// Moves one 16-bit word per request as a non-processor (NPR) master: it
// raises NPR, answers the grant NPG with SACK, waits for the bus to be free
// (BBSY, SSYN and NPG low), takes BBSY, puts address, C1/C0 and (for DATO)
// data on the lines, raises MSYN one clock later and waits for the slave's
// SSYN. The write data are not stored here: they are passed straight through
// from wdata, which must stay valid while the cycle runs. It then reports done and keeps MSYN up -- for DATI the slave's data
// stay on the lines, clamped through to FASTBUS -- until the requester says
// release; then it drops MSYN, waits for SSYN to fall and releases BBSY.
// If the word is not done within T_WORD clock cycles (grant or SSYN missing)
// the cycle is abandoned and reported done with error code 7.
// DMA mastership and the 10 ms limit are as published; the sequence follows
// the standard UNIBUS NPR protocol with one grant per word, and the
// hold/release interface is this design's choice. Inputs are taken as
// synchronous to clk.
module ub_master
  import fbu_pkg::*;
#(
  parameter int T_WORD = 100_000   // 10 ms at 10 MHz
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,          // level; sampled in idle
  input  logic        wr,           // 1 = DATO, 0 = DATI
  input  logic [17:0] addr,
  input  logic [15:0] wdata,
  input  logic        release_i,
  output logic        done,
  output ev_code_e    err,
  // UNIBUS
  output logic        npr,
  input  logic        npg,
  output logic        sack,
  input  logic        bbsy_in,
  output logic        bbsy,
  output logic [17:0] a_out,
  output logic [1:0]  c_out,
  output logic [15:0] d_out,
  output logic        a_oe,          // address and C1/C0 driven
  output logic        d_oe,          // data driven (DATO)
  output logic        msyn,
  input  logic        ssyn
);
  typedef enum logic [2:0] {D_IDLE, D_REQ, D_SACK, D_ADDR, D_MSYN, D_HOLD, D_END} dst_e;
  dst_e st;
  logic [17:0] a_q;
  logic        wr_q;
  logic [$clog2(T_WORD+1)-1:0] t;
  wire tmo = (t >= T_WORD[$bits(t)-1:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= D_IDLE; err <= EV_NONE; t <= '0; a_q <= '0; wr_q <= 1'b0;
    end else begin
      if (st != D_IDLE && st != D_HOLD) t <= t + 1'b1;
      unique case (st)
        D_IDLE: begin
          t <= '0;
          if (req) begin st <= D_REQ; err <= EV_NONE; a_q <= addr; wr_q <= wr; end
        end
        D_REQ:  if (npg) st <= D_SACK;
                else if (tmo) begin err <= EV_WORD_TMO; st <= D_HOLD; end
        D_SACK: if (!npg && !bbsy_in && !ssyn) st <= D_ADDR;
                else if (tmo) begin err <= EV_WORD_TMO; st <= D_HOLD; end
        D_ADDR: st <= D_MSYN;
        D_MSYN: if (ssyn) st <= D_HOLD;
                else if (tmo) begin err <= EV_WORD_TMO; st <= D_HOLD; end
        D_HOLD: if (release_i) begin st <= D_END; t <= '0; end
        D_END:  if (!ssyn || tmo) st <= D_IDLE;
        default: st <= D_IDLE;
      endcase
    end
  end

  always_comb begin
    npr   = (st == D_REQ);
    sack  = (st == D_SACK);
    bbsy  = (st == D_ADDR || st == D_MSYN || st == D_END || (st == D_HOLD && err == EV_NONE));
    a_oe  = bbsy;
    d_oe  = bbsy && wr_q;
    a_out = a_q;
    c_out = wr_q ? 2'b10 : 2'b00;
    d_out = wdata;   // clamped through, not latched
    msyn  = (st == D_MSYN) || (st == D_HOLD && err == EV_NONE);
    done  = (st == D_HOLD);
  end
endmodule
