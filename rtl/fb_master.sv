// fb_master -- FASTBUS master sequencer of the interface.
//
// Runs one FASTBUS transaction on request (address and write data are
// sampled when the bus is granted, so they must stay valid until then): arbitration (request to the
// segment arbiter, wait for grant), the address cycle (address on AD, AS
// raised, wait for the slave's AK) and, except for a broadcast, one data
// cycle (data on AD for a write, DS raised, wait for DK, sample BUSY/EMPTY).
// It then reports done and holds the cycle -- for a read the slave's data
// stay on the bus, clamped through to UNIBUS -- until the requester says
// release; it then drops DS, waits for DK to fall, drops AS, waits for AK to
// fall and frees the bus. A broadcast raises BC (and GL for a gbl one)
// during the address cycle, whose AD field carries the broadcast word.
// Timeouts (in clock cycles): no AK within T_AK -> code 1, no DK within T_DK
// -> code 2, the whole word not done within T_WORD -> code 7; BUSY, EMPTY or
// both with DK -> codes 3, 4, 5 (the transfer still completes). On a timeout
// the cycle is abandoned and reported done with the code.
// The double handshake, the flags and the 4/3/10 ms limits are as published;
// the clock rate (10 MHz for the default cycle counts), the hold/release
// interface and the BC/GL lines are this design's choice. Inputs are taken
// as synchronous to clk.
module fb_master
  import fbu_pkg::*;
#(
  parameter int T_AK   = 40_000,   // 4 ms at 10 MHz
  parameter int T_DK   = 30_000,   // 3 ms
  parameter int T_WORD = 100_000   // 10 ms
) (
  input  logic        clk,
  input  logic        rst,
  // request side
  input  logic        req,        // level; sampled in idle
  input  logic        rd,
  input  logic        bcast,
  input  logic        gbl,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        release_i,  // end the held cycle
  output logic        done,       // level while the cycle is held
  output ev_code_e    err,        // valid with done; EV_NONE if none
  // FASTBUS
  output logic        fb_req,
  input  logic        fb_gnt,
  output logic [31:0] ad_out,
  output logic        ad_oe,
  output logic        as_o,
  output logic        ds_o,
  output logic        rd_o,
  output logic        bc_o,
  output logic        gl_o,
  input  logic        ak_i,
  input  logic        dk_i,
  input  logic        busy_i,
  input  logic        empty_i
);
  typedef enum logic [2:0] {M_IDLE, M_ARB, M_ADDR, M_DATA, M_HOLD, M_DSOFF, M_ASOFF} mst_e;
  mst_e st;
  logic [31:0] a_q, w_q;
  logic        rd_q, bc_q, gl_q;
  logic [$clog2(T_WORD+1)-1:0] tword;
  logic [$clog2(T_AK+T_DK+1)-1:0] tphase;
  logic        ds_up;   // data cycle reached (DS raised)
  logic        as_up;   // address cycle under way (AS raised)

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= M_IDLE; err <= EV_NONE; tword <= '0; tphase <= '0; ds_up <= 1'b0; as_up <= 1'b0;
      a_q <= '0; w_q <= '0; rd_q <= 1'b0; bc_q <= 1'b0; gl_q <= 1'b0;
    end else begin
      if (st != M_IDLE && st != M_HOLD) tword <= tword + 1'b1;
      unique case (st)
        M_IDLE: begin
          tword <= '0; tphase <= '0; ds_up <= 1'b0; as_up <= 1'b0;
          if (req) begin
            st <= M_ARB; err <= EV_NONE;
            rd_q <= rd; bc_q <= bcast; gl_q <= gbl;
          end
        end
        M_ARB: begin
          // address and data are taken when the bus is granted
          if (fb_gnt && !ak_i && !dk_i) begin
            st <= M_ADDR; tphase <= '0; a_q <= addr; w_q <= wdata; as_up <= 1'b1;
          end
          else if (tword >= T_WORD[$bits(tword)-1:0]) begin err <= EV_WORD_TMO; st <= M_HOLD; end
        end
        M_ADDR: begin
          tphase <= tphase + 1'b1;
          if (ak_i) begin
            tphase <= '0;
            if (bc_q) st <= M_HOLD;
            else begin st <= M_DATA; ds_up <= 1'b1; end
          end else if (tphase >= T_AK[$bits(tphase)-1:0]) begin
            err <= EV_AK_TMO; st <= M_HOLD; as_up <= 1'b0;
          end else if (tword >= T_WORD[$bits(tword)-1:0]) begin
            err <= EV_WORD_TMO; st <= M_HOLD; as_up <= 1'b0;
          end
        end
        M_DATA: begin
          tphase <= tphase + 1'b1;
          if (dk_i) begin
            st <= M_HOLD;
            if (busy_i && empty_i) err <= EV_BUSYEMP;
            else if (busy_i)       err <= EV_BUSY;
            else if (empty_i)      err <= EV_EMPTY;
          end else if (tphase >= T_DK[$bits(tphase)-1:0]) begin err <= EV_DK_TMO; st <= M_HOLD; end
          else if (tword >= T_WORD[$bits(tword)-1:0]) begin err <= EV_WORD_TMO; st <= M_HOLD; end
        end
        M_HOLD:  if (release_i) begin st <= M_DSOFF; tword <= '0; end
        M_DSOFF: if (!dk_i || tword >= T_WORD[$bits(tword)-1:0]) st <= M_ASOFF;
        M_ASOFF: if (!ak_i || tword >= T_WORD[$bits(tword)-1:0]) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

  always_comb begin
    // the bus is held from the grant until AS has come down
    fb_req = (st != M_IDLE);
    as_o   = as_up && (st == M_ADDR || st == M_DATA || st == M_HOLD || st == M_DSOFF);
    ds_o   = ds_up && (st == M_DATA || st == M_HOLD);
    rd_o   = rd_q && !bc_q;
    bc_o   = bc_q && (st == M_ADDR || st == M_HOLD);
    gl_o   = gl_q && bc_o;
    ad_oe  = (st == M_ADDR) || (!rd_q && (st == M_DATA || (st == M_HOLD && ds_up)));
    ad_out = (st == M_ADDR) ? a_q : w_q;
    done   = (st == M_HOLD);
  end
endmodule
