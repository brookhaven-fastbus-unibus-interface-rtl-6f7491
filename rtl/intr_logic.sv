// intr_logic -- UNIBUS interrupt logic.
//
// When the CSR INTERRUPT bit rises the interface raises its bus request line
// BR. On a bus grant BG it answers with SACK and drops BR; once the previous
// master has released BBSY (and SSYN is low) it takes BBSY, drives its vector
// on the data lines with INTR, and finishes when the processor answers SSYN
// (the vector is then taken). A grant that arrives while the interface is not
// requesting is passed down the daisy chain on BG_OUT. One interrupt per
// rise of INTERRUPT. Seven bus lines (BR, BG in, BG out, SACK, BBSY, INTR,
// SSYN) as on the published block diagram; the sequence follows the
// standard UNIBUS interrupt protocol, and the vector value is this design's
// choice. Inputs are taken as synchronous to clk.
module intr_logic #(
  parameter logic [8:0] VECTOR = 9'o300
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        int_req,
  input  logic        bg_in,
  output logic        bg_out,
  output logic        br,
  output logic        sack,
  input  logic        bbsy_in,    // BBSY from other masters
  output logic        bbsy,
  output logic        intr,
  input  logic        ssyn,
  output logic [15:0] vec,        // driven on the data lines while intr_oe
  output logic        intr_oe
);
  typedef enum logic [2:0] {I_IDLE, I_REQ, I_SACK, I_INTR, I_DONE} ist_e;
  ist_e st;
  logic int_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= I_IDLE; int_q <= 1'b0;
    end else begin
      int_q <= int_req;
      unique case (st)
        I_IDLE: if (int_req && !int_q) st <= I_REQ;
        I_REQ:  if (bg_in) st <= I_SACK;
        I_SACK: if (!bg_in && !bbsy_in && !ssyn) st <= I_INTR;
        I_INTR: if (ssyn) st <= I_DONE;
        I_DONE: if (!ssyn) st <= I_IDLE;
        default: st <= I_IDLE;
      endcase
    end
  end

  always_comb begin
    br      = (st == I_REQ);
    sack    = (st == I_SACK);
    bbsy    = (st == I_INTR);
    intr    = (st == I_INTR);
    intr_oe = (st == I_INTR);
    vec     = {7'd0, VECTOR};
    bg_out  = bg_in && (st == I_IDLE);
  end
endmodule
