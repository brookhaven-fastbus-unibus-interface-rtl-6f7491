// data_mux -- combinational data multiplexer between UNIBUS and the 32-bit
// internal bus.
//
// Toward FASTBUS it composes a 32-bit word: a 16-bit word, the addressed byte
// of a UNIBUS word, the UNIBUS word as high half over the low-word latch (LWL)
// for the second word of a 32-bit pair, or the UNIBUS word as high half over
// the low-order broadcast register (LBR) for a broadcast. Toward UNIBUS it
// decomposes: the low or high half of the internal bus, the high-word latch
// (HWL), or the low byte of the internal bus moved into the addressed byte
// lane (the other lane reads zero). No storage, no clock.
// The sources and the tasks (composition, decomposition, byte shifting) are
// as published; the select encodings are this design's choice.
module data_mux
  import fbu_pkg::*;
(
  input  ib_sel_e     ib_sel,
  input  ub_sel_e     ub_sel,
  input  logic        odd,       // UNIBUS byte address bit 0
  input  logic [15:0] ub_in,     // UNIBUS data lines
  input  logic [15:0] lwl,
  input  logic [15:0] lbr,
  input  logic [15:0] hwl,
  input  logic [31:0] ib_in,     // internal bus, from FASTBUS
  output logic [31:0] ib_out,    // internal bus, toward FASTBUS
  output logic [15:0] ub_out     // toward UNIBUS
);
  always_comb begin
    unique case (ib_sel)
      IB_W16:  ib_out = {16'd0, ub_in};
      IB_BYTE: ib_out = {24'd0, odd ? ub_in[15:8] : ub_in[7:0]};
      IB_W32:  ib_out = {ub_in, lwl};
      IB_BC:   ib_out = {ub_in, lbr};
    endcase
    unique case (ub_sel)
      UB_LO:   ub_out = ib_in[15:0];
      UB_HI:   ub_out = ib_in[31:16];
      UB_HWL:  ub_out = hwl;
      UB_BYTE: ub_out = odd ? {ib_in[7:0], 8'd0} : {8'd0, ib_in[7:0]};
    endcase
  end
endmodule
