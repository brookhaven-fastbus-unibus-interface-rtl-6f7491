// addr_map -- UNIBUS-to-FASTBUS address map.
//
// Sixteen mapping registers, each a 32-bit FASTBUS base address plus a 5-bit
// control field, translate the 12-bit UNIBUS window offset into a 32-bit
// FASTBUS address: offset[11:8] selects a register, offset[7:0] is shifted
// right by 2 (32-bit data), 1 (16-bit data) or 0 (8-bit data) and ORed with
// the selected base. Each block thus holds 64 32-bit words, 128 16-bit words
// or 256 bytes. For 32-bit data offset[1] tells which UNIBUS word (low at the
// even, high at the odd word address) of the FASTBUS word is meant.
// The registers are written and read from UNIBUS as three words each (base
// low, base high, control). Translation is combinational; register writes
// take effect on the next clock edge. The register count, widths, shifts and
// the OR are as published; the control bit assignment (see map_ctrl_t) and
// the reset value (all zero) are this design's choice.
module addr_map
  import fbu_pkg::*;
#(
  parameter int NREG = 16
) (
  input  logic        clk,
  input  logic        rst,
  // register access from UNIBUS
  input  logic        wr,          // write strobe, one cycle
  input  logic [3:0]  wr_idx,
  input  logic [1:0]  wr_field,    // 0 base[15:0], 1 base[31:16], 2 control
  input  logic [15:0] wdata,
  output logic [15:0] rdata,       // contents of register wr_idx, field wr_field
  // translation
  input  logic [11:0] ub_off,      // UNIBUS window offset (byte address)
  output logic [31:0] fb_addr,
  output map_ctrl_t   ctrl,        // control field of the selected register
  output logic        hi_word      // 32-bit data: this is the high UNIBUS word
);
  logic [31:0] base [NREG];
  map_ctrl_t   cfld [NREG];
  logic [3:0]  sel;
  logic [7:0]  low;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) begin
        base[i] <= '0;
        cfld[i] <= '0;
      end
    end else if (wr) begin
      case (wr_field)
        2'd0: base[wr_idx][15:0]  <= wdata;
        2'd1: base[wr_idx][31:16] <= wdata;
        2'd2: cfld[wr_idx]        <= map_ctrl_t'(wdata[4:0]);
        default: ;
      endcase
    end
  end

  always_comb begin
    case (wr_field)
      2'd0:    rdata = base[wr_idx][15:0];
      2'd1:    rdata = base[wr_idx][31:16];
      2'd2:    rdata = {11'd0, cfld[wr_idx]};
      default: rdata = '0;
    endcase
  end

  always_comb begin
    sel     = ub_off[11:8];
    low     = ub_off[7:0];
    ctrl    = cfld[sel];
    hi_word = ctrl.w32 && ub_off[1];
    if (ctrl.w32)        fb_addr = base[sel] | {24'd0, 2'b00, low[7:2]};
    else if (ctrl.byte8) fb_addr = base[sel] | {24'd0, low};
    else                 fb_addr = base[sel] | {24'd0, 1'b0, low[7:1]};
  end
endmodule
