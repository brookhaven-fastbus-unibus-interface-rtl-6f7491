// ub_decoder -- UNIBUS address decoder of the interface.
//
// Compares the six high-order bits of the 18-bit UNIBUS address with the page
// that is allotted to FASTBUS (4096 byte locations, 12 bits, passed on to the
// address map) and recognises the interface's own 256-byte register page
// (mapping registers, CSR, IR, LBR and the two broadcast dummy locations).
// Purely combinational. The 4096-location window and the six decoded bits are
// from the published block diagram and text; the default page numbers and the
// register page are this design's choice (UNIBUS I/O page addresses).
module ub_decoder
  import fbu_pkg::*; #(
  parameter logic [5:0]  WIN_PAGE = 6'o76,       // window at 760000..767777 (octal)
  parameter logic [17:0] REG_BASE = 18'o772400   // 256-byte register page
) (
  input  logic [17:0] addr,
  output logic        win_hit,    // address falls in the FASTBUS window
  output logic        reg_hit,    // address falls in the register page
  output logic        map_sel,    // register page: a mapping register
  output logic [3:0]  map_idx,    // which mapping register
  output logic [1:0]  map_field,  // 0 base low, 1 base high, 2 control, 3 none
  output logic        csr_sel,
  output logic        ir_sel,
  output logic        lbr_sel,
  output logic        bc_sel,     // broadcast dummy location (local or global)
  output logic        bc_global
);
  logic [7:0] off;
  assign off = addr[7:0];

  always_comb begin
    win_hit   = (addr[17:12] == WIN_PAGE);
    reg_hit   = (addr[17:8] == REG_BASE[17:8]);
    map_sel   = reg_hit && !off[7];
    map_idx   = off[6:3];
    map_field = off[2:1];
    csr_sel   = reg_hit && ({off[7:1], 1'b0} == RO_CSR);
    ir_sel    = reg_hit && ({off[7:1], 1'b0} == RO_IR);
    lbr_sel   = reg_hit && ({off[7:1], 1'b0} == RO_LBR);
    bc_global = ({off[7:1], 1'b0} == RO_BC_GLB);
    bc_sel    = reg_hit && (({off[7:1], 1'b0} == RO_BC_LOC) || bc_global);
  end
endmodule
