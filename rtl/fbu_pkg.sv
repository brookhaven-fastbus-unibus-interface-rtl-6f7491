// fbu_pkg -- types and constants shared by the FASTBUS/UNIBUS interface.
//
// Holds the layout of the control/status register (CSR), the error flag codes
// stored in the interrupt register (IR), the control field of an address
// mapping register, the UNIBUS register page layout and the bus cycle codes.
// The nine flag codes, the CSR meanings and the five-bit mapping control
// field follow the published description; the bit positions, the register
// offsets and the encodings of the control field are this design's choice.
package fbu_pkg;

  // ---------------------------------------------------------------- UNIBUS
  // UNIBUS C1,C0 cycle codes.
  typedef enum logic [1:0] {
    UB_DATI  = 2'b00,
    UB_DATIP = 2'b01,
    UB_DATO  = 2'b10,
    UB_DATOB = 2'b11
  } ub_cyc_e;

  // --------------------------------------------------------- error flag codes
  // Four-bit code held in IR[15:12] for cases 1..8; case 9 (a FASTBUS
  // message) stores a single leading flag bit plus 15 data bits instead.
  typedef enum logic [3:0] {
    EV_NONE     = 4'd0,
    EV_AK_TMO   = 4'd1,  // no address handshake from FASTBUS slave (4 ms)
    EV_DK_TMO   = 4'd2,  // no data handshake from FASTBUS slave (3 ms)
    EV_BUSY     = 4'd3,  // BUSY returned with the data handshake
    EV_EMPTY    = 4'd4,  // EMPTY returned with the data handshake
    EV_BUSYEMP  = 4'd5,  // BUSY and EMPTY together
    EV_ALIGN    = 4'd6,  // two UNIBUS words of a 32-bit pair disagree on R/W
    EV_WORD_TMO = 4'd7,  // any word transfer not done in 10 ms (incl. arbitration)
    EV_BLK_END  = 4'd8,  // last word of a DMA block transfer
    EV_MESSAGE  = 4'd9   // 15-bit message from a FASTBUS master
  } ev_code_e;

  // Event classes reported in CSR[12:11].
  typedef enum logic [1:0] {
    CL_NONE  = 2'b00,
    CL_ERROR = 2'b01,  // cases 1..7
    CL_BLOCK = 2'b10,  // case 8
    CL_MSG   = 2'b11   // case 9
  } ev_class_e;

  // ------------------------------------------------------------------- CSR
  localparam int CSR_IE_AK    = 0;   // interrupt enable, case 1
  localparam int CSR_IE_DK    = 1;   // interrupt enable, case 2
  localparam int CSR_IE_ALIGN = 2;   // interrupt enable, case 6
  localparam int CSR_IE_TMO   = 3;   // interrupt enable, case 7
  localparam int CSR_IE_BLK   = 4;   // interrupt enable, case 8
  localparam int CSR_IE_MSG   = 5;   // interrupt enable, case 9
  localparam int CSR_FB32     = 6;   // FASTBUS-initiated transfers are 32-bit
  localparam int CSR_PEND     = 7;   // second UNIBUS word of a 32-bit pair pending
  localparam int CSR_RD       = 8;   // last transaction was a read
  localparam int CSR_BLK      = 9;   // last transaction was part of a block transfer
  localparam int CSR_FBI      = 10;  // last transaction was initiated by FASTBUS
  localparam int CSR_CL_LO    = 11;  // event class, two bits
  localparam int CSR_ERROR    = 13;
  localparam int CSR_OVF      = 14;  // interrupt overflow
  localparam int CSR_INT      = 15;  // interrupt requested, IR locked
  localparam logic [15:0] CSR_WMASK = 16'h007F;  // software-writable bits

  // ------------------------------------------------- mapping register control
  typedef struct packed {
    logic spare;  // stored and read back, no function
    logic susp;   // hold interrupts until the second word of a 32-bit pair
    logic beie;   // BUSY/EMPTY interrupt enable
    logic byte8;  // 8-bit FASTBUS data (used when w32 = 0)
    logic w32;    // 32-bit FASTBUS transfers
  } map_ctrl_t;

  // ------------------------------------------------- UNIBUS register page
  // Byte offsets inside the 256-byte register page.
  //   0x00..0x7F  mapping register i at 8*i: +0 base[15:0], +2 base[31:16], +4 control
  localparam logic [7:0] RO_CSR     = 8'h80;
  localparam logic [7:0] RO_IR      = 8'h82;
  localparam logic [7:0] RO_LBR     = 8'h84;
  localparam logic [7:0] RO_BC_LOC  = 8'h86;  // dummy: write high half of a local broadcast
  localparam logic [7:0] RO_BC_GLB  = 8'h88;  // dummy: write high half of a global broadcast

  // FASTBUS register offsets (word address bits [1:0]) inside the interface's
  // FASTBUS register block.
  localparam logic [1:0] FO_FBR_LOC = 2'd0;
  localparam logic [1:0] FO_FBR_GLB = 2'd1;
  localparam logic [1:0] FO_MSG     = 2'd2;

  // Data-path selections of the data multiplexer.
  typedef enum logic [1:0] {
    IB_W16  = 2'd0,  // {16'h0, UNIBUS word}
    IB_BYTE = 2'd1,  // {24'h0, addressed UNIBUS byte}
    IB_W32  = 2'd2,  // {UNIBUS word, LWL}
    IB_BC   = 2'd3   // {UNIBUS word, LBR}
  } ib_sel_e;

  typedef enum logic [1:0] {
    UB_LO   = 2'd0,  // internal bus [15:0]
    UB_HI   = 2'd1,  // internal bus [31:16]
    UB_HWL  = 2'd2,  // high-word latch
    UB_BYTE = 2'd3   // internal bus [7:0] in the addressed byte lane
  } ub_sel_e;

endpackage
