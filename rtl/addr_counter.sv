// addr_counter -- FASTBUS-to-UNIBUS address counter/shifter.
//
// On load it takes a 20-bit FASTBUS word address from the internal bus and
// shifts it left by 2 (32-bit words) or 1 (16-bit words), so that N FASTBUS
// words occupy 4N or 2N UNIBUS byte locations; the result is truncated to the
// 18-bit UNIBUS address. Each step advances it by one FASTBUS word (4 or 2
// bytes), generating the sequential addresses of a block transfer. The
// output adds 2 when the high word of a 32-bit pair is being moved.
// One clock per load or step. The 20 input and 18 output bits and the
// shift/count function are as published; the shift amounts, the truncation
// and the low-word-first order are this design's choice.
module addr_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic        step,
  input  logic        w32,       // 32-bit FASTBUS words
  input  logic [19:0] fb_addr,   // word address from the internal bus
  input  logic        hi,        // select the high UNIBUS word of the pair
  output logic [17:0] ub_addr
);
  logic [17:0] cnt;
  logic [21:0] shifted;

  assign shifted = w32 ? {fb_addr, 2'b00} : {1'b0, fb_addr, 1'b0};

  always_ff @(posedge clk) begin
    if (rst)       cnt <= '0;
    else if (load) cnt <= shifted[17:0];
    else if (step) cnt <= cnt + (w32 ? 18'd4 : 18'd2);
  end

  assign ub_addr = cnt + {15'd0, hi, 1'b0};
endmodule
