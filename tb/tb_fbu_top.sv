// tb_fbu_top -- end-to-end test of the whole interface at its default
// parameters (10 MHz clock, 4/3/10 ms timeouts as clock counts).
//
// Bus models around the interface:
//  * UNIBUS: a processor that runs DATI/DATO/DATOB cycles, arbitrates NPR and
//    BR requests and takes interrupt vectors; a memory that answers DMA
//    cycles below 18'o200000 (nothing answers above, to force a timeout).
//  * FASTBUS: a slave with 32-bit memory at 0x0001xxxx, a region that gives
//    the address but never the data handshake (0x0002xxxx), a region that
//    answers with BUSY/EMPTY (0x0003xxxx) and nothing elsewhere; it records
//    broadcasts. A second FASTBUS master (arbiter input 1) runs DMA, block,
//    register and message cycles into the interface.
// Every mechanism is counted and must happen at least once; data and status
// are compared with values computed here from the published mappings. The
// 32-bit pairs also check the published goal that a 32-bit FASTBUS transfer
// holds FASTBUS about as long as one of its two UNIBUS words: the pair starts
// one FASTBUS cycle, whose AS time must not exceed that word's MSYN time.
module tb_fbu_top;
  import fbu_pkg::*;
  localparam int N = 8;
  localparam logic [17:0] WIN = 18'o760000;
  localparam logic [17:0] REG = 18'o772400;
  localparam logic [31:0] FB_REG = 32'h7F10_0000;
  localparam logic [11:0] DMAB = 12'h7F0;

  logic clk = 0, rst = 1;
  always #50 clk = ~clk;   // 10 MHz

  // ---------------------------------------------------------------- DUT
  logic        ub_init = 0;
  logic [17:0] ub_a_in, ub_a_out;
  logic [1:0]  ub_c_in, ub_c_out;
  logic [15:0] ub_d_in, ub_d_out;
  logic ub_msyn_in, ub_ssyn_in, ub_bbsy_in, ub_npg, ub_bg_in;
  logic ub_a_oe, ub_d_oe, ub_msyn_out, ub_ssyn_out, ub_bbsy_out, ub_npr, ub_sack, ub_br, ub_bg_out, ub_intr;
  logic [31:0] fb_ad_in, fb_ad_out;
  logic fb_as_in, fb_ds_in, fb_rd_in, fb_ak_in, fb_dk_in, fb_busy_in, fb_empty_in;
  logic [N-1:1] fb_req_in, fb_gnt_out;
  logic fb_ad_oe, fb_as_out, fb_ds_out, fb_rd_out, fb_bc_out, fb_gl_out, fb_ak_out, fb_dk_out;

  fbu_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------- UNIBUS models
  logic [17:0] cpu_a = 0;
  logic [1:0]  cpu_c = 0;
  logic [15:0] cpu_d = 0;
  logic cpu_msyn = 0, cpu_bbsy = 0, cpu_ssyn = 0, cpu_dr = 0;
  logic [15:0] mem [logic [17:0]];
  logic mem_ssyn = 0;
  logic [15:0] mem_d = 0;
  logic npg = 0, bg = 0;

  assign ub_a_in    = cpu_a;
  assign ub_c_in    = cpu_c;
  assign ub_msyn_in = cpu_msyn;
  assign ub_bbsy_in = cpu_bbsy;
  assign ub_d_in    = cpu_dr ? cpu_d : mem_d;
  assign ub_ssyn_in = mem_ssyn || cpu_ssyn;
  assign ub_npg     = npg;
  assign ub_bg_in   = bg;

  // DMA memory slave
  always @(posedge clk) begin
    if (ub_msyn_out && ub_a_oe && !mem_ssyn && ub_a_out < 18'o200000) begin
      if (ub_c_out[1]) mem[ub_a_out] = ub_d_out;
      else mem_d <= mem.exists(ub_a_out) ? mem[ub_a_out] : 16'h0;
      mem_ssyn <= 1;
    end
    if (!ub_msyn_out) mem_ssyn <= 0;
  end

  // one UNIBUS owner at a time: the processor or a granted device
  semaphore bus = new(1);
  int n_npr = 0, n_intr = 0;
  logic [15:0] last_vec;
  initial forever begin
    @(posedge clk);
    if (ub_npr || ub_br) begin
      bus.get(1);
      @(posedge clk);
      if (ub_npr) begin
        npg <= 1; n_npr++;
        do @(posedge clk); while (!ub_sack);
        npg <= 0;
        do @(posedge clk); while (!ub_bbsy_out);
        do @(posedge clk); while (ub_bbsy_out);
      end else if (ub_br) begin
        bg <= 1;
        do @(posedge clk); while (!ub_sack);
        bg <= 0;
        do @(posedge clk); while (!ub_intr);
        @(posedge clk);
        last_vec = ub_d_out; n_intr++;
        chk(ub_d_oe, "vector driven");
        cpu_ssyn <= 1;
        do @(posedge clk); while (ub_intr);
        cpu_ssyn <= 0;
      end
      bus.put(1);
    end
  end

  task automatic cpu_cyc(input logic [17:0] a, input logic [1:0] c, input logic [15:0] d,
                         output logic [15:0] q, output logic ok);
    int n = 0;
    bus.get(1);
    @(negedge clk);
    cpu_bbsy = 1; cpu_a = a; cpu_c = c; cpu_d = d; cpu_dr = c[1];
    @(negedge clk); cpu_msyn = 1;
    while (!ub_ssyn_out && n < 300_000) begin @(negedge clk); n++; end
    ok = ub_ssyn_out;
    @(negedge clk); q = ub_d_out;
    cpu_msyn = 0;
    n = 0;
    while (ub_ssyn_out && n < 100) begin @(negedge clk); n++; end
    cpu_bbsy = 0; cpu_dr = 0;
    @(negedge clk);
    bus.put(1);
  endtask

  logic [15:0] rq;
  logic rok;
  task automatic wr(input logic [17:0] a, input logic [15:0] d);
    cpu_cyc(a, 2'b10, d, rq, rok); chk(rok, "DATO answered");
  endtask
  task automatic wrb(input logic [17:0] a, input logic [15:0] d);
    cpu_cyc(a, 2'b11, d, rq, rok); chk(rok, "DATOB answered");
  endtask
  task automatic rd(input logic [17:0] a, output logic [15:0] q);
    cpu_cyc(a, 2'b00, 0, q, rok); chk(rok, "DATI answered");
  endtask

  // ------------------------------------------------------ FASTBUS slave
  logic [31:0] fmem [logic [31:0]];
  logic s_ak = 0, s_dk = 0, s_busy = 0, s_empty = 0;
  logic [31:0] s_addr, s_rdata = 0;
  int n_bc_loc = 0, n_bc_glb = 0;
  logic [31:0] last_bc;
  always @(posedge clk) begin
    if (fb_as_out && !s_ak) begin
      s_addr <= fb_ad_out;
      if (fb_bc_out) begin
        s_ak <= 1; last_bc <= fb_ad_out;
        if (fb_gl_out) n_bc_glb++; else n_bc_loc++;
      end else if (fb_ad_out[31:16] inside {16'h0001, 16'h0002, 16'h0003}) s_ak <= 1;
    end
    if (!fb_as_out) s_ak <= 0;
    if (fb_ds_out && s_ak && !s_dk && s_addr[31:16] != 16'h0002) begin
      s_dk <= 1;
      s_busy  <= (s_addr[31:16] == 16'h0003) && s_addr[0];
      s_empty <= (s_addr[31:16] == 16'h0003) && s_addr[1];
      if (fb_rd_out) s_rdata <= fmem.exists(s_addr) ? fmem[s_addr] : 32'h0;
      else fmem[s_addr] = fb_ad_out;
    end
    if (!fb_ds_out) begin s_dk <= 0; s_busy <= 0; s_empty <= 0; end
  end

  // ---------------------------------------------- second FASTBUS master
  logic om_req = 0, om_as = 0, om_ds = 0, om_rd = 0, om_drive = 0;
  logic [31:0] om_ad = 0;
  assign fb_req_in  = {{(N - 2){1'b0}}, om_req};
  assign fb_as_in   = om_as;
  assign fb_ds_in   = om_ds;
  assign fb_rd_in   = om_rd;
  assign fb_ad_in   = om_drive ? om_ad : s_rdata;
  assign fb_ak_in   = s_ak;
  assign fb_dk_in   = s_dk;
  assign fb_busy_in = s_busy;
  assign fb_empty_in = s_empty;

  task automatic om_start(input logic [31:0] a, output logic ok);
    int n = 0;
    @(negedge clk); om_req = 1;
    while (!fb_gnt_out[1]) @(negedge clk);
    om_ad = a; om_drive = 1; om_as = 1;
    while (!fb_ak_out && n < 50) begin @(negedge clk); n++; end
    ok = fb_ak_out;
  endtask
  task automatic om_data(input logic r, input logic [31:0] d, output logic [31:0] q, output logic ok);
    int n = 0;
    @(negedge clk); om_rd = r; om_ad = d; om_drive = !r; om_ds = 1;
    while (!fb_dk_out && n < 300_000) begin @(negedge clk); n++; end
    ok = fb_dk_out; q = fb_ad_out;
    if (ok && r) chk(fb_ad_oe, "interface drives read data");
    @(negedge clk); om_ds = 0;
    n = 0;
    while (fb_dk_out && n < 300_000) begin @(negedge clk); n++; end
  endtask
  task automatic om_end();
    int n = 0;
    @(negedge clk); om_as = 0; om_drive = 0; om_rd = 0;
    while (fb_ak_out && n < 50) begin @(negedge clk); n++; end
    om_req = 0;
    repeat (3) @(negedge clk);
  endtask

  // ------------------------------------------------------------- helpers
  function automatic logic [17:0] wa(input int m, input int off);
    return WIN + 18'(m * 256 + off);
  endfunction
  task automatic map(input int m, input logic [31:0] base, input logic [4:0] ctl);
    wr(REG + 18'(8 * m), base[15:0]);
    wr(REG + 18'(8 * m + 2), base[31:16]);
    wr(REG + 18'(8 * m + 4), {11'd0, ctl});
  endtask
  localparam logic [4:0] C32 = 5'b00001, C8 = 5'b00010, CBE = 5'b00100, CSUS = 5'b01000;

  logic [15:0] csr_v, ir_v;
  task automatic status();
    rd(REG + 18'h80, csr_v);
    rd(REG + 18'h82, ir_v);
  endtask
  task automatic clear_int(input logic [15:0] keep);
    wr(REG + 18'h80, keep);
  endtask

  // wait for the interrupt taken by the processor model
  task automatic wait_intr(input int n0, output logic got);
    int n = 0;
    while (n_intr == n0 && n < 1000) begin @(negedge clk); n++; end
    got = (n_intr > n0);
  endtask

  // ------------------------------------------------------------ counters
  int m_regs = 0, m_w32 = 0, m_r32 = 0, m_w16 = 0, m_byte = 0, m_align = 0, m_aktmo = 0,
      m_dktmo = 0, m_busy = 0, m_empty = 0, m_both = 0, m_ovf = 0, m_susp = 0, m_bcast = 0,
      m_dmaw = 0, m_dmar = 0, m_block = 0, m_msg = 0, m_fbr = 0, m_wordtmo = 0, m_arbwait = 0;

  logic [15:0] q;
  logic [31:0] q32;
  logic ok, got;
  int ni;

  // bus occupancy: clock cycles with the interface's AS up on FASTBUS and
  // with the processor's MSYN up on UNIBUS
  int as_cyc = 0, as_rise = 0, msyn_cyc = 0, a0, r0, m0, m1;
  logic as_q = 0;
  always @(posedge clk) begin
    as_q <= fb_as_out;
    if (fb_as_out) as_cyc++;
    if (fb_as_out && !as_q) as_rise++;
    if (cpu_msyn) msyn_cyc++;
  end
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (2) @(negedge clk);

    // ---- programming the map
    map(0, 32'h0001_0000, C32);
    map(1, 32'h0001_0100, 5'b0);
    map(2, 32'h0001_0200, C8);
    map(3, 32'h0002_0000, 5'b0);
    map(4, 32'h0003_0000, CBE);
    map(5, 32'h0005_0000, 5'b0);
    map(6, 32'h0001_0300, C32 | CSUS);
    rd(REG + 18'(8 * 6 + 4), q); chk(q == {11'd0, C32 | CSUS}, "map control read back");
    rd(REG + 18'(8 * 4 + 2), q); chk(q == 16'h0003, "map base read back");
    m_regs++;
    // enable all six interrupt classes
    clear_int(16'h003F);

    // ---- 32-bit write pair: two UNIBUS words, one FASTBUS word
    // FASTBUS is held about as long as one of the two UNIBUS words: not at
    // all during the first word of a write, and inside the second word's MSYN
    r0 = as_rise;
    wr(wa(0, 8'h10), 16'h5678);
    chk(as_rise == r0, "first word of a write pair leaves FASTBUS alone");
    rd(REG + 18'h80, csr_v); chk(csr_v[CSR_PEND], "second word pending");
    chk(!fmem.exists(32'h0001_0004), "no FASTBUS write after first word");
    a0 = as_cyc; m0 = msyn_cyc;
    wr(wa(0, 8'h12), 16'h1234);
    m1 = msyn_cyc - m0;
    wait (!fb_as_out); @(negedge clk);
    chk(as_cyc - a0 > 0 && as_cyc - a0 <= m1, "write pair: FASTBUS time about one UNIBUS word");
    chk(fmem.exists(32'h0001_0004) && fmem[32'h0001_0004] == 32'h1234_5678, "32-bit word composed");
    $display("write pair: FASTBUS AS %0d cycles, second UNIBUS word MSYN %0d cycles", as_cyc - a0, m1);
    m_w32++;
    // ---- 32-bit read pair
    fmem[32'h0001_0005] = 32'hDEAD_BEEF;
    a0 = as_cyc; m0 = msyn_cyc;
    rd(wa(0, 8'h14), q); chk(q == 16'hBEEF, "low word direct");
    m1 = msyn_cyc - m0;
    wait (!fb_as_out); @(negedge clk);
    chk(as_cyc - a0 > 0 && as_cyc - a0 <= m1, "read pair: FASTBUS time about one UNIBUS word");
    $display("read pair: FASTBUS AS %0d cycles, first UNIBUS word MSYN %0d cycles", as_cyc - a0, m1);
    fmem[32'h0001_0005] = 32'h0;  // second word must come from the HWL
    r0 = as_rise;
    rd(wa(0, 8'h16), q); chk(q == 16'hDEAD, "high word from HWL");
    chk(as_rise == r0, "second word of a read pair leaves FASTBUS alone");
    m_r32++;
    // ---- 16-bit transfers: 128 words per block
    wr(wa(1, 8'hFE), 16'hA5A5);
    chk(fmem[32'h0001_017F] == 32'h0000_A5A5, "16-bit write at base|off>>1");
    rd(wa(1, 8'hFE), q); chk(q == 16'hA5A5, "16-bit read");
    m_w16++;
    // ---- bytes: 256 per block, lane by address bit 0
    wrb(wa(2, 8'h21), 16'h7700);
    chk(fmem[32'h0001_0221] == 32'h0000_0077, "odd byte written from high lane");
    fmem[32'h0001_0230] = 32'h0000_00C3;
    rd(wa(2, 8'h30), q); chk(q == 16'h00C3, "even byte into low lane");
    rd(wa(2, 8'h21), q); chk(q == 16'h7700, "odd byte into high lane");
    m_byte++;

    // ---- alignment error: write low, read high (interrupt enabled)
    ni = n_intr;
    wr(wa(0, 8'h20), 16'h1111);
    rd(wa(0, 8'h22), q);
    wait_intr(ni, got);
    status();
    chk(got && last_vec == 16'o300, "alignment interrupt with vector");
    chk(ir_v == {4'd6, 12'h022} && csr_v[CSR_ERROR] && csr_v[12:11] == CL_ERROR && csr_v[CSR_INT], "IR code 6");
    if (ir_v[15:12] == 4'd6) m_align++;
    clear_int(16'h003F);

    // ---- address handshake timeout (nothing at 0x0005xxxx): 4 ms
    ni = n_intr;
    begin
      longint t0, t1;
      t0 = $time;
      rd(wa(5, 8'h02), q);
      t1 = $time;
      chk((t1 - t0) / 100 >= 40_000 && (t1 - t0) / 100 < 41_000, "AK timeout after 4 ms");
    end
    wait_intr(ni, got);
    status();
    chk(got && ir_v == {4'd1, 12'h502}, "IR code 1 with UNIBUS address");
    if (ir_v[15:12] == 4'd1) m_aktmo++;
    // ---- overflow: a second enabled event while INTERRUPT is set
    rd(wa(5, 8'h04), q);
    status();
    chk(csr_v[CSR_OVF] && ir_v == {4'd1, 12'h502}, "overflow, IR locked");
    if (csr_v[CSR_OVF]) m_ovf++;
    clear_int(16'h003F);

    // ---- data handshake timeout: 3 ms
    ni = n_intr;
    wr(wa(3, 8'h00), 16'h0001);
    wait_intr(ni, got);
    status();
    chk(got && ir_v == {4'd2, 12'h300}, "IR code 2");
    if (ir_v[15:12] == 4'd2) m_dktmo++;
    clear_int(16'h003F);

    // ---- BUSY / EMPTY / both, enabled by the map register
    ni = n_intr; rd(wa(4, 8'h02), q); wait_intr(ni, got); status();   // addr ...1: BUSY
    chk(got && ir_v == {4'd3, 12'h402}, "BUSY code 3"); if (ir_v[15:12] == 4'd3) m_busy++;
    clear_int(16'h003F);
    ni = n_intr; rd(wa(4, 8'h04), q); wait_intr(ni, got); status();   // ...2: EMPTY
    chk(got && ir_v == {4'd4, 12'h404}, "EMPTY code 4"); if (ir_v[15:12] == 4'd4) m_empty++;
    clear_int(16'h003F);
    ni = n_intr; rd(wa(4, 8'h06), q); wait_intr(ni, got); status();   // ...3: both
    chk(got && ir_v == {4'd5, 12'h406}, "BUSY+EMPTY code 5"); if (ir_v[15:12] == 4'd5) m_both++;
    clear_int(16'h003F);

    // ---- suspension: event between the two words of a pair
    ni = n_intr;
    wr(wa(6, 8'h00), 16'h2222);               // first word, suspend option set
    om_start(FB_REG + 2, ok); om_data(0, 32'h0000_0ABC, q32, ok); om_end();   // message
    repeat (20) @(negedge clk);
    chk(n_intr == ni, "interrupt held back during the pair");
    wr(wa(6, 8'h02), 16'h3333);               // second word
    wait_intr(ni, got);
    chk(got && fmem[32'h0001_0300] == 32'h3333_2222, "interrupt after the pair completes");
    status();
    chk(ir_v == {1'b1, 15'h0ABC} && csr_v[12:11] == CL_MSG, "message in IR (case 9)");
    om_start(FB_REG + 2, ok); om_data(1, 0, q32, ok); om_end();               // status seen from FASTBUS
    chk(ok && q32 == {csr_v, ir_v}, "CSR and IR readable from FASTBUS");
    if (got) m_susp++;
    if (ir_v[15]) m_msg++;
    clear_int(16'h003F);

    // ---- UNIBUS broadcast: LBR + dummy location
    wr(REG + 18'h84, 16'hCDEF);
    wr(REG + 18'h88, 16'h89AB);
    chk(n_bc_glb == 1 && last_bc == 32'h89AB_CDEF, "global broadcast from UNIBUS");
    wr(REG + 18'h86, 16'h0102);
    chk(n_bc_loc == 1 && last_bc == 32'h0102_CDEF, "local broadcast from UNIBUS");
    m_bcast++;

    // ---- FASTBUS broadcast through the FBR
    om_start(FB_REG + 0, ok); chk(ok, "FBR addressed");
    om_data(0, 32'h4455_6677, q32, ok); om_end();
    repeat (30) @(negedge clk);
    chk(n_bc_loc == 2 && last_bc == 32'h4455_6677, "FBR broadcast");
    om_start(FB_REG + 0, ok); om_data(1, 0, q32, ok); om_end();
    chk(q32 == 32'h4455_6677, "FBR read back");
    m_fbr++;

    // ---- FASTBUS-initiated DMA, 32-bit (CSR FB32)
    clear_int(16'h007F);
    om_start({DMAB, 20'h00100}, ok); chk(ok, "DMA window addressed");
    om_data(0, 32'hCAFE_F00D, q32, ok); om_end();
    repeat (20) @(negedge clk);
    chk(mem[18'h0400] == 16'hF00D && mem[18'h0402] == 16'hCAFE, "DMA write: 4N mapping, low word first");
    m_dmaw++;
    mem[18'h0404] = 16'h3210; mem[18'h0406] = 16'h7654;
    om_start({DMAB, 20'h00101}, ok); om_data(1, 0, q32, ok); om_end();
    chk(ok && q32 == 32'h7654_3210, "DMA read composed from two UNIBUS words");
    m_dmar++;
    // ---- 16-bit block write of four words, block-end interrupt (case 8)
    clear_int(16'h003F);
    ni = n_intr;
    om_start({DMAB, 20'h00400}, ok);
    for (int k = 0; k < 4; k++) begin om_data(0, 32'(16'h1000 + k), q32, ok); chk(ok, "block word"); end
    om_end();
    wait_intr(ni, got);
    status();
    chk(mem[18'h0800] == 16'h1000 && mem[18'h0802] == 16'h1001 && mem[18'h0806] == 16'h1003, "2N mapping, sequential addresses");
    chk(got && ir_v[15:12] == 4'd8 && csr_v[12:11] == CL_BLOCK && csr_v[CSR_BLK] && csr_v[CSR_FBI], "block end (case 8)");
    if (ir_v[15:12] == 4'd8) m_block++;
    clear_int(16'h003F);

    // ---- 10 ms word timeout: DMA to absent UNIBUS memory
    ni = n_intr;
    om_start({DMAB, 20'h08000}, ok);   // 16-bit words: UNIBUS 18'o200000, no memory there
    om_data(0, 32'h1, q32, ok);
    chk(!ok, "no data handshake after UNIBUS timeout");
    om_end();
    wait_intr(ni, got);
    status();
    chk(got && ir_v[15:12] == 4'd7, "word timeout code 7");
    if (ir_v[15:12] == 4'd7) m_wordtmo++;
    clear_int(16'h003F);

    // ---- arbitration: the other master holds FASTBUS while UNIBUS asks
    om_start({DMAB, 20'h00500}, ok);
    fork
      wr(wa(1, 8'h00), 16'h4242);
      begin
        repeat (20) @(negedge clk);
        if (dut.fm_fb_req && !dut.arb_gnt[0]) m_arbwait++;
        om_end();
      end
    join
    chk(fmem[32'h0001_0100] == 32'h0000_4242, "write completes after arbitration");

    // ---- every mechanism happened
    chk(m_regs > 0, "map programming");     chk(m_w32 > 0, "32-bit write pair");
    chk(m_r32 > 0, "32-bit read pair");     chk(m_w16 > 0, "16-bit transfers");
    chk(m_byte > 0, "byte transfers");      chk(m_align > 0, "alignment error");
    chk(m_aktmo > 0, "address timeout");    chk(m_dktmo > 0, "data timeout");
    chk(m_busy > 0, "BUSY");                chk(m_empty > 0, "EMPTY");
    chk(m_both > 0, "BUSY+EMPTY");          chk(m_ovf > 0, "interrupt overflow");
    chk(m_susp > 0, "interrupt suspension"); chk(m_bcast > 0, "UNIBUS broadcast");
    chk(m_fbr > 0, "FASTBUS broadcast");    chk(m_dmaw > 0, "DMA write");
    chk(m_dmar > 0, "DMA read");            chk(m_block > 0, "block transfer end");
    chk(m_msg > 0, "message");              chk(m_wordtmo > 0, "10 ms timeout");
    chk(m_arbwait > 0, "arbitration wait"); chk(n_npr > 0 && n_intr > 0, "NPR and interrupts");
    $display("mechanisms: regs=%0d w32=%0d r32=%0d w16=%0d byte=%0d align=%0d aktmo=%0d dktmo=%0d busy=%0d empty=%0d both=%0d ovf=%0d susp=%0d bcast=%0d fbr=%0d dmaw=%0d dmar=%0d block=%0d msg=%0d wordtmo=%0d arbwait=%0d npr=%0d intr=%0d",
             m_regs, m_w32, m_r32, m_w16, m_byte, m_align, m_aktmo, m_dktmo, m_busy, m_empty, m_both,
             m_ovf, m_susp, m_bcast, m_fbr, m_dmaw, m_dmar, m_block, m_msg, m_wordtmo, m_arbwait, n_npr, n_intr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 2 million clocks
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
