// tb_rvc_frontend: end-to-end test of the RVC front end at its default
// parameters (8-entry TLB with 4 KB pages, 16 KB direct-mapped cache, 32-byte
// lines, 6-halfword buffer), backed by mem_model with 50-cycle refills and
// ptw_model with 100-cycle page walks. The page table maps each virtual page
// to physical page (virtual page ^ 3), so code is written to memory at
// translated addresses and a missing translation would fetch wrong words.
//
// Phase 1 runs the compressed string-length routine: eight instructions, six
// of them 16-bit and one 32-bit load starting at an odd halfword. A small
// interpreter here plays the core: it executes the expanded base-ISA
// instructions it receives (lb, addi, add, sub, beq, bne, jalr), redirects
// the front end on taken branches and checks the returned length for several
// strings. Expanded words that have a base-ISA counterpart in the
// uncompressed routine are compared with it. The first instruction after
// reset must arrive TLB_LAT + 2 + LATENCY + 5 cycles after reset (page walk
// and TLB fill, then fetch, lookup, memory request, LATENCY-cycle refill,
// response, hand-over).
//
// Phase 2 streams a random program: 32-bit words, 16-bit instructions taken
// from a table of hand-encoded RVC instructions with their expected
// expansions, and a few unused RVC encodings that must be flagged illegal.
// The consumer stalls at random and redirects to random instruction starts;
// every delivered instruction is checked for address, expansion, length and
// illegal flag. The program is laid out so that a 32-bit instruction
// straddles each page boundary. Each mechanism must have happened at least
// once: TLB misses (one page walk each), cache misses and hits, 16-bit
// expansion, 32-bit pass-through, 32-bit instructions split across words,
// cache lines and pages, redirects to odd
// halfwords, fetches discarded by a redirect, fetch switched off by a full
// buffer, consumer stalls, illegal encodings.
module tb_rvc_frontend;

  localparam int unsigned LATENCY = 50;
  localparam int unsigned MEMW    = 16384;       // 64 KB of program memory
  localparam int unsigned HALT    = 32'h0000_0F00;
  localparam int unsigned PROG2   = 32'h0000_2000;
  localparam int unsigned N2      = 3000;
  localparam int unsigned TLB_LAT = 100;         // page-table walk
  localparam int unsigned PXOR    = 3;           // physical page = virtual page ^ 3

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        redirect_valid;
  logic [31:0] redirect_pc;
  logic        inst_valid, inst_ready, inst_compressed, inst_illegal;
  logic [31:0] inst, inst_pc;
  logic        mreq_valid, mreq_ready, mresp_valid;
  logic [31:0] mreq_addr, mresp_data;
  logic        stat_hit, stat_miss, stat_tlb_miss, fetch_idle;
  logic        ptw_req_valid, ptw_req_ready, ptw_resp_valid;
  logic [19:0] ptw_req_vpn, ptw_resp_ppn;

  rvc_frontend dut (
    .clk, .rst_n,
    .redirect_valid_i(redirect_valid), .redirect_pc_i(redirect_pc),
    .inst_valid_o(inst_valid), .inst_ready_i(inst_ready), .inst_o(inst),
    .inst_pc_o(inst_pc), .inst_compressed_o(inst_compressed), .inst_illegal_o(inst_illegal),
    .mem_req_valid_o(mreq_valid), .mem_req_ready_i(mreq_ready), .mem_req_addr_o(mreq_addr),
    .mem_resp_valid_i(mresp_valid), .mem_resp_data_i(mresp_data),
    .ptw_req_valid_o(ptw_req_valid), .ptw_req_ready_i(ptw_req_ready), .ptw_req_vpn_o(ptw_req_vpn),
    .ptw_resp_valid_i(ptw_resp_valid), .ptw_resp_ppn_i(ptw_resp_ppn),
    .stat_hit_o(stat_hit), .stat_miss_o(stat_miss), .stat_tlb_miss_o(stat_tlb_miss),
    .fetch_idle_o(fetch_idle)
  );

  ptw_model #(.VPN_W(20), .LATENCY(TLB_LAT), .PPN_XOR(PXOR)) u_ptw (
    .clk, .rst_n,
    .req_valid_i(ptw_req_valid), .req_ready_o(ptw_req_ready), .req_vpn_i(ptw_req_vpn),
    .resp_valid_o(ptw_resp_valid), .resp_ppn_o(ptw_resp_ppn)
  );

  mem_model #(.ADDR_W(32), .LINE_BYTES(32), .LATENCY(LATENCY), .MEM_WORDS(MEMW)) u_mem (
    .clk, .rst_n,
    .req_valid_i(mreq_valid), .req_ready_o(mreq_ready), .req_addr_i(mreq_addr),
    .resp_valid_o(mresp_valid), .resp_data_o(mresp_data)
  );

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_c16 = 0, n_c32 = 0, n_split = 0, n_line = 0;
  int n_odd = 0, n_drop = 0, n_stale = 0, n_idle = 0, n_stall = 0, n_ill = 0;
  int n_tlb = 0, n_page = 0;

  task automatic expect_that(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always_ff @(posedge clk) if (rst_n) begin
    if (stat_hit)  n_hit++;
    if (stat_miss) n_miss++;
    if (stat_tlb_miss) n_tlb++;
    if (fetch_idle) n_idle++;
    if (inst_valid && !inst_ready && !redirect_valid) n_stall++;
    if (redirect_valid && dut.u_fetch.inflight_q) n_drop++;
    if (dut.u_fetch.drop_q && dut.u_fetch.ic_resp_valid_i) n_stale++;
  end

  // halfword write into the program memory, at the physical address of the
  // virtual address 'addr'
  task automatic put_hw(input int unsigned addr, input logic [15:0] v);
    int unsigned wi = ((addr ^ (PXOR << 12)) / 4) % MEMW;
    if (addr % 4 == 0) u_mem.mem[wi][15:0]  = v;
    else               u_mem.mem[wi][31:16] = v;
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ================================================================ phase 1
  logic [31:0] regs [32];
  byte         dmem [int];

  function automatic logic [31:0] sext12(input logic [11:0] v);
    return {{20{v[11]}}, v};
  endfunction

  // executes one expanded instruction; returns 1 and the target when control
  // leaves the sequential path
  task automatic execute(input logic [31:0] w, input logic [31:0] pc, input bit c,
                         output bit taken, output logic [31:0] target);
    logic [4:0]  rd, rs1, rs2;
    logic [31:0] a, b, iimm, bimm;
    rd   = w[31:27]; rs1 = w[26:22]; rs2 = w[21:17];
    a    = regs[rs1]; b = regs[rs2];
    iimm = sext12(w[21:10]);
    bimm = sext12({w[31:27], w[16:10]});
    taken  = 0;
    target = pc + (c ? 2 : 4);
    case (w[6:0])
      7'h03: if (w[9:7] == 3'b000) regs[rd] = {{24{dmem[a + iimm][7]}}, dmem[a + iimm]};
             else expect_that(0, "unexpected load");
      7'h13: if (w[9:7] == 3'b000) regs[rd] = a + iimm;
             else expect_that(0, "unexpected op-imm");
      7'h33: if (w[16:7] == 10'h000) regs[rd] = a + b;
             else if (w[16:7] == 10'h200) regs[rd] = a - b;
             else expect_that(0, "unexpected op");
      7'h63: begin
        if ((w[9:7] == 3'b000 && a == b) || (w[9:7] == 3'b001 && a != b)) begin
          taken = 1; target = pc + (bimm << 1);
        end
      end
      7'h6B: begin
        taken = 1; target = a + iimm;
        regs[rd] = pc + (c ? 2 : 4);
      end
      default: expect_that(0, $sformatf("unexpected instruction %08h", w));
    endcase
    regs[0] = '0;
  endtask

  // base-ISA words of the uncompressed routine, where an expansion equals one
  function automatic logic [31:0] base_word(input logic [31:0] pc);
    case (pc)
      32'h00: return 32'h2900_0003;   // lb   a1,0(a0)
      32'h04: return 32'h1900_0013;   // addi v1,a0,0
      32'h08: return 32'h18c0_0413;   // addi v1,v1,1
      32'h0a: return 32'h10c0_0003;   // lb   v0,0(v1)
      32'h10: return 32'h10c9_0033;   // sub  v0,v1,a0
      32'h12: return 32'h0040_00eb;   // jalr x0,ra
      default: return 32'h0;          // branches: offsets differ
    endcase
  endfunction

  logic core_ready;
  assign inst_ready = core_ready;

  // runs the routine on a string at 'base'; returns the result in v0
  task automatic run_strlen(input int unsigned base, input string s, output int cycles);
    bit          done = 0, tk, pend = 0;
    logic [31:0] tgt;
    int          cyc = 0;
    foreach (s[i]) dmem[base + i] = s[i];
    dmem[base + s.len()] = 8'h00;
    regs[4] = base;        // a0
    regs[1] = HALT;        // ra
    // the core samples and drives on the falling edge, so each handshake
    // it sees is the one the next rising edge completes
    while (!done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
      if (pend) begin
        core_ready     = 1'b0;
        redirect_valid = 1'b1;
        redirect_pc    = tgt;
        pend           = 0;
        continue;
      end
      if (redirect_valid) begin
        redirect_valid = 1'b0;
        core_ready     = 1'b1;
      end
      if (inst_valid && inst_ready) begin
        if (base_word(inst_pc) != 32'h0)
          expect_that(inst == base_word(inst_pc),
                      $sformatf("strlen pc %02h: %08h expected %08h", inst_pc, inst, base_word(inst_pc)));
        expect_that(!inst_illegal, "strlen: illegal flag");
        if (inst_compressed) n_c16++; else n_c32++;
        if (!inst_compressed && inst_pc % 4 == 2) n_split++;
        execute(inst, inst_pc, inst_compressed, tk, tgt);
        if (tk) begin
          if (tgt == HALT) done = 1;
          else pend = 1;
        end
      end
    end
    cycles = cyc;
    expect_that(done, "strlen did not return");
    expect_that(regs[2] == s.len(), $sformatf("strlen(\"%s\") = %0d", s, regs[2]));
    // leave the front end at a known point for the next run
    @(negedge clk);
    core_ready     = 1'b0;
    redirect_valid = 1'b1;
    redirect_pc    = 32'h0;
    @(negedge clk);
    redirect_valid = 1'b0;
    core_ready     = 1'b1;
  endtask

  // ================================================================ phase 2
  typedef struct { logic [15:0] c; logic [31:0] e; } pair_t;
  pair_t table16 [$];
  int unsigned ipc [N2];
  logic [31:0] ibits [N2];
  bit          i16 [N2], iill [N2];

  task automatic build_table();
    table16.push_back('{16'h1062, 32'h1900_0013});   // c.move v1,a0
    table16.push_back('{16'h0461, 32'h18c0_0413});   // c.addi v1,1
    table16.push_back('{16'h4d9c, 32'h10c9_0033});   // c.sub3 v0,v1,a0
    table16.push_back('{16'h0401, 32'h0040_00eb});   // c.jr ra
    table16.push_back('{16'hf4b0, 32'h0140_1463});   // c.beq a1,x0,+5
    table16.push_back('{16'hebb1, 32'hf881_f4e3});   // c.bne v0,x0,-3
    table16.push_back('{{6'b111111, 5'd6, 5'd0},  {5'd6, 5'd0, 12'hFFF, 3'd0, 7'h13}});   // c.li
    table16.push_back('{{6'd3, 5'd4, 5'd5},       {5'd4, 5'd30, 12'd12, 3'd2, 7'h03}});   // c.lwsp
    table16.push_back('{{6'd5, 5'd1, 5'd8},       {5'd0, 5'd30, 5'd1, 7'd20, 3'd2, 7'h23}}); // c.swsp
    table16.push_back('{{1'b1, 5'd5, 5'd2, 5'd12},{5'd2, 5'd5, 5'd2, 10'h200, 7'h33}});   // c.sub
    table16.push_back('{{1'b1, 10'h3FE, 5'd2},    {25'h1FF_FFFE, 7'h67}});                // c.j
    table16.push_back('{{3'd5, 2'b11, 6'd33, 5'd13}, {5'd5, 5'd5, 12'h421, 3'd5, 7'h13}}); // c.srai
    table16.push_back('{{3'd3, 3'd0, 5'd31, 5'd20}, {5'd3, 5'd20, 12'd124, 3'd2, 7'h03}}); // c.lw
    table16.push_back('{{3'd7, 3'd4, 5'd2, 5'd25},  {5'd0, 5'd4, 5'd0, 7'd8, 3'd2, 7'h23}}); // c.sw
    table16.push_back('{{3'd6, 3'd4, 5'd1, 5'd30},  {5'd0, 5'd4, 5'd6, 7'd8, 3'd3, 7'h27}}); // c.fsd
  endtask

  task automatic build_random_program();
    int unsigned a = PROG2;
    for (int i = 0; i < N2; i++) begin
      int kind = $urandom_range(0, 99);
      ipc[i]  = a;
      iill[i] = 0;
      // steer the layout so that a 32-bit instruction straddles each page
      // boundary: a 16-bit one at offset 4092, a 32-bit one at 4094
      if (a % 4096 == 4092) kind = 0;
      if (a % 4096 == 4094) kind = 99;
      if (kind < 48) begin
        pair_t p = table16[$urandom_range(0, table16.size() - 1)];
        put_hw(a, p.c);
        ibits[i] = p.e; i16[i] = 1; a += 2;
      end else if (kind < 50) begin
        put_hw(a, {11'($urandom), 5'd14});   // unused RVC opcode
        ibits[i] = 32'h0; i16[i] = 1; iill[i] = 1; a += 2;
      end else begin
        logic [31:0] w = $urandom;
        w[1:0] = 2'b11;
        if (w[4:0] == 5'b11111) w[2] = 1'b0;
        put_hw(a, w[15:0]);
        put_hw(a + 2, w[31:16]);
        ibits[i] = w; i16[i] = 0; a += 4;
      end
    end
  endtask

  initial begin
    int cyc, first_cyc;
    redirect_valid = 1'b0;
    redirect_pc    = '0;
    core_ready     = 1'b1;
    for (int i = 0; i < 32; i++) regs[i] = '0;
    // the compressed routine at address 0
    begin
      logic [31:0] words [5] = '{32'h2900_0003, 32'hf4b0_1062, 32'h0003_0461,
                                 32'hebb1_10c0, 32'h0401_4d9c};
      foreach (words[i]) begin
        put_hw(4 * i, words[i][15:0]);
        put_hw(4 * i + 2, words[i][31:16]);
      end
    end
    build_table();
    build_random_program();

    repeat (3) @(negedge clk);
    core_ready = 1'b0;
    rst_n = 1'b1;
    // first instruction after reset: a cold miss
    first_cyc = 0;
    do begin
      @(negedge clk);
      first_cyc++;
    end while (!inst_valid && first_cyc < 1000);
    core_ready = 1'b1;
    // inst_valid seen before rising edge first_cyc + 1, which takes it
    expect_that(first_cyc + 1 == TLB_LAT + 2 + LATENCY + 5,
                $sformatf("first instruction after %0d cycles", first_cyc + 1));

    // ---- phase 1
    begin
      string strs [4] = '{"", "a", "RISC-V", "compressed instructions halve the fetch"};
      foreach (strs[k]) begin
        run_strlen(32'h0000_1000 + 64 * k, strs[k], cyc);
        $display("strlen(\"%s\") = %0d in %0d cycles", strs[k], regs[2], cyc);
      end
    end

    // ---- phase 2 (falling-edge core as in phase 1)
    begin
      int exp_i = 0;
      int run_end;
      int hold = 0;
      @(negedge clk);
      core_ready     = 1'b0;
      redirect_valid = 1'b1;
      redirect_pc    = PROG2;
      hold           = 1;
      for (int run = 0; run < 30; run++) begin
        run_end = (run == 0) ? N2 - 10 : $urandom_range(exp_i + 1, N2 - 10);
        while (exp_i < run_end) begin
          @(negedge clk);
          if (hold > 0) begin
            hold--;
            if (hold > 0) continue;
            redirect_valid = 1'b0;
          end
          core_ready = ($urandom_range(0, 3) != 0);
          if (inst_valid && inst_ready) begin
            expect_that(inst_pc == ipc[exp_i] && inst_compressed == i16[exp_i] &&
                        inst_illegal == iill[exp_i] && (iill[exp_i] || inst == ibits[exp_i]),
                        $sformatf("stream %0d: pc %08h inst %08h c%0b ill%0b, expected %08h %08h c%0b ill%0b",
                                  exp_i, inst_pc, inst, inst_compressed, inst_illegal,
                                  ipc[exp_i], ibits[exp_i], i16[exp_i], iill[exp_i]));
            if (i16[exp_i]) n_c16++; else n_c32++;
            if (!i16[exp_i] && ipc[exp_i] % 4 == 2)  n_split++;
            if (!i16[exp_i] && ipc[exp_i] % 32 == 30) n_line++;
            if (!i16[exp_i] && ipc[exp_i] % 4096 == 4094) n_page++;
            if (iill[exp_i]) n_ill++;
            exp_i++;
          end
        end
        // redirect to a random instruction start, held for one or two cycles.
        // Every tenth time, first jump to an address that is not cached (in
        // a page not yet in the TLB) and leave again while the line refill
        // is still in flight.
        begin
          automatic int k = $urandom_range(0, N2 - 200);
          @(negedge clk);
          if (run % 10 == 5) begin
            core_ready     = 1'b0;
            redirect_valid = 1'b1;
            redirect_pc    = 32'h0000_8000 + 32'h400 * run;
            @(negedge clk);
            redirect_valid = 1'b0;
            // the page walk is over and the line refill is in flight
            repeat (TLB_LAT + 8) @(negedge clk);
          end
          core_ready     = 1'b0;
          redirect_valid = 1'b1;
          redirect_pc    = ipc[k];
          hold           = $urandom_range(1, 2);
          if (ipc[k] % 4 == 2) n_odd++;
          exp_i = k;
        end
      end
    end

    $display("TLB misses %0d, 32-bit instructions across pages %0d", n_tlb, n_page);
    $display("hits %0d misses %0d | 16-bit %0d 32-bit %0d split %0d line-crossing %0d | odd redirects %0d dropped %0d stale %0d | fetch-idle %0d stalls %0d illegal %0d",
             n_hit, n_miss, n_c16, n_c32, n_split, n_line, n_odd, n_drop, n_stale, n_idle, n_stall, n_ill);
    expect_that(n_hit > 0,   "no cache hit");
    expect_that(n_miss > 0,  "no cache miss");
    expect_that(n_c16 > 0,   "no 16-bit instruction");
    expect_that(n_c32 > 0,   "no 32-bit instruction");
    expect_that(n_split > 0, "no 32-bit instruction split across words");
    expect_that(n_line > 0,  "no 32-bit instruction split across cache lines");
    expect_that(n_odd > 0,   "no redirect to an odd halfword");
    expect_that(n_drop > 0,  "no fetch discarded by a redirect");
    expect_that(n_stale > 0, "no stale refill discarded after a redirect");
    expect_that(n_idle > 0,  "fetch never switched off");
    expect_that(n_stall > 0, "consumer never stalled");
    expect_that(n_ill > 0,   "no illegal encoding");
    expect_that(n_tlb > 0,   "no TLB miss");
    expect_that(n_page > 0,  "no 32-bit instruction split across pages");
    expect_that(u_ptw.n_req == n_tlb, $sformatf("page walks %0d vs TLB misses %0d", u_ptw.n_req, n_tlb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
