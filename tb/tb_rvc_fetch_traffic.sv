// tb_rvc_fetch_traffic: fetch traffic, cache misses and run time of
// compressed code against the same code uncompressed, on four front ends that
// differ only in their instruction cache (32-byte lines throughout):
//   lane 0: compressed program,   16 KB direct-mapped (the default front end);
//   lane 1: uncompressed program, 16 KB direct-mapped (the base system);
//   lane 2: uncompressed program, 32 KB direct-mapped (twice the capacity);
//   lane 3: uncompressed program, 16 KB two-way (twice the associativity).
// Each is backed by a memory with 50-cycle refills and a page-table walker
// with 100-cycle walks (identity map; the 5 pages of the program fit the
// 8-entry TLB).
//
// A synthetic program of N_INSTR instructions is generated in which about half
// of the instructions have a 16-bit form, the share typical of compiled code
// for this ISA. Lane 0 holds the program with those instructions
// compressed (about 75 % of the uncompressed size); the other lanes hold the
// same program with every instruction in its 32-bit form. The program is
// sized so that the uncompressed loop (about 17.6 KB) overflows a 16 KB cache
// while the compressed one (about 13 KB) fits. A core model per lane takes one
// instruction per cycle, stalls while none is delivered and, after the last
// one, jumps back to the start, for N_PASS passes.
//
// Checked: every instruction of every lane (address, base-ISA word, length
// flag), the 16-bit expansions being worked out here from the field layouts,
// independently of the design; and the effects compressed code is meant to
// have: fewer cache lookups (words fetched) by at least 20 %, fewer misses
// and fewer cycles than the base system, fewer cycles than the two-way
// system, and at least 99 % of the speed of the system with twice the cache.
// The measured ratios and the speedups over the base system are printed.
module tb_rvc_fetch_traffic;

  localparam int unsigned N_INSTR = 4400;
  localparam int unsigned N_PASS  = 4;
  localparam int unsigned LATENCY = 50;
  localparam int unsigned MEMW    = 16384;
  localparam int unsigned N_LANE  = 4;
  localparam bit          LANE_RVC   [N_LANE] = '{1'b1, 1'b0, 1'b0, 1'b0};
  localparam int unsigned LANE_BYTES [N_LANE] = '{16384, 16384, 32768, 16384};
  localparam int unsigned LANE_WAYS  [N_LANE] = '{1, 1, 1, 2};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- program
  int unsigned pc_c [N_INSTR];   // address in the compressed program
  logic [31:0] word [N_INSTR];   // expected base-ISA instruction
  logic [15:0] half [N_INSTR];   // 16-bit form, if any
  bit          c16  [N_INSTR];   // has a 16-bit form
  int unsigned size_c;           // bytes of the compressed program

  // 3-bit register specifiers: 0, 1 -> x20, x21; 2..7 -> x2..x7
  function automatic logic [4:0] reg_a(input logic [2:0] r);
    return (r == 3'd0) ? 5'd20 : (r == 3'd1) ? 5'd21 : {2'b00, r};
  endfunction

  // the rs2b specifier selects x0 instead of x7
  function automatic logic [4:0] reg_b(input logic [2:0] r);
    return (r == 3'd7) ? 5'd0 : reg_a(r);
  endfunction

  function automatic logic [11:0] sx6(input logic [5:0] v);
    return {{6{v[5]}}, v};
  endfunction

  // a random instruction with a 16-bit form: returns both forms
  task automatic random_rvc(output logic [15:0] h, output logic [31:0] w);
    logic [5:0] imm6 = 6'($urandom);
    logic [4:0] r5a  = 5'($urandom_range(1, 31));
    logic [4:0] r5b  = 5'($urandom);
    logic [2:0] ra   = 3'($urandom);
    logic [2:0] rb   = 3'($urandom);
    logic [2:0] rc   = 3'($urandom);
    logic [4:0] imm5 = 5'($urandom);
    logic [11:0] i12;
    case ($urandom_range(0, 5))
      0: begin  // c.addi rd, imm6
        h = {imm6, r5a, 5'd1};
        w = {r5a, r5a, sx6(imm6), 3'b000, 7'h13};
      end
      1: begin  // c.move rd, rs1
        h = {1'b0, r5b, r5a, 5'd2};
        w = {r5a, r5b, 12'd0, 3'b000, 7'h13};
      end
      2: begin  // c.add3 rda, rs1a, rs2a
        h = {ra, rb, 2'b00, rc, 5'd28};
        w = {reg_a(ra), reg_a(rb), reg_a(rc), 10'h000, 7'h33};
      end
      3: begin  // c.lwsp rd, imm6*4(sp)
        h = {imm6, r5a, 5'd5};
        w = {r5a, 5'd30, 4'b0000, imm6, 2'b00, 3'b010, 7'h03};
      end
      4: begin  // c.sw rs2b, imm5*4(rs1a)
        i12 = {5'b00000, imm5, 2'b00};
        h = {ra, rb, imm5, 5'd25};
        w = {i12[11:7], reg_a(rb), reg_b(ra), i12[6:0], 3'b010, 7'h23};
      end
      default: begin  // c.bne rs1a, rs2b, imm5 (halfwords)
        i12 = {{7{imm5[4]}}, imm5};
        h = {ra, rb, imm5, 5'd17};
        w = {i12[11:7], reg_a(rb), reg_b(ra), i12[6:0], 3'b001, 7'h63};
      end
    endcase
  endtask

  task automatic build_program();
    int unsigned a = 0;
    for (int k = 0; k < N_INSTR; k++) begin
      pc_c[k] = a;
      if ($urandom_range(0, 1) == 0) begin
        random_rvc(half[k], word[k]);
        c16[k] = 1;
        a += 2;
      end else begin
        logic [31:0] w = $urandom;
        w[1:0] = 2'b11;
        if (w[4:0] == 5'b11111) w[2] = 1'b0;
        word[k] = w;
        half[k] = '0;
        c16[k]  = 0;
        a += 4;
      end
    end
    size_c = a;
  endtask

  // ------------------------------------------------------------------ lanes
  int checks = 0, failures = 0;

  task automatic expect_that(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  bit start = 0;

  for (genvar L = 0; L < N_LANE; L++) begin : g_lane
    logic        redirect_valid, core_ready;
    logic [31:0] redirect_pc;
    logic        inst_valid, inst_compressed, inst_illegal;
    logic [31:0] inst, inst_pc;
    logic        mreq_valid, mreq_ready, mresp_valid;
    logic [31:0] mreq_addr, mresp_data;
    logic        stat_hit, stat_miss, stat_tlb_miss, fetch_idle;
    logic        ptw_req_valid, ptw_req_ready, ptw_resp_valid;
    logic [19:0] ptw_req_vpn, ptw_resp_ppn;

    rvc_frontend #(.CACHE_BYTES(LANE_BYTES[L]), .WAYS(LANE_WAYS[L])) dut (
      .clk, .rst_n,
      .redirect_valid_i(redirect_valid), .redirect_pc_i(redirect_pc),
      .inst_valid_o(inst_valid), .inst_ready_i(core_ready), .inst_o(inst),
      .inst_pc_o(inst_pc), .inst_compressed_o(inst_compressed), .inst_illegal_o(inst_illegal),
      .mem_req_valid_o(mreq_valid), .mem_req_ready_i(mreq_ready), .mem_req_addr_o(mreq_addr),
      .mem_resp_valid_i(mresp_valid), .mem_resp_data_i(mresp_data),
      .ptw_req_valid_o(ptw_req_valid), .ptw_req_ready_i(ptw_req_ready), .ptw_req_vpn_o(ptw_req_vpn),
      .ptw_resp_valid_i(ptw_resp_valid), .ptw_resp_ppn_i(ptw_resp_ppn),
      .stat_hit_o(stat_hit), .stat_miss_o(stat_miss), .stat_tlb_miss_o(stat_tlb_miss),
      .fetch_idle_o(fetch_idle)
    );

    // identity page map, 100-cycle walks
    ptw_model #(.VPN_W(20), .LATENCY(100), .PPN_XOR(0)) u_ptw (
      .clk, .rst_n,
      .req_valid_i(ptw_req_valid), .req_ready_o(ptw_req_ready), .req_vpn_i(ptw_req_vpn),
      .resp_valid_o(ptw_resp_valid), .resp_ppn_o(ptw_resp_ppn)
    );

    mem_model #(.ADDR_W(32), .LINE_BYTES(32), .LATENCY(LATENCY), .MEM_WORDS(MEMW)) u_mem (
      .clk, .rst_n,
      .req_valid_i(mreq_valid), .req_ready_o(mreq_ready), .req_addr_i(mreq_addr),
      .resp_valid_o(mresp_valid), .resp_data_o(mresp_data)
    );

    int n_hit = 0, n_miss = 0, n_idle = 0, n_cyc = 0, n_inst = 0;
    bit done = 0;

    always_ff @(posedge clk) if (rst_n && start && !done) begin
      if (stat_hit)   n_hit++;
      if (stat_miss)  n_miss++;
      if (fetch_idle) n_idle++;
      n_cyc++;
    end

    // the core: samples and drives on the falling edge, always ready except
    // in the cycle of the jump back to the start
    initial begin : core
      int k = 0, pass = 0;
      redirect_valid = 1'b0;
      redirect_pc    = '0;
      core_ready     = 1'b1;
      wait (start);
      while (pass < N_PASS) begin
        @(negedge clk);
        if (redirect_valid) begin
          redirect_valid = 1'b0;
          core_ready     = 1'b1;
        end
        if (inst_valid && core_ready) begin
          automatic int unsigned exp_pc = LANE_RVC[L] ? pc_c[k] : 4 * k;
          automatic bit          exp_c  = LANE_RVC[L] && c16[k];
          expect_that(inst_pc == exp_pc && inst == word[k] && inst_compressed == exp_c &&
                      !inst_illegal,
                      $sformatf("lane %0d instr %0d: pc %08h %08h c%0b, expected %08h %08h c%0b",
                                L, k, inst_pc, inst, inst_compressed, exp_pc, word[k], exp_c));
          n_inst++;
          k++;
          if (k == N_INSTR) begin   // jump back to the start
            k = 0;
            pass++;
            core_ready     = 1'b0;
            redirect_valid = 1'b1;
            redirect_pc    = '0;
          end
        end
      end
      done = 1;
    end
  end

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lk_c, lk_r;
    int unsigned cyc [N_LANE];
    build_program();
    // lane 0: compressed layout; lanes 1 to 3: every instruction 32 bits
    for (int k = 0; k < N_INSTR; k++) begin
      automatic int unsigned a = pc_c[k];
      if (c16[k]) begin
        if (a % 4 == 0) g_lane[0].u_mem.mem[a / 4][15:0]  = half[k];
        else            g_lane[0].u_mem.mem[a / 4][31:16] = half[k];
      end else begin
        if (a % 4 == 0) g_lane[0].u_mem.mem[a / 4] = word[k];
        else begin
          g_lane[0].u_mem.mem[a / 4][31:16]   = word[k][15:0];
          g_lane[0].u_mem.mem[a / 4 + 1][15:0] = word[k][31:16];
        end
      end
      g_lane[1].u_mem.mem[k] = word[k];
      g_lane[2].u_mem.mem[k] = word[k];
      g_lane[3].u_mem.mem[k] = word[k];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    start = 1;
    wait (g_lane[0].done && g_lane[1].done && g_lane[2].done && g_lane[3].done);

    lk_c = g_lane[0].n_hit + g_lane[0].n_miss;
    lk_r = g_lane[1].n_hit + g_lane[1].n_miss;
    cyc[0] = g_lane[0].n_cyc;
    cyc[1] = g_lane[1].n_cyc;
    cyc[2] = g_lane[2].n_cyc;
    cyc[3] = g_lane[3].n_cyc;
    $display("program: %0d instructions, %0d B compressed, %0d B uncompressed (static ratio %0d%%)",
             N_INSTR, size_c, 4 * N_INSTR, 100 * size_c / (4 * N_INSTR));
    $display("compressed,   16 KB 1-way: %0d words fetched, %0d misses, %0d fetch-idle cycles, %0d cycles",
             lk_c, g_lane[0].n_miss, g_lane[0].n_idle, cyc[0]);
    $display("uncompressed, 16 KB 1-way: %0d words fetched, %0d misses, %0d fetch-idle cycles, %0d cycles",
             lk_r, g_lane[1].n_miss, g_lane[1].n_idle, cyc[1]);
    $display("uncompressed, 32 KB 1-way: %0d misses, %0d cycles", g_lane[2].n_miss, cyc[2]);
    $display("uncompressed, 16 KB 2-way: %0d misses, %0d cycles", g_lane[3].n_miss, cyc[3]);
    $display("dynamic fetch ratio %0d%%, miss ratio %0d%%, cycle ratio %0d%%",
             100 * lk_c / lk_r, 100 * g_lane[0].n_miss / g_lane[1].n_miss, 100 * cyc[0] / cyc[1]);
    $display("speedup over the 16 KB direct-mapped base (x1000): RVC %0d, 2x capacity %0d, 2-way %0d",
             1000 * cyc[1] / cyc[0], 1000 * cyc[1] / cyc[2], 1000 * cyc[1] / cyc[3]);
    expect_that(g_lane[0].n_inst == N_PASS * N_INSTR && g_lane[1].n_inst == N_PASS * N_INSTR &&
                g_lane[2].n_inst == N_PASS * N_INSTR && g_lane[3].n_inst == N_PASS * N_INSTR,
                "instruction counts");
    expect_that(size_c < 16384 && 4 * N_INSTR > 16384, "program sizes straddle the cache size");
    expect_that(100 * lk_c <= 80 * lk_r, "compressed code fetched at most 80% of the words");
    expect_that(g_lane[0].n_miss < g_lane[1].n_miss, "compressed code missed less");
    expect_that(cyc[0] < cyc[1], "compressed code ran faster than the base");
    expect_that(cyc[0] < cyc[3], "compressed code ran faster than the base with a two-way cache");
    expect_that(100 * cyc[0] <= 101 * cyc[2],
                "compressed code below 99% of the speed of the base with twice the cache");
    expect_that(g_lane[0].n_idle > 0, "fetch never switched off in the compressed lane");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
