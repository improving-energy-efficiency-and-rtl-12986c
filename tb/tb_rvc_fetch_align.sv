// tb_rvc_fetch_align: self-checking test of the fetch/align buffer.
//
// A random program of mixed 16-bit and 32-bit instructions is laid out
// contiguously in a halfword array, so about half of the 32-bit ones start at
// the upper half of a word. A cache model in this file answers word fetches
// after a random delay and sometimes refuses requests; the consumer takes
// instructions with random ready. Every instruction handed out is compared
// with the expected sequence (address, bits, length class). Redirects to
// random instruction starts are taken at random moments, and the expected
// sequence restarts there. A final phase checks throughput: with a one-cycle
// cache and an always-ready consumer, aligned 32-bit code streams one
// instruction per cycle. The test counts, and requires, each mechanism:
// 16-bit and 32-bit delivery, 32-bit instructions split across fetch words,
// redirects to odd halfwords, redirects that discard a fetch in flight,
// cycles with fetch switched off by a full buffer, and consumer stalls.
module tb_rvc_fetch_align;

  localparam int unsigned N_INSTR = 600;
  localparam int unsigned MEM_HW  = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        redirect_valid;
  logic [31:0] redirect_pc;
  logic        ic_req_valid, ic_req_ready, ic_resp_valid;
  logic [31:0] ic_req_addr, ic_resp_data;
  logic        instr_valid, instr_ready, is16, islong, fetch_idle;
  logic [31:0] instr, pc;

  rvc_fetch_align dut (
    .clk, .rst_n,
    .redirect_valid_i(redirect_valid), .redirect_pc_i(redirect_pc),
    .ic_req_valid_o(ic_req_valid), .ic_req_ready_i(ic_req_ready), .ic_req_addr_o(ic_req_addr),
    .ic_resp_valid_i(ic_resp_valid), .ic_resp_data_i(ic_resp_data),
    .instr_valid_o(instr_valid), .instr_ready_i(instr_ready), .instr_o(instr), .pc_o(pc),
    .is16_o(is16), .islong_o(islong), .fetch_idle_o(fetch_idle)
  );

  // ------------------------------------------------------------ program
  logic [15:0] mem_hw [MEM_HW];
  int unsigned ipc  [N_INSTR];   // start address of each instruction
  logic [31:0] ibits[N_INSTR];
  bit          i16  [N_INSTR];

  task automatic build_program(input bit only_aligned32);
    int unsigned a = 0;
    for (int unsigned i = 0; i < MEM_HW; i++) mem_hw[i] = 16'($urandom);
    for (int i = 0; i < N_INSTR; i++) begin
      logic [31:0] w;
      w = $urandom;
      ipc[i] = a;
      if (!only_aligned32 && $urandom_range(0, 1)) begin
        if (w[1:0] == 2'b11) w[1:0] = 2'b01;
        w[31:16] = '0;
        i16[i] = 1;
        mem_hw[a / 2] = w[15:0];
        a += 2;
      end else begin
        w[1:0] = 2'b11;
        if (w[4:0] == 5'b11111) w[2] = 1'b0;
        i16[i] = 0;
        mem_hw[a / 2]     = w[15:0];
        mem_hw[a / 2 + 1] = w[31:16];
        a += 4;
      end
      ibits[i] = w;
    end
  endtask

  // ------------------------------------------------------------ cache model
  bit          fixed_timing;   // 1: always ready, one-cycle responses
  bit          pend;
  int          delay;
  logic [31:0] pend_addr;

  assign ic_req_ready  = fixed_timing ? 1'b1 : (ic_req_ready_rnd && (!pend || ic_resp_valid));
  assign ic_resp_valid = pend && delay == 0;
  assign ic_resp_data  = {mem_hw[(pend_addr / 2 + 1) % MEM_HW], mem_hw[(pend_addr / 2) % MEM_HW]};

  logic ic_req_ready_rnd;
  always_ff @(posedge clk) ic_req_ready_rnd <= ($urandom_range(0, 3) != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend  <= 1'b0;
      delay <= 0;
    end else begin
      if (pend && delay > 0) delay <= delay - 1;
      if (ic_resp_valid) pend <= 1'b0;
      if (ic_req_valid && ic_req_ready) begin
        pend      <= 1'b1;
        pend_addr <= ic_req_addr;
        delay     <= fixed_timing ? 0 : $urandom_range(0, 4);
      end
    end
  end

  // ------------------------------------------------------------ checking
  int checks = 0, failures = 0;
  int n16 = 0, n32 = 0, n_split = 0, n_redir_odd = 0, n_drop = 0, n_idle = 0, n_stall = 0;
  int exp_i;
  bit random_ready;

  task automatic expect_that(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always_ff @(posedge clk) if (rst_n && fetch_idle) n_idle++;
  always_ff @(posedge clk) if (rst_n && instr_valid && !instr_ready) n_stall++;
  always_ff @(posedge clk) if (rst_n && redirect_valid && dut.inflight_q && !ic_resp_valid) n_drop++;

  // compare every handed-out instruction with the expected sequence
  always_ff @(posedge clk) begin
    if (rst_n && instr_valid && instr_ready && !redirect_valid) begin
      if (exp_i < N_INSTR) begin
        expect_that(pc == ipc[exp_i] && is16 == i16[exp_i] && !islong &&
                    instr == ibits[exp_i],
                    $sformatf("instr %0d: pc %08h bits %08h is16 %0b, expected %08h %08h %0b",
                              exp_i, pc, instr, is16, ipc[exp_i], ibits[exp_i], i16[exp_i]));
        if (i16[exp_i]) n16++;
        else begin
          n32++;
          if (ipc[exp_i] % 4 == 2) n_split++;
        end
      end
      exp_i <= exp_i + 1;
    end
  end

  always_ff @(posedge clk) instr_ready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic redirect_to(input int k);
    redirect_valid <= 1'b1;
    redirect_pc    <= ipc[k];
    @(posedge clk);
    exp_i          <= k;
    redirect_valid <= 1'b0;
    if (ipc[k] % 4 == 2) n_redir_odd++;
  endtask

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    redirect_valid = 1'b0;
    redirect_pc    = '0;
    fixed_timing   = 1'b0;
    random_ready   = 1'b1;
    exp_i          = 0;
    build_program(0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // phase 1: run from reset to the end, then many redirected runs
    for (int run = 0; run < 40; run++) begin
      int stop;
      stop = (run == 0) ? N_INSTR - 8 : $urandom_range(0, N_INSTR - 40);
      while (exp_i < stop) @(posedge clk);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      redirect_to($urandom_range(0, N_INSTR - 60));
      repeat ($urandom_range(20, 120)) @(posedge clk);
    end

    // phase 2: throughput of aligned 32-bit code, one-cycle cache. The
    // redirect is held while the program is replaced, so nothing of the old
    // program is delivered.
    redirect_valid <= 1'b1;
    redirect_pc    <= 32'h0;
    @(posedge clk);
    fixed_timing = 1'b1;
    random_ready = 1'b0;
    build_program(1);
    repeat (10) @(posedge clk);
    exp_i          <= 0;
    redirect_valid <= 1'b0;
    begin
      int first = -1, last = -1, cyc = 0, got = 0;
      while (got < 100 && cyc < 1000) begin
        @(posedge clk);
        cyc++;
        if (instr_valid && instr_ready) begin
          got++;
          if (first < 0) first = cyc;
          last = cyc;
        end
      end
      // counted from the last edge with the redirect high: request at edge 1,
      // word in the buffer at edge 2, first instruction taken at edge 3, then
      // one instruction per edge
      expect_that(first == 3 && last - first == 99,
                  $sformatf("throughput: first at %0d, last at %0d", first, last));
    end
    repeat (2) @(posedge clk);

    $display("delivered 16-bit %0d, 32-bit %0d (split %0d); odd redirects %0d; dropped fetches %0d; fetch-idle cycles %0d; stalls %0d",
             n16, n32, n_split, n_redir_odd, n_drop, n_idle, n_stall);
    expect_that(n16 > 0, "no 16-bit instruction");
    expect_that(n32 > 0, "no 32-bit instruction");
    expect_that(n_split > 0, "no 32-bit instruction split across words");
    expect_that(n_redir_odd > 0, "no redirect to an odd halfword");
    expect_that(n_drop > 0, "no fetch discarded by a redirect");
    expect_that(n_idle > 0, "fetch never switched off");
    expect_that(n_stall > 0, "consumer never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
