// icache_bench: self-checking bench for one icache configuration (testbench
// helper, instantiated by tb_icache once per configuration).
//
// Drives a mix of sequential streams and random word addresses into an
// icache backed by mem_model. Each response is compared with the memory
// content, and hit/miss is compared with a reference model of the tags kept
// in this file (direct-mapped, or two-way with LRU replacement). Latencies
// are checked: a hit answers in the cycle after the request is accepted, a
// miss LATENCY + 3 cycles after (lookup, memory request, LATENCY-cycle
// refill, response), and a run of back-to-back hits streams one word per
// cycle. done_o rises when the run is over; checks_o / failures_o then hold
// the totals.
module icache_bench #(
  parameter int unsigned CACHE_BYTES = 256,
  parameter int unsigned WAYS        = 1,
  parameter int unsigned LATENCY     = 50,
  parameter int unsigned N_ACCESS    = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   hits_o,
  output int   misses_o
);

  localparam int unsigned LINE = 32;
  localparam int unsigned SETS = CACHE_BYTES / (LINE * WAYS);

  logic        req_valid, req_ready, resp_valid;
  logic [31:0] req_addr, resp_data;
  logic        mreq_valid, mreq_ready, mresp_valid;
  logic [31:0] mreq_addr, mresp_data;
  logic        stat_hit, stat_miss;

  icache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE), .WAYS(WAYS), .ADDR_W(32)) dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_addr_i(req_addr),
    .resp_valid_o(resp_valid), .resp_data_o(resp_data),
    .mem_req_valid_o(mreq_valid), .mem_req_ready_i(mreq_ready), .mem_req_addr_o(mreq_addr),
    .mem_resp_valid_i(mresp_valid), .mem_resp_data_i(mresp_data),
    .stat_hit_o(stat_hit), .stat_miss_o(stat_miss)
  );

  mem_model #(.ADDR_W(32), .LINE_BYTES(LINE), .LATENCY(LATENCY), .MEM_WORDS(4096)) u_mem (
    .clk, .rst_n,
    .req_valid_i(mreq_valid), .req_ready_o(mreq_ready), .req_addr_i(mreq_addr),
    .resp_valid_o(mresp_valid), .resp_data_o(mresp_data)
  );

  // reference tag store
  int unsigned rtag [WAYS][SETS];
  bit          rval [WAYS][SETS];
  int unsigned rlru [SETS];   // way to replace next (two-way)

  // returns 1 on hit and updates the reference as the cache should
  function automatic bit ref_access(input int unsigned addr);
    int unsigned line = addr / LINE;
    int unsigned set  = line % SETS;
    int unsigned tag  = line / SETS;
    for (int w = 0; w < WAYS; w++) begin
      if (rval[w][set] && rtag[w][set] == tag) begin
        if (WAYS == 2) rlru[set] = 1 - w;
        return 1;
      end
    end
    begin
      int unsigned v;
      if (WAYS == 1) v = 0;
      else if (!rval[0][set]) v = 0;
      else if (!rval[1][set]) v = 1;
      else v = rlru[set];
      rval[v][set] = 1;
      rtag[v][set] = tag;
      if (WAYS == 2) rlru[set] = 1 - v;
    end
    return 0;
  endfunction

  int checks = 0, failures = 0, hits = 0, misses = 0;
  assign checks_o   = checks;
  assign failures_o = failures;
  assign hits_o     = hits;
  assign misses_o   = misses;

  task automatic expect_that(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL icache(%0dB,%0d-way) %s", CACHE_BYTES, WAYS, what);
    end
  endtask

  // one request; waits for its response and checks data, hit/miss and latency
  task automatic access(input int unsigned addr);
    bit exp_hit;
    int lat;
    req_valid <= 1'b1;
    req_addr  <= addr;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    req_valid <= 1'b0;
    exp_hit = ref_access(addr);
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
    end while (!resp_valid && lat < 10 * LATENCY);
    // resp_valid seen in the cycle ending at this edge: sample after it
    expect_that(resp_valid, $sformatf("response for %08h", addr));
    expect_that(resp_data == u_mem.mem[(addr / 4) % 4096],
                $sformatf("data at %08h: %08h", addr, resp_data));
    expect_that((exp_hit ? 1 : int'(LATENCY) + 3) == lat,
                $sformatf("latency %0d at %08h (hit expected %0b)", lat, addr, exp_hit));
    if (exp_hit) hits++; else misses++;
  endtask

  initial begin
    done_o    = 1'b0;
    req_valid = 1'b0;
    req_addr  = '0;
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) rval[w][s] = 0;
    for (int s = 0; s < SETS; s++) rlru[s] = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);

    // sequential walk over twice the capacity, twice
    for (int r = 0; r < 2; r++)
      for (int unsigned a = 0; a < 2 * CACHE_BYTES; a += 4) access(a);
    // random accesses over four times the capacity (conflicts and reuse)
    for (int i = 0; i < N_ACCESS; i++)
      access(($urandom % (4 * CACHE_BYTES)) & ~32'h3);
    // ping-pong between two lines mapping to the same set
    for (int i = 0; i < 6; i++) begin
      access(32'h0000_0040);
      access(32'h0000_0040 + CACHE_BYTES / WAYS);
    end

    // streaming: 8 back-to-back requests to a resident line, one per cycle
    begin
      int unsigned base = 32'h0000_0400;
      int got = 0, cyc = 0;
      access(base);  // make it resident
      req_valid <= 1'b1;
      req_addr  <= base;
      for (int k = 0; k < 8; ) begin
        @(posedge clk);
        cyc++;
        if (resp_valid) got++;
        if (req_valid && req_ready) begin
          k++;
          req_addr <= base + 4 * k;
          if (k == 8) req_valid <= 1'b0;
        end
      end
      while (got < 8 && cyc < 100) begin
        @(posedge clk);
        cyc++;
        if (resp_valid) got++;
      end
      // the first request was accepted at the first edge, the last response
      // is seen one edge after the last acceptance: 8 + 1 edges
      expect_that(got == 8 && cyc == 9, $sformatf("stream got %0d in %0d cycles", got, cyc));
    end

    // every refill reaches memory exactly once per miss
    expect_that(u_mem.n_req == misses, $sformatf("refills %0d vs misses %0d", u_mem.n_req, misses));
    done_o = 1'b1;
  end

endmodule
