// tb_itlb: self-checking test of the instruction TLB (8 entries, 4 KB pages)
// with ptw_model answering refills in 100 cycles.
//
// Requests to random addresses in 12 virtual pages (more than the TLB holds,
// so entries are replaced) are driven on the falling clock edge; the cache
// side accepts at random. A reference model of the entries (FIFO
// replacement) predicts hit or miss. Checked for each request: the physical
// address passed to the cache (page number from the page-table map, offset
// unchanged), that a hit is forwarded in the cycle it is presented, that a
// miss is forwarded LATENCY + 3 cycles after it was first presented (refill
// request, LATENCY-cycle walk, entry written, hit) when the cache side is
// ready, and that the walker served exactly one refill per miss. A second
// phase withdraws a missing request after one cycle and presents a page that
// is present instead: it must pass while the refill is outstanding, and the
// withdrawn page must be present afterwards.
module tb_itlb;

  localparam int unsigned LATENCY = 100;
  localparam int unsigned XORMASK = 32'h5A5A5;
  localparam int unsigned N_REQ   = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        req_valid, req_ready, ic_valid, ic_ready;
  logic [31:0] req_vaddr, ic_paddr;
  logic        ptw_req_valid, ptw_req_ready, ptw_resp_valid, tlb_miss;
  logic [19:0] ptw_req_vpn, ptw_resp_ppn;

  itlb dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_vaddr_i(req_vaddr),
    .ic_req_valid_o(ic_valid), .ic_req_ready_i(ic_ready), .ic_req_paddr_o(ic_paddr),
    .ptw_req_valid_o(ptw_req_valid), .ptw_req_ready_i(ptw_req_ready), .ptw_req_vpn_o(ptw_req_vpn),
    .ptw_resp_valid_i(ptw_resp_valid), .ptw_resp_ppn_i(ptw_resp_ppn),
    .stat_miss_o(tlb_miss)
  );

  ptw_model #(.VPN_W(20), .LATENCY(LATENCY), .PPN_XOR(XORMASK)) u_ptw (
    .clk, .rst_n,
    .req_valid_i(ptw_req_valid), .req_ready_o(ptw_req_ready), .req_vpn_i(ptw_req_vpn),
    .resp_valid_o(ptw_resp_valid), .resp_ppn_o(ptw_resp_ppn)
  );

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_evict = 0, n_stat = 0;

  task automatic expect_that(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always_ff @(posedge clk) if (rst_n && tlb_miss) n_stat++;

  // reference entries, FIFO replacement
  int unsigned rvpn [8];
  bit          rval [8];
  int unsigned rptr = 0;

  function automatic bit ref_present(input int unsigned vpn);
    for (int e = 0; e < 8; e++) if (rval[e] && rvpn[e] == vpn) return 1;
    return 0;
  endfunction

  function automatic void ref_insert(input int unsigned vpn);
    if (rval[rptr]) n_evict++;
    rval[rptr] = 1;
    rvpn[rptr] = vpn;
    rptr = (rptr + 1) % 8;
  endfunction

  function automatic int unsigned page_of(input int unsigned i);
    return 32'h1234 + 7 * i;
  endfunction

  // presents one request until it is accepted; returns the cycles it took
  task automatic request(input logic [31:0] va, input bit rnd_ready, output int cyc);
    cyc = 0;
    req_valid = 1'b1;
    req_vaddr = va;
    forever begin
      ic_ready = rnd_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      cyc++;
      if (req_valid && req_ready) break;
      if (cyc > 10 * LATENCY) break;
      @(negedge clk);
    end
    // the handshake that the edge completed: check what the cache saw
    expect_that(ic_valid && ic_paddr == {va[31:12] ^ XORMASK[19:0], va[11:0]},
                $sformatf("va %08h -> pa %08h", va, ic_paddr));
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int e = 0; e < 8; e++) rval[e] = 0;
    req_valid = 1'b0;
    req_vaddr = '0;
    ic_ready  = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // phase 1: random pages, mostly from a working set of 6, some from 12
    for (int i = 0; i < N_REQ; i++) begin
      automatic int unsigned pg  = page_of(($urandom_range(0, 3) == 0) ? $urandom_range(0, 11)
                                                              : $urandom_range(0, 5));
      automatic logic [31:0] va  = {pg[19:0], 12'($urandom) & 12'hFFC};
      automatic bit          hit = ref_present(pg);
      automatic bit          rnd = hit && ($urandom_range(0, 1) == 1);
      request(va, rnd, cyc);
      if (hit) begin
        n_hit++;
        if (!rnd) expect_that(cyc == 1, $sformatf("hit took %0d cycles", cyc));
      end else begin
        n_miss++;
        ref_insert(pg);
        expect_that(cyc == LATENCY + 3, $sformatf("miss took %0d cycles", cyc));
      end
    end
    expect_that(u_ptw.n_req == n_miss, $sformatf("refills %0d vs misses %0d", u_ptw.n_req, n_miss));
    expect_that(n_stat == n_miss, $sformatf("miss pulses %0d vs misses %0d", n_stat, n_miss));

    // phase 2: a missing request withdrawn after one cycle; a present page
    // passes while its refill is outstanding, and the page is filled anyway
    begin
      automatic int unsigned gone = page_of(20);
      automatic int unsigned here = rvpn[(rptr + 7) % 8];   // the newest entry
      req_valid = 1'b1;
      req_vaddr = {gone[19:0], 12'h010};
      @(posedge clk);
      expect_that(!req_ready, "missing page accepted");
      @(negedge clk);
      req_valid = 1'b0;
      repeat (3) @(negedge clk);
      request({here[19:0], 12'h020}, 1'b0, cyc);
      expect_that(cyc == 1, $sformatf("hit under refill took %0d cycles", cyc));
      expect_that(dut.state_q != dut.S_IDLE, "refill no longer outstanding");
      ref_insert(gone);
      n_miss++;
      repeat (LATENCY + 5) @(negedge clk);
      request({gone[19:0], 12'h040}, 1'b0, cyc);
      expect_that(cyc == 1, $sformatf("withdrawn page not filled (%0d cycles)", cyc));
    end

    $display("hits %0d misses %0d evictions %0d", n_hit, n_miss, n_evict);
    expect_that(n_hit > 0 && n_miss > 0 && n_evict > 0, "hits, misses and evictions all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
