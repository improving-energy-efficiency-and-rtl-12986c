// itlb: instruction TLB, fully associative, between the fetch unit and the
// instruction cache.
//
// The fetch unit works with virtual addresses; the cache is indexed and
// tagged with physical ones. The TLB holds ENTRIES translations of
// PAGE_BYTES pages (8 entries of 4 KB by default). Matching is fully
// associative and combinational, inside the request path: a fetch request
// whose page is present goes to the cache in the same cycle with the page
// number replaced, so a TLB hit costs no cycle. Because a 32-bit instruction
// may start in the last halfword of a page, its two halves can need two
// different translations; the fetch unit asks for them as two separate word
// fetches and each is translated on its own.
//
// A request whose page is absent is held (req_ready_o low) while the TLB
// asks an external page-table walker for the translation: ptw_req_* carries
// the virtual page number (valid/ready), ptw_resp_valid_i returns the
// physical page number some cycles later and must be accepted. The entry is
// written with it (replacement in FIFO order, which fills empty entries
// first after reset), and the held request then hits. Requests to pages
// already present keep passing while a refill is outstanding. Only one
// refill is outstanding at a time; a refill whose request was withdrawn
// meanwhile (the fetch unit was redirected) still completes and fills its
// entry. stat_miss_o pulses once per refill started.
//
// Interfaces (all synchronous to clk, active-low asynchronous reset, which
// invalidates every entry):
//   * req_* from the fetch unit: valid/ready with a virtual byte address;
//   * ic_req_* to the cache: the same handshake with the physical address
//     (ic_req_valid_o = req_valid_i on a hit, req_ready_o = ic_req_ready_i
//     on a hit); its low log2(PAGE_BYTES) bits are the page offset, passed
//     through from req_vaddr_i;
//   * ptw_*: translation refills, page numbers of ADDR_W - log2(PAGE_BYTES)
//     bits.
// The size, full associativity and page size follow the evaluated system;
// the refill interface, FIFO replacement, the one outstanding refill and the
// absence of permission bits, address-space identifiers and a flush input
// are this design's choices, since nothing more about the TLB is specified.
module itlb #(
  parameter int unsigned ENTRIES    = 8,
  parameter int unsigned PAGE_BYTES = 4096,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned OFF_W     = $clog2(PAGE_BYTES),
  localparam int unsigned VPN_W     = ADDR_W - OFF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch side (virtual)
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic [ADDR_W-1:0] req_vaddr_i,
  // cache side (physical)
  output logic              ic_req_valid_o,
  input  logic              ic_req_ready_i,
  output logic [ADDR_W-1:0] ic_req_paddr_o,
  // page-table walker
  output logic              ptw_req_valid_o,
  input  logic              ptw_req_ready_i,
  output logic [VPN_W-1:0]  ptw_req_vpn_o,
  input  logic              ptw_resp_valid_i,
  input  logic [VPN_W-1:0]  ptw_resp_ppn_i,
  // statistics
  output logic              stat_miss_o
);

  localparam int unsigned PTR_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e state_q;

  logic [ENTRIES-1:0] valid_q;
  logic [VPN_W-1:0]   vpn_q [ENTRIES];
  logic [VPN_W-1:0]   ppn_q [ENTRIES];
  logic [PTR_W-1:0]   victim_q;
  logic [VPN_W-1:0]   miss_vpn_q;

  // ------------------------------------------------------------ lookup
  logic [VPN_W-1:0]   req_vpn, hit_ppn;
  logic [ENTRIES-1:0] match;
  logic               hit;

  assign req_vpn = req_vaddr_i[ADDR_W-1:OFF_W];

  always_comb begin
    hit_ppn = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      match[e] = valid_q[e] && vpn_q[e] == req_vpn;
      if (match[e]) hit_ppn = hit_ppn | ppn_q[e];   // at most one entry matches
    end
  end
  assign hit = |match;

  assign ic_req_valid_o = req_valid_i && hit;
  assign ic_req_paddr_o = {hit_ppn, req_vaddr_i[OFF_W-1:0]};
  assign req_ready_o    = hit && ic_req_ready_i;

  // ------------------------------------------------------------ refill
  logic start_refill;
  assign start_refill    = state_q == S_IDLE && req_valid_i && !hit;
  assign ptw_req_valid_o = state_q == S_REQ;
  assign ptw_req_vpn_o   = miss_vpn_q;
  assign stat_miss_o     = start_refill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      valid_q    <= '0;
      victim_q   <= '0;
      miss_vpn_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start_refill) begin
          miss_vpn_q <= req_vpn;
          state_q    <= S_REQ;
        end
        S_REQ: if (ptw_req_ready_i) state_q <= S_WAIT;
        S_WAIT: if (ptw_resp_valid_i) begin
          valid_q[victim_q] <= 1'b1;
          victim_q          <= (int'(victim_q) == ENTRIES - 1) ? '0 : victim_q + 1'b1;
          state_q           <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // translation storage: written only at the end of a refill
  always_ff @(posedge clk) begin
    if (state_q == S_WAIT && ptw_resp_valid_i) begin
      vpn_q[victim_q] <= miss_vpn_q;
      ppn_q[victim_q] <= ptw_resp_ppn_i;
    end
  end

  // ------------------------------------------------------------ checks
  a_one_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("itlb: two entries translate the same page");

  a_resp_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    ptw_resp_valid_i |-> state_q == S_WAIT)
    else $error("itlb: page-table response without a request");

endmodule
