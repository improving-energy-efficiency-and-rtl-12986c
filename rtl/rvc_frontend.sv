// rvc_frontend: instruction front end of a RISC-V core that runs RVC code.
//
// RVC shrinks programs by encoding the most frequent RISC-V instructions in
// 16 bits while every 32-bit instruction stays available, the two mixed
// freely. A core gains that benefit (fewer instruction bits fetched, fewer
// instruction-cache misses) with a modest front end, which is this module:
//
//   main memory <-> icache <- itlb <- rvc_fetch_align -> rvc_expander -> core
//                    |  data ------------^
//   page-table walker <-> itlb
//
//   * itlb: 8-entry fully associative instruction TLB with 4 KB pages,
//     translating each fetch address in the request path; refills come from
//     an external page-table walker;
//   * icache: blocking, 32-byte lines, 16 KB direct-mapped by default,
//     physically addressed;
//   * rvc_fetch_align: fetches aligned words, buffers halfwords, finds
//     instruction boundaries from the two low bits, reassembles 32-bit
//     instructions that start at odd halfwords (also across cache lines and
//     pages, as two separately translated word fetches),
//     follows redirects to any even address and stops fetching while enough
//     is buffered;
//   * rvc_expander: rewrites each 16-bit instruction into the one 32-bit base
//     instruction it stands for, so the core decodes only base instructions.
//
// Interfaces (all synchronous to clk, active-low asynchronous reset):
//   * inst_*: valid/ready stream to the core. inst_o is the base-ISA
//     instruction, inst_pc_o its address, inst_compressed_o tells the core to
//     advance the PC by 2 instead of 4, inst_illegal_o marks unused RVC
//     encodings and the reserved >32-bit opcode space;
//   * redirect_*: the core's taken branches, jumps and traps; the stream
//     restarts at redirect_pc_i in the next cycle's fetch;
//   * mem_*: line refills from main memory (request, then LINE_BYTES/4 data
//     words, word 0 first);
//   * ptw_*: TLB refills: a virtual page number out (valid/ready), the
//     physical page number back on ptw_resp_valid_i, which must be accepted;
//   * stat_*: per-lookup cache hit/miss pulses, a pulse per TLB refill, and
//     fetch_idle_o, high in cycles in which fetching is stopped because the
//     buffer holds enough.
// Timing: after a redirect, an instruction that hits in the TLB and the
// cache appears two cycles later; hits then stream one instruction per
// cycle. A TLB miss adds the walk time plus 2 cycles, a cache miss the
// refill time plus 2 cycles.
// The split into cache, fetch buffer and expander follows the ISA's notes on
// implementing RVC, and the TLB and cache sizes follow the evaluated system;
// the interfaces and cycle timing are this design's.
module rvc_frontend #(
  parameter int unsigned       ADDR_W      = 32,
  parameter int unsigned       CACHE_BYTES = 16384,
  parameter int unsigned       LINE_BYTES  = 32,
  parameter int unsigned       WAYS        = 1,
  parameter int unsigned       BUF_HW      = 6,
  parameter logic [ADDR_W-1:0] RESET_PC    = '0,
  parameter int unsigned       TLB_ENTRIES = 8,
  parameter int unsigned       PAGE_BYTES  = 4096,
  localparam int unsigned      VPN_W       = ADDR_W - $clog2(PAGE_BYTES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // redirect from the core
  input  logic              redirect_valid_i,
  input  logic [ADDR_W-1:0] redirect_pc_i,
  // expanded instruction stream to the core
  output logic              inst_valid_o,
  input  logic              inst_ready_i,
  output logic [31:0]       inst_o,
  output logic [ADDR_W-1:0] inst_pc_o,
  output logic              inst_compressed_o,
  output logic              inst_illegal_o,
  // main memory
  output logic              mem_req_valid_o,
  input  logic              mem_req_ready_i,
  output logic [ADDR_W-1:0] mem_req_addr_o,
  input  logic              mem_resp_valid_i,
  input  logic [31:0]       mem_resp_data_i,
  // page-table walker (instruction TLB refills)
  output logic              ptw_req_valid_o,
  input  logic              ptw_req_ready_i,
  output logic [VPN_W-1:0]  ptw_req_vpn_o,
  input  logic              ptw_resp_valid_i,
  input  logic [VPN_W-1:0]  ptw_resp_ppn_i,
  // statistics
  output logic              stat_hit_o,
  output logic              stat_miss_o,
  output logic              stat_tlb_miss_o,
  output logic              fetch_idle_o
);

  // fetch unit -> TLB (virtual), TLB -> cache (physical)
  logic              f_req_valid, f_req_ready;
  logic [ADDR_W-1:0] f_req_vaddr;
  logic              ic_req_valid, ic_req_ready, ic_resp_valid;
  logic [ADDR_W-1:0] ic_req_addr;
  logic [31:0]       ic_resp_data;

  itlb #(
    .ENTRIES   (TLB_ENTRIES),
    .PAGE_BYTES(PAGE_BYTES),
    .ADDR_W    (ADDR_W)
  ) u_itlb (
    .clk             (clk),
    .rst_n           (rst_n),
    .req_valid_i     (f_req_valid),
    .req_ready_o     (f_req_ready),
    .req_vaddr_i     (f_req_vaddr),
    .ic_req_valid_o  (ic_req_valid),
    .ic_req_ready_i  (ic_req_ready),
    .ic_req_paddr_o  (ic_req_addr),
    .ptw_req_valid_o (ptw_req_valid_o),
    .ptw_req_ready_i (ptw_req_ready_i),
    .ptw_req_vpn_o   (ptw_req_vpn_o),
    .ptw_resp_valid_i(ptw_resp_valid_i),
    .ptw_resp_ppn_i  (ptw_resp_ppn_i),
    .stat_miss_o     (stat_tlb_miss_o)
  );

  icache #(
    .CACHE_BYTES(CACHE_BYTES),
    .LINE_BYTES (LINE_BYTES),
    .WAYS       (WAYS),
    .ADDR_W     (ADDR_W)
  ) u_icache (
    .clk             (clk),
    .rst_n           (rst_n),
    .req_valid_i     (ic_req_valid),
    .req_ready_o     (ic_req_ready),
    .req_addr_i      (ic_req_addr),
    .resp_valid_o    (ic_resp_valid),
    .resp_data_o     (ic_resp_data),
    .mem_req_valid_o (mem_req_valid_o),
    .mem_req_ready_i (mem_req_ready_i),
    .mem_req_addr_o  (mem_req_addr_o),
    .mem_resp_valid_i(mem_resp_valid_i),
    .mem_resp_data_i (mem_resp_data_i),
    .stat_hit_o      (stat_hit_o),
    .stat_miss_o     (stat_miss_o)
  );

  logic [31:0] raw;
  logic        is16, islong, exp_illegal;

  rvc_fetch_align #(
    .ADDR_W  (ADDR_W),
    .BUF_HW  (BUF_HW),
    .RESET_PC(RESET_PC)
  ) u_fetch (
    .clk             (clk),
    .rst_n           (rst_n),
    .redirect_valid_i(redirect_valid_i),
    .redirect_pc_i   (redirect_pc_i),
    .ic_req_valid_o  (f_req_valid),
    .ic_req_ready_i  (f_req_ready),
    .ic_req_addr_o   (f_req_vaddr),
    .ic_resp_valid_i (ic_resp_valid),
    .ic_resp_data_i  (ic_resp_data),
    .instr_valid_o   (inst_valid_o),
    .instr_ready_i   (inst_ready_i),
    .instr_o         (raw),
    .pc_o            (inst_pc_o),
    .is16_o          (is16),
    .islong_o        (islong),
    .fetch_idle_o    (fetch_idle_o)
  );

  rvc_expander u_expand (
    .instr_i     (raw),
    .instr_o     (inst_o),
    .compressed_o(inst_compressed_o),
    .illegal_o   (exp_illegal)
  );

  assign inst_illegal_o = exp_illegal || islong;

  // the expander and the length decoder read the same two bits
  a_len_agree: assert property (@(posedge clk) disable iff (!rst_n)
    inst_valid_o |-> (is16 == inst_compressed_o))
    else $error("length decode and expander disagree");

endmodule
