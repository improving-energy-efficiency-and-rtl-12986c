// rvc_fetch_align: instruction fetch unit with a halfword buffer for mixed
// 16-bit / 32-bit code.
//
// Once 16-bit and 32-bit instructions are mixed freely, a 32-bit instruction
// may start at any halfword, so it can straddle two fetch words and even two
// cache lines. Padding such instructions to 32-bit alignment would give back
// much of the code-size gain, so the fetch unit must reassemble them. This
// unit fetches aligned 32-bit words from the instruction cache and appends
// their halfwords to a circular buffer of BUF_HW halfwords. The length of the
// instruction at the head is known from its first halfword alone
// (rvc_length_decoder): the head is handed out as soon as the buffer holds
// all of it, 16-bit instructions in the low half of instr_o, 32-bit
// instructions assembled from two halfwords that may have come from
// different fetches. The buffer also saves fetch energy: a new word is only
// requested while the buffer, counting the word still in flight, has room
// for it, so a run of 16-bit instructions lets the fetch port sit idle
// (fetch_idle_o) while buffered instructions are consumed.
//
// Redirects (taken branches, jumps) may target any even address.
// redirect_valid_i empties the buffer, discards a fetch still in flight and
// restarts fetching at the word holding the target. When the target is the
// upper half of a word, the lower halfword of the first fetched word is
// dropped. After reset fetching starts at RESET_PC in the same way.
//
// Interfaces and timing:
//   * fetch port to the cache: ic_req_* is a valid/ready request of a word
//     address; ic_resp_valid_i returns the word at least one cycle later and
//     must always be accepted. At most one request is outstanding, and a new
//     one may issue in the cycle the previous response returns, so cache hits
//     stream one word per cycle.
//   * instruction port: valid/ready; instr_o, pc_o, is16_o and islong_o are
//     stable while instr_valid_o is high and instr_ready_i low, unless a
//     redirect is taken. One instruction leaves per cycle.
//   * islong_o marks the opcode space reserved for instructions longer than
//     32 bits; such an instruction is handed out (32 bits of it) for the core
//     to reject.
// The fetch-and-buffer behaviour follows the ISA's implementation notes; the
// word-wide fetch, the buffer size, the single outstanding request and the
// redirect handshake are this design's choices.
module rvc_fetch_align #(
  parameter int unsigned        ADDR_W   = 32,
  parameter int unsigned        BUF_HW   = 6,
  parameter logic [ADDR_W-1:0]  RESET_PC = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // redirect from the core
  input  logic              redirect_valid_i,
  input  logic [ADDR_W-1:0] redirect_pc_i,
  // instruction cache port
  output logic              ic_req_valid_o,
  input  logic              ic_req_ready_i,
  output logic [ADDR_W-1:0] ic_req_addr_o,
  input  logic              ic_resp_valid_i,
  input  logic [31:0]       ic_resp_data_i,
  // instruction output
  output logic              instr_valid_o,
  input  logic              instr_ready_i,
  output logic [31:0]       instr_o,
  output logic [ADDR_W-1:0] pc_o,
  output logic              is16_o,
  output logic              islong_o,
  // status
  output logic              fetch_idle_o
);

  localparam int unsigned IDX_W = $clog2(BUF_HW);
  localparam int unsigned CNT_W = $clog2(BUF_HW + 1);

  if (BUF_HW < 4) begin : g_bad_buf
    $error("rvc_fetch_align needs BUF_HW >= 4");
  end

  function automatic logic [IDX_W-1:0] wrap(input int unsigned i);
    wrap = (i >= BUF_HW) ? IDX_W'(i - BUF_HW) : IDX_W'(i);
  endfunction

  logic [15:0]       buf_q [BUF_HW];
  logic [IDX_W-1:0]  rd_q;
  logic [CNT_W-1:0]  count_q;
  logic [ADDR_W-1:0] head_pc_q;
  logic [ADDR_W-1:0] fetch_pc_q;       // word-aligned address of the next fetch
  logic              skip_next_q;      // next fetch starts at its upper halfword
  logic              inflight_q;       // a request is outstanding
  logic              inflight_skip_q;  // ...and its lower halfword is to be dropped
  logic              drop_q;           // ...and its whole response is stale

  // ------------------------------------------------------------ head decode
  logic [15:0] h0, h1;
  logic        l16, l32, llong;

  assign h0 = buf_q[rd_q];
  assign h1 = buf_q[wrap(int'(rd_q) + 1)];

  rvc_length_decoder u_len (
    .low_i   (h0[4:0]),
    .is16_o  (l16),
    .is32_o  (l32),
    .islong_o(llong)
  );

  assign instr_valid_o = (count_q >= CNT_W'(2)) || (count_q == CNT_W'(1) && l16);
  assign instr_o       = l16 ? {16'h0000, h0} : {h1, h0};
  assign pc_o          = head_pc_q;
  assign is16_o        = l16;
  assign islong_o      = llong;

  logic       pop;
  logic [1:0] pop_n;
  assign pop   = instr_valid_o && instr_ready_i && !redirect_valid_i;
  assign pop_n = pop ? (l16 ? 2'd1 : 2'd2) : 2'd0;

  // ------------------------------------------------------------ fetch
  logic       resp_take;
  logic [1:0] push_n;
  logic [CNT_W:0] occupancy;
  logic       room;

  assign resp_take = ic_resp_valid_i && !drop_q && !redirect_valid_i;
  assign push_n    = resp_take ? (inflight_skip_q ? 2'd1 : 2'd2) : 2'd0;
  assign occupancy = {1'b0, count_q} + (inflight_q ? (CNT_W+1)'(2) : '0);
  assign room      = (occupancy + (CNT_W+1)'(2)) <= (CNT_W+1)'(BUF_HW);

  assign ic_req_valid_o = !redirect_valid_i && (!inflight_q || ic_resp_valid_i) && room;
  assign ic_req_addr_o  = fetch_pc_q;
  assign fetch_idle_o   = !redirect_valid_i && !room;

  logic fire;
  assign fire = ic_req_valid_o && ic_req_ready_i;

  logic [IDX_W-1:0] tail;
  assign tail = wrap(int'(rd_q) + int'(count_q));

  always_ff @(posedge clk) begin
    if (resp_take) begin
      if (inflight_skip_q) begin
        buf_q[tail] <= ic_resp_data_i[31:16];
      end else begin
        buf_q[tail]               <= ic_resp_data_i[15:0];
        buf_q[wrap(int'(tail) + 1)]     <= ic_resp_data_i[31:16];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q            <= '0;
      count_q         <= '0;
      head_pc_q       <= {RESET_PC[ADDR_W-1:1], 1'b0};
      fetch_pc_q      <= {RESET_PC[ADDR_W-1:2], 2'b00};
      skip_next_q     <= RESET_PC[1];
      inflight_q      <= 1'b0;
      inflight_skip_q <= 1'b0;
      drop_q          <= 1'b0;
    end else if (redirect_valid_i) begin
      rd_q        <= '0;
      count_q     <= '0;
      head_pc_q   <= {redirect_pc_i[ADDR_W-1:1], 1'b0};
      fetch_pc_q  <= {redirect_pc_i[ADDR_W-1:2], 2'b00};
      skip_next_q <= redirect_pc_i[1];
      inflight_q  <= inflight_q && !ic_resp_valid_i;
      drop_q      <= inflight_q && !ic_resp_valid_i;
    end else begin
      rd_q      <= wrap(int'(rd_q) + int'(pop_n));
      count_q   <= count_q + CNT_W'(push_n) - CNT_W'(pop_n);
      head_pc_q <= head_pc_q + ADDR_W'({pop_n, 1'b0});
      if (ic_resp_valid_i) begin
        drop_q     <= 1'b0;
        inflight_q <= 1'b0;
      end
      if (fire) begin
        inflight_q      <= 1'b1;
        inflight_skip_q <= skip_next_q;
        skip_next_q     <= 1'b0;
        fetch_pc_q      <= fetch_pc_q + ADDR_W'(4);
      end
    end
  end

  // ------------------------------------------------------------ protocol rules
  a_resp_only_when_inflight: assert property (@(posedge clk) disable iff (!rst_n)
    ic_resp_valid_i |-> inflight_q)
    else $error("instruction-cache response without a request");

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count_q <= CNT_W'(BUF_HW))
    else $error("fetch buffer overflow");

  // l32 is implied by !l16 && !llong; kept for readability of the decode
  logic unused_l32;
  assign unused_l32 = l32;

endmodule
