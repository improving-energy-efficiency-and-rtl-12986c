// icache: blocking instruction cache with 32-byte lines, direct-mapped or
// two-way set-associative.
//
// Compressed code mainly pays off in the instruction cache: a smaller
// instruction working set misses less, so the same program runs faster from
// a cache of the same size, or as fast from a smaller one. This cache has the
// organisation used to measure that effect: 32-byte lines, direct-mapped by
// default (WAYS = 2 gives the two-way variant with LRU replacement), and a
// blocking refill that stalls the requester while a whole line is fetched
// from main memory. The default size of 16 KB is the configuration at which
// RVC code runs almost as fast as uncompressed code with twice the cache.
//
// Operation. A request (req_valid_i && req_ready_o) registers the word
// address; the next cycle reads tag, valid and data arrays with it. On a hit
// resp_valid_o is high in that cycle with the word, and a new request may be
// accepted in the same cycle, so hits stream at one word per cycle. On a miss
// the cache asks main memory for the line (mem_req_*; the address is
// line-aligned, so its low log2(LINE_BYTES) bits are always zero), writes the
// LINE_BYTES/4 words that come back on mem_resp_* (word 0 first, one per
// cycle that mem_resp_valid_i is high) into the victim way, marks it valid and
// then returns the requested word with resp_valid_o. The memory latency is set
// by the memory; the evaluated system takes 50 cycles per refill.
// resp_valid_o carries no ready: the requester must accept the response.
// stat_hit_o / stat_miss_o pulse once per looked-up request for miss-rate
// counting.
//
// Line size, associativities and sizes follow the evaluated cache
// configurations (256 B to 32 KB); the word-wide ports, the one-cycle hit
// timing, LRU replacement, word-0-first refill order and the reset that
// invalidates every line are this design's choices.
module icache #(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned WAYS        = 1,
  parameter int unsigned ADDR_W      = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch side
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic [ADDR_W-1:0] req_addr_i,
  output logic              resp_valid_o,
  output logic [31:0]       resp_data_o,
  // main-memory refill side
  output logic              mem_req_valid_o,
  input  logic              mem_req_ready_i,
  output logic [ADDR_W-1:0] mem_req_addr_o,
  input  logic              mem_resp_valid_i,
  input  logic [31:0]       mem_resp_data_i,
  // statistics
  output logic              stat_hit_o,
  output logic              stat_miss_o
);

  localparam int unsigned WPL   = LINE_BYTES / 4;
  localparam int unsigned SETS  = CACHE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned WOFF_W = $clog2(WPL);
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned TAG_W = ADDR_W - $clog2(SETS) - OFF_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  if (WAYS != 1 && WAYS != 2) begin : g_bad_ways
    $error("icache supports WAYS = 1 or 2");
  end

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_MEMREQ, S_REFILL, S_RESP} state_e;
  state_e state_q;

  logic [SETS-1:0]   valid_q [WAYS];
  logic [SETS-1:0]   lru_q;     // two-way: the way to replace next

  logic [ADDR_W-1:2] addr_q;   // word address
  logic [TAG_W-1:0]  a_tag;
  logic [IDX_W-1:0]  a_idx;
  logic [WOFF_W-1:0] a_word;

  assign a_tag  = addr_q[ADDR_W-1 -: TAG_W];
  assign a_idx  = (SETS > 1) ? IDX_W'(addr_q[OFF_W +: IDX_W]) : '0;
  assign a_word = addr_q[2 +: WOFF_W];

  // ------------------------------------------------------------ arrays
  // One data memory and one tag memory per way, read asynchronously with the
  // registered address and written during refill.
  logic [31:0]       rd_data [WAYS];
  logic [TAG_W-1:0]  rd_tag  [WAYS];
  logic [WOFF_W-1:0] beat_q;
  logic [WAY_W-1:0]  victim_q, victim_d;
  logic              fill_we, last_beat;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [31:0]      data_mem [SETS*WPL];
    logic [TAG_W-1:0] tag_mem  [SETS];

    always_ff @(posedge clk) begin
      if (fill_we && victim_q == WAY_W'(w)) begin
        data_mem[{a_idx, beat_q}] <= mem_resp_data_i;
        if (last_beat) tag_mem[a_idx] <= a_tag;
      end
    end

    assign rd_data[w] = data_mem[{a_idx, a_word}];
    assign rd_tag[w]  = tag_mem[a_idx];
  end

  // ------------------------------------------------------------ tag compare
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[w][a_idx] && rd_tag[w] == a_tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  always_comb begin
    victim_d = '0;
    if (WAYS == 2) begin
      if (!valid_q[0][a_idx])      victim_d = '0;
      else if (!valid_q[WAYS-1][a_idx]) victim_d = WAY_W'(WAYS-1);
      else                         victim_d = WAY_W'(lru_q[a_idx]);
    end
  end

  logic              lookup;
  assign lookup = (state_q == S_LOOKUP);

  logic [31:0]       fill_word_q;
  assign fill_we   = (state_q == S_REFILL) && mem_resp_valid_i;
  assign last_beat = (beat_q == WOFF_W'(WPL - 1));

  assign req_ready_o = (state_q == S_IDLE) || (state_q == S_RESP) || (lookup && hit);
  assign resp_valid_o = (lookup && hit) || (state_q == S_RESP);
  assign resp_data_o  = (state_q == S_RESP) ? fill_word_q
                                            : rd_data[hit_way];
  assign mem_req_valid_o = (state_q == S_MEMREQ);
  assign mem_req_addr_o  = {addr_q[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  assign stat_hit_o  = lookup && hit;
  assign stat_miss_o = lookup && !hit;

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      addr_q      <= '0;
      beat_q      <= '0;
      victim_q    <= '0;
      fill_word_q <= '0;
    end else begin
      case (state_q)
        S_IDLE, S_RESP: begin
          if (req_valid_i) begin
            addr_q  <= req_addr_i[ADDR_W-1:2];
            state_q <= S_LOOKUP;
          end else begin
            state_q <= S_IDLE;
          end
        end
        S_LOOKUP: begin
          if (hit) begin
            if (req_valid_i) addr_q <= req_addr_i[ADDR_W-1:2];
            else             state_q <= S_IDLE;
          end else begin
            victim_q <= victim_d;
            state_q  <= S_MEMREQ;
          end
        end
        S_MEMREQ: begin
          if (mem_req_ready_i) begin
            beat_q  <= '0;
            state_q <= S_REFILL;
          end
        end
        S_REFILL: begin
          if (mem_resp_valid_i) begin
            if (beat_q == a_word) fill_word_q <= mem_resp_data_i;
            beat_q <= beat_q + 1'b1;
            if (last_beat) state_q <= S_RESP;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++) valid_q[w] <= '0;
      lru_q <= '0;
    end else begin
      if (fill_we && last_beat)
        valid_q[victim_q][a_idx] <= 1'b1;
      // two-way LRU: the other way becomes the next victim
      if (WAYS == 2) begin
        if (lookup && hit)
          lru_q[a_idx] <= ~hit_way[0];
        else if (fill_we && last_beat)
          lru_q[a_idx] <= ~victim_q[0];
      end
    end
  end

endmodule
