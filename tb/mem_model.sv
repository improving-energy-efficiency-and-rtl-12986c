// mem_model: behavioural main memory for cache refills (testbench only).
//
// Accepts one line request at a time (req_ready_o is high while idle) and
// returns the LINE_BYTES/4 words of the line, word 0 first, on consecutive
// cycles, the last word arriving LATENCY cycles after the request was
// accepted, so a whole refill takes LATENCY cycles. The content is the array
// mem, MEM_WORDS words, addressed modulo its size; it starts as a fixed
// pseudo-random pattern (word_init) and testbenches overwrite it with a
// program by hierarchical assignment. n_req counts the refills served.
module mem_model #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned LATENCY    = 50,
  parameter int unsigned MEM_WORDS  = 16384
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic [ADDR_W-1:0] req_addr_i,
  output logic              resp_valid_o,
  output logic [31:0]       resp_data_o
);

  localparam int unsigned WPL = LINE_BYTES / 4;

  logic [31:0] mem [MEM_WORDS];
  int unsigned n_req;

  function automatic logic [31:0] word_init(input int unsigned word_addr);
    return (word_addr * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  initial begin
    for (int unsigned i = 0; i < MEM_WORDS; i++) mem[i] = word_init(i);
  end

  logic              busy;
  int unsigned       timer;
  logic [ADDR_W-1:0] base;

  assign req_ready_o = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      timer        <= 0;
      n_req        <= 0;
      base         <= '0;
      resp_valid_o <= 1'b0;
      resp_data_o  <= '0;
    end else begin
      resp_valid_o <= 1'b0;
      if (!busy) begin
        if (req_valid_i) begin
          busy  <= 1'b1;
          timer <= 1;
          base  <= req_addr_i;
          n_req <= n_req + 1;
        end
      end else begin
        timer <= timer + 1;
        // beats at LATENCY-WPL+1 .. LATENCY cycles after acceptance
        if (timer >= LATENCY - WPL && timer < LATENCY) begin
          resp_valid_o <= 1'b1;
          resp_data_o  <= mem[((base >> 2) + (timer - (LATENCY - WPL))) % MEM_WORDS];
        end
        if (timer == LATENCY - 1) busy <= 1'b0;
      end
    end
  end

endmodule
