// tb_icache: self-checking test of the instruction cache.
// Runs icache_bench on four configurations from the range the cache is meant
// for, all with 32-byte lines and 50-cycle refills:
//   * 256 B direct-mapped and 256 B two-way, the smallest size, so capacity
//     and conflict misses are frequent;
//   * 16 KB direct-mapped, the default;
//   * 32 KB two-way, the largest size.
// Each bench checks data, hit/miss against a reference tag model and the
// hit and miss latencies. This testbench requires both hits and misses in
// each configuration.
module tb_icache;

  localparam int unsigned N_CFG = 4;
  localparam int unsigned CFG_BYTES [N_CFG] = '{256, 256, 16384, 32768};
  localparam int unsigned CFG_WAYS  [N_CFG] = '{1, 2, 1, 2};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N_CFG-1:0] done;
  int c [N_CFG];
  int f [N_CFG];
  int h [N_CFG];
  int m [N_CFG];

  for (genvar i = 0; i < N_CFG; i++) begin : g_cfg
    icache_bench #(.CACHE_BYTES(CFG_BYTES[i]), .WAYS(CFG_WAYS[i]), .N_ACCESS(3000)) u_bench (
      .clk, .rst_n, .done_o(done[i]), .checks_o(c[i]), .failures_o(f[i]),
      .hits_o(h[i]), .misses_o(m[i]));
  end

  function automatic int sum(input int v [N_CFG]);
    int s = 0;
    for (int i = 0; i < N_CFG; i++) s += v[i];
    return s;
  endfunction

  int checks, failures;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    checks   = sum(c);
    failures = sum(f);
    for (int i = 0; i < N_CFG; i++) begin
      checks++;
      if (h[i] == 0 || m[i] == 0) failures++;
      $display("%0d B, %0d-way: %0d hits %0d misses (miss rate %0d.%01d%%)",
               CFG_BYTES[i], CFG_WAYS[i], h[i], m[i],
               1000 * m[i] / (h[i] + m[i]) / 10, 1000 * m[i] / (h[i] + m[i]) % 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
