// ptw_model: behavioural page-table walker for TLB refills (testbench only).
//
// Accepts one translation request at a time (req_ready_o is high while idle)
// and answers it LATENCY cycles after acceptance with a one-cycle
// resp_valid_o. The page table it stands for is the fixed map
// ppn = vpn ^ PPN_XOR, so testbenches can place code at the physical
// addresses of their virtual pages. n_req counts the refills served.
module ptw_model #(
  parameter int unsigned VPN_W   = 20,
  parameter int unsigned LATENCY = 100,
  parameter int unsigned PPN_XOR = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid_i,
  output logic             req_ready_o,
  input  logic [VPN_W-1:0] req_vpn_i,
  output logic             resp_valid_o,
  output logic [VPN_W-1:0] resp_ppn_o
);

  logic             busy;
  int unsigned      timer;
  logic [VPN_W-1:0] vpn;
  int unsigned      n_req;

  assign req_ready_o  = !busy;
  assign resp_valid_o = busy && timer == LATENCY;
  assign resp_ppn_o   = vpn ^ VPN_W'(PPN_XOR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      timer <= 0;
      vpn   <= '0;
      n_req <= 0;
    end else if (!busy) begin
      if (req_valid_i) begin
        busy  <= 1'b1;
        timer <= 1;
        vpn   <= req_vpn_i;
        n_req <= n_req + 1;
      end
    end else begin
      timer <= timer + 1;
      if (timer == LATENCY) busy <= 1'b0;
    end
  end

endmodule
