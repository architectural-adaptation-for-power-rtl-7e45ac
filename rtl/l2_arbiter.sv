// l2_arbiter: round-robin arbiter of the unified L2's single request port.
//
// The L2 is shared by the instruction side (L1 I-cache) and the data side.
// The arbiter grants one requester at a time and keeps that grant until the
// L2 has answered, so each answer is routed back to the requester that
// asked. When both request in the same cycle the one not served last wins.
// The answer data is shared by both ports; resp_valid says whose it is.
//
// Interface: two request/response ports (index 0 = instruction side,
// index 1 = data side) with valid/ready handshakes, and one port towards the
// L2. A request is forwarded in the cycle it is granted (no added latency).
//
// Sharing the L2 follows the design; the round-robin policy and holding the
// grant until the answer are this design's own choices.
module l2_arbiter
  import mem_hier_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid [2],
  output logic    req_ready [2],
  input  l1addr_t req_addr  [2],
  output logic    resp_valid[2],
  output l1line_t resp_data [2],
  // towards L2
  output logic    l2_req_valid,
  input  logic    l2_req_ready,
  output l1addr_t l2_req_addr,
  input  logic    l2_resp_valid,
  input  l1line_t l2_resp_data
);
  logic busy_q;   // a request has been passed on and awaits its answer
  logic owner_q;  // requester of the outstanding request
  logic last_q;   // requester granted last
  logic gnt;      // requester granted this cycle

  always_comb begin
    if (req_valid[0] && req_valid[1]) gnt = ~last_q;
    else                              gnt = req_valid[1];
  end

  assign l2_req_valid = !busy_q && (req_valid[0] || req_valid[1]);
  assign l2_req_addr  = req_addr[gnt];

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      req_ready[i]  = !busy_q && l2_req_ready && (gnt == 1'(i));
      resp_valid[i] = busy_q && l2_resp_valid && (owner_q == 1'(i));
      resp_data[i]  = l2_resp_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= 1'b0;
      last_q  <= 1'b1;
    end else begin
      if (l2_req_valid && l2_req_ready) begin
        busy_q  <= 1'b1;
        owner_q <= gnt;
        last_q  <= gnt;
      end else if (busy_q && l2_resp_valid) begin
        busy_q <= 1'b0;
      end
    end
  end

endmodule
