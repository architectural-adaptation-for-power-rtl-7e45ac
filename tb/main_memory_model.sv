// main_memory_model: behavioural main memory for simulation only.
//
// Accepts one burst request at a time (first 64-byte line address and line
// count), and LATENCY cycles later returns the lines in address order, one
// per cycle. Contents are not stored: every line holds a fixed function of
// its address (line_word), so checkers can compute the expected data of
// any address. `bursts` and `lines` count the traffic.
module main_memory_model
  import mem_hier_pkg::*;
#(
  parameter int LATENCY = 30
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  l2addr_t    req_addr,
  input  logic [3:0] req_lines,
  output logic       resp_valid,
  output l2line_t    resp_data,
  output int         bursts,
  output int         lines
);
  function automatic l2line_t line_word(l2addr_t a);
    l2line_t l;
    for (int k = 0; k < 16; k++) l[k*32 +: 32] = {a[25:0], 6'(k)} * 32'h2545F491 + 32'h1234;
    return l;
  endfunction

  logic    busy;
  int      cnt, left;
  l2addr_t addr;

  assign req_ready  = !busy;
  assign resp_valid = busy && cnt == 0;
  assign resp_data  = line_word(addr);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= 0; left <= 0; addr <= '0; bursts <= 0; lines <= 0;
    end else if (req_valid && req_ready) begin
      busy   <= 1'b1;
      cnt    <= LATENCY - 1;
      addr   <= req_addr;
      left   <= int'(req_lines);
      bursts <= bursts + 1;
    end else if (resp_valid) begin
      addr  <= addr + 1'b1;
      left  <= left - 1;
      lines <= lines + 1;
      if (left == 1) busy <= 1'b0;
    end else if (busy) begin
      cnt <= cnt - 1;
    end
  end
endmodule
