// l0_data_array: data store of the direct-mapped L0 I-cache.
//
// One entry holds one 16-byte line, which is also one fetch block of four
// instructions. The data array is separate from the tag array so that it is
// only read when the fetch is predicted to hit in L0; a fetch sent straight
// to L1 leaves it idle.
//
// Interface and timing: rd_en with rd_addr in cycle t gives rd_data in
// cycle t+1 (synchronous read); rd_data holds while rd_en is low. wr_en
// writes wr_data at the entry of wr_addr. A read of the entry being written
// in the same cycle returns the new data (write-first). The array itself has
// no reset; the tag array's valid bits guard it.
//
// Size and line follow the L0 configuration (256 bytes by default, 16-byte
// lines); write-first behaviour is this design's choice.
module l0_data_array
  import mem_hier_pkg::*;
#(
  parameter int unsigned L0_BYTES = 256
) (
  input  logic   clk,
  input  logic   rd_en,
  input  faddr_t rd_addr,
  output fblk_t  rd_data,
  input  logic   wr_en,
  input  faddr_t wr_addr,
  input  fblk_t  wr_data
);
  localparam int unsigned ENTRIES = L0_BYTES / FBLK_B;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);

  fblk_t mem [ENTRIES];

  logic [IDX_W-1:0] rd_idx, wr_idx;
  assign rd_idx = rd_addr[IDX_W-1:0];
  assign wr_idx = wr_addr[IDX_W-1:0];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_data;
    if (rd_en) rd_data <= (wr_en && wr_idx == rd_idx) ? wr_data : mem[rd_idx];
  end

endmodule
