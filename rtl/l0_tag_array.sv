// l0_tag_array: tag store and comparator of the direct-mapped L0 I-cache.
//
// The L0 keeps its tags in an array of their own, decoupled from the data.
// The tag is therefore looked up on every fetch, also when the fetch is
// sent to L1, and the hit/miss outcome feeds the L0/L1 cache selector that
// predicts where the next fetch goes. The outcome is also what says whether
// the L0 line must be refilled.
//
// Interface and timing: a lookup presented with rd_en in cycle t returns
// `hit` in cycle t+1 (registered read, comparison on the registered values).
// `hit` holds its value while rd_en is low. A write (wr_en) installs the tag
// of wr_addr and marks the entry valid. A lookup in the same cycle as a write
// to the same entry sees the new tag (write-first), so a refill and the next
// fetch can overlap. Reset clears every valid bit.
//
// Direct mapping, the 16-byte line and the 256-byte default size follow the
// L0 configuration of the design (512 bytes is the other size studied; set
// L0_BYTES). Write-first behaviour and the reset are this design's choice.
module l0_tag_array
  import mem_hier_pkg::*;
#(
  parameter int unsigned L0_BYTES = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rd_en,
  input  faddr_t rd_addr,
  output logic   hit,
  input  logic   wr_en,
  input  faddr_t wr_addr
);
  localparam int unsigned ENTRIES = L0_BYTES / FBLK_B;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);
  localparam int unsigned TAG_W   = FADDR_W - IDX_W;

  logic [TAG_W-1:0] tags  [ENTRIES];
  logic [ENTRIES-1:0] valid;

  logic [IDX_W-1:0] rd_idx, wr_idx;
  logic [TAG_W-1:0] rd_tag, wr_tag;
  assign rd_idx = rd_addr[IDX_W-1:0];
  assign rd_tag = rd_addr[FADDR_W-1:IDX_W];
  assign wr_idx = wr_addr[IDX_W-1:0];
  assign wr_tag = wr_addr[FADDR_W-1:IDX_W];

  logic [TAG_W-1:0] stored_tag_q, lookup_tag_q;
  logic             stored_valid_q;

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_idx] <= wr_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid          <= '0;
      stored_valid_q <= 1'b0;
      stored_tag_q   <= '0;
      lookup_tag_q   <= '0;
    end else begin
      if (wr_en) valid[wr_idx] <= 1'b1;
      if (rd_en) begin
        lookup_tag_q <= rd_tag;
        if (wr_en && wr_idx == rd_idx) begin
          stored_tag_q   <= wr_tag;
          stored_valid_q <= 1'b1;
        end else begin
          stored_tag_q   <= tags[rd_idx];
          stored_valid_q <= valid[rd_idx];
        end
      end
    end
  end

  assign hit = stored_valid_q && (stored_tag_q == lookup_tag_q);

endmodule
