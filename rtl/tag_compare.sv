// tag_compare: tag storage and hit detection for the IUnit blocks.
//
// The TArray holds, for each of the 16 blocks, a 23-bit address tag and a
// block valid bit. FetchPC latches the PC_bus when Load_FetchPC is true and
// otherwise keeps the address of the instruction being fetched; its block
// field drives the tag decoders and its tag field goes to the comparator.
// BlockValid combines the comparator's Match with the block valid bit:
// Block_Miss is true when the tag differs or the block is invalid.
//
// Writes take effect at the end of the cycle (the array reads early in a
// cycle and writes late, so a lookup sees the contents before that cycle's
// writes). Write_Tag stores FetchPC's tag and sets the block valid bit.
// Invalidate_Tag with Bypass_Tag_Decoder selects every row and clears all
// block valid bits; a lookup in that same cycle already reports a
// Block_Miss. If both happen in one cycle, the block being written ends
// valid, since its fetch follows the invalidation.
//
// Timing: pc_bus and load_fetchpc are used in the cycle they arrive (the
// FetchPC latch is transparent in the first phase); block_miss is
// combinational. rst_n clears the valid bits (power-on choice of this
// design; Reset_IUnit leaves them alone, as the reference requires).
module tag_compare #(
  parameter int unsigned ADDR_W     = 30,
  parameter int unsigned NUM_BLOCKS = 16,
  parameter int unsigned SUBBLOCKS  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] pc_bus,
  input  logic              load_fetchpc,
  input  logic              write_tag,
  input  logic              invalidate_tag,
  input  logic              bypass_tag_decoder,
  output logic [ADDR_W-1:0] fetch_pc,     // FetchPC as seen this cycle
  output logic              block_miss
);

  localparam int unsigned SUB_W = $clog2(SUBBLOCKS);
  localparam int unsigned BLK_W = $clog2(NUM_BLOCKS);
  localparam int unsigned TAG_W = ADDR_W - BLK_W - SUB_W;

  logic [ADDR_W-1:0] fetch_pc_q;
  logic [TAG_W-1:0]  tarray [NUM_BLOCKS];
  logic [NUM_BLOCKS-1:0] block_valid;

  logic [BLK_W-1:0] blk;
  logic [TAG_W-1:0] tag;
  logic             match;

  always_comb begin
    fetch_pc = load_fetchpc ? pc_bus : fetch_pc_q;
    blk      = fetch_pc[SUB_W +: BLK_W];
    tag      = fetch_pc[ADDR_W-1 -: TAG_W];
  end

  tag_comparator #(.TAG_W(TAG_W)) u_comparator (
    .stored_tag (tarray[blk]),
    .fetch_tag  (tag),
    .match      (match)
  );

  // BlockValid
  always_comb block_miss = !match || !block_valid[blk] || invalidate_tag;

  always_ff @(posedge clk) begin
    if (!rst_n) fetch_pc_q <= '0;
    else        fetch_pc_q <= fetch_pc;
  end

  always_ff @(posedge clk) begin
    if (write_tag) tarray[blk] <= tag;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      block_valid <= '0;
    end else begin
      if (invalidate_tag && bypass_tag_decoder) block_valid <= '0;
      if (write_tag) block_valid[blk] <= 1'b1;
    end
  end

endmodule
