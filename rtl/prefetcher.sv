// prefetcher: next-address generator for sequential prefetching.
//
// ReferencePC (a master/slave pair in the reference, one register here)
// takes the address the IUnit drives on Add_bus whenever Load_ReferencePC
// is true, that is on every fetch and prefetch it initiates. The Incrementer
// adds one to the three lowest address bits only, wrapping around inside the
// block, so prefetching runs through the 8 sub-blocks of the block that last
// missed and then starts again at its beginning; the upper address bits pass
// through unchanged. IncrementedPC is that address, to be put on Add_bus
// when a prefetch is initiated.
//
// Timing: load_referencepc and add_bus are sampled at the end of a cycle;
// incremented_pc is valid from the next cycle on. rst_n clears ReferencePC
// (a choice of this design; nothing is prefetched before the first fetch).
module prefetcher #(
  parameter int unsigned ADDR_W    = 30,
  parameter int unsigned SUBBLOCKS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] add_bus,           // address the IUnit drives
  input  logic              load_referencepc,
  output logic [ADDR_W-1:0] reference_pc,
  output logic [ADDR_W-1:0] incremented_pc
);

  localparam int unsigned SUB_W = $clog2(SUBBLOCKS);

  always_ff @(posedge clk) begin
    if (!rst_n)                reference_pc <= '0;
    else if (load_referencepc) reference_pc <= add_bus;
  end

  always_comb begin
    incremented_pc            = reference_pc;
    incremented_pc[SUB_W-1:0] = reference_pc[SUB_W-1:0] + 1'b1;
  end

endmodule
