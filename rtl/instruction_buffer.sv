// instruction_buffer: instruction storage and instruction-bus driver of the
// IUnit.
//
// The IArray holds 128 instructions, one per sub-block, each with its own
// sub-block valid bit (the WordValid column). The read address (IBRead)
// is the low 7 bits of the PC: 3 sub-block bits and 4 block bits. It follows
// PC_bus while Load_IBRead is true and holds otherwise. A read produces the
// instruction and Instruction_Miss (sub-block valid bit false).
// InsReg latches the read when Read_Instruction is true and holds its value
// otherwise, so a globally suspended pipeline is sent the same instruction
// again. With Read_MemLatch it instead takes the word arriving on Data_bus.
// The InsMux drives Ins_bus from one of four sources: InsReg or the
// hard-wired MISS, TRAP_CALL and READ_PC instructions.
//
// Writes: the write address (IBWrite) is taken from Add_bus whenever the
// IUnit sends a fetch or prefetch address (Load_IBWrite). The data comes back
// in a later cycle with Write_Instruction; the low 32 Data_bus bits are then
// written at that address and its sub-block valid bit is set.
// Invalidate_Block (with Enable_Block, the whole-block decoder access)
// clears the 8 sub-block valid bits of the block addressed by IBRead; in a
// clash it wins over a write into the same block.
//
// Timing: one clock cycle is one CPU cycle. Reads and the Ins_bus are
// combinational within the cycle (read in phase 2, drive in phase 3); writes
// and register loads happen at the end of the cycle (phase 4). rst_n clears
// the valid bits and InsReg (power-on choice of this design; Reset_IUnit
// keeps the cached instructions, as the reference requires). What goes in
// the upper 8 Data_bus bits is not used here.
module instruction_buffer
  import iu_pkg::*;
#(
  parameter int unsigned     ADDR_W     = IU_ADDR_W,
  parameter int unsigned     INS_W      = IU_INS_W,
  parameter int unsigned     DATA_W     = IU_DATA_W,
  parameter int unsigned     NUM_BLOCKS = IU_NUM_BLOCKS,
  parameter int unsigned     SUBBLOCKS  = IU_SUBBLOCKS,
  parameter logic [INS_W-1:0] MISS_INS      = INS_MISS,
  parameter logic [INS_W-1:0] TRAP_CALL_INS = INS_TRAP_CALL,
  parameter logic [INS_W-1:0] READ_PC_INS   = INS_READ_PC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] pc_bus,
  input  logic              load_ibread,
  input  logic [ADDR_W-1:0] add_bus,
  input  logic              load_ibwrite,
  input  logic [DATA_W-1:0] data_bus,
  input  logic              write_instruction,
  input  logic              invalidate_block,
  input  logic              read_instruction,
  input  logic              read_memlatch,
  input  logic              instruction_to_insbus,
  input  logic              miss_to_insbus,
  input  logic              trapcall_to_insbus,
  input  logic              readpc_to_insbus,
  output logic              instruction_miss,
  output logic [INS_W-1:0]  ins_bus
);

  localparam int unsigned SUB_W   = $clog2(SUBBLOCKS);
  localparam int unsigned BLK_W   = $clog2(NUM_BLOCKS);
  localparam int unsigned IDX_W   = SUB_W + BLK_W;
  localparam int unsigned ENTRIES = NUM_BLOCKS * SUBBLOCKS;

  logic [INS_W-1:0]   iarray [ENTRIES];
  logic [ENTRIES-1:0] word_valid;

  logic [IDX_W-1:0] ibread_q, ibwrite_q, rd_idx;
  logic [INS_W-1:0] insreg_q, insreg;
  logic [INS_W-1:0] rd_data;
  logic [BLK_W-1:0] inv_blk;

  always_comb begin
    rd_idx           = load_ibread ? pc_bus[IDX_W-1:0] : ibread_q;
    rd_data          = iarray[rd_idx];
    instruction_miss = !word_valid[rd_idx];
    insreg           = read_instruction ? rd_data : insreg_q;
    inv_blk          = rd_idx[IDX_W-1:SUB_W];
  end

  // InsMux
  always_comb begin
    ins_bus = '0;
    if (instruction_to_insbus) ins_bus = insreg;
    if (miss_to_insbus)        ins_bus = MISS_INS;
    if (trapcall_to_insbus)    ins_bus = TRAP_CALL_INS;
    if (readpc_to_insbus)      ins_bus = READ_PC_INS;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ibread_q  <= '0;
      ibwrite_q <= '0;
      insreg_q  <= '0;
    end else begin
      ibread_q <= rd_idx;
      if (load_ibwrite)  ibwrite_q <= add_bus[IDX_W-1:0];
      insreg_q <= read_memlatch ? data_bus[INS_W-1:0] : insreg;
    end
  end

  always_ff @(posedge clk) begin
    if (write_instruction) iarray[ibwrite_q] <= data_bus[INS_W-1:0];
  end

  // WordValid
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word_valid <= '0;
    end else begin
      if (write_instruction) word_valid[ibwrite_q] <= 1'b1;
      if (invalidate_block)
        for (int unsigned s = 0; s < SUBBLOCKS; s++)
          word_valid[{inv_blk, SUB_W'(s)}] <= 1'b0;
    end
  end

  a_insmux_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot({instruction_to_insbus, miss_to_insbus, trapcall_to_insbus, readpc_to_insbus}));

endmodule
