// iu_pkg: types and constants shared by the instruction unit (IUnit).
//
// The IUnit is a 512-byte direct-mapped instruction cache: 16 blocks, each
// holding an address tag and 8 one-instruction sub-blocks. An instruction
// address is a 30-bit word address split into a 3-bit sub-block field, a
// 4-bit block field and a 23-bit tag. These sizes are the reference ones;
// the modules take them as parameters.
//
// The package also holds the encodings of the two controller state machines,
// the bundle of derived control inputs they share, and the three instructions
// the IUnit generates itself (MISS, TRAP_CALL, READ_PC). The machine codes of
// those three instructions are not part of the reference description; the
// values below are placeholders of this design and can be overridden at the
// top level.
package iu_pkg;

  localparam int unsigned IU_ADDR_W     = 30;  // PC_bus / Add_bus width (word address)
  localparam int unsigned IU_INS_W      = 32;  // Ins_bus width
  localparam int unsigned IU_DATA_W     = 40;  // Data_bus width
  localparam int unsigned IU_NUM_BLOCKS = 16;
  localparam int unsigned IU_SUBBLOCKS  = 8;

  // Internally generated instructions (placeholder encodings).
  localparam logic [IU_INS_W-1:0] INS_MISS      = 32'hFFFF_FF01;
  localparam logic [IU_INS_W-1:0] INS_TRAP_CALL = 32'hFFFF_FF02;
  localparam logic [IU_INS_W-1:0] INS_READ_PC   = 32'hFFFF_FF03;

  // Fetch state machine.
  typedef enum logic [2:0] {
    FET_RESET      = 3'd0,
    FET_NORMAL     = 3'd1,
    FET_MEMBUSY    = 3'd2,
    FET_MEMPENDING = 3'd3,
    FET_DISABLED   = 3'd4
  } fet_state_e;

  // Prefetch state machine.
  typedef enum logic [2:0] {
    PF_RESET    = 3'd0,
    PF_IDLE     = 3'd1,
    PF_DISABLED = 3'd2,
    PF_WAITING  = 3'd3,
    PF_PREFETCH = 3'd4
  } pf_state_e;

  // Control inputs shared by both state machines (derived from the
  // interface signals by iu_input_logic).
  typedef struct packed {
    logic reset;              // Reset_IUnit
    logic iunit_enable;       // latched IUnit_KPSW_Set
    logic prefetch_enable;    // latched Prefetch_KPSW_Set
    logic global_suspension;  // latched NOT Pipeline_Not_Suspended
    logic memory_busy;        // external cache cannot take a request this cycle
    logic data_valid;         // external cache data valid on Data_bus
    logic flush;              // invalidate request
    logic miss;               // Block_Miss OR Instruction_Miss
  } iu_ctl_t;

  // Outputs of the fetch controller.
  typedef struct packed {
    logic load_fetchpc;          // FetchPC / IBRead latch the PC_bus
    logic read_instruction;      // InsReg latches the IArray read
    logic instruction_to_insbus; // InsMux selects InsReg
    logic miss_to_insbus;        // InsMux selects MISS
    logic trapcall_to_insbus;    // InsMux selects TRAP_CALL
    logic readpc_to_insbus;      // InsMux selects READ_PC
    logic read_memlatch;         // InsReg latches the incoming memory data
    logic fetch_request;         // a fetch is initiated this cycle
    logic fetchpc_to_addbus;     // FetchPC drives Add_bus
    logic write_tag;             // TArray takes FetchPC's tag, block valid set
    logic invalidate_block;      // clear the block's sub-block valid bits (on block miss)
    logic starting_prefetch;     // fetch side is busy with / starting a fetch
    logic write_fetch;           // fetched instruction arrives this cycle
  } fet_out_t;

  // Outputs of the prefetch controller.
  typedef struct packed {
    logic prefetch_request;        // a prefetch is initiated this cycle
    logic incrementedpc_to_addbus; // IncrementedPC drives Add_bus
    logic load_referencepc;        // ReferencePC latches the Add_bus
    logic write_instruction;       // IArray write of the Data_bus word
    logic invalidate_tag;          // clear every block valid bit
    logic bypass_tag_decoder;      // select all TArray rows at once
  } pf_out_t;

endpackage
