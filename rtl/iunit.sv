// iunit: the SPUR-style on-chip instruction unit, top level.
//
// A 512-byte direct-mapped instruction cache between the execution unit
// (EUnit) and the external cache (ECache). 16 blocks each hold a tag and 8
// one-instruction sub-blocks with their own valid bits, so a miss loads only
// the instruction that missed. After a miss the prefetcher keeps sending the
// next sequential addresses of that block (wrapping around inside it) to
// the ECache whenever neither a fetch nor an EUnit data reference needs it,
// from one demand miss to the next.
//
// Each clock cycle is one CPU cycle; the four clock phases of the original
// are folded into it. In a cycle the IUnit takes a PC from PC_bus, looks it up
// and answers on Ins_bus with the instruction (hit), MISS (miss, invalidate,
// waiting for memory: a partial pipeline suspension), TRAP_CALL (first cycle
// of Reset_IUnit) or READ_PC (the IUnit's reset state). Requests to the
// ECache go out on Add_bus with Fetch_Request or Prefetch_Request; the ECache
// answers with Cache_Data_Valid and the instruction on the low 32 bits of
// Data_bus. A read-miss costs two cycles when the ECache is free:
//   cycle 1  miss, MISS on Ins_bus, fetch address out
//   cycle 2  data back and written, MISS on Ins_bus, first prefetch out
//   cycle 3  the same PC hits.
// A global suspension (Pipeline_Not_Suspended false, taking effect the next
// cycle) repeats the last instruction. Invalidate_OPCODE / Invalidate_Trap
// clear all block valid bits and start a fetch in the same cycle.
// Reset_IUnit keeps the cached instructions but drops pending fetches and
// stops prefetching until the next miss.
//
// Structure: iu_input_logic derives the control inputs; fetch_fsm and
// prefetch_fsm are the two controllers; instruction_buffer, tag_compare and
// prefetcher are the datapath. add_bus_drive tells when the IUnit drives the
// shared Add_bus; otherwise the EUnit owns it. fet_state / pf_state expose the
// controller states. rst_n is a power-on reset of this design (clears all
// valid bits, both controllers to their reset states); it is not part of the
// reference interface, where Reset_IUnit does not invalidate.
module iunit
  import iu_pkg::*;
#(
  parameter int unsigned      ADDR_W     = IU_ADDR_W,
  parameter int unsigned      INS_W      = IU_INS_W,
  parameter int unsigned      DATA_W     = IU_DATA_W,
  parameter int unsigned      NUM_BLOCKS = IU_NUM_BLOCKS,
  parameter int unsigned      SUBBLOCKS  = IU_SUBBLOCKS,
  parameter logic [INS_W-1:0] MISS_INS      = INS_MISS,
  parameter logic [INS_W-1:0] TRAP_CALL_INS = INS_TRAP_CALL,
  parameter logic [INS_W-1:0] READ_PC_INS   = INS_READ_PC
) (
  input  logic              clk,
  input  logic              rst_n,
  // execution unit to IUnit
  input  logic              reset_iunit,
  input  logic              iunit_kpsw_set,
  input  logic              prefetch_kpsw_set,
  input  logic              pipeline_not_suspended,
  input  logic              load_opcode,
  input  logic              store_opcode,
  input  logic              lowtoup_opcode,
  input  logic              invalidate_opcode,
  input  logic              invalidate_trap,
  input  logic [ADDR_W-1:0] pc_bus,
  // external cache to IUnit
  input  logic              cache_busy,
  input  logic              cache_data_valid,
  input  logic [DATA_W-1:0] data_bus,
  // IUnit outputs
  output logic [INS_W-1:0]  ins_bus,
  output logic              fetch_request,
  output logic              prefetch_request,
  output logic [ADDR_W-1:0] add_bus,
  output logic              add_bus_drive,
  output logic [2:0]        fet_state,
  output logic [2:0]        pf_state
);

  iu_ctl_t    ctl;
  fet_out_t   fo;
  pf_out_t    po;
  fet_state_e fstate;
  pf_state_e  pstate;

  logic block_miss, instruction_miss;
  logic [ADDR_W-1:0] fetch_pc, incremented_pc;

  iu_input_logic u_input (
    .clk, .rst_n, .reset_iunit, .iunit_kpsw_set, .prefetch_kpsw_set,
    .pipeline_not_suspended, .load_opcode, .store_opcode, .lowtoup_opcode,
    .invalidate_opcode, .invalidate_trap, .cache_busy, .cache_data_valid,
    .block_miss, .instruction_miss, .ctl
  );

  fetch_fsm u_fetch (
    .clk, .rst_n, .ctl,
    .pf_idle (pstate == PF_IDLE),
    .state   (fstate),
    .fo
  );

  prefetch_fsm u_prefetch (
    .clk, .rst_n, .ctl,
    .starting_prefetch (fo.starting_prefetch),
    .write_fetch       (fo.write_fetch),
    .fetch_request     (fo.fetch_request),
    .state             (pstate),
    .po
  );

  tag_compare #(
    .ADDR_W(ADDR_W), .NUM_BLOCKS(NUM_BLOCKS), .SUBBLOCKS(SUBBLOCKS)
  ) u_tags (
    .clk, .rst_n, .pc_bus,
    .load_fetchpc       (fo.load_fetchpc),
    .write_tag          (fo.write_tag),
    .invalidate_tag     (po.invalidate_tag),
    .bypass_tag_decoder (po.bypass_tag_decoder),
    .fetch_pc, .block_miss
  );

  prefetcher #(.ADDR_W(ADDR_W), .SUBBLOCKS(SUBBLOCKS)) u_prefetcher (
    .clk, .rst_n, .add_bus,
    .load_referencepc (po.load_referencepc),
    .reference_pc (), .incremented_pc
  );

  instruction_buffer #(
    .ADDR_W(ADDR_W), .INS_W(INS_W), .DATA_W(DATA_W),
    .NUM_BLOCKS(NUM_BLOCKS), .SUBBLOCKS(SUBBLOCKS),
    .MISS_INS(MISS_INS), .TRAP_CALL_INS(TRAP_CALL_INS), .READ_PC_INS(READ_PC_INS)
  ) u_ibuf (
    .clk, .rst_n, .pc_bus,
    .load_ibread           (fo.load_fetchpc),
    .add_bus,
    .load_ibwrite          (add_bus_drive),
    .data_bus,
    .write_instruction     (po.write_instruction),
    .invalidate_block      (fo.invalidate_block && block_miss),
    .read_instruction      (fo.read_instruction),
    .read_memlatch         (fo.read_memlatch),
    .instruction_to_insbus (fo.instruction_to_insbus),
    .miss_to_insbus        (fo.miss_to_insbus),
    .trapcall_to_insbus    (fo.trapcall_to_insbus),
    .readpc_to_insbus      (fo.readpc_to_insbus),
    .instruction_miss, .ins_bus
  );

  // Add_bus: FetchPC for a fetch, IncrementedPC for a prefetch.
  always_comb begin
    add_bus_drive    = fo.fetchpc_to_addbus || po.incrementedpc_to_addbus;
    add_bus          = fo.fetchpc_to_addbus ? fetch_pc : incremented_pc;
    fetch_request    = fo.fetch_request;
    prefetch_request = po.prefetch_request;
    fet_state        = fstate;
    pf_state         = pstate;
  end

endmodule
