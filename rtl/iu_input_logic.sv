// iu_input_logic: the input logic and latches in front of the two IUnit
// controllers.
//
// It turns the execution-unit and external-cache interface signals into the
// eight control inputs both state machines use:
//   Reset             = Reset_IUnit
//   IUnit_Enable      = IUnit_KPSW_Set, latched at the cycle boundary
//   Prefetch_Enable   = Prefetch_KPSW_Set, latched at the cycle boundary
//   Global_Suspension = NOT Pipeline_Not_Suspended, latched at the cycle boundary
//   Memory_Busy       = (Cache_Busy AND NOT Cache_Data_Valid)
//                       OR Load_OPCODE OR Store_OPCODE OR lowTOup_OPCODE
//   Data_Valid        = Cache_Data_Valid
//   Flush             = Invalidate_OPCODE OR Invalidate_Trap
//   Miss              = Block_Miss OR Instruction_Miss
// These equations follow the reference description. The three latched inputs
// change in the last phase of a cycle and are used from the next cycle on, so
// here they are registers clocked at the cycle boundary; all others are used
// in the cycle they arrive.
//
// Choice of this design: while the IUnit is disabled every request is
// treated as a miss (Miss is forced), so that the CPU runs from the external
// cache without the IUnit; rst_n is a power-on reset that clears the three
// latches (IUnit and prefetching disabled, no suspension).
module iu_input_logic
  import iu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    reset_iunit,
  input  logic    iunit_kpsw_set,
  input  logic    prefetch_kpsw_set,
  input  logic    pipeline_not_suspended,
  input  logic    load_opcode,
  input  logic    store_opcode,
  input  logic    lowtoup_opcode,
  input  logic    invalidate_opcode,
  input  logic    invalidate_trap,
  input  logic    cache_busy,
  input  logic    cache_data_valid,
  input  logic    block_miss,
  input  logic    instruction_miss,
  output iu_ctl_t ctl
);

  logic iunit_en_q, prefetch_en_q, suspended_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      iunit_en_q    <= 1'b0;
      prefetch_en_q <= 1'b0;
      suspended_q   <= 1'b0;
    end else begin
      iunit_en_q    <= iunit_kpsw_set;
      prefetch_en_q <= prefetch_kpsw_set;
      suspended_q   <= !pipeline_not_suspended;
    end
  end

  always_comb begin
    ctl.reset             = reset_iunit;
    ctl.iunit_enable      = iunit_en_q;
    ctl.prefetch_enable   = prefetch_en_q;
    ctl.global_suspension = suspended_q;
    ctl.memory_busy       = (cache_busy && !cache_data_valid)
                          || load_opcode || store_opcode || lowtoup_opcode;
    ctl.data_valid        = cache_data_valid;
    ctl.flush             = invalidate_opcode || invalidate_trap;
    ctl.miss              = block_miss || instruction_miss || !iunit_en_q;
  end

endmodule
