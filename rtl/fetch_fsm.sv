// fetch_fsm: the IUnit fetch controller (state register plus output logic).
//
// Five states. FET_reset is entered from anywhere while Reset is true and
// left for FET_normal once it is false. In FET_normal the IUnit takes a PC
// from the execution unit every cycle and looks it up; a Miss or a Flush
// (outside a global suspension) starts a fetch from the external cache: to
// FET_memPending if the cache can take it now, to FET_memBusy to wait for it
// otherwise. FET_memPending waits for Data_Valid and returns to FET_normal, or
// to FET_disabled if the IUnit is disabled; FET_disabled hands the fetched
// instruction over and returns to FET_normal when no global suspension holds.
// The transitions are those of the reference state diagram and PLA listing.
//
// Outputs, all combinational from the present state and this cycle's control
// inputs (one clock cycle here stands for the four-phase CPU cycle):
//   Ins_bus select  exactly one of instruction / MISS / TRAP_CALL / READ_PC.
//                   MISS follows the reference MISS_To_InsBus equation;
//                   TRAP_CALL goes out in the cycle Reset is first seen,
//                   READ_PC in every FET_reset cycle.
//   fetch_request   fetch initiated this cycle (FetchPC onto Add_bus).
//   write_fetch     NOT Reset AND Data_Valid AND FET_memPending (reference).
//   read_memlatch   write_fetch while the IUnit is disabled: InsReg keeps the
//                   fetched word so FET_disabled can pass it on.
//   starting_prefetch  true while a fetch is starting or outstanding, and
//                   during a global suspension in FET_normal. It drops in
//                   the cycle the fetched word arrives, so that the first
//                   prefetch can go out in that cycle, unless the prefetch
//                   controller sits in PF_idle (after an invalidation sent
//                   it there): then it stays up one more cycle to start it.
// Choices of this design where the reference gives no equation: the exact
// terms of starting_prefetch, load_fetchpc and read_instruction (gated by
// Global_Suspension so the last instruction is repeated), and write_tag /
// invalidate_block asserted together with the fetch request.
module fetch_fsm
  import iu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  iu_ctl_t    ctl,
  input  logic       pf_idle,     // prefetch controller is in PF_idle
  output fet_state_e state,
  output fet_out_t   fo
);

  fet_state_e next;

  always_comb begin
    next = state;
    if (ctl.reset) begin
      next = FET_RESET;
    end else begin
      unique case (state)
        FET_RESET:      next = FET_NORMAL;
        FET_NORMAL:
          if (!ctl.global_suspension && (ctl.miss || ctl.flush))
            next = ctl.memory_busy ? FET_MEMBUSY : FET_MEMPENDING;
        FET_MEMBUSY:
          if (!ctl.memory_busy) next = FET_MEMPENDING;
        FET_MEMPENDING:
          if (ctl.data_valid) next = ctl.iunit_enable ? FET_NORMAL : FET_DISABLED;
        FET_DISABLED:
          if (!ctl.global_suspension) next = FET_NORMAL;
        default:        next = FET_RESET;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= FET_RESET;
    else        state <= next;
  end

  logic normal, membusy, mempend, disabled, in_reset, fetch_issue, demand;

  always_comb begin
    normal   = (state == FET_NORMAL);
    membusy  = (state == FET_MEMBUSY);
    mempend  = (state == FET_MEMPENDING);
    disabled = (state == FET_DISABLED);
    in_reset = (state == FET_RESET);
    demand   = ctl.miss || ctl.flush;

    fetch_issue = !ctl.reset && !ctl.memory_busy &&
                  ((normal && !ctl.global_suspension && demand) || membusy);

    fo.load_fetchpc          = normal && !ctl.global_suspension;
    fo.read_instruction      = normal && !ctl.global_suspension && !ctl.reset;
    fo.miss_to_insbus        = (normal && !ctl.reset && !ctl.global_suspension && demand)
                             || (disabled && !ctl.reset && ctl.global_suspension)
                             || ((membusy || mempend) && !ctl.reset);
    fo.trapcall_to_insbus    = ctl.reset && !in_reset;
    fo.readpc_to_insbus      = in_reset;
    fo.instruction_to_insbus = !ctl.reset &&
                               ((normal && (ctl.global_suspension || !demand))
                                || (disabled && !ctl.global_suspension));
    fo.write_fetch           = !ctl.reset && ctl.data_valid && mempend;
    fo.read_memlatch         = fo.write_fetch && !ctl.iunit_enable;
    fo.fetch_request         = fetch_issue;
    fo.fetchpc_to_addbus     = fetch_issue;
    fo.write_tag             = fetch_issue;
    fo.invalidate_block      = fetch_issue;
    fo.starting_prefetch     = !ctl.reset &&
                               ((normal && (ctl.global_suspension || demand))
                                || membusy || (mempend && (!ctl.data_valid || pf_idle)));
  end

  // Exactly one source drives Ins_bus in every cycle.
  a_insbus_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot({fo.instruction_to_insbus, fo.miss_to_insbus,
             fo.trapcall_to_insbus, fo.readpc_to_insbus}));

endmodule
