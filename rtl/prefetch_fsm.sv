// prefetch_fsm: the IUnit prefetch controller (state register plus output
// logic).
//
// Five states, with the transitions of the reference state diagram and PLA
// listing. Reset forces PF_reset from anywhere. Leaving PF_reset, the
// machine goes to PF_idle if both the IUnit and prefetching are enabled,
// otherwise to PF_disabled, which only a new Reset leaves. PF_idle waits
// for Starting_Prefetch from the fetch controller (prefetch-on-miss). In
// PF_waiting and PF_prefetch the machine prefetches: it moves to PF_prefetch
// when neither Starting_Prefetch nor Memory_Busy holds and back to
// PF_waiting when either does. Flush sends PF_waiting / PF_prefetch back to
// PF_idle.
//
// Outputs, combinational within the cycle:
//   prefetch_request  a prefetch goes out this cycle (IncrementedPC onto
//                     Add_bus): in PF_waiting or PF_prefetch whenever neither
//                     Starting_Prefetch nor Memory_Busy holds.
//   write_instruction (NOT Reset AND NOT Flush AND Data_Valid AND PF_prefetch)
//                     OR Write_Fetch, as in the reference.
//   load_referencepc  ReferencePC takes the Add_bus whenever the IUnit drives
//                     it, fetch or prefetch.
//   invalidate_tag / bypass_tag_decoder  NOT Reset AND Flush: all block valid
//                     bits are cleared in one access.
// Which terms make up prefetch_request, load_referencepc and the two flush
// outputs is a choice of this design; the reference only names them.
module prefetch_fsm
  import iu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  iu_ctl_t   ctl,
  input  logic      starting_prefetch,
  input  logic      write_fetch,
  input  logic      fetch_request,
  output pf_state_e state,
  output pf_out_t   po
);

  pf_state_e next;

  always_comb begin
    next = state;
    if (ctl.reset) begin
      next = PF_RESET;
    end else begin
      unique case (state)
        PF_RESET:
          next = (ctl.iunit_enable && ctl.prefetch_enable) ? PF_IDLE : PF_DISABLED;
        PF_IDLE:
          if (!ctl.flush && starting_prefetch) next = PF_WAITING;
        PF_DISABLED: next = PF_DISABLED;
        PF_WAITING, PF_PREFETCH:
          if (ctl.flush)                                   next = PF_IDLE;
          else if (starting_prefetch || ctl.memory_busy)   next = PF_WAITING;
          else                                             next = PF_PREFETCH;
        default: next = PF_RESET;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= PF_RESET;
    else        state <= next;
  end

  logic active, prefetch_issue;

  always_comb begin
    active         = (state == PF_WAITING) || (state == PF_PREFETCH);
    prefetch_issue = active && !ctl.reset && !ctl.flush
                     && !starting_prefetch && !ctl.memory_busy;

    po.prefetch_request        = prefetch_issue;
    po.incrementedpc_to_addbus = prefetch_issue;
    po.load_referencepc        = prefetch_issue || fetch_request;
    po.write_instruction       = (!ctl.reset && !ctl.flush && ctl.data_valid
                                  && (state == PF_PREFETCH)) || write_fetch;
    po.invalidate_tag          = !ctl.reset && ctl.flush;
    po.bypass_tag_decoder      = !ctl.reset && ctl.flush;
  end

  // The fetch side has the external cache whenever it is fetching.
  a_no_fetch_prefetch_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(fetch_request && prefetch_issue));

endmodule
