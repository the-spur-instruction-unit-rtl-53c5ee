// tb_fetch_fsm: self-checking test of the fetch controller.
// Random control inputs are applied every cycle. A reference model, written
// as the case table of the fetch PLA (inputs flush, miss, memory busy, not
// suspended), predicts the next state; the testbench also checks which
// instruction source is put on Ins_bus in each state, when a fetch is
// requested, Write_Fetch, Read_MemLatch and the Starting_Prefetch cases
// that the description states outright. Every state must be visited.
module tb_fetch_fsm;
  import iu_pkg::*;
  logic clk = 0, rst_n = 0;
  iu_ctl_t ctl;
  fet_state_e state;
  fet_out_t fo;
  logic pf_idle;
  int checks = 0, failures = 0;
  int visits [5];

  fetch_fsm dut (.clk, .rst_n, .ctl, .pf_idle, .state, .fo);

  always #5 clk = !clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b (state %s)", what, $time, got, exp, state.name());
    end
  endtask

  // Next state as the PLA table lists it.
  function automatic fet_state_e model_next(input fet_state_e s, input iu_ctl_t c);
    logic not_spd;
    not_spd = !c.global_suspension;
    if (c.reset) return FET_RESET;
    case (s)
      FET_RESET: return FET_NORMAL;
      FET_NORMAL:
        casez ({c.flush, c.miss, c.memory_busy, not_spd})
          4'b1?11, 4'b0111: return FET_MEMBUSY;
          4'b1?01, 4'b0101: return FET_MEMPENDING;
          default:          return FET_NORMAL;
        endcase
      FET_MEMBUSY: return c.memory_busy ? FET_MEMBUSY : FET_MEMPENDING;
      FET_MEMPENDING:
        case ({c.data_valid, c.iunit_enable})
          2'b10:   return FET_DISABLED;
          2'b11:   return FET_NORMAL;
          default: return FET_MEMPENDING;
        endcase
      FET_DISABLED: return not_spd ? FET_NORMAL : FET_DISABLED;
      default: return FET_RESET;
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fet_state_e exp_state;
    ctl = '0;
    ctl.reset = 1;
    pf_idle = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    chk(state == FET_RESET, 1, "power-on state");
    rst_n = 1;
    exp_state = FET_RESET;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      chk(state == exp_state, 1, "state");
      visits[int'(state)]++;
      ctl.reset             = ($urandom_range(15) == 0);
      ctl.iunit_enable      = ($urandom_range(7) != 0);
      ctl.prefetch_enable   = $urandom_range(1);
      ctl.global_suspension = ($urandom_range(3) == 0);
      ctl.memory_busy       = ($urandom_range(2) == 0);
      ctl.data_valid        = $urandom_range(1);
      ctl.flush             = ($urandom_range(7) == 0);
      ctl.miss              = ($urandom_range(2) == 0);
      pf_idle               = $urandom_range(1);
      #1;
      // Ins_bus source
      if (state == FET_RESET)
        chk(fo.readpc_to_insbus, 1, "READ_PC in FET_reset");
      else if (ctl.reset)
        chk(fo.trapcall_to_insbus, 1, "TRAP_CALL when Reset arrives");
      else if (state == FET_MEMBUSY || state == FET_MEMPENDING)
        chk(fo.miss_to_insbus, 1, "MISS while waiting for memory");
      else if (state == FET_NORMAL)
        chk(fo.miss_to_insbus, !ctl.global_suspension && (ctl.miss || ctl.flush), "MISS in FET_normal");
      else if (state == FET_DISABLED)
        chk(fo.miss_to_insbus, ctl.global_suspension, "MISS in FET_disabled");
      chk(fo.instruction_to_insbus,
          !ctl.reset && ((state == FET_NORMAL && (ctl.global_suspension || !(ctl.miss || ctl.flush)))
                         || (state == FET_DISABLED && !ctl.global_suspension)), "instruction to Ins_bus");
      // fetch initiation
      chk(fo.fetch_request, !ctl.reset && !ctl.memory_busy &&
          ((state == FET_NORMAL && !ctl.global_suspension && (ctl.miss || ctl.flush)) || state == FET_MEMBUSY),
          "Fetch_Request");
      chk(fo.write_fetch, !ctl.reset && ctl.data_valid && state == FET_MEMPENDING, "Write_Fetch");
      chk(fo.read_memlatch, !ctl.reset && ctl.data_valid && state == FET_MEMPENDING && !ctl.iunit_enable, "Read_MemLatch");
      if (state == FET_RESET) chk(fo.starting_prefetch, 0, "no Starting_Prefetch in FET_reset");
      if (state == FET_NORMAL && !ctl.reset && !ctl.global_suspension && !ctl.miss && !ctl.flush)
        chk(fo.starting_prefetch, 0, "no Starting_Prefetch on a hit");
      if (state == FET_MEMPENDING && !ctl.reset)
        chk(fo.starting_prefetch, !ctl.data_valid || pf_idle, "Starting_Prefetch while memory pending");
      exp_state = model_next(state, ctl);
    end
    for (int i = 0; i < 5; i++) chk(visits[i] > 0, 1, $sformatf("state %0d visited", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
