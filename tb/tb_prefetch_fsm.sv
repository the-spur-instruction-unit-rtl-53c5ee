// tb_prefetch_fsm: self-checking test of the prefetch controller.
// Random control inputs every cycle; a reference model written as the case
// table of the prefetch PLA predicts the next state. Also checked: a
// prefetch is requested exactly when the machine is in PF_waiting or
// PF_prefetch with neither Starting_Prefetch, Memory_Busy, Flush nor Reset;
// the Write_Instruction equation; the flush outputs. Every state must be
// visited.
module tb_prefetch_fsm;
  import iu_pkg::*;
  logic clk = 0, rst_n = 0;
  iu_ctl_t ctl;
  logic starting_prefetch, write_fetch, fetch_request;
  pf_state_e state;
  pf_out_t po;
  int checks = 0, failures = 0;
  int visits [5];

  prefetch_fsm dut (.*);

  always #5 clk = !clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b (state %s)", what, $time, got, exp, state.name());
    end
  endtask

  function automatic pf_state_e model_next(input pf_state_e s, input iu_ctl_t c, input logic spf);
    if (c.reset) return PF_RESET;
    case (s)
      PF_RESET:
        casez ({c.reset, c.iunit_enable, c.prefetch_enable})
          3'b011:  return PF_IDLE;
          default: return PF_DISABLED;
        endcase
      PF_IDLE:
        casez ({c.flush, spf})
          2'b01:   return PF_WAITING;
          default: return PF_IDLE;
        endcase
      PF_DISABLED: return PF_DISABLED;
      PF_WAITING, PF_PREFETCH:
        casez ({c.flush, spf, c.memory_busy})
          3'b1??:         return PF_IDLE;
          3'b01?, 3'b001: return PF_WAITING;
          default:        return PF_PREFETCH;
        endcase
      default: return PF_RESET;
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
    pf_state_e exp_state;
    logic active;
    ctl = '0; ctl.reset = 1;
    starting_prefetch = 0; write_fetch = 0; fetch_request = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    chk(state == PF_RESET, 1, "power-on state");
    rst_n = 1;
    exp_state = PF_RESET;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      chk(state == exp_state, 1, "state");
      visits[int'(state)]++;
      ctl.reset           = ($urandom_range(31) == 0);
      ctl.iunit_enable    = ($urandom_range(5) != 0);
      ctl.prefetch_enable = ($urandom_range(5) != 0);
      ctl.memory_busy     = ($urandom_range(2) == 0);
      ctl.data_valid      = $urandom_range(1);
      ctl.flush           = ($urandom_range(15) == 0);
      ctl.global_suspension = $urandom_range(1);
      ctl.miss            = $urandom_range(1);
      starting_prefetch   = ($urandom_range(2) == 0);
      write_fetch         = ($urandom_range(7) == 0);
      fetch_request       = !ctl.reset && starting_prefetch && ($urandom_range(1) == 1);
      #1;
      active = (state == PF_WAITING || state == PF_PREFETCH);
      chk(po.prefetch_request, active && !ctl.reset && !ctl.flush && !starting_prefetch && !ctl.memory_busy,
          "Prefetch_Request");
      chk(po.incrementedpc_to_addbus, po.prefetch_request, "IncrementedPC_To_AddBus");
      chk(po.load_referencepc, po.prefetch_request || fetch_request, "Load_ReferencePC");
      chk(po.write_instruction, (!ctl.reset && !ctl.flush && ctl.data_valid && state == PF_PREFETCH) || write_fetch,
          "Write_Instruction");
      chk(po.invalidate_tag, ctl.flush && !ctl.reset, "Invalidate_Tag");
      exp_state = model_next(state, ctl, starting_prefetch);
    end
    for (int i = 0; i < 5; i++) chk(visits[i] > 0, 1, $sformatf("state %0d visited", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
