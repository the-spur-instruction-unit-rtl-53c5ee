// tb_iu_input_logic: self-checking test of the IUnit control input logic.
// Drives random interface signals every cycle and checks each derived
// control input: the combinational ones in the same cycle, the three latched
// ones (IUnit_Enable, Prefetch_Enable, Global_Suspension) one cycle later,
// and Miss forced while the IUnit is disabled.
module tb_iu_input_logic;
  import iu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reset_iunit, iunit_kpsw_set, prefetch_kpsw_set, pipeline_not_suspended;
  logic load_opcode, store_opcode, lowtoup_opcode, invalidate_opcode, invalidate_trap;
  logic cache_busy, cache_data_valid, block_miss, instruction_miss;
  iu_ctl_t ctl;
  int checks = 0, failures = 0;

  iu_input_logic dut (.*);

  always #5 clk = !clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_en, prev_pf, prev_ns;
    {reset_iunit, iunit_kpsw_set, prefetch_kpsw_set, pipeline_not_suspended, load_opcode,
     store_opcode, lowtoup_opcode, invalidate_opcode, invalidate_trap, cache_busy,
     cache_data_valid, block_miss, instruction_miss} = '0;
    pipeline_not_suspended = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    chk(ctl.iunit_enable, 0, "power-on enable");
    chk(ctl.global_suspension, 0, "power-on suspension");
    rst_n = 1;
    prev_en = 0; prev_pf = 0; prev_ns = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      {reset_iunit, iunit_kpsw_set, prefetch_kpsw_set, pipeline_not_suspended, load_opcode,
       store_opcode, lowtoup_opcode, invalidate_opcode, invalidate_trap, cache_busy,
       cache_data_valid, block_miss, instruction_miss} = 13'($urandom);
      // make the opcodes rarer so Memory_Busy depends on the cache terms too
      if ($urandom_range(3) != 0) {load_opcode, store_opcode, lowtoup_opcode} = '0;
      #1;
      chk(ctl.reset, reset_iunit, "reset");
      chk(ctl.iunit_enable, prev_en, "iunit_enable latched");
      chk(ctl.prefetch_enable, prev_pf, "prefetch_enable latched");
      chk(ctl.global_suspension, !prev_ns, "global_suspension latched");
      chk(ctl.memory_busy, (cache_busy & !cache_data_valid) | load_opcode | store_opcode | lowtoup_opcode, "memory_busy");
      chk(ctl.data_valid, cache_data_valid, "data_valid");
      chk(ctl.flush, invalidate_opcode | invalidate_trap, "flush");
      chk(ctl.miss, block_miss | instruction_miss | !prev_en, "miss");
      prev_en = iunit_kpsw_set; prev_pf = prefetch_kpsw_set; prev_ns = pipeline_not_suspended;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
