// tb_iunit: end-to-end test of the instruction unit at its default size
// (16 blocks x 8 one-instruction sub-blocks, 30-bit addresses).
//
// The IUnit is wired to a behavioural external cache (ecache_model) whose
// memory holds a known function of each address, and to a small model of
// the execution unit written here. The execution unit presents a PC every
// cycle and advances it (sequentially, with occasional jumps) only when it
// receives a real instruction outside a global suspension; that
// instruction must be the memory word of the PC.
//
// Part 1 replays the reference operation sequences cycle by cycle: the
// ideal miss (two-cycle penalty, fetch then prefetches of the next
// addresses), invalidate, reset followed by a hit, trap (reset followed by
// a miss), global suspension, a miss while the external cache is busy, and
// the IUnit running disabled.
// Part 2 runs a long random mix of sequential code, jumps, loads and stores,
// suspensions, invalidations, resets and cache busy cycles, checking every
// delivered instruction and every internally generated one. Each mechanism
// is counted and must have happened at least once.
module tb_iunit;
  import iu_pkg::*;
  localparam int ADDR_W = 30, INS_W = 32, DATA_W = 40;

  logic clk = 0, rst_n = 0;
  logic reset_iunit, iunit_kpsw_set, prefetch_kpsw_set, pipeline_not_suspended;
  logic load_opcode, store_opcode, lowtoup_opcode, invalidate_opcode, invalidate_trap;
  logic [ADDR_W-1:0] pc_bus, add_bus;
  logic cache_busy, cache_data_valid;
  logic [DATA_W-1:0] data_bus;
  logic [INS_W-1:0] ins_bus;
  logic fetch_request, prefetch_request, add_bus_drive;
  logic [2:0] fet_state, pf_state;

  int busy_pct = 0, idle_busy_pct = 0, protocol_errors, iu_requests;

  int checks = 0, failures = 0;

  iunit dut (.*);

  ecache_model #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) ecache (
    .clk, .rst_n, .iu_req(add_bus_drive), .iu_addr(add_bus), .eu_load(load_opcode),
    .busy_pct, .idle_busy_pct, .cache_busy, .cache_data_valid, .data_bus,
    .protocol_errors, .iu_requests);

  always #5 clk = !clk;

  function automatic logic [31:0] mem_word(input logic [ADDR_W-1:0] a);
    return {2'b00, 30'(a)} ^ 32'h1357_9BDF;
  endfunction

  function automatic logic is_internal(input logic [INS_W-1:0] i);
    return i == INS_MISS || i == INS_TRAP_CALL || i == INS_READ_PC;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: fet=%0d pf=%0d pc=%h ins=%h add=%h", what, $time,
               fet_state, pf_state, pc_bus, ins_bus, add_bus);
    end
  endtask

  // ---------------------------------------------------------------------
  // Mechanism counters
  int n_hit, n_fetch, n_membusy, n_prefetch, n_pf_write_used, n_pf_blocked_by_data;
  int n_pf_wrap, n_gsusp, n_partial, n_reset, n_flush, n_disabled, n_trapcall, n_readpc;
  int n_delivered, n_cycles;

  logic [6:0] prefetched [$];

  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (fetch_request) n_fetch++;
    if (prefetch_request) begin
      n_prefetch++;
      if (add_bus[2:0] == 3'd0) n_pf_wrap++;
    end
    if (fet_state == 3'(FET_MEMBUSY)) n_membusy++;
    if (fet_state == 3'(FET_DISABLED)) n_disabled++;
    if (ins_bus == INS_MISS) n_partial++;
    if (ins_bus == INS_TRAP_CALL) n_trapcall++;
    if (ins_bus == INS_READ_PC) n_readpc++;
    if (dut.u_input.ctl.global_suspension) n_gsusp++;
    if ((pf_state == 3'(PF_WAITING) || pf_state == 3'(PF_PREFETCH)) &&
        (load_opcode || store_opcode || lowtoup_opcode) && !fetch_request)
      n_pf_blocked_by_data++;
    // The IUnit may only use the external cache when it is free.
    if (add_bus_drive) begin
      checks++;
      if ((cache_busy && !cache_data_valid) || load_opcode || store_opcode || lowtoup_opcode) begin
        failures++;
        $display("FAIL request while memory busy at %0t", $time);
      end
    end
  end

  // ---------------------------------------------------------------------
  // Drive helpers: inputs change at the falling edge, outputs are sampled
  // one time step later.
  task automatic idle_inputs();
    reset_iunit = 0; load_opcode = 0; store_opcode = 0; lowtoup_opcode = 0;
    invalidate_opcode = 0; invalidate_trap = 0; pipeline_not_suspended = 1;
  endtask

  task automatic cycle_begin();
    @(negedge clk);
    idle_inputs();
  endtask

  task automatic settle(); #1; endtask

  // Present pc until a real instruction is delivered; return cycles taken.
  task automatic run_to_hit(input logic [ADDR_W-1:0] pc, output int cyc);
    cyc = 0;
    forever begin
      cycle_begin();
      pc_bus = pc;
      settle();
      cyc++;
      if (!is_internal(ins_bus) && (fet_state == 3'(FET_NORMAL) || fet_state == 3'(FET_DISABLED))) begin
        chk(ins_bus == mem_word(pc), "delivered instruction matches memory");
        n_delivered++;
        break;
      end
      if (cyc > 50) begin chk(0, "instruction never delivered"); break; end
    end
  endtask

  task automatic do_reset(input int cycles);
    for (int k = 0; k < cycles; k++) begin
      cycle_begin();
      reset_iunit = 1;
      settle();
      if (k == 0 && fet_state != 3'(FET_RESET)) chk(ins_bus == INS_TRAP_CALL, "TRAP_CALL on reset");
      else chk(ins_bus == INS_READ_PC, "READ_PC while in FET_reset");
      chk(!fetch_request && !prefetch_request, "no requests during reset");
    end
    n_reset++;
    cycle_begin();
    settle();
    chk(fet_state == 3'(FET_RESET) && ins_bus == INS_READ_PC, "READ_PC in the cycle reset ends");
  endtask

  // ---------------------------------------------------------------------
  initial begin
    #50000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [ADDR_W-1:0] P, Q;
    idle_inputs();
    iunit_kpsw_set = 1; prefetch_kpsw_set = 1;
    pc_bus = '0;
    reset_iunit = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    do_reset(2);

    // ---------------- Ideal instruction miss ------------------------------
    P = 30'h0012_3450;  // sub-block 0 of a block
    cycle_begin(); pc_bus = P; settle();
    chk(fet_state == 3'(FET_NORMAL), "ideal miss c1: FET_normal");
    chk(ins_bus == INS_MISS, "ideal miss c1: MISS on Ins_bus");
    chk(fetch_request && add_bus_drive && add_bus == P, "ideal miss c1: fetch of P");
    cycle_begin(); pc_bus = 30'h3FFF_FFFF; settle();   // PC_bus ignored
    chk(fet_state == 3'(FET_MEMPENDING) && pf_state == 3'(PF_WAITING), "ideal miss c2: memPending/waiting");
    chk(ins_bus == INS_MISS, "ideal miss c2: MISS on Ins_bus");
    chk(cache_data_valid, "ideal miss c2: data returned");
    chk(prefetch_request && add_bus == P + 1, "ideal miss c2: prefetch of P+1");
    cycle_begin(); pc_bus = P; settle();
    chk(fet_state == 3'(FET_NORMAL) && pf_state == 3'(PF_PREFETCH), "ideal miss c3: normal/prefetch");
    chk(ins_bus == mem_word(P), "ideal miss c3: hit delivers P");
    chk(prefetch_request && add_bus == P + 2, "ideal miss c3: prefetch of P+2");
    n_delivered++;
    // The prefetched sub-blocks now hit without any fetch.
    for (int k = 1; k <= 3; k++) begin
      cycle_begin(); pc_bus = P + k; settle();
      chk(ins_bus == mem_word(P + k), "prefetched sub-block hits");
      chk(!fetch_request, "no fetch for a prefetched sub-block");
      if (ins_bus == mem_word(P + k)) n_pf_write_used++;
    end
    // Let the prefetcher go round the block: it wraps to sub-block 0.
    repeat (8) begin cycle_begin(); pc_bus = P + 3; settle(); end
    for (int k = 0; k < 8; k++) begin
      cycle_begin(); pc_bus = P + k; settle();
      chk(ins_bus == mem_word(P + k), "whole block present after prefetching");
    end

    // ---------------- Invalidate -----------------------------------------
    cycle_begin(); pc_bus = P; invalidate_opcode = 1; settle();
    chk(ins_bus == INS_MISS, "invalidate c1: MISS");
    chk(fetch_request && add_bus == P, "invalidate c1: fetch starts in the same cycle");
    n_flush++;
    cycle_begin(); pc_bus = P; settle();
    chk(fet_state == 3'(FET_MEMPENDING) && ins_bus == INS_MISS, "invalidate c2: memPending, MISS");
    cycle_begin(); pc_bus = P; settle();
    chk(ins_bus == mem_word(P), "invalidate c3: hit");
    chk(pf_state == 3'(PF_WAITING) && prefetch_request && add_bus == P + 1,
        "invalidate c3: prefetching restarts with P+1");
    // Other blocks were invalidated too.
    Q = 30'h0012_3460;  // next block, filled earlier? no: check a sub-block of P's block not refetched
    cycle_begin(); pc_bus = P + 5; settle();
    // P+5 may have been prefetched again since the invalidate; either a hit
    // with the right word or a miss is correct, never a wrong word.
    chk(is_internal(ins_bus) || ins_bus == mem_word(P + 5), "after invalidate: no stale word");
    run_to_hit(P + 5, cyc);

    // ---------------- Reset followed by a hit ------------------------------
    do_reset(1);
    cycle_begin(); pc_bus = P; settle();
    chk(fet_state == 3'(FET_NORMAL) && pf_state == 3'(PF_IDLE), "reset+hit: normal/idle");
    chk(ins_bus == mem_word(P), "reset+hit: cached instruction survives reset");
    chk(!prefetch_request, "reset+hit: prefetcher idle");
    n_delivered++;
    cycle_begin(); pc_bus = P + 1; settle();
    chk(!prefetch_request && pf_state == 3'(PF_IDLE), "prefetcher stays idle on hits");

    // ---------------- Trap: reset followed by a miss ---------------------
    do_reset(1);
    Q = 30'h0000_0800;
    cycle_begin(); pc_bus = Q; settle();
    chk(ins_bus == INS_MISS && fetch_request && add_bus == Q, "trap: miss after READ_PC");
    cycle_begin(); pc_bus = Q; settle();
    chk(ins_bus == INS_MISS, "trap c4: MISS");
    cycle_begin(); pc_bus = Q; settle();
    chk(ins_bus == mem_word(Q), "trap c5: hit");
    n_delivered++;

    // ---------------- Global suspension ---------------------------------
    cycle_begin(); pc_bus = Q + 1; settle();
    run_to_hit(Q + 1, cyc);
    // A hit, with the suspension signalled for the next cycle.
    cycle_begin(); pc_bus = Q + 2; pipeline_not_suspended = 0; settle();
    chk(ins_bus == mem_word(Q + 2), "suspension c1: hit");
    for (int k = 0; k < 3; k++) begin
      cycle_begin(); pc_bus = Q + 2; pipeline_not_suspended = (k == 2); settle();
      chk(ins_bus == mem_word(Q + 2), "suspension: last instruction repeated");
      chk(fet_state == 3'(FET_NORMAL), "suspension: stays FET_normal");
    end
    cycle_begin(); pc_bus = Q + 3; settle();
    chk(ins_bus == mem_word(Q + 3) || ins_bus == INS_MISS, "after suspension: normal operation");
    run_to_hit(Q + 3, cyc);

    // ---------------- Miss while the external cache is busy --------------
    Q = 30'h0000_1000;
    begin
      int waited;
      waited = 0;
      cycle_begin(); pc_bus = Q; load_opcode = 1; settle();   // data reference
      chk(ins_bus == INS_MISS && !fetch_request, "busy: miss but no fetch during a load");
      forever begin
        cycle_begin(); pc_bus = Q; settle();
        waited++;
        if (fetch_request) break;
        chk(fet_state == 3'(FET_MEMBUSY) && ins_bus == INS_MISS, "busy: FET_memBusy sends MISS");
        if (waited > 10) begin chk(0, "busy: fetch never started"); break; end
      end
      chk(fet_state == 3'(FET_MEMBUSY) && add_bus == Q, "busy: fetch from FET_memBusy");
      run_to_hit(Q, cyc);
      chk(cyc == 2, "busy: two cycles from fetch to hit");
    end

    // ---------------- IUnit disabled --------------------------------------
    iunit_kpsw_set = 0;
    cycle_begin(); pc_bus = Q + 1; settle();   // enable bit takes effect next cycle
    run_to_hit(Q + 1, cyc);
    for (int k = 0; k < 4; k++) begin
      run_to_hit(P + k, cyc);                  // cached, yet fetched from memory
      chk(cyc == 3, "disabled: every instruction takes three cycles");
    end
    iunit_kpsw_set = 1;
    cycle_begin(); pc_bus = P; settle();
    run_to_hit(P, cyc);
    do_reset(1);                               // re-arm the prefetcher

    // ---------------- Random operation ----------------------------------
    busy_pct = 20; idle_busy_pct = 5;
    begin
      logic [ADDR_W-1:0] pc;
      logic susp_next, susp_now, pending_data_ref;
      int run_len;
      pc = 30'h0000_2000;
      susp_now = 0;
      run_len = 0;
      for (int n = 0; n < 60000; n++) begin
        cycle_begin();
        pc_bus = pc;
        // occasional events
        if ($urandom_range(999) == 0) begin
          do_reset($urandom_range(3, 1));
          pc = 30'h0000_2000 + 30'($urandom_range(511));
          susp_now = 0;
          continue;
        end
        if (!cache_busy && $urandom_range(9) == 0) begin
          case ($urandom_range(2))
            0: load_opcode = 1;
            1: store_opcode = 1;
            default: lowtoup_opcode = 1;
          endcase
        end
        if ($urandom_range(399) == 0) begin
          if ($urandom_range(1)) invalidate_opcode = 1; else invalidate_trap = 1;
          n_flush++;
        end
        susp_next = ($urandom_range(19) == 0) || (susp_now && $urandom_range(1));
        pipeline_not_suspended = !susp_next;
        settle();
        if (fet_state == 3'(FET_RESET)) chk(ins_bus == INS_READ_PC, "random: READ_PC in FET_reset");
        if (!is_internal(ins_bus)) begin
          if (susp_now) begin
            // repeated instruction during a suspension: not consumed
          end else begin
            chk(ins_bus == mem_word(pc), "random: delivered instruction matches memory");
            n_delivered++;
            if (fet_state == 3'(FET_NORMAL)) n_hit++;
            run_len++;
            if ($urandom_range(9) == 0) pc = 30'h0000_2000 + 30'($urandom_range(511));
            else pc = pc + 1;
          end
        end
        susp_now = susp_next;
      end
    end

    chk(protocol_errors == 0, "external cache protocol respected");
    // every mechanism happened
    chk(n_hit > 0, "hits happened");
    chk(n_fetch > 0, "fetches happened");
    chk(n_membusy > 0, "FET_memBusy happened");
    chk(n_prefetch > 0, "prefetches happened");
    chk(n_pf_write_used > 0, "prefetched instructions were used");
    chk(n_pf_blocked_by_data > 0, "prefetch blocked by a data reference");
    chk(n_pf_wrap > 0, "prefetcher wrapped around a block");
    chk(n_gsusp > 0, "global suspension happened");
    chk(n_partial > 0, "partial suspension (MISS) happened");
    chk(n_reset > 0 && n_trapcall > 0 && n_readpc > 0, "reset sequence happened");
    chk(n_flush > 0, "invalidation happened");
    chk(n_disabled > 0, "FET_disabled happened");
    $display("cycles=%0d delivered=%0d hits=%0d fetches=%0d prefetches=%0d memBusy=%0d wraps=%0d",
             n_cycles, n_delivered, n_hit, n_fetch, n_prefetch, n_membusy, n_pf_wrap);
    $display("suspended=%0d MISS=%0d resets=%0d flushes=%0d disabled=%0d pf_blocked=%0d",
             n_gsusp, n_partial, n_reset, n_flush, n_disabled, n_pf_blocked_by_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
