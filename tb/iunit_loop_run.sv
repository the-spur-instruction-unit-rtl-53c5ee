// iunit_loop_run: test harness that runs one straight-line loop through an
// instruction unit of a given size (testbench only).
//
// It instantiates iunit with NUM_BLOCKS blocks of 8 sub-blocks and an
// ecache_model, resets both, and then executes a loop of LOOP_LEN
// consecutive instructions starting at a block boundary, PASSES times. The
// execution-unit side presents the PC every cycle and advances it only when
// the real instruction arrives; every delivered word is checked against the
// memory function of the model. Data references (loads) are mixed in
// at random so prefetches and fetches are sometimes blocked, and the
// external cache injects busy cycles.
//
// It reports, through its outputs, the checks made and failed, the demand
// fetches issued during the last pass, and the cycles the last pass took.
// A direct-mapped cache holds a loop of contiguous code without conflict
// exactly when LOOP_LEN <= NUM_BLOCKS * 8; the calling testbench compares
// the last-pass fetch count with that rule. done rises when the run is over.
module iunit_loop_run #(
  parameter int NUM_BLOCKS = 16,
  parameter int LOOP_LEN   = 100,
  parameter int PASSES     = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   last_pass_fetches,
  output int   last_pass_cycles
);
  import iu_pkg::*;
  localparam int ADDR_W = 30, INS_W = 32, DATA_W = 40;
  localparam logic [ADDR_W-1:0] BASE = 30'h0004_0000;

  logic rst_n;
  logic reset_iunit, iunit_kpsw_set, prefetch_kpsw_set, pipeline_not_suspended;
  logic load_opcode, store_opcode, lowtoup_opcode, invalidate_opcode, invalidate_trap;
  logic [ADDR_W-1:0] pc_bus, add_bus;
  logic cache_busy, cache_data_valid;
  logic [DATA_W-1:0] data_bus;
  logic [INS_W-1:0] ins_bus;
  logic fetch_request, prefetch_request, add_bus_drive;
  logic [2:0] fet_state, pf_state;
  int busy_pct, idle_busy_pct, protocol_errors, iu_requests;

  iunit #(.NUM_BLOCKS(NUM_BLOCKS)) dut (.*);

  ecache_model #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) ecache (
    .clk, .rst_n, .iu_req(add_bus_drive), .iu_addr(add_bus), .eu_load(load_opcode),
    .busy_pct, .idle_busy_pct, .cache_busy, .cache_data_valid, .data_bus,
    .protocol_errors, .iu_requests);

  function automatic logic [31:0] mem_word(input logic [ADDR_W-1:0] a);
    return {2'b00, 30'(a)} ^ 32'h1357_9BDF;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [blocks=%0d loop=%0d] %s at %0t: pc=%h ins=%h",
               NUM_BLOCKS, LOOP_LEN, what, $time, pc_bus, ins_bus);
    end
  endtask

  initial begin
    int fetches, cycles, guard;
    done = 0; checks = 0; failures = 0;
    last_pass_fetches = 0; last_pass_cycles = 0;
    rst_n = 0; reset_iunit = 1;
    iunit_kpsw_set = 1; prefetch_kpsw_set = 1; pipeline_not_suspended = 1;
    load_opcode = 0; store_opcode = 0; lowtoup_opcode = 0;
    invalidate_opcode = 0; invalidate_trap = 0;
    busy_pct = 10; idle_busy_pct = 2;
    pc_bus = BASE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) reset_iunit = 0;

    for (int p = 0; p < PASSES; p++) begin
      fetches = 0; cycles = 0;
      for (int i = 0; i < LOOP_LEN; i++) begin
        guard = 0;
        forever begin
          @(negedge clk);
          pc_bus = BASE + ADDR_W'(i);
          load_opcode = !cache_busy && ($urandom_range(7) == 0);
          #1;
          cycles++;
          if (fetch_request) fetches++;
          if (add_bus_drive)
            chk(!load_opcode && !(cache_busy && !cache_data_valid),
                "no request while memory is busy");
          if (ins_bus != INS_MISS && ins_bus != INS_TRAP_CALL && ins_bus != INS_READ_PC) begin
            chk(ins_bus == mem_word(pc_bus), "delivered instruction matches memory");
            break;
          end
          if (++guard > 50) begin chk(0, "instruction never delivered"); break; end
        end
      end
      last_pass_fetches = fetches;
      last_pass_cycles  = cycles;
    end
    @(negedge clk) load_opcode = 0;
    chk(protocol_errors == 0, "external cache protocol respected");
    done = 1;
  end
endmodule
