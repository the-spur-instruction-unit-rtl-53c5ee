// ecache_model: behavioural model of the external cache as the instruction
// unit sees it (testbench only, not synthesizable).
//
// It accepts one request at a time: an IUnit fetch or prefetch (iu_req with
// its address) or an EUnit load. The answer comes back after one cycle, or
// later when busy cycles are injected (busy_pct percent of requests wait
// 1..3 extra cycles); while a request waits, cache_busy is true. With
// idle_busy_pct the cache also reports itself busy for a cycle without a
// request, standing for work on behalf of other bus masters. An IUnit
// request returns memory_word(address), a fixed function of the address,
// so the testbench can predict every instruction; a load returns random
// data. A request made while the cache is busy and has no data to give
// is a protocol error and is counted.
module ecache_model #(
  parameter int ADDR_W = 30,
  parameter int DATA_W = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              iu_req,
  input  logic [ADDR_W-1:0] iu_addr,
  input  logic              eu_load,
  input  int                busy_pct,
  input  int                idle_busy_pct,
  output logic              cache_busy,
  output logic              cache_data_valid,
  output logic [DATA_W-1:0] data_bus,
  output int                protocol_errors,
  output int                iu_requests
);

  // Instruction stored at a word address in the memory behind the cache.
  // The top bits never match the IUnit's internal instruction codes.
  function automatic logic [31:0] memory_word(input logic [ADDR_W-1:0] a);
    return {2'b00, 30'(a)} ^ 32'h1357_9BDF;
  endfunction

  logic              pending, pend_iu, idle_busy;
  logic [ADDR_W-1:0] pend_addr;
  int                delay;
  logic [31:0]       load_data;

  always_comb begin
    cache_data_valid = pending && (delay == 0);
    cache_busy       = (pending && (delay != 0)) || (!pending && idle_busy);
    data_bus         = '0;
    if (cache_data_valid)
      data_bus = pend_iu ? {8'hA5, memory_word(pend_addr)} : {8'h00, load_data};
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      pending <= 0; pend_iu <= 0; delay <= 0; idle_busy <= 0;
      protocol_errors <= 0; iu_requests <= 0; pend_addr <= '0; load_data <= '0;
    end else begin
      if ((iu_req || eu_load) && cache_busy && !cache_data_valid)
        protocol_errors <= protocol_errors + 1;
      if (iu_req && eu_load)
        protocol_errors <= protocol_errors + 1;
      if (cache_data_valid) pending <= 0;
      else if (pending && delay > 0) delay <= delay - 1;
      idle_busy <= 0;
      if (iu_req || eu_load) begin
        pending   <= 1;
        pend_iu   <= iu_req;
        pend_addr <= iu_addr;
        load_data <= $urandom;
        delay     <= ($urandom_range(99) < busy_pct) ? $urandom_range(3, 1) : 0;
        if (iu_req) iu_requests <= iu_requests + 1;
      end else if (!pending || cache_data_valid) begin
        idle_busy <= ($urandom_range(99) < idle_busy_pct);
      end
    end
  end

endmodule
