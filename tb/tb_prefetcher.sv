// tb_prefetcher: self-checking test of the prefetch address generator.
// Loads random addresses into ReferencePC and checks that IncrementedPC is
// the same address with its 3 low bits advanced by one modulo 8 (the upper
// 27 bits unchanged), that ReferencePC holds when not loaded, and that eight
// successive prefetches walk once around the whole block.
module tb_prefetcher;
  localparam int ADDR_W = 30;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] add_bus, reference_pc, incremented_pc;
  logic load;
  int checks = 0, failures = 0;

  prefetcher #(.ADDR_W(ADDR_W), .SUBBLOCKS(8)) dut (
    .clk, .rst_n, .add_bus, .load_referencepc(load), .reference_pc, .incremented_pc);

  always #5 clk = !clk;

  function automatic logic [ADDR_W-1:0] expect_inc(input logic [ADDR_W-1:0] a);
    logic [2:0] low;
    low = (a[2:0] == 3'd7) ? 3'd0 : a[2:0] + 3'd1;
    return {a[ADDR_W-1:3], low};
  endfunction

  task automatic chk(input logic [ADDR_W-1:0] got, input logic [ADDR_W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    logic [ADDR_W-1:0] a, start;
    load = 0; add_bus = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      a = ADDR_W'($urandom);
      @(negedge clk); add_bus = a; load = 1;
      @(negedge clk); load = 0; add_bus = ~a;
      chk(reference_pc, a, "load");
      chk(incremented_pc, expect_inc(a), "increment");
      @(negedge clk);
      chk(reference_pc, a, "hold");
    end
    // Walk a block: feed IncrementedPC back as the next prefetch address.
    start = ADDR_W'($urandom);
    @(negedge clk); add_bus = start; load = 1;
    for (int k = 1; k <= 8; k++) begin
      @(negedge clk); add_bus = incremented_pc;
      chk(reference_pc, {start[ADDR_W-1:3], 3'(start[2:0] + 3'(k - 1))}, "walk");
    end
    @(negedge clk); load = 0;
    chk(reference_pc, start, "walk wraps to start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
