// tb_tag_compare: self-checking test of tag storage and block hit detection.
// Random lookups (tags drawn from a small pool so hits occur), tag writes
// and whole-array invalidations, checked every cycle against a model of the
// 16-entry tag array and its block valid bits: FetchPC follows PC_bus when
// loaded and holds otherwise, and Block_Miss is true exactly when the block
// is invalid, its tag differs, or an invalidation is in progress.
module tb_tag_compare;
  localparam int ADDR_W = 30, NB = 16, SB = 8, TAG_W = 23;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] pc_bus, fetch_pc;
  logic load_fetchpc, write_tag, invalidate_tag, bypass_tag_decoder, block_miss;
  int checks = 0, failures = 0, hits = 0;

  tag_compare #(.ADDR_W(ADDR_W), .NUM_BLOCKS(NB), .SUBBLOCKS(SB)) dut (.*);

  always #5 clk = !clk;

  task automatic chk(input logic [ADDR_W-1:0] got, input logic [ADDR_W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TAG_W-1:0] m_tag [NB];
    logic m_valid [NB];
    logic [TAG_W-1:0] pool [4];
    logic [ADDR_W-1:0] m_fpc, cur;
    logic exp_miss;
    int b;
    for (int i = 0; i < 4; i++) pool[i] = TAG_W'($urandom);
    for (int i = 0; i < NB; i++) m_valid[i] = 0;
    {load_fetchpc, write_tag, invalidate_tag, bypass_tag_decoder} = '0;
    pc_bus = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_fpc = '0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      pc_bus = {pool[$urandom_range(3)], 4'($urandom), 3'($urandom)};
      load_fetchpc = ($urandom_range(3) != 0);
      write_tag = ($urandom_range(3) == 0);
      invalidate_tag = ($urandom_range(40) == 0);
      bypass_tag_decoder = invalidate_tag;
      #1;
      cur = load_fetchpc ? pc_bus : m_fpc;
      chk(fetch_pc, cur, "FetchPC");
      b = int'(cur[6:3]);
      exp_miss = !(m_valid[b] && m_tag[b] == cur[29:7]) || invalidate_tag;
      chk(ADDR_W'(block_miss), ADDR_W'(exp_miss), "Block_Miss");
      if (!exp_miss) hits++;
      @(posedge clk);
      if (invalidate_tag) for (int i = 0; i < NB; i++) m_valid[i] = 0;
      if (write_tag) begin m_tag[b] = cur[29:7]; m_valid[b] = 1; end
      m_fpc = cur;
    end
    chk(ADDR_W'(hits > 100), 1, "enough hits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
