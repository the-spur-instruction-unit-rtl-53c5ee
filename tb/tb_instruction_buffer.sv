// tb_instruction_buffer: self-checking test of the instruction buffer.
// Random reads, writes (address taken from Add_bus one request earlier),
// block invalidations, InsReg loads and Ins_bus source selections, checked
// every cycle against a model of the 128-entry array, the sub-block valid
// bits, the IBRead/IBWrite registers and InsReg. Ins_bus must carry the
// InsReg value or the fixed MISS / TRAP_CALL / READ_PC codes.
module tb_instruction_buffer;
  import iu_pkg::*;
  localparam int ADDR_W = 30, INS_W = 32, DATA_W = 40, N = 128;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] pc_bus, add_bus;
  logic [DATA_W-1:0] data_bus;
  logic load_ibread, load_ibwrite, write_instruction, invalidate_block;
  logic read_instruction, read_memlatch;
  logic instruction_to_insbus, miss_to_insbus, trapcall_to_insbus, readpc_to_insbus;
  logic instruction_miss;
  logic [INS_W-1:0] ins_bus;
  int checks = 0, failures = 0, hits = 0;

  instruction_buffer dut (.*);

  always #5 clk = !clk;

  task automatic chk(input logic [INS_W-1:0] got, input logic [INS_W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [INS_W-1:0] m_mem [N];
    logic m_known [N];
    logic m_valid [N];
    logic [6:0] m_rd, m_wr, rd;
    logic [INS_W-1:0] m_insreg, cur_insreg;
    logic insreg_known, cur_known;
    int sel;
    for (int i = 0; i < N; i++) begin m_valid[i] = 0; m_known[i] = 0; end
    {load_ibread, load_ibwrite, write_instruction, invalidate_block, read_instruction,
     read_memlatch, miss_to_insbus, trapcall_to_insbus, readpc_to_insbus} = '0;
    instruction_to_insbus = 1;
    pc_bus = '0; add_bus = '0; data_bus = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_rd = '0; m_wr = '0; m_insreg = '0; insreg_known = 1;
    for (int n = 0; n < 30000; n++) begin
      @(negedge clk);
      pc_bus   = ADDR_W'($urandom);
      add_bus  = ADDR_W'($urandom);
      data_bus = {8'($urandom), 32'($urandom)};
      load_ibread       = $urandom_range(1);
      load_ibwrite      = $urandom_range(1);
      write_instruction = ($urandom_range(2) != 0);
      invalidate_block  = ($urandom_range(30) == 0);
      read_instruction  = $urandom_range(1);
      read_memlatch     = ($urandom_range(9) == 0);
      sel = $urandom_range(5);
      instruction_to_insbus = (sel <= 2);
      miss_to_insbus        = (sel == 3);
      trapcall_to_insbus    = (sel == 4);
      readpc_to_insbus      = (sel == 5);
      #1;
      rd = load_ibread ? pc_bus[6:0] : m_rd;
      chk(INS_W'(instruction_miss), INS_W'(!m_valid[rd]), "Instruction_Miss");
      if (m_valid[rd]) hits++;
      cur_insreg = read_instruction ? m_mem[rd] : m_insreg;
      cur_known  = read_instruction ? m_known[rd] : insreg_known;
      case (sel)
        0, 1, 2: if (cur_known) chk(ins_bus, cur_insreg, "Ins_bus = InsReg");
        3: chk(ins_bus, INS_MISS, "Ins_bus = MISS");
        4: chk(ins_bus, INS_TRAP_CALL, "Ins_bus = TRAP_CALL");
        default: chk(ins_bus, INS_READ_PC, "Ins_bus = READ_PC");
      endcase
      @(posedge clk);
      if (write_instruction) begin
        m_mem[m_wr] = data_bus[31:0]; m_known[m_wr] = 1; m_valid[m_wr] = 1;
      end
      if (invalidate_block) for (int s = 0; s < 8; s++) m_valid[{rd[6:3], 3'(s)}] = 0;
      if (read_memlatch) begin m_insreg = data_bus[31:0]; insreg_known = 1; end
      else begin m_insreg = cur_insreg; insreg_known = cur_known; end
      if (load_ibwrite) m_wr = add_bus[6:0];
      m_rd = rd;
    end
    chk(INS_W'(hits > 1000), 1, "enough valid reads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
