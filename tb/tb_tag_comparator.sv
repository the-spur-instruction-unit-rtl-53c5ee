// tb_tag_comparator: self-checking test of the 23-bit tag comparator.
// Applies random tag pairs, equal pairs and pairs differing in exactly one
// bit position (every position is tried), and checks Match against the
// expected equality worked out bit by bit in the testbench.
module tb_tag_comparator;
  localparam int TAG_W = 23;
  logic [TAG_W-1:0] a, b;
  logic match;
  int checks = 0, failures = 0;

  tag_comparator #(.TAG_W(TAG_W)) dut (.stored_tag(a), .fetch_tag(b), .match);

  task automatic check(input logic exp);
    #1;
    checks++;
    if (match !== exp) begin
      failures++;
      $display("FAIL: a=%h b=%h match=%0b expected %0b", a, b, match, exp);
    end
  endtask

  function automatic logic same(input logic [TAG_W-1:0] x, input logic [TAG_W-1:0] y);
    for (int i = 0; i < TAG_W; i++) if (x[i] != y[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = TAG_W'($urandom); b = TAG_W'($urandom);
      check(same(a, b));
      b = a;
      check(1'b1);
      for (int i = 0; i < TAG_W; i++) begin
        b = a; b[i] = !a[i];
        check(1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
