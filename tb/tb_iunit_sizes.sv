// tb_iunit_sizes: capacity test of the instruction unit at three array
// sizes, 64, 128 (the default) and 256 instructions, direct mapped with
// 8 one-instruction sub-blocks per block (NUM_BLOCKS = 8, 16, 32).
//
// For each size it runs loops of contiguous code of 60, 120 and 250
// instructions (iunit_loop_run, four passes each) with data references and
// external-cache busy cycles mixed in. Every delivered instruction is
// checked against memory. The capacity rule is checked on the last pass:
//   - a loop that fits (LOOP_LEN <= 8 * NUM_BLOCKS) runs from the cache
//     with no demand fetch at all and one instruction per cycle; the data
//     references cost it nothing, since hits do not use the external cache;
//   - a loop that does not fit replaces its own blocks and keeps fetching,
//     at least one fetch per block of the loop beyond the capacity.
// The expected counts come from the loop length and the array size alone.
module tb_iunit_sizes;
  logic clk = 0;
  always #5 clk = !clk;

  localparam int NCFG = 9;
  localparam int SIZES [3] = '{8, 16, 32};
  localparam int LOOPS [3] = '{60, 120, 250};

  logic done [NCFG];
  int   c [NCFG], f [NCFG], lf [NCFG], lc [NCFG];

  for (genvar s = 0; s < 3; s++) begin : g_size
    for (genvar l = 0; l < 3; l++) begin : g_loop
      iunit_loop_run #(.NUM_BLOCKS(SIZES[s]), .LOOP_LEN(LOOPS[l]), .PASSES(4)) run (
        .clk,
        .done              (done[3*s+l]),
        .checks            (c[3*s+l]),
        .failures          (f[3*s+l]),
        .last_pass_fetches (lf[3*s+l]),
        .last_pass_cycles  (lc[3*s+l])
      );
    end
  end

  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
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
    int cap, len, n_fit, n_thrash;
    n_fit = 0; n_thrash = 0;
    #1;
    for (int k = 0; k < NCFG; k++) wait (done[k]);
    for (int s = 0; s < 3; s++) begin
      for (int l = 0; l < 3; l++) begin
        int k;
        k   = 3 * s + l;
        cap = 8 * SIZES[s];
        len = LOOPS[l];
        checks   += c[k];
        failures += f[k];
        $display("instructions=%0d loop=%0d: last pass %0d fetches, %0d cycles",
                 cap, len, lf[k], lc[k]);
        if (len <= cap) begin
          n_fit++;
          chk(lf[k] == 0, $sformatf("loop of %0d fits %0d: no fetch", len, cap));
          chk(lc[k] == len, $sformatf("loop of %0d fits %0d: one instruction per cycle", len, cap));
        end else begin
          n_thrash++;
          // Blocks of the loop that share a cache block with another one.
          chk(lf[k] >= (len - cap + 7) / 8,
              $sformatf("loop of %0d exceeds %0d: keeps fetching", len, cap));
          chk(lc[k] > len, $sformatf("loop of %0d exceeds %0d: misses cost cycles", len, cap));
        end
      end
    end
    chk(n_fit > 0 && n_thrash > 0, "both fitting and non-fitting loops were run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
