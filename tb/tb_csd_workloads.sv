// tb_csd_workloads: runs the evaluated configurations on CSD-converted weights.
//
// Six configurations: weight width B = 8 and 16, pruning stride k = 8, 16
// and 32. k = 8 and 16 run on an instance of the default size (16
// activations per lane; k = 8 uses the first eight), k = 32 on an instance
// with 32 activations and 32 rows per lane. Each configuration runs a number
// of weight sets drawn from a bell-shaped distribution (the trained network
// weights themselves are not used); every result is checked exactly, and the
// average cycles per set are printed next to those of plain two's complement
// bit-column condensation and of no condensation. "CSD rows" is the condensed
// depth before the int8 split, "CSD cycles" what this design takes (half of
// it, rounded up per column, for B = 8).
module tb_csd_workloads;
  localparam int NSETS = 20;

  logic clk = 0;
  always #5 clk = ~clk;

  logic go16 = 0, go32 = 0, fin16, fin32;
  int   bb16 = 16, k16 = 16, bb32 = 16;
  int   ch16, fl16, co16, ct16, cn16, cp16;
  int   ch32, fl32, co32, ct32, cn32, cp32;
  int   checks = 0, failures = 0;

  csd_workload_runner #(.K(16), .ROWS(16)) u16 (
    .clk, .go(go16), .b_bits(bb16), .stride(k16), .nsets(NSETS), .finished(fin16),
    .checks(ch16), .failures(fl16), .cyc_ours(co16), .cyc_tc(ct16), .cyc_none(cn16), .cyc_pre(cp16));
  csd_workload_runner #(.K(32), .ROWS(32)) u32 (
    .clk, .go(go32), .b_bits(bb32), .stride(32), .nsets(NSETS), .finished(fin32),
    .checks(ch32), .failures(fl32), .cyc_ours(co32), .cyc_tc(ct32), .cyc_none(cn32), .cyc_pre(cp32));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic report(int bb, int k, int co, int ct, int cn, int cp);
    $display("  B=%2d k=%2d  cycles/set: none %5.2f  two's-complement condensed %5.2f  CSD rows %5.2f  CSD cycles %5.2f",
             bb, k, real'(cn) / NSETS, real'(ct) / NSETS, real'(cp) / NSETS, real'(co) / NSETS);
  endtask

  initial begin
    $display("workloads (%0d sets of 16 lanes each):", NSETS);
    for (int bi = 0; bi < 2; bi++) begin
      automatic int bb = (bi != 0) ? 16 : 8;
      for (int ki = 0; ki < 2; ki++) begin
        bb16 = bb; k16 = (ki != 0) ? 16 : 8;
        @(negedge clk) go16 = 1;
        wait (fin16);
        @(negedge clk) go16 = 0;
        checks += ch16; failures += fl16;
        report(bb, k16, co16, ct16, cn16, cp16);
        @(negedge clk);
      end
      bb32 = bb;
      @(negedge clk) go32 = 1;
      wait (fin32);
      @(negedge clk) go32 = 0;
      checks += ch32; failures += fl32;
      report(bb, 32, co32, ct32, cn32, cp32);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
