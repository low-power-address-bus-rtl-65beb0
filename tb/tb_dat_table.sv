// tb_dat_table: self-checking test of the Discontinuous Address Table.
//
// Writes random (source, target) pairs into a 4-entry table, among them
// sources that are already present (their target must be replaced) and
// enough new sources to wrap the round-robin replacement several times.
// After every write, lookups of random and recently written keys are
// compared with a software model of the table.
module tb_dat_table;
  import codec_ref_pkg::*;

  localparam int AW = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] key = '0, target, wr_target = '0;
  logic hit, wr_en = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dat_table #(.AW(AW), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Key pool of 8 values so that hits, misses and replacements all occur.
  function automatic logic [AW-1:0] pick();
    return AW'(16'h0100 + 16'h0040 * $urandom_range(0, 7));
  endfunction

  initial begin
    automatic rr_table #(DEPTH) m = new();
    automatic int i, nrep = 0, nhit = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      // lookup
      @(negedge clk); wr_en = 0; key = pick(); #1;
      i = m.find(key);
      check(hit == (i >= 0), $sformatf("lookup %h hit %0d", key, hit));
      if (i >= 0) begin
        nhit++;
        check(target == AW'(m.d0[i]), $sformatf("lookup %h target %h exp %h", key, target, m.d0[i]));
      end
      // write
      @(negedge clk); key = pick(); wr_target = AW'($urandom()); wr_en = 1;
      if (m.find(key) >= 0) nrep++;
      m.put(key, wr_target, 0);
      @(posedge clk); #1;
      check(hit && target == wr_target, "read back after write");
    end
    check(nrep > 100 && nhit > 100, $sformatf("replacements %0d hits %0d", nrep, nhit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
