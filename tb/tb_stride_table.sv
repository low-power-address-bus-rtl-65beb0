// tb_stride_table: self-checking test of the Stride-Table.
//
// First replays the entry for one load/store: a miss inserts stride 4, then
// the predicted address and learned stride follow the accesses
// 400, 396, 392 (stride -4 learned after the second). Then random accesses
// from 8 load/store index addresses through a 4-entry table (so entries are
// replaced round-robin) are compared with a software model: hit and
// prediction before every update.
module tb_stride_table;
  import codec_ref_pkg::*;

  localparam int AW = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] key = '0, pred, upd_addr = '0;
  logic hit, upd = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stride_table #(.AW(AW), .DEPTH(DEPTH)) dut (.*);

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

  task automatic access(logic [AW-1:0] k, logic [AW-1:0] a);
    @(negedge clk); key = k; upd_addr = a; upd = 1;
    @(posedge clk); #1 upd = 0;
  endtask

  initial begin
    automatic rr_table #(DEPTH) m = new();
    automatic int i, nhit = 0;
    logic [AW-1:0] k, a;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    key = 16'd32; #1;
    check(!hit, "empty table misses");
    access(16'd32, 16'd400);
    check(hit && pred == 16'd404, $sformatf("new entry predicts 400+4, got %0d", pred));
    access(16'd32, 16'd396);
    check(hit && pred == 16'd392, $sformatf("stride -4 learned, got %0d", pred));
    access(16'd32, 16'd392);
    check(hit && pred == 16'd388, "stride -4 kept");

    @(negedge clk); rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      k = AW'(16'd20 + 16'd4 * $urandom_range(0, 7));
      i = m.find(k);
      a = (i >= 0 && $urandom_range(0, 3) != 0) ? AW'(m.d1[i] + m.d0[i]) : AW'($urandom());
      @(negedge clk); key = k; #1;
      check(hit == (i >= 0), "hit");
      if (i >= 0) begin
        nhit++;
        check(pred == AW'(m.d1[i] + m.d0[i]), $sformatf("pred %h exp %h", pred, AW'(m.d1[i] + m.d0[i])));
        m.put(k, (a - m.d1[i]) & 16'hFFFF, a);
      end else m.put(k, 4, a);
      access(k, a);
    end
    check(nhit > 500, $sformatf("hits %0d", nhit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
