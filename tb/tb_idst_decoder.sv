// tb_idst_decoder: self-checking test of the instruction/data mixed address
// bus decoder.
//
// Behavioural encoder models turn a random program with loads and stores
// into bus, control-line and I/D selector values. Two decoders are checked,
// each fed by its own model: the default configuration, and one with
// Bus-Invert on data addresses and small tables (4-entry DAT, 8-entry
// Stride-Table) so that both tables wrap. Every original address, its I/D
// flag and its Read/Write flag must come back one clock after the transfer.
module tb_idst_decoder;
  import codec_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        bv = 0, rd = 1, ctl0 = 0, ctl1 = 0, is0 = 1, is1 = 1;
  logic [31:0] bus0 = '0, bus1 = '0;
  logic        ov0, ov1, od0, od1, or0, or1;
  logic [31:0] oa0, oa1;

  idst_decoder u0 (.clk, .rst_n, .bus_valid(bv), .bus(bus0), .ctl(ctl0), .isel(is0), .bus_read(rd),
                   .out_valid(ov0), .out_addr(oa0), .out_is_data(od0), .out_read(or0));
  idst_decoder #(.DAT_DEPTH(4), .ST_DEPTH(8), .ST_INV(1'b1)) u1 (.clk, .rst_n, .bus_valid(bv),
                   .bus(bus1), .ctl(ctl1), .isel(is1), .bus_read(rd),
                   .out_valid(ov1), .out_addr(oa1), .out_is_data(od1), .out_read(or1));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    automatic idst_ref #(32, 32, 128, 4, 0) m0 = new();
    automatic idst_ref #(32, 4, 8, 4, 1) m1 = new();
    automatic mixed_gen #(32) g = new();
    logic [31:0] a; bit d, r; int k0, k1;
    automatic int cnt [6] = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      a = 32'(g.next(d, r));
      k0 = m0.encode(a, d); k1 = m1.encode(a, d);
      cnt[k1]++;
      @(negedge clk); bv = 1; rd = r;
      bus0 = 32'(m0.bus); ctl0 = m0.ctl; is0 = m0.isel;
      bus1 = 32'(m1.bus); ctl1 = m1.ctl; is1 = m1.isel;
      @(posedge clk); #1;
      check(ov0 && oa0 == a && od0 == d && or0 == r, $sformatf("plain step %0d got %h exp %h kind %0d", i, oa0, a, k0));
      check(ov1 && oa1 == a && od1 == d && or1 == r, $sformatf("inv step %0d got %h exp %h kind %0d", i, oa1, a, k1));
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk); bv = 0;
        @(posedge clk); #1;
        check(!ov0 && oa0 == a, "hold when idle");
      end
    end
    check(cnt[1] > 50 && cnt[2] > 50 && cnt[3] > 50 && cnt[4] > 20 && cnt[5] > 50,
          $sformatf("mix direct %0d inc %0d dat %0d inv %0d st %0d", cnt[1], cnt[2], cnt[3], cnt[4], cnt[5]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
