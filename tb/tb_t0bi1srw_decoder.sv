// tb_t0bi1srw_decoder: self-checking test of the T0_BI_1/S/RW decoder.
//
// Behavioural encoder models turn interleaved read/write array streams into
// bus, INCV and Read/Write values. Two decoders are checked: the default
// configuration (endurance 1) and one with endurance 2, each fed by its own
// model. Every original address and its Read/Write flag must come back one
// clock after the transfer. The stream also contains repeated addresses and
// values whose inversion equals the bus, so the forced-direct cases occur.
module tb_t0bi1srw_decoder;
  import codec_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        bv = 0, incv1 = 0, incv2 = 0, rd = 1;
  logic [31:0] bus1 = '0, bus2 = '0;
  logic        ov1, ov2, or1, or2;
  logic [31:0] oa1, oa2;

  t0bi1srw_decoder u1 (.clk, .rst_n, .bus_valid(bv), .bus(bus1), .incv(incv1), .bus_read(rd),
                       .out_valid(ov1), .out_addr(oa1), .out_read(or1));
  t0bi1srw_decoder #(.ENDURANCE(2)) u2 (.clk, .rst_n, .bus_valid(bv), .bus(bus2), .incv(incv2),
                       .bus_read(rd), .out_valid(ov2), .out_addr(oa2), .out_read(or2));

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
    automatic t0bi1srw_ref #(32, 1, 4) m1 = new();
    automatic t0bi1srw_ref #(32, 2, 4) m2 = new();
    automatic data_gen #(32) g = new();
    automatic logic [31:0] a, prev = 0; bit r; int k1, k2;
    automatic int cnt [6] = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      case ($urandom_range(0, 19))
        0: a = prev;                     // repeated address
        1: a = ~32'(m1.bus);             // inversion would freeze the bus
        default: a = 32'(g.next());
      endcase
      r = g.is_read; prev = a;
      k1 = m1.encode(a, r); k2 = m2.encode(a, r);
      cnt[k1]++;
      @(negedge clk); bv = 1; rd = r;
      bus1 = 32'(m1.bus); incv1 = m1.ctl; bus2 = 32'(m2.bus); incv2 = m2.ctl;
      @(posedge clk); #1;
      check(ov1 && oa1 == a && or1 == r, $sformatf("E1 step %0d got %h exp %h kind %0d", i, oa1, a, k1));
      check(ov2 && oa2 == a && or2 == r, $sformatf("E2 step %0d got %h exp %h kind %0d", i, oa2, a, k2));
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk); bv = 0;
        @(posedge clk); #1;
        check(!ov1 && oa1 == a, "hold when idle");
      end
    end
    check(cnt[1] > 100 && cnt[2] > 100 && cnt[4] > 100,
          $sformatf("mix direct %0d inc %0d inv %0d", cnt[1], cnt[2], cnt[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
