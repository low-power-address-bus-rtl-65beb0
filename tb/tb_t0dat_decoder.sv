// tb_t0dat_decoder: self-checking test of the T0 DAT decoder.
//
// A behavioural T0 DAT encoder model turns a random program address stream
// (loops, recurring branches, rare random jumps) into bus and INC-DAT values;
// the decoder must give back every original address one clock after the bus
// transfer. A 4-entry DAT makes the table fill up and replace entries. Idle
// clocks are mixed in; the output must then hold and out_valid must drop.
module tb_t0dat_decoder;
  import codec_ref_pkg::*;

  localparam int AW = 32;
  logic clk = 0, rst_n = 0;
  logic bus_valid = 0, inc_dat = 0;
  logic [AW-1:0] bus = '0;
  logic out_valid;
  logic [AW-1:0] out_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  t0dat_decoder #(.AW(AW), .DAT_DEPTH(4)) dut (.*);

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
    automatic t0dat_ref #(AW, 4, 4) m = new();
    automatic prog_gen #(AW) g = new();
    automatic int ndat = 0;
    logic [AW-1:0] a;
    int k;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      a = AW'(g.next_pc());
      k = m.encode(a);
      if (k == 3) ndat++;
      @(negedge clk); bus_valid = 1; bus = AW'(m.bus); inc_dat = m.ctl;
      @(posedge clk); #1;
      check(out_valid && out_addr == a, $sformatf("step %0d got %h exp %h kind %0d", i, out_addr, a, k));
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk); bus_valid = 0;
        @(posedge clk); #1;
        check(!out_valid && out_addr == a, "hold when idle");
      end
    end
    check(ndat > 100, $sformatf("DAT hits exercised: %0d", ndat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
