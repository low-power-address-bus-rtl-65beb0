// tb_t0dat_encoder: self-checking test of the T0 DAT encoder.
//
// Part 1 replays the worked instruction address example of a two-branch
// loop (16-bit bus, stride 4): for every address it checks the INC-DAT line,
// the bus value and how the address was sent, and it counts the bus plus
// INC-DAT transitions (10 for this sequence). Part 2 runs a random program
// address stream through the encoder and a behavioural reference model and
// compares bus, INC-DAT and kind after every clock, with a 4-entry DAT so
// that the table wraps and replaces entries. Each result is registered one
// clock after the address; that latency is checked too.
module tb_t0dat_encoder;
  import addr_codec_pkg::*;
  import codec_ref_pkg::*;

  localparam int AW = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [AW-1:0] in_addr = '0;
  logic [AW-1:0] bus;
  logic inc_dat, bus_valid;
  xfer_kind_e kind;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  t0dat_encoder #(.AW(AW), .DAT_DEPTH(4)) dut (.*);

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

  // Drive one address for one clock and sample the registered outputs.
  task automatic send(logic [AW-1:0] a);
    @(negedge clk); in_valid = 1; in_addr = a;
    @(posedge clk); #1;
  endtask

  localparam int N1 = 15;
  logic [AW-1:0] ex_addr [N1] = '{16'h0004, 16'h0008, 16'h0100, 16'h0104, 16'h0000,
                                  16'h0004, 16'h0008, 16'h0100, 16'h0104, 16'h0000,
                                  16'h0004, 16'h0008, 16'h0100, 16'h0104, 16'h0108};
  int ex_kind [N1] = '{2, 2, 1, 2, 1, 2, 2, 3, 2, 3, 2, 2, 3, 2, 1};

  initial begin
    t0dat_ref #(AW, 4, 4) m;
    prog_gen #(AW) g;
    logic [AW-1:0] prev_bus;
    logic prev_inc;
    automatic int trans = 0;
    logic [AW-1:0] a;
    int k;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(bus == 0 && inc_dat == 0 && kind == XFER_NONE, "reset values");
    prev_bus = bus; prev_inc = inc_dat;
    for (int i = 0; i < N1; i++) begin
      send(ex_addr[i]);
      check(bus_valid, "bus_valid one clock after in_valid");
      check(int'(kind) == ex_kind[i], $sformatf("example step %0d kind %0d exp %0d", i, kind, ex_kind[i]));
      check(inc_dat == (ex_kind[i] != 1), $sformatf("example step %0d INC-DAT", i));
      check(bus == (ex_kind[i] == 1 ? ex_addr[i] : prev_bus), $sformatf("example step %0d bus %h", i, bus));
      trans += $countones(bus ^ prev_bus) + (inc_dat != prev_inc);
      prev_bus = bus; prev_inc = inc_dat;
    end
    check(trans == 10, $sformatf("example transitions %0d, expected 10", trans));
    // Idle clock: lines must hold, bus_valid must drop.
    @(negedge clk); in_valid = 0; in_addr = 16'h5555;
    @(posedge clk); #1;
    check(!bus_valid && bus == prev_bus && inc_dat == prev_inc, "lines hold when idle");

    // Part 2: random program stream against the reference model.
    @(negedge clk); rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    m = new(); g = new(16'h0100);
    for (int i = 0; i < 3000; i++) begin
      a = AW'(g.next_pc());
      k = m.encode(a);
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk); in_valid = 0; @(posedge clk);
      end
      send(a);
      check(int'(kind) == k && bus == AW'(m.bus) && inc_dat == m.ctl,
            $sformatf("random step %0d addr %h kind %0d exp %0d", i, a, kind, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
