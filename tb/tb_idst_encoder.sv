// tb_idst_encoder: self-checking test of the instruction/data mixed address
// bus encoder (I/D selector + T0 DAT + Stride-Table).
//
// Part 1 replays three iterations of the worked loop example on the default
// configuration: instructions 20..60 with four loads/stores at index
// addresses 20, 28, 32 and 40 whose data addresses move by +4, +4, -4 and -2.
// Iteration 1 sends the first instruction and all data addresses on the
// bus; iteration 2 sends 20 (new DAT pair 60->20) and the two data addresses
// whose stride is not the default 4; iteration 3 sends nothing: every
// address goes with a frozen bus and the shared control line high. The
// I/D selector line is checked on every transfer.
// Part 2 compares two encoders (plain and with Bus-Invert on data, small
// tables so that they wrap) with behavioural models on a random program
// with loads and stores.
module tb_idst_encoder;
  import addr_codec_pkg::*;
  import codec_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        v = 0, isd = 0, rd = 1;
  logic [31:0] a = '0;
  logic [31:0] bus0, bus1, bus2;
  logic        ctl0, ctl1, ctl2, is0, is1, is2, bv0, bv1, bv2, br0, br1, br2;
  xfer_kind_e  k0, k1, k2;

  idst_encoder u0 (.clk, .rst_n, .in_valid(v), .in_addr(a), .in_is_data(isd), .in_read(rd),
                   .bus(bus0), .ctl(ctl0), .isel(is0), .bus_valid(bv0), .bus_read(br0), .kind(k0));
  idst_encoder #(.DAT_DEPTH(4), .ST_DEPTH(8)) u1 (.clk, .rst_n, .in_valid(v), .in_addr(a),
                   .in_is_data(isd), .in_read(rd),
                   .bus(bus1), .ctl(ctl1), .isel(is1), .bus_valid(bv1), .bus_read(br1), .kind(k1));
  idst_encoder #(.DAT_DEPTH(4), .ST_DEPTH(8), .ST_INV(1'b1)) u2 (.clk, .rst_n, .in_valid(v),
                   .in_addr(a), .in_is_data(isd), .in_read(rd),
                   .bus(bus2), .ctl(ctl2), .isel(is2), .bus_valid(bv2), .bus_read(br2), .kind(k2));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(logic [31:0] addr, bit is_data, bit is_read);
    @(negedge clk); v = 1; a = addr; isd = is_data; rd = is_read;
    @(posedge clk); #1;
  endtask

  // Loop body: index of the instruction before each data access and the
  // data address sequence per iteration.
  int ins [15] = '{20, -1, 24, 28, -2, 32, -3, 36, 40, -4, 44, 48, 52, 56, 60};
  int dbase [4] = '{600, 100, 400, 900};
  int dstep [4] = '{4, 4, -4, -2};

  initial begin
    automatic idst_ref #(32, 4, 8, 4, 0) m1 = new();
    automatic idst_ref #(32, 4, 8, 4, 1) m2 = new();
    automatic mixed_gen #(32) g = new();
    logic [31:0] pbus, addr;
    bit d, r;
    int e1, e2, exp_kind, nsent, q;
    automatic int cnt [6] = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 3; it++) begin
      nsent = 0;
      for (int j = 0; j < 15; j++) begin
        pbus = bus0;
        if (ins[j] >= 0) begin
          send(32'(ins[j]), 0, 1);
          if (ins[j] == 20) exp_kind = (it == 2) ? 3 : 1;
          else              exp_kind = 2;
          check(is0 == 1'b1, "I/D selector high for an instruction");
        end else begin
          q = -ins[j] - 1;
          send(32'(dbase[q] + it * dstep[q]), 1, 1);
          if (it == 0)      exp_kind = 1;
          else if (it == 1) exp_kind = (dstep[q] == 4) ? 5 : 1;
          else              exp_kind = 5;
          check(is0 == 1'b0, "I/D selector low for data");
        end
        check(int'(k0) == exp_kind, $sformatf("iteration %0d slot %0d kind %0d exp %0d", it + 1, j, k0, exp_kind));
        check(ctl0 == (exp_kind != 1), "INC-DAT/ST line");
        check(exp_kind == 1 ? bus0 == a : bus0 == pbus, "bus sent or frozen");
        if (exp_kind == 1) nsent++;
      end
      check(nsent == (it == 0 ? 5 : it == 1 ? 3 : 0), $sformatf("iteration %0d sent %0d addresses", it + 1, nsent));
    end

    @(negedge clk); v = 0; rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      addr = 32'(g.next(d, r));
      e1 = m1.encode(addr, d); e2 = m2.encode(addr, d);
      cnt[e2]++;
      send(addr, d, r);
      check(int'(k1) == e1 && bus1 == 32'(m1.bus) && ctl1 == m1.ctl && is1 == !d && br1 == r,
            $sformatf("plain step %0d addr %h kind %0d exp %0d", i, addr, k1, e1));
      check(int'(k2) == e2 && bus2 == 32'(m2.bus) && ctl2 == m2.ctl && is2 == !d,
            $sformatf("inv step %0d addr %h kind %0d exp %0d", i, addr, k2, e2));
    end
    check(cnt[1] > 50 && cnt[2] > 50 && cnt[3] > 50 && cnt[4] > 20 && cnt[5] > 50,
          $sformatf("mix direct %0d inc %0d dat %0d inv %0d st %0d", cnt[1], cnt[2], cnt[3], cnt[4], cnt[5]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
