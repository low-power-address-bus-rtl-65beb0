// tb_table_size_sweep: runs the table sizes that the thesis compares on one
// shared address stream and reports the bus transitions of each.
//
//   * Instruction bus: T0 DAT with a 4-entry and a 32-entry DAT, and plain
//     sequential-only coding (a 1-entry DAT that is never allowed to hit
//     is not possible, so the unencoded stream is the reference).
//   * Mixed bus: I/D selector + T0 DAT + Stride-Table with 32 and 128
//     Stride-Table entries, and 128 entries with Bus-Invert (ST_INV = 1).
//
// Each encoder is paired with its decoder and every address must come back
// unchanged. The program has about 32 branch sites and 64 load/store sites,
// more than the small tables hold. Its branch sites are taken 98% of the
// time, like loop back-edges and calls, so the larger tables must produce
// fewer transitions; and every configuration must beat the unencoded bus.
// (With branches that often fall through, a larger DAT can lose: every
// fall-through from a recorded source must be sent directly.)
module tb_table_size_sweep;
  import addr_codec_pkg::*;
  import codec_ref_pkg::*;

  localparam int AW = 32, N = 20000;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic          iv = 0, mv = 0, misd = 0, mrd = 1;
  logic [AW-1:0] ia = '0, ma = '0;

  // Instruction bus, DAT 4 and 32.
  logic [AW-1:0] ib [2], io [2];
  logic          ic [2], ibv [2], iov [2];
  xfer_kind_e    ik [2];
  t0dat_encoder #(.DAT_DEPTH(4))  e4  (.clk, .rst_n, .in_valid(iv), .in_addr(ia), .bus(ib[0]), .inc_dat(ic[0]), .bus_valid(ibv[0]), .kind(ik[0]));
  t0dat_decoder #(.DAT_DEPTH(4))  d4  (.clk, .rst_n, .bus_valid(ibv[0]), .bus(ib[0]), .inc_dat(ic[0]), .out_valid(iov[0]), .out_addr(io[0]));
  t0dat_encoder #(.DAT_DEPTH(32)) e32 (.clk, .rst_n, .in_valid(iv), .in_addr(ia), .bus(ib[1]), .inc_dat(ic[1]), .bus_valid(ibv[1]), .kind(ik[1]));
  t0dat_decoder #(.DAT_DEPTH(32)) d32 (.clk, .rst_n, .bus_valid(ibv[1]), .bus(ib[1]), .inc_dat(ic[1]), .out_valid(iov[1]), .out_addr(io[1]));

  // Mixed bus, Stride-Table 32, 128, 128 with invert.
  logic [AW-1:0] mb [3], mo [3];
  logic          mc [3], ms [3], mbv [3], mbr [3], mov [3], mod [3], mor [3];
  xfer_kind_e    mk [3];
  idst_encoder #(.ST_DEPTH(32)) me0 (.clk, .rst_n, .in_valid(mv), .in_addr(ma), .in_is_data(misd), .in_read(mrd),
      .bus(mb[0]), .ctl(mc[0]), .isel(ms[0]), .bus_valid(mbv[0]), .bus_read(mbr[0]), .kind(mk[0]));
  idst_decoder #(.ST_DEPTH(32)) md0 (.clk, .rst_n, .bus_valid(mbv[0]), .bus(mb[0]), .ctl(mc[0]), .isel(ms[0]), .bus_read(mbr[0]),
      .out_valid(mov[0]), .out_addr(mo[0]), .out_is_data(mod[0]), .out_read(mor[0]));
  idst_encoder me1 (.clk, .rst_n, .in_valid(mv), .in_addr(ma), .in_is_data(misd), .in_read(mrd),
      .bus(mb[1]), .ctl(mc[1]), .isel(ms[1]), .bus_valid(mbv[1]), .bus_read(mbr[1]), .kind(mk[1]));
  idst_decoder md1 (.clk, .rst_n, .bus_valid(mbv[1]), .bus(mb[1]), .ctl(mc[1]), .isel(ms[1]), .bus_read(mbr[1]),
      .out_valid(mov[1]), .out_addr(mo[1]), .out_is_data(mod[1]), .out_read(mor[1]));
  idst_encoder #(.ST_INV(1'b1)) me2 (.clk, .rst_n, .in_valid(mv), .in_addr(ma), .in_is_data(misd), .in_read(mrd),
      .bus(mb[2]), .ctl(mc[2]), .isel(ms[2]), .bus_valid(mbv[2]), .bus_read(mbr[2]), .kind(mk[2]));
  idst_decoder #(.ST_INV(1'b1)) md2 (.clk, .rst_n, .bus_valid(mbv[2]), .bus(mb[2]), .ctl(mc[2]), .isel(ms[2]), .bus_read(mbr[2]),
      .out_valid(mov[2]), .out_addr(mo[2]), .out_is_data(mod[2]), .out_read(mor[2]));

  initial begin
    repeat (4 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    automatic prog_gen  #(AW) pg = new();
    automatic mixed_gen #(AW) mg = new();
    automatic longint ti [2] = '{0, 0}, tm [3] = '{0, 0, 0};
    automatic longint ti_raw = 0, tm_raw = 0;
    logic [AW-1:0] pib [2], pmb [3], pi_addr, pm_addr, ia_q, ma_q;
    logic pic [2], pmc [3], pms [3];
    bit d, r, misd_q;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pg.taken_pct = 98;
    pi_addr = 0; pm_addr = 0;
    foreach (pib[j]) begin pib[j] = ib[j]; pic[j] = ic[j]; end
    foreach (pmb[j]) begin pmb[j] = mb[j]; pmc[j] = mc[j]; pms[j] = ms[j]; end
    for (int n = 0; n < N; n++) begin
      iv = 1; ia = AW'(pg.next_pc());
      mv = 1; ma = AW'(mg.next(d, r)); misd = d; mrd = r;
      ti_raw += $countones(ia ^ pi_addr); pi_addr = ia;
      tm_raw += $countones(ma ^ pm_addr); pm_addr = ma;
      @(posedge clk); #1;
      foreach (pib[j]) begin
        ti[j] += $countones(ib[j] ^ pib[j]) + (ic[j] != pic[j]);
        pib[j] = ib[j]; pic[j] = ic[j];
      end
      foreach (pmb[j]) begin
        tm[j] += $countones(mb[j] ^ pmb[j]) + (mc[j] != pmc[j]) + (ms[j] != pms[j]);
        pmb[j] = mb[j]; pmc[j] = mc[j]; pms[j] = ms[j];
      end
      // Decoders show the previous clock's address now.
      if (n > 0) begin
        foreach (io[j]) check(iov[j] && io[j] == ia_q, $sformatf("inst decoder %0d got %h exp %h", j, io[j], ia_q));
        foreach (mo[j]) check(mov[j] && mo[j] == ma_q && mod[j] == misd_q,
                              $sformatf("mixed decoder %0d got %h exp %h", j, mo[j], ma_q));
      end
      ia_q = ia; ma_q = ma; misd_q = misd;
      @(negedge clk);
    end
    $display("instruction bus transitions: unencoded %0d, T0 DAT(4) %0d (%0.1f%% fewer), T0 DAT(32) %0d (%0.1f%% fewer)",
             ti_raw, ti[0], 100.0 * (ti_raw - ti[0]) / ti_raw, ti[1], 100.0 * (ti_raw - ti[1]) / ti_raw);
    $display("mixed bus transitions: unencoded %0d, ST(32) %0d (%0.1f%% fewer), ST(128) %0d (%0.1f%% fewer), ST-INV(128) %0d (%0.1f%% fewer)",
             tm_raw, tm[0], 100.0 * (tm_raw - tm[0]) / tm_raw, tm[1], 100.0 * (tm_raw - tm[1]) / tm_raw,
             tm[2], 100.0 * (tm_raw - tm[2]) / tm_raw);
    check(ti[1] < ti[0], "larger DAT gives fewer transitions");
    check(tm[1] < tm[0], "larger Stride-Table gives fewer transitions");
    check(ti[0] < ti_raw && tm[0] < tm_raw, "every configuration beats the unencoded bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
