// tb_addr_bus_codec_top_xor: end-to-end test of the three address bus links
// with the XOR (transition-signalling) stage on their address lines
// (XOR_LINK = 1), otherwise at default sizes.
//
// Each clock, with some idle clocks mixed in, it feeds
//   * the instruction link with a program counter stream (loops, recurring
//     branches, rare random jumps),
//   * the data link with interleaved read and write array streams whose
//     strides change, plus scattered scalar accesses,
//   * the mixed link with a program whose loads and stores walk arrays.
// Every address must arrive at the memory side unchanged, with its
// Read/Write and I/D flags, exactly three clocks after it left the CPU side
// (one more than without the XOR stage).
// The test counts how often each coding mechanism was used (increment by
// stride, DAT hit, forced direct after a loop exit, bus invert, the
// inverted-equals-bus special case, stride change, read/write interleave,
// Stride-Table hit and insert) and fails for any that never happened. It
// also counts the transitions on every encoded bus including its control
// lines against the same address stream sent unencoded, and prints the
// reduction; the encoded buses must toggle less.
module tb_addr_bus_codec_top_xor;
  import addr_codec_pkg::*;
  import codec_ref_pkg::*;

  localparam int AW = 32;
  localparam int N  = 10000;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic          i_valid = 0, d_valid = 0, d_read = 1, m_valid = 0, m_is_data = 0, m_read = 1;
  logic [AW-1:0] i_addr = '0, d_addr = '0, m_addr = '0;
  logic [AW-1:0] i_bus, d_bus, m_bus, i_mem_addr, d_mem_addr, m_mem_addr;
  logic          i_incdat, d_incv, m_ctl, m_isel;
  logic          i_mem_valid, d_mem_valid, d_mem_read, m_mem_valid, m_mem_is_data, m_mem_read;
  xfer_kind_e    i_kind, d_kind, m_kind;

  addr_bus_codec_top #(.XOR_LINK(1'b1)) dut (.*);

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

  typedef struct { logic [AW-1:0] a; bit f1, f2; longint t; } exp_t;
  exp_t iq[$], dq[$], mq[$];

  // Mechanism counters.
  int n_i_inc, n_i_dat, n_i_direct, n_i_exit;
  int n_d_inc, n_d_inv, n_d_direct, n_d_special, n_d_rwswitch_inc, n_d_stride_change;
  int n_m_inc, n_m_dat, n_m_st, n_m_stmiss, n_m_direct;
  // Transition counters: encoded (bus + control lines) and unencoded.
  longint t_i_enc, t_i_raw, t_d_enc, t_d_raw, t_m_enc, t_m_raw;
  // Clocks on which the XOR stage showed a frozen bus as all-zero lines.
  int n_zero_lines;

  // Memory side: compare decoded addresses with what was sent.
  always @(posedge clk) if (rst_n) begin
    exp_t e;
    if (i_mem_valid) begin
      e = iq.pop_front();
      check(i_mem_addr == e.a && cyc - e.t == 3, $sformatf("inst link got %h exp %h after %0d clocks", i_mem_addr, e.a, cyc - e.t));
    end
    if (d_mem_valid) begin
      e = dq.pop_front();
      check(d_mem_addr == e.a && d_mem_read == e.f1 && cyc - e.t == 3,
            $sformatf("data link got %h exp %h", d_mem_addr, e.a));
    end
    if (m_mem_valid) begin
      e = mq.pop_front();
      check(m_mem_addr == e.a && m_mem_is_data == e.f1 && m_mem_read == e.f2 && cyc - e.t == 3,
            $sformatf("mixed link got %h exp %h", m_mem_addr, e.a));
    end
  end

  initial begin
    automatic prog_gen  #(AW) pg = new();
    automatic data_gen  #(AW) dg = new();
    automatic mixed_gen #(AW) mg = new();
    automatic logic [AW-1:0] a, i_last = 0, i_raw = 0, d_raw = 0, m_raw = 0;
    automatic logic [AW-1:0] pib, pdb, pmb, pdeb, d_pstride_r = 4, d_pstride_w = 4, d_last_r = 0, d_last_w = 0;
    automatic logic pic, pdc, pmc, pms, prev_read = 1;
    bit d, r, mdat;
    automatic logic [AW-1:0] mlast_i = 0, s;
    bit seen_idx [logic [AW-1:0]];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pib = i_bus; pdb = d_bus; pmb = m_bus; pdeb = dut.de_bus; pic = i_incdat; pdc = d_incv; pmc = m_ctl; pms = m_isel;
    for (int n = 0; n < N; n++) begin
      // CPU side, driven at the falling edge.
      i_valid = ($urandom_range(0, 15) != 0);
      d_valid = ($urandom_range(0, 15) != 0);
      m_valid = ($urandom_range(0, 15) != 0);
      if (i_valid) begin
        a = AW'(pg.next_pc()); i_addr = a;
        iq.push_back('{a, 0, 0, cyc});
        t_i_raw += $countones(a ^ i_raw); i_raw = a;
      end
      if (d_valid) begin
        a = AW'(dg.next()); d_addr = a; d_read = dg.is_read;
        dq.push_back('{a, d_read, 0, cyc});
        t_d_raw += $countones(a ^ d_raw) + (d_read != prev_read); d_raw = a;
      end
      if (m_valid) begin
        a = AW'(mg.next(d, r)); m_addr = a; m_is_data = d; m_read = r;
        mq.push_back('{a, d, r, cyc});
        t_m_raw += $countones(a ^ m_raw); m_raw = a;
      end
      @(posedge clk); #1;
      // Encoded side: count transitions and mechanisms.
      if (i_valid) begin
        case (i_kind)
          XFER_INC: n_i_inc++;
          XFER_DAT: n_i_dat++;
          default: begin
            n_i_direct++;
            if (i_addr == i_last + 4) n_i_exit++;   // consecutive, but source in DAT
          end
        endcase
        i_last = i_addr;
      end
      if (d_valid) begin
        s = d_read ? d_addr - d_last_r : d_addr - d_last_w;
        if (s != (d_read ? d_pstride_r : d_pstride_w)) n_d_stride_change++;
        case (d_kind)
          XFER_INC: begin n_d_inc++; if (d_read != prev_read) n_d_rwswitch_inc++; end
          XFER_INV: n_d_inv++;
          default: begin
            n_d_direct++;
            if ($countones(d_addr ^ pdeb) > AW / 2) n_d_special++;   // encoder's own bus, before the XOR stage
          end
        endcase
        if (d_read) begin d_pstride_r = s; d_last_r = d_addr; end
        else        begin d_pstride_w = s; d_last_w = d_addr; end
        prev_read = d_read;
      end
      if (m_valid) begin
        case (m_kind)
          XFER_INC: n_m_inc++;
          XFER_DAT: n_m_dat++;
          XFER_ST:  n_m_st++;
          default:  n_m_direct++;
        endcase
        if (m_is_data && !seen_idx.exists(mlast_i)) begin n_m_stmiss++; seen_idx[mlast_i] = 1; end
        if (!m_is_data) mlast_i = m_addr;
      end
      if (i_bus == '0 || d_bus == '0 || m_bus == '0) n_zero_lines++;
      t_i_enc += $countones(i_bus ^ pib) + (i_incdat != pic);
      t_d_enc += $countones(d_bus ^ pdb) + (d_incv != pdc);
      t_m_enc += $countones(m_bus ^ pmb) + (m_ctl != pmc) + (m_isel != pms);
      pib = i_bus; pdb = d_bus; pmb = m_bus; pdeb = dut.de_bus; pic = i_incdat; pdc = d_incv; pmc = m_ctl; pms = m_isel;
      @(negedge clk);
    end
    i_valid = 0; d_valid = 0; m_valid = 0;
    repeat (4) @(posedge clk);
    #1;
    check(iq.size() == 0 && dq.size() == 0 && mq.size() == 0, "every address delivered");
    $display("instruction bus: inc %0d dat-hit %0d direct %0d (loop-exit forced %0d)",
             n_i_inc, n_i_dat, n_i_direct, n_i_exit);
    $display("data bus: inc %0d inv %0d direct %0d (invert-equals-bus forced %0d) stride changes %0d inc-after-r/w-switch %0d",
             n_d_inc, n_d_inv, n_d_direct, n_d_special, n_d_stride_change, n_d_rwswitch_inc);
    $display("mixed bus: inc %0d dat-hit %0d st-hit %0d st-insert %0d direct %0d",
             n_m_inc, n_m_dat, n_m_st, n_m_stmiss, n_m_direct);
    $display("transitions encoded/unencoded: inst %0d/%0d (%0.1f%% fewer) data %0d/%0d (%0.1f%% fewer) mixed %0d/%0d (%0.1f%% fewer)",
             t_i_enc, t_i_raw, 100.0 * (t_i_raw - t_i_enc) / t_i_raw,
             t_d_enc, t_d_raw, 100.0 * (t_d_raw - t_d_enc) / t_d_raw,
             t_m_enc, t_m_raw, 100.0 * (t_m_raw - t_m_enc) / t_m_raw);
    check(n_i_inc > 0, "instruction increment used");
    check(n_i_dat > 0, "DAT hit used");
    check(n_i_direct > 0, "instruction direct transfer used");
    check(n_i_exit > 0, "loop-exit forced direct happened");
    check(n_d_inc > 0, "data increment used");
    check(n_d_inv > 0, "bus invert used");
    check(n_d_direct > 0, "data direct transfer used");
    check(n_d_special > 0, "invert-equals-bus forced direct happened");
    check(n_d_stride_change > 0, "stride change happened");
    check(n_d_rwswitch_inc > 0, "increment across a read/write switch happened");
    check(n_m_inc > 0 && n_m_dat > 0, "mixed bus T0 DAT used");
    check(n_m_st > 0, "Stride-Table hit used");
    check(n_m_stmiss > 0, "Stride-Table insert happened");
    check(n_zero_lines > 0, $sformatf("XOR stage sent frozen buses as zero lines on %0d clocks", n_zero_lines));
    check(t_i_enc < t_i_raw && t_d_enc < t_d_raw && t_m_enc < t_m_raw, "encoded buses toggle less");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
