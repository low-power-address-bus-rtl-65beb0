// tb_t0bi1srw_encoder: self-checking test of the T0_BI_1/S/RW encoder.
//
// Three encoders are driven:
//   * ex: 16-bit bus, initial stride 0, endurance 1. Replays the worked
//     variable-stride example 0004, 0008, 7FF0, 7FF2, 7FF4: direct, increment,
//     invert (800F), invert (800D), increment; 7 transitions on bus + INCV.
//   * fs: 16-bit bus, fixed stride 4. Replays the two special cases in which
//     inverting would leave the bus unchanged (000C, 0010, FFF3 and a repeated
//     000C after it was sent inverted): the address must then go out directly.
//   * rnd: default configuration (32 bits, endurance 1) on interleaved
//     read/write array streams, compared after every clock with a
//     behavioural model; the number of increment, invert and direct
//     transfers is also checked to be non-trivial.
module tb_t0bi1srw_encoder;
  import addr_codec_pkg::*;
  import codec_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // ex and fs instances (16-bit)
  logic        v16 = 0, r16 = 1;
  logic [15:0] a16 = '0;
  logic [15:0] bus_ex, bus_fs;
  logic        incv_ex, incv_fs, bv_ex, bv_fs, br_ex, br_fs;
  xfer_kind_e  k_ex, k_fs;
  t0bi1srw_encoder #(.AW(16), .ENDURANCE(1), .INIT_STRIDE(0)) u_ex (
    .clk, .rst_n, .in_valid(v16), .in_addr(a16), .in_read(r16),
    .bus(bus_ex), .incv(incv_ex), .bus_valid(bv_ex), .bus_read(br_ex), .kind(k_ex));
  t0bi1srw_encoder #(.AW(16), .ENDURANCE(0), .INIT_STRIDE(4)) u_fs (
    .clk, .rst_n, .in_valid(v16), .in_addr(a16), .in_read(r16),
    .bus(bus_fs), .incv(incv_fs), .bus_valid(bv_fs), .bus_read(br_fs), .kind(k_fs));

  // rnd instance (defaults)
  logic        v32 = 0, r32 = 1;
  logic [31:0] a32 = '0;
  logic [31:0] bus_r;
  logic        incv_r, bv_r, br_r;
  xfer_kind_e  k_r;
  t0bi1srw_encoder u_rnd (
    .clk, .rst_n, .in_valid(v32), .in_addr(a32), .in_read(r32),
    .bus(bus_r), .incv(incv_r), .bus_valid(bv_r), .bus_read(br_r), .kind(k_r));

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

  task automatic send16(logic [15:0] a);
    @(negedge clk); v16 = 1; a16 = a;
    @(posedge clk); #1;
  endtask

  logic [15:0] ex_a   [5] = '{16'h0004, 16'h0008, 16'h7FF0, 16'h7FF2, 16'h7FF4};
  int          ex_k   [5] = '{1, 2, 4, 4, 2};
  logic [15:0] ex_bus [5] = '{16'h0004, 16'h0004, 16'h800F, 16'h800D, 16'h800D};

  initial begin
    automatic t0bi1srw_ref #(32, 1, 4) m = new();
    automatic data_gen #(32) g = new();
    automatic logic [15:0] pb;
    automatic logic pi;
    automatic int trans = 0;
    logic [31:0] a; bit rd; int k;
    automatic int cnt [6] = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    pb = bus_ex; pi = incv_ex;
    for (int i = 0; i < 5; i++) begin
      send16(ex_a[i]);
      check(int'(k_ex) == ex_k[i] && bus_ex == ex_bus[i] && incv_ex == (ex_k[i] != 1) && bv_ex,
            $sformatf("example step %0d kind %0d bus %h", i, k_ex, bus_ex));
      trans += $countones(bus_ex ^ pb) + (incv_ex != pi);
      pb = bus_ex; pi = incv_ex;
    end
    check(trans == 7, $sformatf("example transitions %0d, expected 7", trans));

    // Special cases on the fixed-stride instance.
    @(negedge clk); v16 = 0; rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    send16(16'h000C); check(k_fs == XFER_DIRECT && bus_fs == 16'h000C, "case 1: 000C direct");
    send16(16'h0010); check(k_fs == XFER_INC && bus_fs == 16'h000C && incv_fs, "case 1: 0010 increment");
    send16(16'hFFF3); check(k_fs == XFER_DIRECT && bus_fs == 16'hFFF3 && !incv_fs, "case 1: FFF3 forced direct");
    @(negedge clk); v16 = 0; rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    send16(16'hFF00); check(k_fs == XFER_DIRECT, "case 2: FF00 direct");
    send16(16'h000C); check(k_fs == XFER_INV && bus_fs == 16'hFFF3 && incv_fs, "case 2: 000C inverted");
    send16(16'h000C); check(k_fs == XFER_DIRECT && bus_fs == 16'h000C && !incv_fs, "case 2: repeated 000C forced direct");
    // Read and write streams are separate: a write between reads keeps the
    // read stride.
    send16(16'h0100); send16(16'h0104); r16 = 0;
    send16(16'h5000); check(k_fs == XFER_DIRECT && !br_fs, "write address direct");
    r16 = 1;
    send16(16'h0108); check(k_fs == XFER_INC && br_fs, "read stream continues across a write");
    @(negedge clk); v16 = 0;

    // Random interleaved streams against the model.
    for (int i = 0; i < 4000; i++) begin
      a = 32'(g.next()); rd = g.is_read;
      k = m.encode(a, rd);
      cnt[k]++;
      @(negedge clk); v32 = 1; a32 = a; r32 = rd;
      @(posedge clk); #1;
      check(int'(k_r) == k && bus_r == 32'(m.bus) && incv_r == m.ctl && br_r == rd && bv_r,
            $sformatf("random step %0d addr %h kind %0d exp %0d", i, a, k_r, k));
    end
    check(cnt[1] > 100 && cnt[2] > 100 && cnt[4] > 50,
          $sformatf("mix direct %0d inc %0d inv %0d", cnt[1], cnt[2], cnt[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
