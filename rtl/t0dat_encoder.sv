// t0dat_encoder: T0 DAT encoder for an instruction address bus.
//
// T0 freezes the bus for an address that is the previous one plus STRIDE.
// T0 DAT adds a Discontinuous Address Table so that taken branches seen
// before are also sent with a frozen bus. One control line, INC-DAT, covers
// both cases; the decoder tells them apart by whether the previous address
// is a Source address in its own DAT copy.
//
// For each address (in_valid high) with previous address L:
//   * (L, addr) is a pair in the DAT                 -> INC-DAT=1, bus frozen
//   * addr = L + STRIDE and L is not a DAT source    -> INC-DAT=1, bus frozen
//   * otherwise                                      -> INC-DAT=0, bus = addr
// In the last case, when addr is not L + STRIDE, the pair (L, addr) is
// recorded in the DAT. A consecutive address whose L is a DAT source is sent
// directly and records nothing (the thesis's loop-exit case).
//
// Timing: bus, inc_dat, bus_valid and kind are registered and change one
// clock after the address is presented; one address per clock. The bus and
// INC-DAT lines hold their values between transfers. The previous address
// resets to 0, the bus's reset value. kind (an observation output) only
// ever takes direct, increment or DAT-hit here, so its top bit stays 0; the
// shared enum also serves the other encoders.
//
// The coding rule follows the thesis. These choices are this design's:
// the first address after reset records no DAT pair, since the reset value
// is not a real address; a discontinuous pair whose source is already in
// the DAT replaces that entry's target instead of adding a second entry;
// consecutive pairs are never recorded.
module t0dat_encoder
  import addr_codec_pkg::*;
#(
  parameter int unsigned AW        = 32,
  parameter int unsigned DAT_DEPTH = 32,
  parameter int unsigned STRIDE    = DEFAULT_STRIDE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,
  output logic [AW-1:0] bus,
  output logic          inc_dat,
  output logic          bus_valid,
  output xfer_kind_e    kind
);
  logic [AW-1:0] last_q;
  logic          started_q;
  logic          src_hit;
  logic [AW-1:0] src_target;
  logic          seq, pair_hit, dat_wr;
  xfer_kind_e    kind_n;

  dat_table #(.AW(AW), .DEPTH(DAT_DEPTH)) u_dat (
    .clk, .rst_n,
    .key       (last_q),
    .hit       (src_hit),
    .target    (src_target),
    .wr_en     (dat_wr),
    .wr_target (in_addr)
  );

  assign seq      = (in_addr == last_q + AW'(STRIDE));
  assign pair_hit = src_hit && (src_target == in_addr);

  always_comb begin
    dat_wr = 1'b0;
    if (pair_hit)              kind_n = XFER_DAT;
    else if (seq && !src_hit)  kind_n = XFER_INC;
    else begin
      kind_n = XFER_DIRECT;
      dat_wr = in_valid && started_q && !seq;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q    <= '0;
      started_q <= 1'b0;
      bus       <= '0;
      inc_dat   <= 1'b0;
      bus_valid <= 1'b0;
      kind      <= XFER_NONE;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        last_q    <= in_addr;
        started_q <= 1'b1;
        kind      <= kind_n;
        inc_dat   <= (kind_n != XFER_DIRECT);
        if (kind_n == XFER_DIRECT) bus <= in_addr;
      end
    end
  end

endmodule
