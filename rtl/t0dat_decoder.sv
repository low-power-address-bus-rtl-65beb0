// t0dat_decoder: T0 DAT decoder for an instruction address bus.
//
// Rebuilds each instruction address from the bus, the INC-DAT line and a
// DAT copy that it keeps in step with the encoder's. For each transfer
// (bus_valid high) with previous decoded address L:
//   * INC-DAT=0                      -> address = bus; if it is not
//                                       L + STRIDE, record (L, address)
//   * INC-DAT=1, L is a DAT source   -> address = that source's target
//   * INC-DAT=1, otherwise           -> address = L + STRIDE
//
// Timing: out_addr/out_valid are registered, one clock after the bus
// transfer. L resets to 0. The decoding rule follows the thesis; the
// DAT-recording details mirror the encoder's choices (no pair from the reset
// value, no consecutive pairs, a known source gets its target replaced).
module t0dat_decoder
  import addr_codec_pkg::*;
#(
  parameter int unsigned AW        = 32,
  parameter int unsigned DAT_DEPTH = 32,
  parameter int unsigned STRIDE    = DEFAULT_STRIDE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bus_valid,
  input  logic [AW-1:0] bus,
  input  logic          inc_dat,
  output logic          out_valid,
  output logic [AW-1:0] out_addr
);
  logic [AW-1:0] last_q, addr_n, next_seq;
  logic          started_q;
  logic          src_hit, dat_wr;
  logic [AW-1:0] src_target;

  dat_table #(.AW(AW), .DEPTH(DAT_DEPTH)) u_dat (
    .clk, .rst_n,
    .key       (last_q),
    .hit       (src_hit),
    .target    (src_target),
    .wr_en     (dat_wr),
    .wr_target (bus)
  );

  assign next_seq = last_q + AW'(STRIDE);

  always_comb begin
    dat_wr = 1'b0;
    if (!inc_dat) begin
      addr_n = bus;
      dat_wr = bus_valid && started_q && (bus != next_seq);
    end else if (src_hit) begin
      addr_n = src_target;
    end else begin
      addr_n = next_seq;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q    <= '0;
      started_q <= 1'b0;
      out_valid <= 1'b0;
      out_addr  <= '0;
    end else begin
      out_valid <= bus_valid;
      if (bus_valid) begin
        last_q    <= addr_n;
        started_q <= 1'b1;
        out_addr  <= addr_n;
      end
    end
  end

endmodule
