// t0bi1srw_encoder: T0_BI_1/S/RW encoder for a data address bus.
//
// Combines T0 (frozen bus for an address at the expected stride) with
// Bus-Invert (drive the inverted address when that toggles fewer lines)
// on a single control line, INCV. The decoder tells the two apart by
// whether the bus changed. The stride is learned per stream (S) and read
// and write addresses are kept as two streams, each with its own last
// address and stride (RW), selected by the Read/Write line.
//
// For each address (in_valid high), with P = last + chosen stride of the
// selected stream and B = the value now on the bus:
//   * addr == P                                      -> INCV=1, bus frozen
//   * popcount(addr ^ B) > AW/2 and ~addr != B       -> INCV=1, bus = ~addr
//   * otherwise                                      -> INCV=0, bus = addr
// The ~addr != B condition keeps an inverted value from looking like a
// frozen bus. The selected stream's vstride_unit then learns the address.
//
// Timing: bus, incv, bus_read, bus_valid and kind are registered, one clock
// after the address; one address per clock; lines hold between transfers.
// in_read = 1 marks a read, 0 a write. The rule, the special-case check and
// the per-stream state follow the thesis. Resetting both streams' last
// address to 0 (the bus reset value) follows its algorithms, as does the
// initial stride of 4.
module t0bi1srw_encoder
  import addr_codec_pkg::*;
#(
  parameter int unsigned AW          = 32,
  parameter int unsigned ENDURANCE   = 1,
  parameter int unsigned INIT_STRIDE = DEFAULT_STRIDE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,
  input  logic          in_read,
  output logic [AW-1:0] bus,
  output logic          incv,
  output logic          bus_valid,
  output logic          bus_read,
  output xfer_kind_e    kind
);
  logic [AW-1:0] r_pred, w_pred, pred;
  logic          invert_ok;
  xfer_kind_e    kind_n;

  vstride_unit #(.AW(AW), .ENDURANCE(ENDURANCE), .INIT_STRIDE(INIT_STRIDE)) u_rd (
    .clk, .rst_n, .upd(in_valid && in_read), .addr(in_addr),
    .pred(r_pred)
  );
  vstride_unit #(.AW(AW), .ENDURANCE(ENDURANCE), .INIT_STRIDE(INIT_STRIDE)) u_wr (
    .clk, .rst_n, .upd(in_valid && !in_read), .addr(in_addr),
    .pred(w_pred)
  );

  assign pred      = in_read ? r_pred : w_pred;
  assign invert_ok = ($countones(in_addr ^ bus) > (AW / 2)) && (~in_addr != bus);

  always_comb begin
    if (in_addr == pred) kind_n = XFER_INC;
    else if (invert_ok)  kind_n = XFER_INV;
    else                 kind_n = XFER_DIRECT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus       <= '0;
      incv      <= 1'b0;
      bus_valid <= 1'b0;
      bus_read  <= 1'b1;
      kind      <= XFER_NONE;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        kind     <= kind_n;
        bus_read <= in_read;
        incv     <= (kind_n != XFER_DIRECT);
        if (kind_n == XFER_INV)         bus <= ~in_addr;
        else if (kind_n == XFER_DIRECT) bus <= in_addr;
      end
    end
  end

endmodule
