// idst_encoder: encoder for an instruction/data mixed address bus
// (I/D selector with T0 DAT and Stride-Table).
//
// Instruction and data addresses share one bus. An I/D selector line (isel,
// 1 = instruction, 0 = data) tells the decoder which stream an address
// belongs to, so each stream keeps its own continuity:
//   * Instruction addresses use T0 DAT against the last instruction address
//     L, exactly as t0dat_encoder does.
//   * Data addresses use a Stride-Table indexed by L, the last instruction
//     address before the access, which stands for the load/store that made
//     it. If the entry exists and the address equals its Last Address +
//     Applied Stride, the bus is frozen.
// Both cases share one control line (INC-DAT/ST, output ctl).
//
// With ST_INV = 1 a data address that misses the Stride-Table is also
// bus-inverted when popcount(addr ^ bus) > AW/2 and ~addr differs from the
// bus; ctl is then high with a changed bus (the INC-DAT/ST-INV variant).
// ST_INV = 0, the default, is the plain Stride-Table scheme.
//
// Timing: bus, ctl, isel, bus_read, bus_valid and kind are registered, one
// clock after the address; one address per clock; lines hold between
// transfers. in_is_data = 1 marks a data address; in_read is the
// conventional Read/Write line and is carried along unchanged.
//
// The scheme follows the thesis, including the stride update
// (new stride = address - Last Address) and the default stride of 4. The
// DAT details (no pair from the reset value, no consecutive pairs, target
// replacement) and round-robin table replacement are this design's choices.
module idst_encoder
  import addr_codec_pkg::*;
#(
  parameter int unsigned AW        = 32,
  parameter int unsigned DAT_DEPTH = 32,
  parameter int unsigned ST_DEPTH  = 128,
  parameter int unsigned STRIDE    = DEFAULT_STRIDE,
  parameter bit          ST_INV    = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,
  input  logic          in_is_data,
  input  logic          in_read,
  output logic [AW-1:0] bus,
  output logic          ctl,
  output logic          isel,
  output logic          bus_valid,
  output logic          bus_read,
  output xfer_kind_e    kind
);
  logic [AW-1:0] last_i_q;
  logic          started_q;
  logic          src_hit, dat_wr;
  logic [AW-1:0] src_target;
  logic          st_hit;
  logic [AW-1:0] st_pred;
  logic          seq, pair_hit, invert_ok;
  xfer_kind_e    kind_n;

  dat_table #(.AW(AW), .DEPTH(DAT_DEPTH)) u_dat (
    .clk, .rst_n,
    .key       (last_i_q),
    .hit       (src_hit),
    .target    (src_target),
    .wr_en     (dat_wr),
    .wr_target (in_addr)
  );

  stride_table #(.AW(AW), .DEPTH(ST_DEPTH)) u_st (
    .clk, .rst_n,
    .key      (last_i_q),
    .hit      (st_hit),
    .pred     (st_pred),
    .upd      (in_valid && in_is_data),
    .upd_addr (in_addr)
  );

  assign seq       = (in_addr == last_i_q + AW'(STRIDE));
  assign pair_hit  = src_hit && (src_target == in_addr);
  assign invert_ok = ST_INV && ($countones(in_addr ^ bus) > (AW / 2)) && (~in_addr != bus);

  always_comb begin
    dat_wr = 1'b0;
    if (!in_is_data) begin
      if (pair_hit)              kind_n = XFER_DAT;
      else if (seq && !src_hit)  kind_n = XFER_INC;
      else begin
        kind_n = XFER_DIRECT;
        dat_wr = in_valid && started_q && !seq;
      end
    end else begin
      if (st_hit && st_pred == in_addr) kind_n = XFER_ST;
      else if (invert_ok)               kind_n = XFER_INV;
      else                              kind_n = XFER_DIRECT;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_i_q  <= '0;
      started_q <= 1'b0;
      bus       <= '0;
      ctl       <= 1'b0;
      isel      <= 1'b1;
      bus_valid <= 1'b0;
      bus_read  <= 1'b1;
      kind      <= XFER_NONE;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        if (!in_is_data) begin
          last_i_q  <= in_addr;
          started_q <= 1'b1;
        end
        kind     <= kind_n;
        isel     <= !in_is_data;
        bus_read <= in_read;
        ctl      <= (kind_n != XFER_DIRECT);
        if (kind_n == XFER_INV)         bus <= ~in_addr;
        else if (kind_n == XFER_DIRECT) bus <= in_addr;
      end
    end
  end

endmodule
