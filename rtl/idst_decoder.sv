// idst_decoder: decoder for an instruction/data mixed address bus
// (I/D selector with T0 DAT and Stride-Table).
//
// Keeps a DAT and a Stride-Table in step with the encoder's, the last
// decoded instruction address L and the previous bus value. For each
// transfer (bus_valid high):
//   instruction (isel=1):
//     * ctl=0                   -> address = bus; record (L, address) in the
//                                  DAT if it is not L + STRIDE
//     * ctl=1, L a DAT source   -> address = DAT target
//     * ctl=1, otherwise        -> address = L + STRIDE
//   data (isel=0):
//     * ctl=0                   -> address = bus
//     * ctl=1, bus unchanged    -> address = Stride-Table prediction for L
//     * ctl=1, bus changed      -> address = ~bus (only sent when ST_INV=1)
//   and the Stride-Table learns the data address.
//
// Timing: out_* are registered, one clock after the bus transfer. The rule
// follows the thesis; the DAT-recording details and the reset values
// (L = 0, previous bus = 0) mirror idst_encoder.
module idst_decoder
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
  input  logic          bus_valid,
  input  logic [AW-1:0] bus,
  input  logic          ctl,
  input  logic          isel,
  input  logic          bus_read,
  output logic          out_valid,
  output logic [AW-1:0] out_addr,
  output logic          out_is_data,
  output logic          out_read
);
  logic [AW-1:0] last_i_q, prev_bus_q, addr_n, next_seq;
  logic          started_q;
  logic          src_hit, dat_wr;
  logic [AW-1:0] src_target;
  logic          st_hit;
  logic [AW-1:0] st_pred;

  dat_table #(.AW(AW), .DEPTH(DAT_DEPTH)) u_dat (
    .clk, .rst_n,
    .key       (last_i_q),
    .hit       (src_hit),
    .target    (src_target),
    .wr_en     (dat_wr),
    .wr_target (bus)
  );

  stride_table #(.AW(AW), .DEPTH(ST_DEPTH)) u_st (
    .clk, .rst_n,
    .key      (last_i_q),
    .hit      (st_hit),
    .pred     (st_pred),
    .upd      (bus_valid && !isel),
    .upd_addr (addr_n)
  );

  assign next_seq = last_i_q + AW'(STRIDE);

  always_comb begin
    dat_wr = 1'b0;
    if (isel) begin
      if (!ctl) begin
        addr_n = bus;
        dat_wr = bus_valid && started_q && (bus != next_seq);
      end else if (src_hit) addr_n = src_target;
      else                  addr_n = next_seq;
    end else begin
      if (!ctl)                                addr_n = bus;
      else if (bus == prev_bus_q || !ST_INV)   addr_n = st_pred;
      else                                     addr_n = ~bus;
    end
  end

  // A data transfer with ctl high and a frozen bus is only sent by the
  // encoder when its Stride-Table holds an entry for L, so ours must too.
  always_ff @(posedge clk) begin
    if (rst_n && bus_valid && !isel && ctl && bus == prev_bus_q)
      assert (st_hit) else $error("idst_decoder: Stride-Table miss on a frozen data transfer");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_i_q    <= '0;
      started_q   <= 1'b0;
      prev_bus_q  <= '0;
      out_valid   <= 1'b0;
      out_addr    <= '0;
      out_is_data <= 1'b0;
      out_read    <= 1'b1;
    end else begin
      out_valid <= bus_valid;
      if (bus_valid) begin
        if (isel) begin
          last_i_q  <= addr_n;
          started_q <= 1'b1;
        end
        prev_bus_q  <= bus;
        out_addr    <= addr_n;
        out_is_data <= !isel;
        out_read    <= bus_read;
      end
    end
  end

endmodule
