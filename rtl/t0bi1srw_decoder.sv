// t0bi1srw_decoder: T0_BI_1/S/RW decoder for a data address bus.
//
// Keeps the bus value of the previous transfer to tell whether the bus is
// frozen, and read and write vstride_units that it keeps in step with the
// encoder's. For each transfer (bus_valid high):
//   * INCV=0                   -> address = bus
//   * INCV=1, bus unchanged    -> address = last + chosen stride of the
//                                 stream selected by bus_read
//   * INCV=1, bus changed      -> address = ~bus
// The selected stream then learns the decoded address.
//
// Timing: out_addr, out_read and out_valid are registered, one clock after
// the bus transfer. The stored bus value resets to 0, the encoder's bus
// reset value. The rule follows the thesis.
module t0bi1srw_decoder
  import addr_codec_pkg::*;
#(
  parameter int unsigned AW          = 32,
  parameter int unsigned ENDURANCE   = 1,
  parameter int unsigned INIT_STRIDE = DEFAULT_STRIDE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bus_valid,
  input  logic [AW-1:0] bus,
  input  logic          incv,
  input  logic          bus_read,
  output logic          out_valid,
  output logic [AW-1:0] out_addr,
  output logic          out_read
);
  logic [AW-1:0] prev_bus_q, addr_n;
  logic [AW-1:0] r_pred, w_pred;

  vstride_unit #(.AW(AW), .ENDURANCE(ENDURANCE), .INIT_STRIDE(INIT_STRIDE)) u_rd (
    .clk, .rst_n, .upd(bus_valid && bus_read), .addr(addr_n),
    .pred(r_pred)
  );
  vstride_unit #(.AW(AW), .ENDURANCE(ENDURANCE), .INIT_STRIDE(INIT_STRIDE)) u_wr (
    .clk, .rst_n, .upd(bus_valid && !bus_read), .addr(addr_n),
    .pred(w_pred)
  );

  always_comb begin
    if (!incv)                  addr_n = bus;
    else if (bus == prev_bus_q) addr_n = bus_read ? r_pred : w_pred;
    else                        addr_n = ~bus;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_bus_q <= '0;
      out_valid  <= 1'b0;
      out_addr   <= '0;
      out_read   <= 1'b1;
    end else begin
      out_valid <= bus_valid;
      if (bus_valid) begin
        prev_bus_q <= bus;
        out_addr   <= addr_n;
        out_read   <= bus_read;
      end
    end
  end

endmodule
