// xor_link_decoder: transition-signalling (XOR) stage on the receiving side
// of an address bus.
//
// Undoes xor_link_encoder: at each transfer the bus value is the line
// pattern exclusive-ored with the bus value recovered at the previous
// transfer. Between transfers out_bus holds the last recovered value, so the
// bus decoder behind it sees exactly what the bus encoder drove, frozen
// buses included.
//
// Interface: in_valid/in_line come from the lines; out_bus feeds a bus
// decoder together with in_valid, which passes through unchanged.
//
// Timing: combinational from the lines to out_bus (no added clock on this
// side); the remembered value is registered at each transfer and resets to
// 0, matching xor_link_encoder. The layer itself follows the thesis; the
// split of clocks between the two sides is this design's choice.
module xor_link_decoder #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_line,
  output logic [W-1:0] out_bus
);
  logic [W-1:0] prev_q;

  assign out_bus = in_valid ? (in_line ^ prev_q) : prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n) prev_q <= '0;
    else if (in_valid) prev_q <= out_bus;
  end
endmodule
