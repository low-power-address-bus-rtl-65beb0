// xor_link_encoder: transition-signalling (XOR) stage on the sending side of
// an address bus.
//
// It sits between a bus encoder and the physical lines. At each transfer it
// drives the lines with the exclusive-or of the new bus value and the bus
// value of the previous transfer: the lines show which bus bits changed,
// not the bus value itself. A frozen bus (the codes' "send nothing" case)
// becomes an all-zero pattern on the lines, which costs no transitions once
// it is there. The receiving side (xor_link_decoder) undoes
// it with its own copy of the previous bus value.
//
// Interface: in_valid/in_bus come from a bus encoder; out_valid/out_line
// drive the lines. Only the address lines are exclusive-ored: the CW control
// lines of the code (in_ctl) are only registered, so that they stay aligned
// with the address lines.
//
// Timing: out_line and out_valid are registered, one clock after the
// transfer, and hold between transfers. Reset clears both the lines and the
// remembered bus value to 0, matching the encoders' reset bus value; the
// control lines reset to CTL_INIT, the reset value of the code's own lines.
//
// The thesis names this layer and its placement (the address code before
// the XOR stage on the sending side, after it on the receiving side); the
// registered output and the reset value are this design's choices.
module xor_link_encoder #(
  parameter int unsigned W  = 32,
  parameter int unsigned CW = 1,
  parameter logic [CW-1:0] CTL_INIT = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  in_bus,
  input  logic [CW-1:0] in_ctl,
  output logic          out_valid,
  output logic [W-1:0]  out_line,
  output logic [CW-1:0] out_ctl
);
  logic [W-1:0] prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_q    <= '0;
      out_line  <= '0;
      out_ctl   <= CTL_INIT;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_ctl   <= in_ctl;
      if (in_valid) begin
        out_line <= in_bus ^ prev_q;
        prev_q   <= in_bus;
      end
    end
  end
endmodule
