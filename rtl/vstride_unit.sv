// vstride_unit: variable-stride state of one address stream (T0_BI_1/S).
//
// Keeps the stream's last address, the chosen stride that T0 applies, a
// candidate ("new") stride and a count of how many transfers in a row the
// candidate has been seen. `pred` = last address + chosen stride is the
// address that can be sent with a frozen bus.
//
// With `upd` high at a clock edge the actual address `addr` of this
// transfer is taken in. Its stride s = addr - last is compared with the
// chosen stride. If they differ, s becomes the candidate (count 1) or, if it
// equals the candidate already held, the count grows. When the count reaches
// ENDURANCE the candidate becomes the chosen stride. ENDURANCE = 1 (the
// thesis's VS1) makes every new stride take effect at once; ENDURANCE = 0
// freezes the stride at INIT_STRIDE (fixed-stride T0_BI_1, FS4 by default).
//
// The registers and the endurance rule follow the thesis. The reset values
// (last address 0, which is the bus's reset value, and chosen stride
// INIT_STRIDE = 4) follow its encoding algorithms.
module vstride_unit #(
  parameter int unsigned AW          = 32,
  parameter int unsigned ENDURANCE   = 1,
  parameter int unsigned INIT_STRIDE = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          upd,
  input  logic [AW-1:0] addr,
  output logic [AW-1:0] pred
);
  localparam int unsigned CW = (ENDURANCE > 1) ? $clog2(ENDURANCE + 1) : 1;

  logic [AW-1:0] last_q, chosen_q, cand_q;
  logic [CW-1:0] cnt_q;
  logic [AW-1:0] s;
  logic [CW-1:0] cnt_n;

  assign s         = addr - last_q;
  assign pred      = last_q + chosen_q;

  // Count of consecutive appearances of the current stride as candidate.
  always_comb begin
    if (s == chosen_q)                    cnt_n = '0;
    else if (cnt_q != '0 && s == cand_q)  cnt_n = cnt_q + 1'b1;
    else                                  cnt_n = CW'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q   <= '0;
      chosen_q <= AW'(INIT_STRIDE);
      cand_q   <= '0;
      cnt_q    <= '0;
    end else if (upd) begin
      last_q <= addr;
      if (ENDURANCE != 0 && s != chosen_q) begin
        if (32'(cnt_n) >= ENDURANCE) begin
          chosen_q <= s;
          cnt_q    <= '0;
        end else begin
          cand_q <= s;
          cnt_q  <= cnt_n;
        end
      end else begin
        cnt_q <= '0;
      end
    end
  end

endmodule
