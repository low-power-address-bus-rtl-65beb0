// dat_table: Discontinuous Address Table (DAT) of the T0 DAT address code.
//
// Holds up to DEPTH pairs (Source address, Target address). A source
// address is stored at most once, so a lookup by source gives at most one
// target. The encoder and the decoder each own an identical copy and drive
// it with identical operations, so the two copies never diverge.
//
// Lookup is combinational: `key` (the previous address of the stream) is
// compared with every valid source and `hit`/`target` report the match.
// Write: with `wr_en` high at a clock edge the pair (key, wr_target) is
// recorded. If `key` is already a source its target is replaced; otherwise
// the pair goes into the next slot in round-robin order, overwriting the
// oldest entry once the table is full.
//
// The table's contents and its lookup by source follow the thesis. The
// replacement order (round-robin) and the replacement of the target of an
// existing source are this design's choices; the thesis names neither.
// Reset clears all valid bits.
module dat_table #(
  parameter int unsigned AW    = 32,
  parameter int unsigned DEPTH = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] key,
  output logic          hit,
  output logic [AW-1:0] target,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_target
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DEPTH-1:0]       valid_q;
  logic [AW-1:0]          src_q [DEPTH];
  logic [AW-1:0]          tgt_q [DEPTH];
  logic [PW-1:0]          next_q;
  logic [PW-1:0]          hit_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    target  = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (valid_q[i] && src_q[i] == key && !hit) begin
        hit     = 1'b1;
        hit_idx = PW'(i);
        target  = tgt_q[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      next_q  <= '0;
    end else if (wr_en) begin
      if (hit) begin
        tgt_q[hit_idx] <= wr_target;
      end else begin
        valid_q[next_q] <= 1'b1;
        src_q[next_q]   <= key;
        tgt_q[next_q]   <= wr_target;
        next_q          <= (next_q == PW'(DEPTH - 1)) ? '0 : next_q + 1'b1;
      end
    end
  end

endmodule
