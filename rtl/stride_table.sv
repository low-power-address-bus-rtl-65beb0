// stride_table: Stride-Table of the instruction/data mixed address bus code.
//
// Each entry holds (Index Address, Applied Stride, Last Address). The index
// is the last instruction address seen before a data access, which stands
// for the load/store instruction that made the access. For the current
// `key` the table predicts the next data address of that instruction as
// Last Address + Applied Stride (`hit`, `pred`, combinational).
//
// With `upd` high at a clock edge the data address `upd_addr` just
// transferred is learned: on a hit the entry's stride becomes
// upd_addr - Last Address and its Last Address becomes upd_addr; on a miss a
// new entry (key, DEFAULT_STRIDE, upd_addr) is inserted. Encoder and decoder
// keep identical copies.
//
// Entry contents, the update rule and the default stride of 4 follow the
// thesis. Round-robin replacement when the table is full is this design's
// choice. Strides are AW-bit two's complement values (address arithmetic is
// modulo 2^AW). Reset clears all valid bits.
module stride_table #(
  parameter int unsigned AW             = 32,
  parameter int unsigned DEPTH          = 128,
  parameter int unsigned DEFAULT_STRIDE = addr_codec_pkg::DEFAULT_STRIDE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] key,
  output logic          hit,
  output logic [AW-1:0] pred,
  input  logic          upd,
  input  logic [AW-1:0] upd_addr
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DEPTH-1:0] valid_q;
  logic [AW-1:0]    idx_q    [DEPTH];
  logic [AW-1:0]    stride_q [DEPTH];
  logic [AW-1:0]    last_q   [DEPTH];
  logic [PW-1:0]    next_q;
  logic [PW-1:0]    hit_idx;
  logic [AW-1:0]    hit_last;

  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    hit_last = '0;
    pred     = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (valid_q[i] && idx_q[i] == key && !hit) begin
        hit      = 1'b1;
        hit_idx  = PW'(i);
        hit_last = last_q[i];
        pred     = last_q[i] + stride_q[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      next_q  <= '0;
    end else if (upd) begin
      if (hit) begin
        stride_q[hit_idx] <= upd_addr - hit_last;
        last_q[hit_idx]   <= upd_addr;
      end else begin
        valid_q[next_q]  <= 1'b1;
        idx_q[next_q]    <= key;
        stride_q[next_q] <= AW'(DEFAULT_STRIDE);
        last_q[next_q]   <= upd_addr;
        next_q           <= (next_q == PW'(DEPTH - 1)) ? '0 : next_q + 1'b1;
      end
    end
  end

endmodule
