// codec_ref_pkg: behavioural reference models of the three address codes,
// used by the testbenches to work out the expected bus values and control
// lines independently of the RTL. Each model is a plain software rendering
// of the coding rule: it keeps its tables in ordinary arrays and searches
// them with loops, and uses the same replacement order as the hardware
// (round-robin) so that both see the same table contents.
//
// Kind codes returned by encode(): 1 direct, 2 increment by stride, 3 DAT
// hit, 4 bus invert, 5 Stride-Table hit (the values of xfer_kind_e).
package codec_ref_pkg;

  // Round-robin associative table: key -> data (data is 2 x 64 bits).
  class rr_table #(int DEPTH = 32);
    bit            valid [DEPTH];
    bit [63:0]     key   [DEPTH];
    bit [63:0]     d0    [DEPTH];
    bit [63:0]     d1    [DEPTH];
    int            next;
    function new(); next = 0; foreach (valid[i]) valid[i] = 0; endfunction
    function int find(bit [63:0] k);
      for (int i = 0; i < DEPTH; i++) if (valid[i] && key[i] == k) return i;
      return -1;
    endfunction
    // Update the entry of k, or insert a new one round-robin.
    function void put(bit [63:0] k, bit [63:0] v0, bit [63:0] v1);
      int i = find(k);
      if (i < 0) begin
        i = next; next = (next + 1) % DEPTH; valid[i] = 1; key[i] = k;
      end
      d0[i] = v0; d1[i] = v1;
    endfunction
  endclass

  function automatic int popc(bit [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) n += v[i];
    return n;
  endfunction

  // ---------------- T0 DAT ----------------
  class t0dat_ref #(int AW = 32, int DEPTH = 32, int STRIDE = 4);
    rr_table #(DEPTH) dat;
    bit [63:0] last, bus, mask;
    bit        ctl, started;
    function new();
      dat = new(); last = 0; bus = 0; ctl = 0; started = 0;
      mask = (AW == 64) ? '1 : ((64'd1 << AW) - 1);
    endfunction
    // Returns the kind; updates bus/ctl.
    function int encode(bit [63:0] a);
      int i = dat.find(last);
      int k;
      bit [63:0] nxt = (last + STRIDE) & mask;
      if (i >= 0 && dat.d0[i] == a)      k = 3;
      else if (i < 0 && a == nxt)        k = 2;
      else begin
        k = 1; bus = a;
        if (started && a != nxt) dat.put(last, a, 0);
      end
      ctl = (k != 1);
      last = a; started = 1;
      return k;
    endfunction
  endclass

  // ---------------- T0_BI_1/S/RW ----------------
  class vs_ref #(int AW = 32, int E = 1, int INIT = 4);
    bit [63:0] last, chosen, cand, mask;
    int        cnt;
    function new();
      mask = (AW == 64) ? '1 : ((64'd1 << AW) - 1);
      last = 0; chosen = INIT; cand = 0; cnt = 0;
    endfunction
    function bit [63:0] pred(); return (last + chosen) & mask; endfunction
    function void learn(bit [63:0] a);
      bit [63:0] s = (a - last) & mask;
      if (E != 0 && s != chosen) begin
        if (cnt != 0 && s == cand) cnt++;
        else begin cand = s; cnt = 1; end
        if (cnt >= E) begin chosen = s; cnt = 0; end
      end else cnt = 0;
      last = a;
    endfunction
  endclass

  class t0bi1srw_ref #(int AW = 32, int E = 1, int INIT = 4);
    vs_ref #(AW, E, INIT) rd, wr;
    bit [63:0] bus, mask;
    bit        ctl;
    function new();
      rd = new(); wr = new(); bus = 0; ctl = 0;
      mask = (AW == 64) ? '1 : ((64'd1 << AW) - 1);
    endfunction
    function int encode(bit [63:0] a, bit is_read);
      int k;
      bit [63:0] p = is_read ? rd.pred() : wr.pred();
      bit [63:0] inv = (~a) & mask;
      if (a == p) k = 2;
      else if (popc(a ^ bus) > AW / 2 && inv != bus) begin k = 4; bus = inv; end
      else begin k = 1; bus = a; end
      ctl = (k != 1);
      if (is_read) rd.learn(a); else wr.learn(a);
      return k;
    endfunction
  endclass

  // ---------------- I/D selector + T0 DAT + Stride-Table ----------------
  class idst_ref #(int AW = 32, int DDEPTH = 32, int SDEPTH = 128, int STRIDE = 4, bit INV = 0);
    rr_table #(DDEPTH) dat;
    rr_table #(SDEPTH) st;     // d0 = stride, d1 = last address
    bit [63:0] last_i, bus, mask;
    bit        ctl, isel, started;
    function new();
      dat = new(); st = new(); last_i = 0; bus = 0; ctl = 0; isel = 1; started = 0;
      mask = (AW == 64) ? '1 : ((64'd1 << AW) - 1);
    endfunction
    function int encode(bit [63:0] a, bit is_data);
      int k;
      if (!is_data) begin
        int i = dat.find(last_i);
        bit [63:0] nxt = (last_i + STRIDE) & mask;
        if (i >= 0 && dat.d0[i] == a) k = 3;
        else if (i < 0 && a == nxt)   k = 2;
        else begin
          k = 1; bus = a;
          if (started && a != nxt) dat.put(last_i, a, 0);
        end
        last_i = a; started = 1;
      end else begin
        int j = st.find(last_i);
        bit [63:0] inv = (~a) & mask;
        if (j >= 0 && ((st.d1[j] + st.d0[j]) & mask) == a) k = 5;
        else if (INV && popc(a ^ bus) > AW / 2 && inv != bus) begin k = 4; bus = inv; end
        else begin k = 1; bus = a; end
        if (j >= 0) st.put(last_i, (a - st.d1[j]) & mask, a);
        else        st.put(last_i, 4, a);
      end
      ctl = (k != 1); isel = !is_data;
      return k;
    endfunction
  endclass

  // Address stream generator modelling a program: mostly sequential fetch,
  // with branch sites that jump to fixed targets (loops, calls) and an
  // occasional unpredictable jump.
  class prog_gen #(int AW = 32);
    bit [63:0] pc, base, mask;
    int        taken_pct = 85;   // how often a branch site is taken
    function new(bit [63:0] start = 'h1000);
      base = start; pc = start; mask = (AW == 64) ? '1 : ((64'd1 << AW) - 1);
    endfunction
    // About one instruction in eight is a branch site. A site is taken
    // taken_pct% of the time, almost always to its own fixed target inside a
    // 1 KiB code region; now and then (an indirect jump or return) to a
    // random target. Other instructions fall through.
    function bit [63:0] next_pc();
      bit [63:0] h = ((pc >> 2) * 64'd2654435761) >> 7;
      int r = $urandom_range(0, 99);
      if (h[2:0] != 3'd0 || r >= taken_pct) pc = (pc + 4) & mask;
      else if ($urandom_range(0, 49) == 0)  pc = (base + ($urandom() & 64'h3FC)) & mask;
      else                                  pc = (base + ((h >> 3) & 64'h3FC)) & mask;
      if (pc >= base + 'h400) pc = base;
      return pc;
    endfunction
  endclass

  // Data address stream generator: a read stream and a write stream each
  // walk an array at their own stride (which changes from time to time),
  // interleaved at random and mixed with scattered scalar accesses and
  // read-modify-write pairs.
  class data_gen #(int AW = 32);
    bit [63:0] ra, wa, rs, ws, mask;
    bit        is_read;
    function new();
      mask = (AW == 64) ? '1 : ((64'd1 << AW) - 1);
      ra = 'h8000; wa = 'hC000; rs = 4; ws = 4; is_read = 1;
    endfunction
    function bit [63:0] pick_stride();
      case ($urandom_range(0, 5))
        0: return 4; 1: return 2; 2: return 1; 3: return 8;
        4: return (-64'd4) & mask; default: return 64;
      endcase
    endfunction
    function bit [63:0] next();
      int r = $urandom_range(0, 99);
      if (r < 2) rs = pick_stride();
      if (r > 97) ws = pick_stride();
      // Read-modify-write (a[i] = a[i] + c): write back to the address just
      // read.
      if (is_read && $urandom_range(0, 9) == 0) begin is_read = 0; return ra; end
      is_read = ($urandom_range(0, 2) != 0);
      if ($urandom_range(0, 9) == 0) return ($urandom() & mask) & ~64'h3;
      if (is_read) begin ra = (ra + rs) & mask; return ra; end
      wa = (wa + ws) & mask; return wa;
    endfunction
  endclass

  // Mixed instruction/data stream: a program (prog_gen) in which about one
  // instruction in four is a load/store. Each load/store walks its own
  // array at its own stride; a few make scattered accesses.
  class mixed_gen #(int AW = 32);
    prog_gen #(AW) p;
    bit [63:0] dlast [bit [63:0]];
    bit [63:0] mask, pc;
    bit        pending;
    function new();
      p = new(); mask = (AW == 64) ? '1 : ((64'd1 << AW) - 1); pending = 0;
    endfunction
    // Returns the next address; is_data tells which stream it belongs to.
    function bit [63:0] next(output bit is_data, output bit is_read);
      bit [63:0] h;
      if (pending) begin
        pending = 0; is_data = 1;
        h = ((pc >> 2) * 64'd40503) >> 3;
        is_read = h[0];
        if (!dlast.exists(pc)) dlast[pc] = (64'h20000 + (h & 64'hFFF0) * 16) & mask;
        if (h[5:3] == 3'd0) return ($urandom() & mask) & ~64'h3;
        case (h[2:1])
          2'd0: dlast[pc] = (dlast[pc] + 4) & mask;
          2'd1: dlast[pc] = (dlast[pc] - 4) & mask;
          2'd2: dlast[pc] = (dlast[pc] + 2) & mask;
          default: dlast[pc] = (dlast[pc] + 16) & mask;
        endcase
        return dlast[pc];
      end
      is_data = 0; is_read = 1;
      pc = p.next_pc();
      h = ((pc >> 2) * 64'd2246822519) >> 5;
      pending = (h[1:0] == 2'd0);
      return pc;
    endfunction
  endclass

endpackage
