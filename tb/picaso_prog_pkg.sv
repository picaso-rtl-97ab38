// Instruction-sequence builders for the PiCaSO testbenches.
//
// These functions play the part of the array controller: they append the
// broadcast instructions of one bit-serial operation to a queue, which a
// testbench then issues one per clock. 'lat' is the write-back latency of
// the PE-blocks (1 + RF_PIPE + OP_PIPE + ALU_PIPE): an instruction issued in
// cycle t writes port B in cycle t + lat. Operations that read both ports
// are issued in bursts of 'lat' instructions followed by 'lat' cycles
// without a port-B read, so that no port-B read meets a write-back.
package picaso_prog_pkg;
  import picaso_pkg::*;

  typedef pim_instr_t prog_t [$];

  function automatic void nops(ref prog_t q, input int n);
    for (int i = 0; i < n; i++) q.push_back(PIM_NOP);
  endfunction

  // Issue a list of port-B-reading instructions in bursts of 'lat', each
  // followed by 'lat' free cycles for the write-backs.
  // With 'tail_full' the first burst is the short one, so that the last
  // 'lat' instructions are issued back to back.
  function automatic void burst(ref prog_t q, input prog_t ins, input int lat,
                                input bit tail_full = 1'b0);
    int k, len;
    k   = 0;
    len = (tail_full && (ins.size() % lat) != 0) ? ins.size() % lat : lat;
    while (k < ins.size()) begin
      for (int s = 0; s < len && k < ins.size(); s++) q.push_back(ins[k++]);
      nops(q, lat);
      len = lat;
    end
  endfunction

  // dst[k] = s1[k] op s2[k] for k = 0..n-1 (two cycles per bit)
  function automatic void bin_op(ref prog_t q, input int lat, input alu_op_e op,
                                 input int dst, input int s1, input int s2, input int n);
    prog_t ins;
    for (int k = 0; k < n; k++) begin
      pim_instr_t i;
      i         = PIM_NOP;
      i.rd_a    = 1'b1; i.raddr_a = RF_AW'(s1 + k);
      i.rd_b    = 1'b1; i.raddr_b = RF_AW'(s2 + k);
      i.we      = 1'b1; i.waddr   = RF_AW'(dst + k);
      i.opm     = OPM_AB;
      i.alu_op  = op;
      i.first   = (k == 0);
      ins.push_back(i);
    end
    burst(q, ins, lat);
  endfunction

  // dst[k] = src[min(k, n_src-1)] for k = 0..n-1: copy with sign extension
  // (one cycle per bit: port A reads, port B writes)
  function automatic void sext_copy(ref prog_t q, input int lat, input int dst, input int src,
                                    input int n_src, input int n);
    for (int k = 0; k < n; k++) begin
      pim_instr_t i;
      i         = PIM_NOP;
      i.rd_a    = 1'b1; i.raddr_a = RF_AW'(src + ((k < n_src) ? k : n_src - 1));
      i.we      = 1'b1; i.waddr   = RF_AW'(dst + k);
      i.alu_op  = ALU_CPX;
      q.push_back(i);
    end
    nops(q, lat + 1);
  endfunction

  // One fold level (1..log2 W) of an n-bit field, in place (one cycle per bit).
  // Levels follow each other without a gap when n > lat (a level reads row k
  // n cycles after the previous level read it, after its write-back); the
  // caller adds the final drain (lat + 1 cycles) after the last level.
  function automatic void fold(ref prog_t q, input int lat, input opmux_mode_e pattern,
                               input int level, input int acc, input int n);
    for (int k = 0; k < n; k++) begin
      pim_instr_t i;
      i         = PIM_NOP;
      i.rd_a    = 1'b1; i.raddr_a = RF_AW'(acc + k);
      i.we      = 1'b1; i.waddr   = RF_AW'(acc + k);
      i.opm     = pattern;
      i.fold    = FOLD_W'(level - 1);
      i.alu_op  = ALU_ADD;
      i.first   = (k == 0);
      q.push_back(i);
    end
    if (n <= lat) nops(q, lat + 1 - n);
  endfunction

  // Configure the hop level, then move the n-bit field src of every
  // transmitter to the field dst of its receiver (PE 0). The stream arrives
  // 2^level cycles late, so the write address trails the read address.
  function automatic void hop(ref prog_t q, input int lat, input net_axis_e axis,
                              input int level, input int dst, input int src, input int n);
    pim_instr_t c;
    int d;
    d          = 1 << level;
    c          = PIM_NOP;
    c.conf_we  = 1'b1;
    c.conf_lvl = NET_LVL_W'(level);
    q.push_back(c);
    for (int j = 0; j < n + d; j++) begin
      pim_instr_t i;
      i         = PIM_NOP;
      i.rd_a    = (j < n); i.raddr_a = RF_AW'(src + ((j < n) ? j : 0));
      i.hop_en  = 1'b1;
      i.axis    = axis;
      i.net_hop = 1'b1;
      i.opm     = OPM_A_NET;
      i.alu_op  = ALU_CPY;
      i.we      = (j >= d);
      i.waddr   = RF_AW'(dst + ((j >= d) ? j - d : 0));
      q.push_back(i);
    end
    nops(q, lat + 1);
  endfunction

  // True if an instruction issued at position t of q may read port B, that
  // is, no write-back lands in that cycle.
  function automatic bit b_free(ref prog_t q, input int t, input int lat);
    return (t - lat < 0) || (t - lat >= q.size()) || !q[t - lat].we;
  endfunction

  // Append i at the earliest cycle in which it causes no port-B collision.
  // With 'next_close' the following port-B read must be possible within
  // 'lat' cycles (before i's own write-back lands).
  function automatic void place(ref prog_t q, input pim_instr_t i, input int lat,
                                input bit next_close = 1'b0);
    forever begin
      int t;
      bit ok;
      t  = q.size();
      ok = !i.rd_b || b_free(q, t, lat);
      if (ok && next_close) begin
        ok = 1'b0;
        for (int u = t + 1; u < t + lat; u++) if (b_free(q, u, lat)) ok = 1'b1;
      end
      if (ok) break;
      q.push_back(PIM_NOP);
    end
    q.push_back(i);
  endfunction

  // Signed Booth multiplication p[0..2n-1] = mc[0..n-1] * mp[0..n-1].
  // Iteration s adds or subtracts the multiplicand, sign-extended to n+1
  // bits, at bit s of the partial product: n+1 bit operations of two port
  // reads each. The row above the partial product does not exist yet and is
  // read as the partial product's sign, i.e. row s+n-1 is read for bit n-1
  // and again for bit n; the second read must come before the first one's
  // write-back. With lat = 1 that is impossible, so each iteration instead
  // copies its top row one row up, where the next iteration reads it as the
  // sign extension. The Booth-pair load reads port A only. Each
  // instruction is placed in the first cycle free of port-B collisions, which
  // approaches two cycles per bit operation.
  // Rows p..p+n must hold zero (booth_clear) before booth_mul starts.
  function automatic void booth_clear(ref prog_t q, input int lat, input int p, input int n);
    bin_op(q, lat, ALU_XOR, p, p, p, n + 1);
  endfunction

  function automatic void booth_mul(ref prog_t q, input int lat, input int p, input int mc,
                                    input int mp, input int n);
    for (int s = 0; s < n; s++) begin
      pim_instr_t bld;
      bld         = PIM_NOP;
      bld.rd_a    = 1'b1; bld.raddr_a = RF_AW'(mp + s);
      bld.alu_op  = ALU_BLD;
      bld.first   = (s == 0);
      q.push_back(bld);
      for (int j = 0; j <= n; j++) begin
        pim_instr_t i;
        int jj, jp;
        jj        = (j < n) ? j : n - 1;           // multiplicand, sign-extended
        jp        = (lat == 1) ? j : jj;           // partial product
        i         = PIM_NOP;
        i.rd_a    = 1'b1; i.raddr_a = RF_AW'(p + s + jp);
        i.rd_b    = 1'b1; i.raddr_b = RF_AW'(mc + jj);
        i.we      = 1'b1; i.waddr   = RF_AW'(p + s + j);
        i.opm     = OPM_AB;
        i.alu_op  = ALU_BOOTH;
        i.first   = (j == 0);
        place(q, i, lat, j == n - 1 && lat > 1);
      end
      if (lat == 1 && s < n - 1) begin
        pim_instr_t cp;
        nops(q, lat);  // the copy reads the row written by bit n
        cp         = PIM_NOP;
        cp.rd_a    = 1'b1; cp.raddr_a = RF_AW'(p + s + n);
        cp.we      = 1'b1; cp.waddr   = RF_AW'(p + s + n + 1);
        cp.alu_op  = ALU_CPX;
        q.push_back(cp);
      end
    end
    nops(q, lat + 1);
  endfunction

endpackage
