// ooo_ref_pkg: a behavioural reference model of the out-of-order pipeline,
// used by the testbenches to predict, cycle by cycle, which instructions
// retire.
//
// The model is written as a sequential program over queues, the way a
// software pipeline simulator is: each cycle it calls the nine stages in
// reverse order (Retire, Writeback, Execute, Issue, Dispatch, RegRead,
// Rename, Decode, Fetch), so that each stage sees the pipeline registers as
// the later stages left them in this same cycle. Issue searches the IQ for
// the lowest sequence number up to WIDTH times; Execute counts each
// instruction's cycles down and, at zero, wakes sources in IQ, DI and RR.
// It shares nothing with the RTL but the package of types.
//
// The class also generates random traces and counts the events the
// testbenches must see at least once.
package ooo_ref_pkg;

  typedef struct {
    int seq;
    int pc;
    int op;
    int dst;        // -1: none
    int s1, s2;     // -1: none
    int dtag;
    int t1, t2;
    bit ren1, ren2;
    bit rdy1, rdy2;
    int ex;
  } minst_t;

  class ooo_ref;
    int W, IQS, ROBS;
    minst_t trace[$];
    int tptr;
    minst_t de[$], rn[$], rr[$], di[$], iq[$], ex[$], wb[$];
    int rob_seq[], rob_dst[];
    bit rob_rdy[];
    int head, tail, cnt;
    bit rmt_v[67];
    int rmt_t[67];
    int cycle;
    int retired_now[$];
    int fetched_now;
    // event counters
    int ev_wake_iq, ev_wake_di, ev_wake_rr, ev_rr_robcheck, ev_stale_guard,
        ev_rmt_inval, ev_inbundle_dep, ev_ooo_issue, ev_full_issue,
        ev_rob_stall, ev_iq_stall, ev_lat[3];

    function new(int w, int iqs, int robs);
      W = w; IQS = iqs; ROBS = robs;
      rob_seq = new[robs]; rob_dst = new[robs]; rob_rdy = new[robs];
      reset();
    endfunction

    function void reset();
      trace.delete(); tptr = 0;
      de.delete(); rn.delete(); rr.delete(); di.delete(); iq.delete(); ex.delete(); wb.delete();
      head = 0; tail = 0; cnt = 0; cycle = 0;
      foreach (rob_rdy[i]) begin rob_rdy[i] = 0; rob_seq[i] = 0; rob_dst[i] = -1; end
      foreach (rmt_v[i]) begin rmt_v[i] = 0; rmt_t[i] = 0; end
    endfunction

    function void clear_events();
      ev_wake_iq = 0; ev_wake_di = 0; ev_wake_rr = 0; ev_rr_robcheck = 0;
      ev_stale_guard = 0; ev_rmt_inval = 0; ev_inbundle_dep = 0; ev_ooo_issue = 0;
      ev_full_issue = 0; ev_rob_stall = 0; ev_iq_stall = 0;
      ev_lat[0] = 0; ev_lat[1] = 0; ev_lat[2] = 0;
    endfunction

    function void add(int pc, int op, int dst, int s1, int s2);
      minst_t m;
      m = '{default: 0};
      m.seq = trace.size(); m.pc = pc; m.op = op; m.dst = dst; m.s1 = s1; m.s2 = s2;
      trace.push_back(m);
    endfunction

    // Random trace: registers drawn from r0..nregs-1 (fewer registers, more
    // dependences); op types weighted by p0/p1 percent (rest type 2).
    function void gen_random(int n, int nregs, int p0, int p1, int pdst, int psrc);
      for (int i = 0; i < n; i++) begin
        int r, op, d, a, b;
        r = int'($urandom_range(99));
        op = (r < p0) ? 0 : (r < p0 + p1) ? 1 : 2;
        d = (int'($urandom_range(99)) < pdst) ? int'($urandom_range(nregs - 1)) : -1;
        a = (int'($urandom_range(99)) < psrc) ? int'($urandom_range(nregs - 1)) : -1;
        b = (int'($urandom_range(99)) < psrc) ? int'($urandom_range(nregs - 1)) : -1;
        add(32'h0040_0000 + 4 * trace.size(), op, d, a, b);
      end
    endfunction

    function int lat(int op);
      return (op == 0) ? 1 : (op == 1) ? 2 : 5;
    endfunction

    function bit done();
      return tptr == trace.size() && de.size() == 0 && rn.size() == 0 && rr.size() == 0 &&
             di.size() == 0 && iq.size() == 0 && ex.size() == 0 && wb.size() == 0 && cnt == 0;
    endfunction

    function void do_retire();
      for (int i = 0; i < W; i++) begin
        int d;
        if (cnt == 0 || !rob_rdy[head]) break;
        d = rob_dst[head];
        if (d >= 0 && rmt_v[d]) begin
          if (rmt_t[d] == head) begin rmt_v[d] = 0; ev_rmt_inval++; end
          else ev_stale_guard++;
        end
        retired_now.push_back(rob_seq[head]);
        head = (head + 1) % ROBS; cnt--;
      end
    endfunction

    function void do_writeback();
      foreach (wb[i]) rob_rdy[wb[i].dtag] = 1;
      wb.delete();
    endfunction

    function void wakeup(int tag);
      foreach (iq[i]) begin
        if (iq[i].ren1 && iq[i].t1 == tag && !iq[i].rdy1) begin iq[i].rdy1 = 1; ev_wake_iq++; end
        if (iq[i].ren2 && iq[i].t2 == tag && !iq[i].rdy2) begin iq[i].rdy2 = 1; ev_wake_iq++; end
      end
      foreach (di[i]) begin
        if (di[i].ren1 && di[i].t1 == tag && !di[i].rdy1) begin di[i].rdy1 = 1; ev_wake_di++; end
        if (di[i].ren2 && di[i].t2 == tag && !di[i].rdy2) begin di[i].rdy2 = 1; ev_wake_di++; end
      end
      foreach (rr[i]) begin
        if (rr[i].ren1 && rr[i].t1 == tag && !rr[i].rdy1) begin rr[i].rdy1 = 1; ev_wake_rr++; end
        if (rr[i].ren2 && rr[i].t2 == tag && !rr[i].rdy2) begin rr[i].rdy2 = 1; ev_wake_rr++; end
      end
    endfunction

    function void do_execute();
      minst_t keep[$];
      foreach (ex[i]) begin
        ex[i].ex--;
        if (ex[i].ex == 0) begin
          wakeup(ex[i].dtag);
          wb.push_back(ex[i]);
        end else keep.push_back(ex[i]);
      end
      ex = keep;
    endfunction

    function void do_issue();
      int n = 0;
      for (int p = 0; p < W; p++) begin
        int best = -1;
        foreach (iq[i])
          if (iq[i].rdy1 && iq[i].rdy2 && (best < 0 || iq[i].seq < iq[best].seq)) best = i;
        if (best < 0) break;
        if (best != 0) ev_ooo_issue++;
        iq[best].ex = lat(iq[best].op);
        ev_lat[iq[best].op > 2 ? 2 : iq[best].op]++;
        ex.push_back(iq[best]);
        iq.delete(best);
        n++;
      end
      if (n == W) ev_full_issue++;
    endfunction

    function void do_dispatch();
      if (di.size() == 0) return;
      if (IQS - iq.size() >= di.size()) begin
        foreach (di[i]) iq.push_back(di[i]);
        di.delete();
      end else ev_iq_stall++;
    endfunction

    function void do_regread();
      if (rr.size() == 0 || di.size() != 0) return;
      foreach (rr[i]) begin
        if (rr[i].ren1 && !rr[i].rdy1 && rob_rdy[rr[i].t1]) begin rr[i].rdy1 = 1; ev_rr_robcheck++; end
        if (rr[i].ren2 && !rr[i].rdy2 && rob_rdy[rr[i].t2]) begin rr[i].rdy2 = 1; ev_rr_robcheck++; end
        di.push_back(rr[i]);
      end
      rr.delete();
    endfunction

    function void do_rename();
      if (rn.size() == 0 || rr.size() != 0) return;
      if (ROBS - cnt < rn.size()) begin ev_rob_stall++; return; end
      foreach (rn[i]) begin
        minst_t m;
        m = rn[i];
        if (m.s1 >= 0 && rmt_v[m.s1]) begin
          m.ren1 = 1; m.t1 = rmt_t[m.s1]; m.rdy1 = 0;
        end else begin m.ren1 = 0; m.rdy1 = 1; end
        if (m.s2 >= 0 && rmt_v[m.s2]) begin m.ren2 = 1; m.t2 = rmt_t[m.s2]; m.rdy2 = 0; end
        else begin m.ren2 = 0; m.rdy2 = 1; end
        for (int j = 0; j < i; j++)
          if (rn[j].dst >= 0 && (rn[j].dst == m.s1 || rn[j].dst == m.s2)) begin ev_inbundle_dep++; break; end
        m.dtag = tail;
        rob_seq[tail] = m.seq; rob_dst[tail] = m.dst; rob_rdy[tail] = 0;
        if (m.dst >= 0) begin rmt_v[m.dst] = 1; rmt_t[m.dst] = tail; end
        tail = (tail + 1) % ROBS; cnt++;
        rr.push_back(m);
      end
      rn.delete();
    endfunction

    function void do_decode();
      if (de.size() == 0 || rn.size() != 0) return;
      rn = de; de.delete();
    endfunction

    function void do_fetch();
      fetched_now = 0;
      if (de.size() != 0) return;
      while (tptr < trace.size() && de.size() < W) begin
        de.push_back(trace[tptr]); tptr++; fetched_now++;
      end
    endfunction

    function void step();
      retired_now.delete();
      do_retire(); do_writeback(); do_execute(); do_issue(); do_dispatch();
      do_regread(); do_rename(); do_decode(); do_fetch();
      cycle++;
    endfunction
  endclass

endpackage
