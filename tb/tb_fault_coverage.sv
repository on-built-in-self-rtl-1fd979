// Stuck-at fault coverage of the test pattern generator on 48-bit adders.
//
// The vectors come from the bist_tpg RTL (N = 48): its full period of
// 2(N+2) = 100 vectors is recorded first. The testbench then builds, in
// memory, gate-level netlists of the four adder structures with the same
// equations as the RTL (CLA cells with OR-type propagate, two-level LCUs made
// of AND/OR gates with up to five inputs), and also the multi-stage LCU adder
// with XOR-type propagate. Each netlist is checked fault free against
// A + B + Ci, and against the RTL adders, on every vector.
//
// Fault model: single stuck-at-0 and stuck-at-1 faults on every net (primary
// inputs and gate outputs) and on every gate input pin whose net fans out to
// more than one place. Gates whose outputs nothing uses are not built, so no
// fault sits on logic that cannot be observed. A fault is detected when any
// vector gives a sum or carry-out different from the fault-free one.
//
// Coverage is reported for the full 2(N+2)-vector sequence and for the
// 2(N+1)-vector sequence of the older generator, which is the same sequence
// without vectors N+2 and 2(N+2) (A all 0, B all 1, Ci = 1 and A all 1, B all
// 0, Ci = 0). The checks require, for the four OR-propagate adders, 100%
// coverage with the full sequence and less than 100% with the older one; and
// for the XOR-propagate adder, less than 100% with either. Typical output:
//   ripple carry adder   1538 faults  older 99.87%  full 100.00%
//   ripple CLA           2306 faults  older 99.91%  full 100.00%
//   ripple LCU           2564 faults  older 99.92%  full 100.00%
//   multi-stage LCU      2612 faults  older 99.92%  full 100.00%
//   multi-stage, XOR P   2420 faults  older 93.60%  full  93.64%
// The gate counts and fault totals depend on this netlist form and differ
// from those of any particular synthesized netlist.
//
// Last, the DSP slice's adder/subtractor: two multi-stage LCU adders with the
// SUBTRACT XORs between them, as one netlist. It is driven cycle by cycle
// through the same load/apply schedule as dsp_bist_ctrl, with P as the only
// output (the slice has no carry-out, so the logic that only feeds the
// carry-outs is removed first). The P register is modelled, so a fault that
// spoils the load cycle shows up through the value the apply cycle reads
// back. The check requires every fault to be detected:
//   DSP two-stage adder   838 gates  5080 faults  100.00%
// Runs in about half a minute.
module tb_fault_coverage;
  import adder_bist_pkg::*;

  localparam int N  = 48;
  localparam int NV = 2 * (N + 2);

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- vectors
  logic         clk = 0, rst = 1;
  logic [N-1:0] tpg_a, tpg_b;
  logic         tpg_ci, tpg_last;
  logic [N-1:0] va [NV];
  logic [N-1:0] vb [NV];
  logic         vc [NV];
  bit           is_new [NV];

  bist_tpg #(.N(N)) u_tpg (.clk(clk), .rst(rst), .ce(1'b1), .a(tpg_a), .b(tpg_b),
                           .ci(tpg_ci), .last(tpg_last));

  // RTL adders, fed from the recorded vectors, as a cross-check of the netlists
  logic [N-1:0] ra, rb;
  logic         rc;
  logic [N-1:0] s_rca, s_rcla, s_rlcu, s_mlcu, s_mx;
  logic         c_rca, c_rcla, c_rlcu, c_mlcu, c_mx;
  ripple_carry_adder   #(.WIDTH(N)) r0 (.a(ra), .b(rb), .cin(rc), .s(s_rca),  .cout(c_rca));
  ripple_cla_adder     #(.WIDTH(N)) r1 (.a(ra), .b(rb), .cin(rc), .s(s_rcla), .cout(c_rcla));
  ripple_lcu_adder     #(.WIDTH(N)) r2 (.a(ra), .b(rb), .cin(rc), .s(s_rlcu), .cout(c_rlcu));
  multistage_lcu_adder #(.WIDTH(N)) r3 (.a(ra), .b(rb), .cin(rc), .s(s_mlcu), .cout(c_mlcu));
  multistage_lcu_adder #(.WIDTH(N), .PKIND(P_XOR)) r4 (.a(ra), .b(rb), .cin(rc), .s(s_mx), .cout(c_mx));

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- netlist
  typedef enum int {G_AND, G_OR, G_XOR} gtype_e;
  localparam int MAXG = 4096;

  // gate gi: type g_t, input count g_n, inputs g_in[5*gi +: g_n], output g_out
  gtype_e g_t [MAXG];
  int    g_n [MAXG];
  int    g_in [5*MAXG];
  int    g_out [MAXG];
  int    ngates;
  int    nnets;
  int    pi_a [N];
  int    pi_b [N];
  int    pi_c;
  int    po_s [N];
  int    po_cout;
  int    npi;          // primary inputs are nets 0 .. npi-1
  int    fanout [];
  // operand and sum nets of the adder being built (the DSP netlist holds two)
  int    cur_a [N];
  int    cur_b [N];
  int    cur_s [N];
  // extra inputs of the DSP two-stage adder: Z operand and SUBTRACT
  int    pi_z [N];
  int    pi_sub;

  function automatic void reset_netlist();
    ngates = 0;
    nnets = 0;
    for (int i = 0; i < N; i++) begin pi_a[i] = nnets; nnets++; end
    for (int i = 0; i < N; i++) begin pi_b[i] = nnets; nnets++; end
    begin pi_c = nnets; nnets++; end
    npi = nnets;
    cur_a = pi_a;
    cur_b = pi_b;
  endfunction

  function automatic int mk(gtype_e t, int i0, int i1, int i2 = -1, int i3 = -1, int i4 = -1);
    int gi;
    gi = ngates;
    ngates++;
    g_t[gi] = t;
    g_in[5*gi]     = i0;
    g_in[5*gi + 1] = i1;
    g_in[5*gi + 2] = i2;
    g_in[5*gi + 3] = i3;
    g_in[5*gi + 4] = i4;
    g_n[gi] = (i4 >= 0) ? 5 : (i3 >= 0) ? 4 : (i2 >= 0) ? 3 : 2;
    g_out[gi] = nnets;
    nnets++;
    return g_out[gi];
  endfunction

  // OR of a list of terms (one term: the net itself)
  function automatic int or_list(int t [5], int n);
    if (n == 1) return t[0];
    return mk(G_OR, t[0], t[1], n > 2 ? t[2] : -1, n > 3 ? t[3] : -1, n > 4 ? t[4] : -1);
  endfunction

  function automatic int and_list(int t [5], int n);
    if (n == 1) return t[0];
    return mk(G_AND, t[0], t[1], n > 2 ? t[2] : -1, n > 3 ? t[3] : -1, n > 4 ? t[4] : -1);
  endfunction

  // carry C_k of a 4-bit LCU: G(k-1) + G(k-2)P(k-1) + ... + P(k-1)..P0 C0
  function automatic int lcu_carry(int p [4], int g [4], int c0, int k);
    int terms [5];
    int nt = 0;
    for (int j = k - 1; j >= 0; j--) begin
      int f [5];
      int nf = 0;
      begin f[nf] = g[j]; nf++; end
      for (int m = j + 1; m < k; m++) begin f[nf] = p[m]; nf++; end
      begin terms[nt] = and_list(f, nf); nt++; end
    end
    begin
      int f [5];
      int nf = 0;
      for (int m = 0; m < k; m++) begin f[nf] = p[m]; nf++; end
      begin f[nf] = c0; nf++; end
      begin terms[nt] = and_list(f, nf); nt++; end
    end
    return or_list(terms, nt);
  endfunction

  function automatic int lcu_gg(int p [4], int g [4]);
    int terms [5];
    for (int j = 3; j >= 0; j--) begin
      int f [5];
      int nf = 0;
      begin f[nf] = g[j]; nf++; end
      for (int m = j + 1; m < 4; m++) begin f[nf] = p[m]; nf++; end
      terms[3 - j] = and_list(f, nf);
    end
    return or_list(terms, 4);
  endfunction

  function automatic int lcu_pg(int p [4]);
    return mk(G_AND, p[0], p[1], p[2], p[3]);
  endfunction

  // 4-bit CLA on bits 4j..4j+3: cells, then carries C1..C3 (and C4 if asked)
  function automatic void cla4_net(int j, int c0, bit pxor, bit need_c4, bit need_grp,
                                   output int c4, output int pg, output int gg);
    int p [4];
    int g [4];
    int c [5];
    int hs [4];
    for (int i = 0; i < 4; i++) begin
      int a, b;
      a = cur_a[4*j + i];
      b = cur_b[4*j + i];
      g[i] = mk(G_AND, a, b);
      if (pxor) begin
        p[i]  = mk(G_XOR, a, b);
        hs[i] = p[i];
      end else begin
        p[i]  = mk(G_OR, a, b);
        hs[i] = mk(G_XOR, a, b);
      end
    end
    c[0] = c0;
    for (int k = 1; k <= 3; k++) c[k] = lcu_carry(p, g, c0, k);
    for (int i = 0; i < 4; i++) cur_s[4*j + i] = mk(G_XOR, hs[i], c[i]);
    c4 = need_c4 ? lcu_carry(p, g, c0, 4) : -1;
    pg = need_grp ? lcu_pg(p) : -1;
    gg = need_grp ? lcu_gg(p, g) : -1;
  endfunction

  function automatic void build_rca();
    int c;
    reset_netlist();
    c = pi_c;
    for (int i = 0; i < N; i++) begin
      int t, gg_, pp;
      t  = mk(G_XOR, pi_a[i], pi_b[i]);
      po_s[i] = mk(G_XOR, t, c);
      gg_ = mk(G_AND, pi_a[i], pi_b[i]);
      pp  = mk(G_OR, pi_a[i], pi_b[i]);
      c   = mk(G_OR, gg_, mk(G_AND, c, pp));
    end
    po_cout = c;
  endfunction

  function automatic void build_rcla();
    int c, pg, gg;
    reset_netlist();
    c = pi_c;
    for (int j = 0; j < N / 4; j++) cla4_net(j, c, 1'b0, 1'b1, 1'b0, c, pg, gg);
    po_s = cur_s;
    po_cout = c;
  endfunction

  // two-level 16-bit block number blk; returns its carry-out (C4 of level 2)
  function automatic int cla16_net(int blk, int cin);
    int p [4];
    int g [4];
    int unused;
    int cc;
    // group carries depend on the level-2 LCU, which needs the groups' PG/GG:
    // build the groups' P/G first with placeholder carry-ins, then patch.
    int cin_net [4];
    cin_net[0] = cin;
    for (int q = 1; q < 4; q++) begin cin_net[q] = nnets; nnets++; end   // placeholders
    for (int q = 0; q < 4; q++) cla4_net(4*blk + q, cin_net[q], 1'b0, 1'b0, 1'b1, unused, p[q], g[q]);
    for (int k = 1; k <= 3; k++) begin
      cc = lcu_carry(p, g, cin, k);
      patch(cin_net[k], cc);
    end
    return lcu_carry(p, g, cin, 4);
  endfunction

  // replace every use of placeholder net ph by net real_net (a carry that is
  // built after the gates reading it; topo_sort restores the order)
  function automatic void patch(int ph, int real_net);
    for (int i = 0; i < ngates; i++)
      for (int k = 0; k < g_n[i]; k++)
        if (g_in[5*i + k] == ph) g_in[5*i + k] = real_net;
  endfunction

  // order gates so that each comes after the gates driving its inputs
  function automatic void topo_sort();
    gtype_e st [];
    int     sn [];
    int     sin [];
    int     sout [];
    bit     ready [];
    bit     placed [];
    int     left, ns;
    st = new[ngates];
    sn = new[ngates];
    sin = new[5*ngates];
    sout = new[ngates];
    ready  = new[nnets];
    placed = new[ngates];
    for (int i = 0; i < npi; i++) ready[i] = 1;
    left = ngates;
    ns = 0;
    while (left > 0) begin
      int progress = 0;
      for (int i = 0; i < ngates; i++) begin
        if (!placed[i]) begin
          bit ok = 1;
          for (int k = 0; k < g_n[i]; k++) if (!ready[g_in[5*i + k]]) ok = 0;
          if (ok) begin
            placed[i] = 1;
            ready[g_out[i]] = 1;
            st[ns] = g_t[i];
            sn[ns] = g_n[i];
            for (int k = 0; k < 5; k++) sin[5*ns + k] = g_in[5*i + k];
            sout[ns] = g_out[i];
            ns++;
            left--;
            progress++;
          end
        end
      end
      if (progress == 0) begin
        $display("FAIL netlist has a gate with an undriven input");
        failures++;
        break;
      end
    end
    for (int i = 0; i < ns; i++) begin
      g_t[i] = st[i];
      g_n[i] = sn[i];
      for (int k = 0; k < 5; k++) g_in[5*i + k] = sin[5*i + k];
      g_out[i] = sout[i];
    end
    ngates = ns;
  endfunction

  function automatic void build_rlcu();
    int c;
    reset_netlist();
    c = pi_c;
    for (int blk = 0; blk < N / 16; blk++) c = cla16_net(blk, c);
    po_s = cur_s;
    po_cout = c;
    topo_sort();
  endfunction

  // multi-stage: 12 groups, 3 level-2 LCUs, 1 level-3 LCU (3 groups used)
  // builds a multi-stage LCU adder on cur_a/cur_b with carry-in cin, sums in
  // cur_s; returns the carry-out net, or -1 when need_cout is 0
  function automatic int mlcu_core(int cin, bit pxor, bit need_cout);
    int p1 [12];
    int g1 [12];
    int cin1 [12];
    int p2 [4];
    int g2 [4];
    int cin2 [3];
    int unused;
    cin2[0] = cin;
    for (int k = 1; k < 3; k++) begin cin2[k] = nnets; nnets++; end                 // placeholders
    for (int j = 0; j < 12; j++) begin
      if (j % 4 == 0) begin
        cin1[j] = cin2[j / 4];
      end else begin
        cin1[j] = nnets;
        nnets++;
      end
    end
    for (int j = 0; j < 12; j++) cla4_net(j, cin1[j], pxor, 1'b0, 1'b1, unused, p1[j], g1[j]);
    for (int k = 0; k < 3; k++) begin
      int p [4];
      int g [4];
      for (int m = 0; m < 4; m++) begin
        p[m] = p1[4*k + m];
        g[m] = g1[4*k + m];
      end
      for (int m = 1; m < 4; m++) patch(cin1[4*k + m], lcu_carry(p, g, cin2[k], m));
      p2[k] = lcu_pg(p);
      g2[k] = lcu_gg(p, g);
    end
    p2[3] = -1;
    g2[3] = -1;
    for (int k = 1; k < 3; k++) patch(cin2[k], lcu_carry(p2, g2, cin, k));
    return need_cout ? lcu_carry(p2, g2, cin, 3) : -1;
  endfunction

  function automatic void build_mlcu(bit pxor);
    reset_netlist();
    po_cout = mlcu_core(pi_c, pxor, 1'b1);
    po_s = cur_s;
    topo_sort();
  endfunction

  // removes gates whose output reaches no primary output (logic that only
  // fed an unobserved carry-out)
  function automatic void prune();
    int removed;
    do begin
      int keep;
      count_fanout();
      removed = 0;
      keep = 0;
      for (int gi = 0; gi < ngates; gi++) begin
        if (fanout[g_out[gi]] == 0) begin
          removed++;
        end else begin
          g_t[keep] = g_t[gi];
          g_n[keep] = g_n[gi];
          for (int k = 0; k < 5; k++) g_in[5*keep + k] = g_in[5*gi + k];
          g_out[keep] = g_out[gi];
          keep++;
        end
      end
      ngates = keep;
    end while (removed > 0);
  endfunction

  // DSP adder/subtractor: top stage y + x + cin (operands on pi_a = Y and
  // pi_b = X), its sum XORed with SUBTRACT, bottom stage z + that + sub.
  // Both stages are multi-stage LCU adders. The slice brings out only the
  // 48-bit P, so neither carry-out is observed.
  function automatic void build_dsp();
    int top_s [N];
    reset_netlist();
    for (int i = 0; i < N; i++) begin pi_z[i] = nnets; nnets++; end
    begin pi_sub = nnets; nnets++; end
    npi = nnets;
    void'(mlcu_core(pi_c, 1'b0, 1'b0));
    top_s = cur_s;
    for (int i = 0; i < N; i++) cur_b[i] = mk(G_XOR, top_s[i], pi_sub);
    cur_a = pi_z;
    void'(mlcu_core(pi_sub, 1'b0, 1'b0));
    po_s = cur_s;
    po_cout = -1;
    topo_sort();
    prune();
  endfunction

  // ---------------------------------------------------------------- simulate
  bit vals [];

  // fault: kind 0 none, 1 stem on net fnet, 2 branch on gate fg pin fp
  // evaluates every gate; the primary inputs must already be in vals
  function automatic void eval_core(int kind, int fnet, int fg, int fp, bit sv);
    if (kind == 1 && fnet < npi) vals[fnet] = sv;
    for (int gi = 0; gi < ngates; gi++) begin
      bit r, x;
      r = (g_t[gi] == G_AND) ? 1'b1 : 1'b0;
      for (int k = 0; k < g_n[gi]; k++) begin
        x = vals[g_in[5*gi + k]];
        if (kind == 2 && fg == gi && fp == k) x = sv;
        case (g_t[gi])
          G_AND:   r = r & x;
          G_OR:    r = r | x;
          default: r = r ^ x;
        endcase
      end
      if (kind == 1 && fnet == g_out[gi]) r = sv;
      vals[g_out[gi]] = r;
    end
  endfunction

  function automatic void eval(int v, int kind, int fnet, int fg, int fp, bit sv,
                               output logic [N-1:0] s, output logic co);
    for (int i = 0; i < N; i++) begin
      vals[pi_a[i]] = va[v][i];
      vals[pi_b[i]] = vb[v][i];
    end
    vals[pi_c] = vc[v];
    eval_core(kind, fnet, fg, fp, sv);
    for (int i = 0; i < N; i++) s[i] = vals[po_s[i]];
    co = vals[po_cout];
  endfunction

  // one cycle of the DSP adder: returns the value P takes at the clock edge
  function automatic logic [N-1:0] eval_dsp(logic [N-1:0] x, logic [N-1:0] y,
                                            logic [N-1:0] z, bit cin, bit sub,
                                            int kind, int fnet, int fg, int fp, bit sv);
    logic [N-1:0] s;
    for (int i = 0; i < N; i++) begin
      vals[pi_a[i]] = y[i];
      vals[pi_b[i]] = x[i];
      vals[pi_z[i]] = z[i];
    end
    vals[pi_c]   = cin;
    vals[pi_sub] = sub;
    eval_core(kind, fnet, fg, fp, sv);
    for (int i = 0; i < N; i++) s[i] = vals[po_s[i]];
    return s;
  endfunction

  // The full two-cycle schedule: for each vector of the top stage, a load
  // cycle (Z = C = A, X = Y = 0) and an apply cycle (X = P, Y = C = B,
  // CIN = Ci); then for each vector of the bottom stage, a load cycle
  // (Y = C = A, inverted when Ci = 1) and an apply cycle (X = P, Z = C = B,
  // SUBTRACT = Ci). P after each apply cycle is the response, written into
  // resp[stage*NV + v]. Stops at the first response differing from gold when
  // gold_valid is set.
  function automatic bit run_dsp_schedule(int kind, int fnet, int fg, int fp, bit sv,
                                          bit gold_valid, ref logic [N-1:0] resp [2*NV]);
    logic [N-1:0] p;
    for (int st = 0; st < 2; st++) begin
      for (int v = 0; v < NV; v++) begin
        logic [N-1:0] r;
        if (st == 0) begin
          p = eval_dsp('0, '0, va[v], 1'b0, 1'b0, kind, fnet, fg, fp, sv);
          r = eval_dsp(p, vb[v], '0, vc[v], 1'b0, kind, fnet, fg, fp, sv);
        end else begin
          p = eval_dsp('0, va[v] ^ {N{vc[v]}}, '0, 1'b0, 1'b0, kind, fnet, fg, fp, sv);
          r = eval_dsp(p, '0, vb[v], 1'b0, vc[v], kind, fnet, fg, fp, sv);
        end
        if (gold_valid) begin
          if (r != resp[st*NV + v]) return 1'b1;
        end else begin
          resp[st*NV + v] = r;
        end
      end
    end
    return 1'b0;
  endfunction

  task automatic run_dsp_faults();
    logic [N-1:0] gold [2*NV];
    int nf = 0, det = 0;
    vals = new[nnets];
    count_fanout();
    void'(run_dsp_schedule(0, -1, -1, -1, 1'b0, 1'b0, gold));
    for (int st = 0; st < 2; st++)
      for (int v = 0; v < NV; v++) begin
        checks++;
        if (gold[st*NV + v] != va[v] + vb[v] + N'(vc[v])) begin
          failures++;
          $display("FAIL DSP netlist stage %0d vector %0d", st, v);
        end
      end
    for (int f = 0; f < nnets; f++) begin
      if (fanout[f] == 0) continue;
      for (int sv = 0; sv < 2; sv++) begin
        nf++;
        det += int'(run_dsp_schedule(1, f, -1, -1, 1'(sv), 1'b1, gold));
      end
    end
    for (int gi = 0; gi < ngates; gi++)
      for (int k = 0; k < g_n[gi]; k++) begin
        if (fanout[g_in[5*gi + k]] < 2) continue;
        for (int sv = 0; sv < 2; sv++) begin
          nf++;
          det += int'(run_dsp_schedule(2, -1, gi, k, 1'(sv), 1'b1, gold));
        end
      end
    $display("%-26s gates=%4d faults=%5d  two-cycle schedule, 2 x 2(N+2) vectors: %6.2f%%",
             "DSP two-stage adder", ngates, nf, 100.0 * det / nf);
    // testing each stage in turn through P and the C port reaches every fault
    checks++;
    if (det != nf) begin
      failures++;
      $display("FAIL DSP adder: %0d of %0d faults undetected", nf - det, nf);
    end
  endtask

  function automatic void count_fanout();
    fanout = new[nnets];
    for (int gi = 0; gi < ngates; gi++)
      for (int k = 0; k < g_n[gi]; k++) fanout[g_in[5*gi + k]]++;
    for (int i = 0; i < N; i++) fanout[po_s[i]]++;
    if (po_cout >= 0) fanout[po_cout]++;
  endfunction

  // fault-simulates the current netlist and reports coverage for both sequences
  task automatic run_faults(input string name, input bit expect_full);
    int nf = 0, det_full = 0, det_old = 0;
    logic [N-1:0] gs [NV];
    logic         gc [NV];
    vals = new[nnets];
    count_fanout();
    // fault-free responses, checked against arithmetic
    for (int v = 0; v < NV; v++) begin
      logic [N:0] e;
      eval(v, 0, -1, -1, -1, 1'b0, gs[v], gc[v]);
      e = (N+1)'(va[v]) + (N+1)'(vb[v]) + (N+1)'(vc[v]);
      checks++;
      if ({gc[v], gs[v]} !== e) begin
        failures++;
        $display("FAIL %s netlist vector %0d: %h exp %h", name, v, {gc[v], gs[v]}, e);
      end
    end
    // fault list: stems on every net, branches where fanout > 1
    for (int f = 0; f < nnets; f++) begin
      if (fanout[f] == 0) continue;
      for (int sv = 0; sv < 2; sv++) begin
        bit d_full = 0, d_old = 0;
        nf++;
        for (int v = 0; v < NV && !d_old; v++) begin
          logic [N-1:0] s;
          logic         co;
          eval(v, 1, f, -1, -1, 1'(sv), s, co);
          if (s != gs[v] || co != gc[v]) begin
            d_full = 1;
            if (!is_new[v]) d_old = 1;
          end
        end
        det_full += int'(d_full);
        det_old  += int'(d_old);
      end
    end
    for (int gi = 0; gi < ngates; gi++) begin
      for (int k = 0; k < g_n[gi]; k++) begin
        if (fanout[g_in[5*gi + k]] < 2) continue;
        for (int sv = 0; sv < 2; sv++) begin
          bit d_full = 0, d_old = 0;
          nf++;
          for (int v = 0; v < NV && !d_old; v++) begin
            logic [N-1:0] s;
            logic         co;
            eval(v, 2, -1, gi, k, 1'(sv), s, co);
            if (s != gs[v] || co != gc[v]) begin
              d_full = 1;
              if (!is_new[v]) d_old = 1;
            end
          end
          det_full += int'(d_full);
          det_old  += int'(d_old);
        end
      end
    end
    $display("%-26s gates=%4d faults=%5d  2(N+1) vectors: %6.2f%%  2(N+2) vectors: %6.2f%%",
             name, ngates, nf, 100.0 * det_old / nf, 100.0 * det_full / nf);
    if (expect_full) begin
      // OR-type propagate: the full sequence detects every fault, the
      // older one misses some
      checks++;
      if (det_full != nf) begin
        failures++;
        $display("FAIL %s: %0d of %0d faults undetected by the full sequence", name, nf - det_full, nf);
      end
      checks++;
      if (det_old >= nf) begin
        failures++;
        $display("FAIL %s: the older sequence already detects every fault", name);
      end
    end else begin
      // XOR-type propagate: some faults stay undetected
      checks++;
      if (det_full >= nf) begin
        failures++;
        $display("FAIL %s: expected undetected faults", name);
      end
    end
    checks++;
    if (det_old > det_full) begin
      failures++;
      $display("FAIL %s: inconsistent counts", name);
    end
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;     // the first vector is presented until the next rising edge
    for (int v = 0; v < NV; v++) begin
      va[v] = tpg_a;
      vb[v] = tpg_b;
      vc[v] = tpg_ci;
      is_new[v] = (v == N + 1) || (v == 2 * N + 3);
      @(negedge clk);
    end
    // the two added vectors are the ones the older generator lacks
    checks++;
    if (!(va[N+1] == '0 && vb[N+1] == '1 && vc[N+1] == 1'b1 &&
          va[2*N+3] == '1 && vb[2*N+3] == '0 && vc[2*N+3] == 1'b0)) begin
      failures++;
      $display("FAIL added vectors not where expected");
    end
    // RTL adders agree with arithmetic on every vector
    for (int v = 0; v < NV; v++) begin
      logic [N:0] e;
      ra = va[v]; rb = vb[v]; rc = vc[v];
      #1;
      e = (N+1)'(ra) + (N+1)'(rb) + (N+1)'(rc);
      checks++;
      if ({c_rca, s_rca} !== e || {c_rcla, s_rcla} !== e || {c_rlcu, s_rlcu} !== e
          || {c_mlcu, s_mlcu} !== e || {c_mx, s_mx} !== e) begin
        failures++;
        $display("FAIL RTL adders on vector %0d", v);
      end
    end

    build_rca();
    run_faults("ripple carry adder", 1'b1);
    build_rcla();
    run_faults("ripple CLA", 1'b1);
    build_rlcu();
    run_faults("ripple LCU", 1'b1);
    build_mlcu(1'b0);
    run_faults("multi-stage LCU", 1'b1);
    build_mlcu(1'b1);
    run_faults("multi-stage LCU, XOR prop.", 1'b0);
    build_dsp();
    run_dsp_faults();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
