// tb_si_soc_top: end-to-end test of the signal-integrity boundary-scan SoC at its
// default size (32 i->j lines, 2 bidirectional j<->l lines, 2 l->k and 1 k->l lines).
//
// The testbench plays two roles.
//  * Interconnect: a timing model of every wire. A wire normally settles 100 ps after
//    its driver changes on the falling TCK edge (50 ps at the driving end of a
//    bidirectional wire). Three defects are built in: i->j line R_OPEN is slow (1200 ps);
//    i->j line V_XT is a crosstalk victim of its two neighbours, which either put a
//    glitch on it (victim quiet, both neighbours switching the same way) or delay it to
//    1500 ps (victim switching against both neighbours); bidirectional line BD_LATE
//    reaches its far end after 1500 ps. The model records, per receiving end, whether a
//    transition arrived after the 400 ps acceptable delay region.
//  * Tester: it drives only the five JTAG pins. It keeps its own model of the boundary
//    scan chain and of the update stages and compares every bit that comes out of TDO,
//    and every pin and core input after each Update-DR, with that model. Patterns are
//    delivered compressed: each is overlapped with what the chain already holds and
//    only the d bits that differ are shifted before Update-DR.
//
// Workloads: maximum-aggressor (MA) pattern sets, 12 vectors per victim line, for
// n = 8, 16 and 32 lines, each observed with the three read-out methods (after every
// pattern, after every victim, once at the end), plus one pseudo-random set with 75 %
// don't-care bits. The test also runs BYPASS and SAMPLE/PRELOAD. It counts how often each
// mechanism happened and fails if one never did. Compression rates and read-out cycle
// counts are printed.
module tb_si_soc_top;
  timeunit 1ps;
  timeprecision 1ps;
  import jtag_pkg::*;

  // top defaults, mirrored
  localparam int N_IJ = 32, N_JL = 2, N_LK = 2, N_KL = 1, ADR = 400;
  localparam int HALF = 5000;
  localparam int L  = 2 * N_IJ + 6 * N_JL + 2 * N_LK + 2 * N_KL;  // chain length
  localparam int NR = N_IJ + 2 * N_JL + N_KL + N_LK;              // receiving ends
  localparam int R_JBD = N_IJ, R_LBD = N_IJ + N_JL, R_LIN = N_IJ + 2 * N_JL;
  localparam int R_KIN = N_IJ + 2 * N_JL + N_KL;
  localparam int R_OPEN = 5, V_XT = 3, BD_LATE = 1;
  localparam int R_READ = L - N_IJ;  // shifts that bring every j input flag to TDO

  // ------------------------------------------------------------------ DUT
  logic tck = 1'b0, tms, tdi, trst_n, tdo, tdo_en;
  logic [N_IJ-1:0] i_core_out, i_pin_out, j_pin_in, j_core_in;
  logic [N_JL-1:0] j_core_bd_out, j_core_bd_oe, j_core_bd_in, j_pin_bd_out, j_pin_bd_oe, j_pin_bd_in;
  logic [N_JL-1:0] l_core_bd_out, l_core_bd_oe, l_core_bd_in, l_pin_bd_out, l_pin_bd_oe, l_pin_bd_in;
  logic [N_LK-1:0] l_core_out, l_pin_out, k_pin_in, k_core_in;
  logic [N_KL-1:0] l_pin_in, l_core_in, k_core_out, k_pin_out;

  si_soc_top dut (.*);

  always #(HALF) tck = ~tck;

  int checks = 0, failures = 0;
  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ interconnect model
  logic [NR-1:0]   rx = '0;          // value at each receiving end
  logic [NR-1:0]   late_seen = '0;   // a late transition arrived since last read-out
  logic [N_IJ-1:0] ij_prev = '0;
  logic [N_JL-1:0] wire_bd = '0;
  int n_ev_open = 0, n_ev_glitch = 0, n_ev_xdelay = 0, n_ev_bd = 0;

  assign j_pin_in    = rx[N_IJ-1:0];
  assign j_pin_bd_in = rx[R_JBD +: N_JL];
  assign l_pin_bd_in = rx[R_LBD +: N_JL];
  assign l_pin_in    = rx[R_LIN +: N_KL];
  assign k_pin_in    = rx[R_KIN +: N_LK];

  always @(negedge tck) begin
    int   ev_t [NR];
    logic ev_v [NR];
    logic gl   [NR];
    int   slots [6] = '{50, 100, 700, 900, 1200, 1500};
    int   cur;
    #1;
    for (int r = 0; r < NR; r++) begin ev_t[r] = 0; ev_v[r] = 1'b0; gl[r] = 1'b0; end
    // i -> j
    for (int q = 0; q < N_IJ; q++) begin
      logic nv, ch, rise_n, fall_n;
      nv = i_pin_out[q];
      ch = (nv != rx[q]);
      ev_v[q] = nv;
      if (q == R_OPEN) begin
        if (ch) begin ev_t[q] = 1200; n_ev_open++; end
      end else if (q == V_XT) begin
        rise_n = !ij_prev[q-1] && i_pin_out[q-1] && !ij_prev[q+1] && i_pin_out[q+1];
        fall_n = ij_prev[q-1] && !i_pin_out[q-1] && ij_prev[q+1] && !i_pin_out[q+1];
        if (!ch && (rise_n || fall_n)) begin gl[q] = 1'b1; n_ev_glitch++; end
        else if (ch && ((nv && fall_n) || (!nv && rise_n))) begin ev_t[q] = 1500; n_ev_xdelay++; end
        else if (ch) ev_t[q] = 100;
      end else if (ch) ev_t[q] = 100;
    end
    ij_prev = i_pin_out;
    // j <-> l, the j end drives when both enable
    for (int m = 0; m < N_JL; m++) begin
      logic w;
      int far_t;
      far_t = (m == BD_LATE) ? 1500 : 100;
      w = j_pin_bd_oe[m] ? j_pin_bd_out[m] : l_pin_bd_oe[m] ? l_pin_bd_out[m] : wire_bd[m];
      if (w != wire_bd[m]) begin
        ev_v[R_JBD+m] = w; ev_v[R_LBD+m] = w;
        ev_t[R_JBD+m] = j_pin_bd_oe[m] ? 50 : far_t;
        ev_t[R_LBD+m] = j_pin_bd_oe[m] ? far_t : 50;
        if (m == BD_LATE) n_ev_bd++;
      end
      wire_bd[m] = w;
    end
    for (int q = 0; q < N_KL; q++)
      if (k_pin_out[q] != rx[R_LIN+q]) begin ev_t[R_LIN+q] = 100; ev_v[R_LIN+q] = k_pin_out[q]; end
    for (int q = 0; q < N_LK; q++)
      if (l_pin_out[q] != rx[R_KIN+q]) begin ev_t[R_KIN+q] = 100; ev_v[R_KIN+q] = l_pin_out[q]; end
    // play the events in time order
    cur = 1;
    foreach (slots[s]) begin
      #(slots[s] - cur);
      cur = slots[s];
      for (int r = 0; r < NR; r++) begin
        if (ev_t[r] == cur) begin
          rx[r] = ev_v[r];
          if (cur > ADR) late_seen[r] = 1'b1;
        end
        if (gl[r] && (cur == 700 || cur == 900)) begin
          rx[r] = ~rx[r];
          late_seen[r] = 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------------ chain model
  typedef enum int {C_I_OUT, C_J_IN, C_J_BDOE, C_J_BDOUT, C_J_BDIN, C_L_IN, C_L_BDOE,
                    C_L_BDOUT, C_L_BDIN, C_L_OUT, C_K_IN, C_K_OUT} cell_t;
  cell_t kind [L];
  int    cbit [L];
  logic  chain [L];   // shift stages, index 0 next to TDI
  logic  upd [L];     // update stages
  logic  cur_mode = 1'b0, cur_si = 1'b0, cur_bsr = 1'b0;
  bit    flags_valid = 1'b0;

  function automatic bit is_obs(int idx);
    return kind[idx] inside {C_J_IN, C_J_BDIN, C_L_BDIN, C_L_IN, C_K_IN};
  endfunction

  function automatic int rx_of(int idx);
    case (kind[idx])
      C_J_IN:   return cbit[idx];
      C_J_BDIN: return R_JBD + cbit[idx];
      C_L_BDIN: return R_LBD + cbit[idx];
      C_L_IN:   return R_LIN + cbit[idx];
      C_K_IN:   return R_KIN + cbit[idx];
      default:  return -1;
    endcase
  endfunction

  // what the DUT presents for a cell: the pin it drives, or the core input it feeds
  function automatic logic dut_val(int idx);
    int b = cbit[idx];
    case (kind[idx])
      C_I_OUT:   return i_pin_out[b];
      C_J_IN:    return j_core_in[b];
      C_J_BDOE:  return j_pin_bd_oe[b];
      C_J_BDOUT: return j_pin_bd_out[b];
      C_J_BDIN:  return j_core_bd_in[b];
      C_L_IN:    return l_core_in[b];
      C_L_BDOE:  return l_pin_bd_oe[b];
      C_L_BDOUT: return l_pin_bd_out[b];
      C_L_BDIN:  return l_core_bd_in[b];
      C_L_OUT:   return l_pin_out[b];
      C_K_IN:    return k_core_in[b];
      C_K_OUT:   return k_pin_out[b];
      default:   return 1'b0;
    endcase
  endfunction

  function automatic logic core_val(int idx);
    int b = cbit[idx];
    case (kind[idx])
      C_I_OUT:   return i_core_out[b];
      C_J_BDOE:  return j_core_bd_oe[b];
      C_J_BDOUT: return j_core_bd_out[b];
      C_L_BDOE:  return l_core_bd_oe[b];
      C_L_BDOUT: return l_core_bd_out[b];
      C_L_OUT:   return l_core_out[b];
      C_K_OUT:   return k_core_out[b];
      default:   return 1'b0;
    endcase
  endfunction

  function automatic void build_map();
    int idx = 0;
    for (int q = 0; q < N_IJ; q++) begin kind[idx] = C_I_OUT; cbit[idx++] = q; end
    for (int q = 0; q < N_IJ; q++) begin kind[idx] = C_J_IN;  cbit[idx++] = q; end
    for (int m = 0; m < N_JL; m++) begin
      kind[idx] = C_J_BDOE; cbit[idx++] = m;
      kind[idx] = C_J_BDOUT; cbit[idx++] = m;
      kind[idx] = C_J_BDIN; cbit[idx++] = m;
    end
    for (int q = 0; q < N_KL; q++) begin kind[idx] = C_L_IN; cbit[idx++] = q; end
    for (int m = 0; m < N_JL; m++) begin
      kind[idx] = C_L_BDOE; cbit[idx++] = m;
      kind[idx] = C_L_BDOUT; cbit[idx++] = m;
      kind[idx] = C_L_BDIN; cbit[idx++] = m;
    end
    for (int q = 0; q < N_LK; q++) begin kind[idx] = C_L_OUT; cbit[idx++] = q; end
    for (int q = 0; q < N_LK; q++) begin kind[idx] = C_K_IN;  cbit[idx++] = q; end
    for (int q = 0; q < N_KL; q++) begin kind[idx] = C_K_OUT; cbit[idx++] = q; end
    if (idx != L) $fatal(1, "chain map length %0d != %0d", idx, L);
    foreach (chain[i]) begin chain[i] = 1'b0; upd[i] = 1'b0; end
  endfunction

  // ------------------------------------------------------------------ JTAG driver
  int n_tck = 0;
  task automatic step(input logic tms_v, input logic tdi_v, output logic tdo_v);
    @(negedge tck);
    tms = tms_v;
    tdi = tdi_v;
    @(posedge tck);
    tdo_v = tdo;
    n_tck++;
  endtask

  task automatic step0(input logic tms_v);
    logic dummy;
    step(tms_v, 1'b0, dummy);
  endtask

  // mechanism counters
  int n_bypass = 0, n_sample = 0, n_update = 0, n_si_capture = 0, n_overlap = 0;
  int n_det_open = 0, n_det_xt = 0, n_det_bd = 0, n_ir = 0;
  int n_m1 = 0, n_m2 = 0, n_m3 = 0;

  task automatic check_outputs(input string what);
    for (int idx = 0; idx < L; idx++) begin
      logic e;
      if (cur_mode) e = upd[idx];
      else          e = is_obs(idx) ? rx[rx_of(idx)] : core_val(idx);
      chk(dut_val(idx), e, $sformatf("%s: cell %0d (kind %0d bit %0d)", what, idx, kind[idx], cbit[idx]));
    end
  endtask

  // Load an instruction: from Run-Test/Idle back to Run-Test/Idle.
  task automatic load_ir(input ir_t op);
    logic [IR_WIDTH-1:0] cap;
    step0(1); step0(1); step0(0); step0(0);    // Select-DR, Select-IR, Capture-IR, Shift-IR
    for (int k = 0; k < IR_WIDTH; k++) begin
      logic o;
      step(k == IR_WIDTH - 1, op[k], o);
      cap[k] = o;
      chk(tdo_en, 1'b1, "tdo enabled in Shift-IR");
    end
    chk(cap[1], 1'b0, "IR capture bit 1");
    chk(cap[0], 1'b1, "IR capture bit 0");
    step0(1);                                   // Update-IR
    step0(0);                                   // Run-Test/Idle; instruction active
    cur_si   = (op == OP_EX_SITEST);
    cur_mode = (op == OP_EX_SITEST) || (op == OP_EXTEST);
    cur_bsr  = (op == OP_EX_SITEST) || (op == OP_EXTEST) || (op == OP_SAMPLE);
    n_ir++;
    #100;
    check_outputs("after IR update");
  endtask

  // One boundary-register scan from Run-Test/Idle: Capture-DR, nbits shifts (bits[0]
  // first), Update-DR, back to Run-Test/Idle. Every TDO bit is compared with the model.
  task automatic scan_dr(input int nbits, input logic bits [], input string what);
    logic o;
    step0(1); step0(0);                         // Select-DR, Capture-DR
    step0(nbits == 0);                          // capture happens on this edge
    // model capture
    for (int idx = 0; idx < L; idx++) begin
      if (is_obs(idx)) begin
        int r = rx_of(idx);
        if (cur_si) begin
          chain[idx] = late_seen[r];
          late_seen[r] = 1'b0;
        end else chain[idx] = rx[r];
      end else chain[idx] = cur_mode ? upd[idx] : core_val(idx);
    end
    if (cur_si) n_si_capture++;
    for (int k = 0; k < nbits; k++) begin
      int src = L - 1 - k;
      step(k == nbits - 1, bits[k], o);
      chk(tdo_en, 1'b1, "tdo enabled in Shift-DR");
      if (!(is_obs(src) && cur_si && !flags_valid))
        chk(o, chain[L-1], $sformatf("%s: TDO bit %0d (cell %0d)", what, k, src));
      if (is_obs(src) && cur_si && o && chain[L-1]) begin
        int r = rx_of(src);
        if (r == R_OPEN) n_det_open++;
        if (r == V_XT) n_det_xt++;
        if (r == R_JBD + BD_LATE || r == R_LBD + BD_LATE) n_det_bd++;
      end
      for (int i = L - 1; i > 0; i--) chain[i] = chain[i-1];
      chain[0] = bits[k];
    end
    step0(1);                                   // Update-DR
    step0(0);                                   // Run-Test/Idle, update done
    foreach (chain[i]) upd[i] = chain[i];
    if (cur_si) flags_valid = 1'b1;
    n_update++;
    #100;
    if (cur_bsr) check_outputs(what);
  endtask

  // ------------------------------------------------------------------ tester: compression
  // Smallest d such that shifting d new bits leaves every cared-for bit of the pattern
  // right in ring i (chain index q = line q), given what the chain holds now.
  function automatic int overlap_d(input logic val [N_IJ], input bit care [N_IJ]);
    for (int d = 0; d <= N_IJ; d++) begin
      bit ok = 1'b1;
      for (int q = d; q < N_IJ; q++)
        if (care[q] && chain[q-d] !== val[q]) ok = 1'b0;
      if (ok) return d;
    end
    return N_IJ;
  endfunction

  int sum_d = 0;

  // Apply one pattern with at least min_d shifts; returns the shifts used.
  task automatic apply(input logic val [N_IJ], input bit care [N_IJ], input int min_d,
                       input string what);
    int d;
    logic bits [];
    d = overlap_d(val, care);
    if (d < min_d) d = min_d;
    bits = new[d];
    for (int k = 0; k < d; k++) begin
      int pos = d - 1 - k;                      // where the k-th shifted bit ends up
      if (pos < N_IJ) bits[k] = care[pos] ? val[pos] : 1'b0;
      else            bits[k] = 1'($urandom_range(0, 1));
    end
    if (d < N_IJ) n_overlap++;
    sum_d += d;
    scan_dr(d, bits, what);
    for (int q = 0; q < N_IJ; q++)
      if (care[q]) chk(i_pin_out[q], val[q], $sformatf("%s: pattern bit %0d on the wire", what, q));
  endtask

  // Read-out: brings every j input flag to TDO and leaves ring i as it was.
  task automatic readout(input string what);
    logic bits [];
    bits = new[R_READ];
    for (int k = 0; k < R_READ; k++) begin
      int pos = R_READ - 1 - k;
      bits[k] = (pos < N_IJ) ? chain[pos] : 1'($urandom_range(0, 1));
    end
    scan_dr(R_READ, bits, what);
  endtask

  // pattern sets
  localparam int MAXP = 12 * N_IJ;
  logic pv [MAXP][N_IJ];
  bit   pc [MAXP][N_IJ];
  int   np;

  function automatic void gen_ma(int n);
    // (victim, aggressors) before -> after, for the six MA faults
    bit tv0 [6] = '{0, 1, 0, 1, 0, 1};
    bit ta0 [6] = '{0, 1, 1, 0, 0, 1};
    bit tv1 [6] = '{0, 1, 1, 0, 1, 0};
    bit ta1 [6] = '{1, 0, 0, 1, 1, 0};
    np = 0;
    for (int v = 0; v < n; v++)
      for (int f = 0; f < 6; f++)
        for (int h = 0; h < 2; h++) begin
          for (int q = 0; q < N_IJ; q++) begin
            pc[np][q] = (q < n);
            if (q == v) pv[np][q] = h ? tv1[f] : tv0[f];
            else        pv[np][q] = h ? ta1[f] : ta0[f];
          end
          np++;
        end
  endfunction

  function automatic void gen_random(int n);
    np = 12 * n;
    for (int p = 0; p < np; p++)
      for (int q = 0; q < N_IJ; q++) begin
        pc[p][q] = (q < n) && ($urandom_range(0, 3) == 0);
        pv[p][q] = 1'($urandom_range(0, 1));
      end
  endfunction

  // run a pattern set with read-out method 1, 2 or 3; n lines under test
  task automatic run_set(input string name, input int n, input int method);
    int sd0, reads;
    logic v [N_IJ];
    bit   c [N_IJ];
    bit   flagged [N_IJ];
    sd0 = sum_d;
    reads = 0;
    load_ir(method == 1 ? OP_EX_SITEST : OP_EXTEST);
    for (int p = 0; p < np; p++) begin
      for (int q = 0; q < N_IJ; q++) begin v[q] = pv[p][q]; c[q] = pc[p][q]; end
      apply(v, c, method == 1 ? R_READ : 0, $sformatf("%s n=%0d p%0d", name, n, p));
      if (method == 1 && p > 0) reads++;
      if (method == 2 && p % 12 == 11) begin
        load_ir(OP_EX_SITEST); readout("method 2 read-out"); reads++; load_ir(OP_EXTEST);
      end
    end
    if (method != 2 || np % 12 != 0 || method == 3) begin
      if (method != 1) load_ir(OP_EX_SITEST);
      // final read-out; keep its result to name the faulty lines
      foreach (flagged[q]) flagged[q] = late_seen[q];
      readout("final read-out");
      reads++;
    end
    if (method == 1) n_m1++; else if (method == 2) n_m2++; else n_m3++;
    // number of read-outs: one per pattern, one per victim (12 patterns), or one in all
    chk(reads == (method == 1 ? np : method == 2 ? np / 12 : 1), 1'b1,
        $sformatf("%s n=%0d method %0d read-out count %0d", name, n, method, reads));
    if (name == "MA" && method == 3) begin
      // with every line switching, the defective lines and only those are flagged
      for (int q = 0; q < n; q++)
        chk(flagged[q], (q == R_OPEN) || (q == V_XT), $sformatf("MA n=%0d line %0d flagged", n, q));
    end
    if (method == 3)
      $display("%s n=%0d: %0d patterns of %0d bits, %0d shifts compressed (rate %0.1f %%)",
               name, n, np, n, sum_d - sd0,
               100.0 * real'(np * n - (sum_d - sd0)) / real'(np * n));
    $display("%s n=%0d method %0d: %0d read-outs, %0d read-out shift cycles", name, n,
             method, reads, reads * R_READ);
  endtask

  // ------------------------------------------------------------------ test sequence
  initial begin
    logic o, prev;
    build_map();
    tms = 1; tdi = 0; trst_n = 0;
    i_core_out = '0; j_core_bd_out = '0; j_core_bd_oe = '0; l_core_bd_out = '0;
    l_core_bd_oe = '0; l_core_out = '0; k_core_out = '0;
    #22000 trst_n = 1;
    for (int k = 0; k < 5; k++) step0(1);
    step0(0);
    chk(tdo_en, 1'b0, "tdo disabled outside shift");

    // BYPASS (the instruction after reset): one-bit delay from TDI to TDO
    step0(1); step0(0); step0(0);               // Select-DR, Capture-DR, Shift-DR
    prev = 1'b0;                                // bypass captures 0
    for (int k = 0; k < 24; k++) begin
      logic b = 1'($urandom_range(0, 1));
      step(k == 23, b, o);
      chk(o, prev, "bypass bit");
      prev = b;
      n_bypass++;
    end
    step0(1); step0(0);

    // SAMPLE/PRELOAD: cells transparent, capture what the core and the wires carry
    load_ir(OP_SAMPLE);
    for (int k = 0; k < 4; k++) begin
      logic bits [];
      @(negedge tck);
      i_core_out = N_IJ'($urandom); l_core_out = N_LK'($urandom); k_core_out = N_KL'($urandom);
      j_core_bd_oe = N_JL'($urandom); l_core_bd_oe = ~j_core_bd_oe;
      j_core_bd_out = N_JL'($urandom); l_core_bd_out = N_JL'($urandom);
      bits = new[L];
      foreach (bits[i]) bits[i] = 1'($urandom_range(0, 1));
      step0(0); step0(0);
      check_outputs("normal mode");
      scan_dr(L, bits, "sample/preload");
      n_sample++;
    end

    // clear whatever the sensors saw so far
    load_ir(OP_EX_SITEST);
    readout("initial read-out");

    // workloads
    for (int s = 0; s < 3; s++) begin
      int n;
      n = 8 << s;
      for (int method = 3; method >= 1; method--) begin
        gen_ma(n);
        run_set("MA", n, method);
      end
    end
    gen_random(N_IJ);
    run_set("pseudo-random", N_IJ, 3);

    // every mechanism must have happened
    begin
      string names [14] = '{"bypass", "sample/preload", "update", "EX-SITEST capture",
                            "pattern overlap", "slow-line event", "glitch event",
                            "crosstalk-delay event", "bidirectional late event",
                            "slow line reported", "crosstalk victim reported",
                            "bidirectional line reported", "method 1/2", "method 3"};
      int cnt [14];
      cnt = '{n_bypass, n_sample, n_update, n_si_capture, n_overlap, n_ev_open, n_ev_glitch,
              n_ev_xdelay, n_ev_bd, n_det_open, n_det_xt, n_det_bd, n_m1 * n_m2, n_m3};
      foreach (cnt[i]) begin
        $display("  %-28s %0d", names[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[i]);
        end
      end
    end
    $display("TCK cycles: %0d", n_tck);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
