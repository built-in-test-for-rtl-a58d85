// bibs_pkg -- types, constants and elaboration-time functions shared by the
// BIBS (Built-In test for Balanced Structures) test hardware.
//
// * bilbo_mode_e: the four operating modes of a BILBO-style register. The
//   encoding follows the classic two-control-bit BILBO convention
//   (11 normal, 00 scan, 01 reset, 10 test); that encoding is this design's
//   choice, the document only names the register type.
// * prim_poly(n): the low-order terms of a primitive polynomial of degree n
//   (2..64) for a type-1 (external-XOR) LFSR. Bit e of the result is the
//   coefficient of x^e; x^n and 1 are implied. Degrees 8, 9, 11, 12 and 16 use
//   the polynomials of the document's TPG examples (x^12+x^7+x^4+x^3+1 is
//   given in the text; the others match the tap positions drawn in its TPG
//   figures); the remaining degrees come from standard maximal-length tables.
// * tpg_plan(): procedure MC_TPG of the document run at elaboration time. It
//   lays the cells of the kernel input registers, plus any extra D flip-flops,
//   along one string of flip-flops, gives every flip-flop a label L_k, and
//   finds the LFSR degree M. Single-cone kernels (procedure SC_TPG) are the
//   one-cone special case and give the same result.
//
//   Inputs: nreg registers R_1..R_nreg with widths w[0..nreg-1]; ncone output
//   cones; seq_at(seq, x, i) is the sequential length from register R_(i+1) to the
//   output port of cone x, or NO_DEP when cone x does not depend on it.
//   Queries (argument 'what'):
//     PLAN_NFF    number of flip-flops in the string
//     PLAN_M      LFSR degree M (labels L_1..L_M form the LFSR)
//     PLAN_LABEL  label k of flip-flop a (string position a, 0 = first)
//     PLAN_CELLFF string position of cell b (0 = R_(a+1),1, the MSB) of register a
//     PLAN_SRC    string position of the flip-flop that carries label a
//                 (the last one, as step 6 of the procedure says), -1 if none
//     PLAN_ERR    1 when the kernel is outside what the procedure handles
//                 (no cone, M outside 2..64, string too long)
package bibs_pkg;

  localparam int unsigned MAX_REGS  = 8;
  localparam int unsigned MAX_CONES = 8;
  localparam int unsigned MAX_FF    = 256;
  localparam int          NO_DEP    = -1;

  typedef enum logic [1:0] {
    BM_SCAN   = 2'b00,
    BM_RESET  = 2'b01,
    BM_TEST   = 2'b10,
    BM_NORMAL = 2'b11
  } bilbo_mode_e;

  typedef int unsigned width_list_t [MAX_REGS];
  // sequential-length tables are packed (signed bytes) so that they can be
  // built and read by constant functions: table[x][i] is cone x, register i
  typedef logic [MAX_REGS-1:0][7:0]  seq_row_t;
  typedef seq_row_t [MAX_CONES-1:0]  seq_table_t;

  typedef enum int {
    PLAN_NFF    = 0,
    PLAN_M      = 1,
    PLAN_LABEL  = 2,
    PLAN_CELLFF = 3,
    PLAN_SRC    = 4,
    PLAN_ERR    = 5
  } plan_query_e;

  // Table builders. A cone row lists the sequential lengths of registers
  // R_1, R_2, ... (NO_DEP = cone does not use the register); rows and
  // registers not given depend on nothing.
  localparam seq_row_t   NO_ROW   = {MAX_REGS{8'hFF}};
  localparam seq_table_t NO_TABLE = {MAX_CONES{NO_ROW}};

  function automatic seq_row_t row2(input byte d0, input byte d1);
    seq_row_t r = NO_ROW;
    r[0] = 8'(d0); r[1] = 8'(d1);
    return r;
  endfunction

  function automatic seq_row_t row3(input byte d0, input byte d1, input byte d2);
    seq_row_t r = NO_ROW;
    r[0] = 8'(d0); r[1] = 8'(d1); r[2] = 8'(d2);
    return r;
  endfunction

  function automatic seq_row_t row8(input byte d0, input byte d1, input byte d2, input byte d3,
                                    input byte d4, input byte d5, input byte d6, input byte d7);
    seq_row_t r;
    r[0] = 8'(d0); r[1] = 8'(d1); r[2] = 8'(d2); r[3] = 8'(d3);
    r[4] = 8'(d4); r[5] = 8'(d5); r[6] = 8'(d6); r[7] = 8'(d7);
    return r;
  endfunction

  function automatic seq_table_t tab1(input seq_row_t c0);
    seq_table_t t = NO_TABLE;
    t[0] = c0;
    return t;
  endfunction

  function automatic seq_table_t tab2(input seq_row_t c0, input seq_row_t c1);
    seq_table_t t = NO_TABLE;
    t[0] = c0; t[1] = c1;
    return t;
  endfunction

  function automatic seq_table_t tab3(input seq_row_t c0, input seq_row_t c1, input seq_row_t c2);
    seq_table_t t = NO_TABLE;
    t[0] = c0; t[1] = c1; t[2] = c2;
    return t;
  endfunction

  // sequential length of register i for cone x (NO_DEP when unused)
  function automatic int seq_at(input seq_table_t t, input int x, input int i);
    return int'($signed(t[x][i]));
  endfunction

  // total width of the first n registers of a width list
  function automatic int unsigned sum_w(input int unsigned n, input width_list_t w);
    int unsigned s = 0;
    for (int i = 0; i < int'(n) && i < int'(MAX_REGS); i++) s += w[i];
    return s;
  endfunction

  function automatic logic [63:0] prim_poly(input int unsigned n);
    prim_poly = 64'h0;
    case (n)
       2: prim_poly = 64'h0000000000000002;
       3: prim_poly = 64'h0000000000000004;
       4: prim_poly = 64'h0000000000000008;
       5: prim_poly = 64'h0000000000000008;
       6: prim_poly = 64'h0000000000000020;
       7: prim_poly = 64'h0000000000000040;
       8: prim_poly = 64'h0000000000000062;
       9: prim_poly = 64'h0000000000000010;
      10: prim_poly = 64'h0000000000000080;
      11: prim_poly = 64'h0000000000000004;
      12: prim_poly = 64'h0000000000000098;
      13: prim_poly = 64'h000000000000001a;
      14: prim_poly = 64'h000000000000002a;
      15: prim_poly = 64'h0000000000004000;
      16: prim_poly = 64'h000000000000002c;
      17: prim_poly = 64'h0000000000004000;
      18: prim_poly = 64'h0000000000000800;
      19: prim_poly = 64'h0000000000000046;
      20: prim_poly = 64'h0000000000020000;
      21: prim_poly = 64'h0000000000080000;
      22: prim_poly = 64'h0000000000200000;
      23: prim_poly = 64'h0000000000040000;
      24: prim_poly = 64'h0000000000c20000;
      25: prim_poly = 64'h0000000000400000;
      26: prim_poly = 64'h0000000000000046;
      27: prim_poly = 64'h0000000000000026;
      28: prim_poly = 64'h0000000002000000;
      29: prim_poly = 64'h0000000008000000;
      30: prim_poly = 64'h0000000000000052;
      31: prim_poly = 64'h0000000010000000;
      32: prim_poly = 64'h0000000000400006;
      33: prim_poly = 64'h0000000000100000;
      34: prim_poly = 64'h0000000008000006;
      35: prim_poly = 64'h0000000200000000;
      36: prim_poly = 64'h0000000002000000;
      37: prim_poly = 64'h000000000000003e;
      38: prim_poly = 64'h0000000000000062;
      39: prim_poly = 64'h0000000800000000;
      40: prim_poly = 64'h0000004000280000;
      41: prim_poly = 64'h0000004000000000;
      42: prim_poly = 64'h0000020000180000;
      43: prim_poly = 64'h0000046000000000;
      44: prim_poly = 64'h0000080000060000;
      45: prim_poly = 64'h0000160000000000;
      46: prim_poly = 64'h0000200006000000;
      47: prim_poly = 64'h0000040000000000;
      48: prim_poly = 64'h0000800000300000;
      49: prim_poly = 64'h0000010000000000;
      50: prim_poly = 64'h0002000001800000;
      51: prim_poly = 64'h0004001800000000;
      52: prim_poly = 64'h0002000000000000;
      53: prim_poly = 64'h0010006000000000;
      54: prim_poly = 64'h0020000000060000;
      55: prim_poly = 64'h0000000080000000;
      56: prim_poly = 64'h0080000c00000000;
      57: prim_poly = 64'h0004000000000000;
      58: prim_poly = 64'h0000008000000000;
      59: prim_poly = 64'h0400006000000000;
      60: prim_poly = 64'h0800000000000000;
      61: prim_poly = 64'h1000600000000000;
      62: prim_poly = 64'h2000000000000060;
      63: prim_poly = 64'h4000000000000000;
      64: prim_poly = 64'hb000000000000000;
      default: prim_poly = 64'h0;
    endcase
  endfunction

  // the whole plan in one value, so that a module evaluates MC_TPG only once
  typedef struct packed {
    logic [15:0]                   nff;       // flip-flops in the string
    logic [15:0]                   m;         // LFSR degree
    logic                          err;       // kernel outside the procedure
    logic [MAX_REGS-1:0][15:0]     first_ff;  // string position of R_(i+1),1
    logic [MAX_FF-1:0][15:0]       lab;       // label of each string position
  } tpg_plan_t;

  function automatic tpg_plan_t tpg_plan_all(input int unsigned nreg, input width_list_t w,
                                             input int unsigned ncone, input seq_table_t seq);
    int  lab      [MAX_FF];
    int  k        [MAX_REGS];
    int  first_ff [MAX_REGS];
    int  first_lb [MAX_REGS];
    int  n_ff, best, dmax, cand, kk, mm, mx, lo, hi;
    tpg_plan_t res;
    bit  dep, any, err;
    n_ff = 0; best = 0; dmax = 0; cand = 0; kk = 0; mm = 0; mx = 0; lo = 0; hi = 0;
    err  = 1'b0;
    for (int f = 0; f < MAX_FF; f++) lab[f] = 0;
    for (int i = 0; i < MAX_REGS; i++) begin
      k[i] = 0; first_ff[i] = 0; first_lb[i] = 0;
    end
    if (nreg < 1 || nreg > MAX_REGS || ncone < 1 || ncone > MAX_CONES) err = 1'b1;
    // step 2: cells of R_1 take labels L_1..L_r1
    if (!err) begin
      first_ff[0] = 0;
      first_lb[0] = 1;
      for (int j = 0; j < int'(w[0]); j++) begin
        if (n_ff < MAX_FF) lab[n_ff] = j + 1;
        n_ff++;
      end
      k[0] = int'(w[0]);
      // step 3: every further register, displaced against all earlier ones
      for (int i = 1; i < int'(nreg); i++) begin
        any  = 1'b0;
        best = 0;
        for (int j = 0; j < i; j++) begin
          dep  = 1'b0;
          dmax = 0;
          for (int x = 0; x < int'(ncone); x++) begin
            if (seq_at(seq, x, i) != NO_DEP && seq_at(seq, x, j) != NO_DEP) begin
              cand = seq_at(seq, x, j) - seq_at(seq, x, i);
              if (!dep || cand > dmax) dmax = cand;
              dep = 1'b1;
            end
          end
          if (dep) begin
            cand = dmax + k[j] - k[i-1];
            if (!any || cand > best) best = cand;
            any = 1'b1;
          end
        end
        if (best < 0) begin
          kk = k[i-1] + best;              // share |best| signals with R_(i-1)
        end else begin
          for (int l = 1; l <= best; l++) begin   // separating flip-flops
            if (n_ff < MAX_FF) lab[n_ff] = k[i-1] + l;
            n_ff++;
          end
          kk = k[i-1] + best;
        end
        first_ff[i] = n_ff;
        first_lb[i] = kk + 1;
        for (int j = 0; j < int'(w[i]); j++) begin
          if (n_ff < MAX_FF) lab[n_ff] = kk + j + 1;
          n_ff++;
        end
        k[i] = kk + int'(w[i]);
      end
      // a displacement larger than the register before it can push labels
      // below 1 (the document then starts the LFSR at L_0); renumber so that
      // the smallest label is 1, which changes nothing but the names
      lo = 1;
      for (int f = 0; f < n_ff && f < MAX_FF; f++) if (lab[f] < lo) lo = lab[f];
      if (lo < 1) begin
        for (int f = 0; f < n_ff && f < MAX_FF; f++) lab[f] += 1 - lo;
        for (int i = 0; i < int'(nreg); i++) begin
          k[i] += 1 - lo;
          first_lb[i] += 1 - lo;
        end
      end
      // step 4: LFSR stages sufficient for every cone (logical span)
      mm = 0;
      for (int x = 0; x < int'(ncone); x++) begin
        lo = -1;
        hi = -1;
        for (int i = 0; i < int'(nreg); i++) begin
          if (seq_at(seq, x, i) != NO_DEP) begin
            if (lo < 0) lo = i;
            hi = i;
          end
        end
        if (lo >= 0) begin
          cand = k[hi] - first_lb[lo] + 1 + seq_at(seq, x, hi) - seq_at(seq, x, lo);
          if (cand > mm) mm = cand;
        end
      end
      // step 5: extend the string when the LFSR is longer than the labels used
      mx = 0;
      for (int f = 0; f < n_ff && f < MAX_FF; f++) if (lab[f] > mx) mx = lab[f];
      for (int l = mx + 1; l <= mm; l++) begin
        if (n_ff < MAX_FF) lab[n_ff] = l;
        n_ff++;
      end
      if (n_ff > int'(MAX_FF) || mm < 2 || mm > 64) err = 1'b1;
      for (int f = 0; f < n_ff && f < MAX_FF; f++) if (lab[f] < 1) err = 1'b1;
    end
    res.nff = 16'(n_ff);
    res.m   = 16'(mm);
    res.err = err;
    for (int i = 0; i < int'(MAX_REGS); i++) res.first_ff[i] = 16'(first_ff[i]);
    for (int f = 0; f < int'(MAX_FF); f++) res.lab[f] = 16'(lab[f]);
    return res;
  endfunction

  // string position of the (last) flip-flop carrying label l, -1 if none
  function automatic int plan_src(input tpg_plan_t p, input int l);
    int r = -1;
    for (int f = 0; f < int'(p.nff) && f < int'(MAX_FF); f++)
      if (int'($signed(p.lab[f])) == l) r = f;
    return r;
  endfunction

  // single queries on the plan, see the list at the top of this file
  function automatic int tpg_plan(input int unsigned nreg, input width_list_t w,
                                  input int unsigned ncone, input seq_table_t seq,
                                  input plan_query_e what, input int a, input int b);
    tpg_plan_t p = tpg_plan_all(nreg, w, ncone, seq);
    int res;
    case (what)
      PLAN_NFF:    res = int'(p.nff);
      PLAN_M:      res = int'(p.m);
      PLAN_LABEL:  res = (a >= 0 && a < MAX_FF) ? int'($signed(p.lab[a])) : 0;
      PLAN_CELLFF: res = (a >= 0 && a < MAX_REGS) ? int'(p.first_ff[a]) + b : 0;
      PLAN_SRC:    res = plan_src(p, a);
      PLAN_ERR:    res = int'(p.err);
      default:     res = 0;
    endcase
    return res;
  endfunction

endpackage
